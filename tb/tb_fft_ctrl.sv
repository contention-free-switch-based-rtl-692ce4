// tb_fft_ctrl: runs the sequencer through two frames (the second with gaps in
// in_fire) and checks: exactly N accepted samples end the load phase and
// load_idx counts them; the compute phase lasts 2 * 256 * 10 = 5120 cycles and
// walks stage, slot and the read/write cycle in order; the unload phase lasts N
// cycles with unload_idx = 0 .. N-1 and last_unload on the final one; then the
// sequencer is back in the load phase.
module tb_fft_ctrl;
  import fft_pkg::*;
  localparam int N = 1024;
  localparam int NPE = 2;
  localparam int SLOTS = N / (2 * NPE);
  localparam int STAGES = 10;

  logic clk = 1'b0, rst_n = 1'b0, in_fire = 1'b0;
  phase_e phase;
  logic [9:0] load_idx, unload_idx;
  logic [3:0] stage;
  logic [7:0] slot;
  logic wr_cycle, last_unload;
  int checks = 0, failures = 0;

  fft_ctrl #(.N(N), .NPE(NPE)) dut (.clk, .rst_n, .in_fire, .phase, .load_idx, .stage, .slot,
                                     .wr_cycle, .unload_idx, .last_unload);

  always #1 clk = ~clk;

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  task automatic frame(input bit gaps);
    int accepted = 0;
    while (accepted < N) begin
      @(negedge clk);
      expect_true(phase == PH_LOAD, "not in load phase while loading");
      expect_true(int'(load_idx) == accepted, "load_idx off");
      in_fire = gaps ? ($urandom_range(2) != 0) : 1'b1;
      if (in_fire) accepted++;
    end
    @(negedge clk);
    in_fire = 0;
    for (int c = 0; c < 2 * SLOTS * STAGES; c++) begin
      expect_true(phase == PH_COMPUTE, "compute phase too short");
      expect_true(int'(stage) == c / (2 * SLOTS) && int'(slot) == (c / 2) % SLOTS &&
                  wr_cycle == c[0], "stage/slot/cycle sequence off");
      @(negedge clk);
    end
    for (int k = 0; k < N; k++) begin
      expect_true(phase == PH_UNLOAD, "compute phase too long or unload too short");
      expect_true(int'(unload_idx) == k, "unload_idx off");
      expect_true(last_unload == (k == N - 1), "last_unload off");
      @(negedge clk);
    end
    expect_true(phase == PH_LOAD, "not back in load phase");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    expect_true(phase == PH_LOAD && load_idx == 0, "reset state");
    rst_n = 1'b1;
    frame(1'b0);
    frame(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
