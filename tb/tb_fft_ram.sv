// tb_fft_ram: fills the 256 x 32 data memory with random words, reads every
// address back in a shuffled order and checks the word arrives exactly one
// cycle after the read, that rdata holds during write and idle cycles, and
// that a write with en low changes nothing.
module tb_fft_ram;
  localparam int DEPTH = 256;
  localparam int WIDTH = 32;

  logic clk = 1'b0, en, we;
  logic [7:0] addr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  fft_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #1 clk = ~clk;

  task automatic chk(input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      if (failures < 10) $display("%s: rdata %h, expected %h", what, rdata, exp);
    end
  endtask

  initial begin : main
    int order [DEPTH];
    en = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      en = 1; we = 1; addr = 8'(i); wdata = model[i];
      @(negedge clk);
    end
    // disabled write must not land
    en = 0; we = 1; addr = 8'd5; wdata = ~model[5];
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < DEPTH; i++) begin
      en = 1; we = 0; addr = 8'(order[i]);
      @(negedge clk);
      chk(model[order[i]], "read");
      // a write cycle next: rdata must hold
      en = 1; we = 1; addr = 8'(order[(i + 1) % DEPTH]); wdata = model[order[(i + 1) % DEPTH]];
      @(negedge clk);
      chk(model[order[i]], "hold on write");
    end
    en = 0; we = 0;
    @(negedge clk);
    chk(model[order[DEPTH-1]], "hold on idle");
    // overwrite and read back
    en = 1; we = 1; addr = 8'd77; wdata = 32'hdead_beef; model[77] = wdata;
    @(negedge clk);
    en = 1; we = 0;
    @(negedge clk);
    chk(32'hdead_beef, "overwrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
