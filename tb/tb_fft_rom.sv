// tb_fft_rom: reads all 512 twiddle words of the 1024-point ROM and compares
// each with round(16384 * cos(2 pi e / N)) and round(-16384 * sin(2 pi e / N))
// from the simulator's own $cos/$sin, checking the one-cycle read latency and
// that rdata holds while en is low.
module tb_fft_rom;
  import fft_pkg::*;
  localparam int N = 1024;
  localparam int DEPTH = N / 2;

  logic clk = 1'b0, en;
  logic [8:0] addr;
  cplx_t rdata;
  int checks = 0, failures = 0;

  fft_rom #(.N(N), .DEPTH(DEPTH)) dut (.clk, .en, .addr, .rdata);

  always #1 clk = ~clk;

  function automatic int fix(input real v);
    real s = v * 16384.0;
    return $rtoi(s >= 0.0 ? s + 0.5 : s - 0.5);
  endfunction

  initial begin
    en = 0; addr = 0;
    @(negedge clk);
    for (int e = 0; e < DEPTH; e++) begin
      real ang;
      ang = 2.0 * 3.14159265358979323846 * e / N;
      en = 1; addr = 9'(e);
      @(negedge clk);
      checks++;
      if (int'(rdata.re) != fix($cos(ang)) || int'(rdata.im) != fix(-$sin(ang))) begin
        failures++;
        if (failures < 10)
          $display("W^%0d = (%0d, %0d), expected (%0d, %0d)", e, rdata.re, rdata.im,
                   fix($cos(ang)), fix(-$sin(ang)));
      end
    end
    // hold while disabled
    en = 0; addr = 9'd0;
    @(negedge clk);
    checks++;
    if (int'(rdata.re) != fix($cos(2.0 * 3.14159265358979323846 * 511 / N))) begin
      failures++;
      $display("rdata changed while en was low");
    end
    // spot values
    en = 1; addr = 9'd256;
    @(negedge clk);
    checks++;
    if (rdata.re != 0 || rdata.im != -16384) begin
      failures++;
      $display("W^256 = (%0d, %0d), expected (0, -16384)", rdata.re, rdata.im);
    end
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
