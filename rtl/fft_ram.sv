// fft_ram: single-port data memory of the FFT engine.
//
// One access per cycle: with en and we high the word at addr is written at the
// clock edge; with en high and we low the word is read and appears on rdata
// the following cycle (a full cycle from address to data, as the engine's
// memory macros were given). rdata holds its last value otherwise. The engine
// uses 2*NPE of these, each holding N/(2*NPE) complex words (256 x 32 bits in
// the 1024-point configuration). A register array stands in for the hard SRAM
// macro of a physical implementation; the contents are not reset.
module fft_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
