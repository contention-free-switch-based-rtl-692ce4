// fft_switch: switch fabric between the 2*NPE data memories and the NPE
// butterfly processing elements.
//
// Read side: PE q takes the words read from memories sel_first[q] and
// sel_second[q]. Normally the first goes to input a and the second to b; with
// swap[q] set (the higher-index operand sits in the first memory) they are
// exchanged. Write side: normally c returns to the place a came from and d to
// the place b came from; with shuffle[q] set the two results are crossed so
// that c lands where x_j was and d where x_i was. As both flags act relative
// to the same memory pair, the first memory gets d exactly when swap XOR
// shuffle. The fabric is made of plain multiplexers selected by memory index;
// purely combinational. A memory that no PE selects gets zero write data (the
// memory-management unit never leaves one out).
module fft_switch
  import fft_pkg::*;
#(
  parameter int unsigned NPE = 2,
  localparam int unsigned NMEM = 2 * NPE,
  localparam int unsigned MW   = $clog2(NMEM)
) (
  input  cplx_t         mem_rdata  [NMEM],
  input  logic [MW-1:0] sel_first  [NPE],
  input  logic [MW-1:0] sel_second [NPE],
  input  logic          swap       [NPE],
  input  logic          shuffle    [NPE],
  output cplx_t         pe_a       [NPE],
  output cplx_t         pe_b       [NPE],
  input  cplx_t         pe_c       [NPE],
  input  cplx_t         pe_d       [NPE],
  output cplx_t         mem_wdata  [NMEM]
);

  always_comb begin
    for (int q = 0; q < int'(NPE); q++) begin
      pe_a[q] = swap[q] ? mem_rdata[sel_second[q]] : mem_rdata[sel_first[q]];
      pe_b[q] = swap[q] ? mem_rdata[sel_first[q]]  : mem_rdata[sel_second[q]];
    end
  end

  always_comb begin
    for (int m = 0; m < int'(NMEM); m++) mem_wdata[m] = '0;
    for (int q = 0; q < int'(NPE); q++) begin
      mem_wdata[sel_first[q]]  = (swap[q] ^ shuffle[q]) ? pe_d[q] : pe_c[q];
      mem_wdata[sel_second[q]] = (swap[q] ^ shuffle[q]) ? pe_c[q] : pe_d[q];
    end
  end

endmodule
