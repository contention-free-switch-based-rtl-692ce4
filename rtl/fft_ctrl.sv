// fft_ctrl: sequencer of the FFT engine.
//
// Three phases, in a loop:
//   LOAD    - counts accepted input samples (in_fire) up to N.
//   COMPUTE - log2 N stages of N/(2*NPE) slots; each slot takes two cycles on
//             the single-port memories, a read cycle (wr_cycle = 0) and a write
//             cycle (wr_cycle = 1). For N = 1024, NPE = 2 this is
//             2 * 256 * 10 = 5120 cycles.
//   UNLOAD  - steps unload_idx through 0 .. N-1, one output read per cycle.
// The stage and slot counts follow the engine's algorithm; the load and unload
// phases and the asynchronous active-low reset (into LOAD, counters cleared)
// are this design's choices.
module fft_ctrl
  import fft_pkg::*;
#(
  parameter int unsigned N   = 1024,
  parameter int unsigned NPE = 2,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned AW   = $clog2(N / (2 * NPE)),
  localparam int unsigned SW   = $clog2(LOGN)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_fire,
  output phase_e          phase,
  output logic [LOGN-1:0] load_idx,
  output logic [SW-1:0]   stage,
  output logic [AW-1:0]   slot,
  output logic            wr_cycle,
  output logic [LOGN-1:0] unload_idx,
  output logic            last_unload
);

  localparam logic [SW-1:0] LAST_STAGE = SW'(LOGN - 1);

  assign last_unload = (phase == PH_UNLOAD) && (unload_idx == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= PH_LOAD;
      load_idx   <= '0;
      stage      <= '0;
      slot       <= '0;
      wr_cycle   <= 1'b0;
      unload_idx <= '0;
    end else begin
      unique case (phase)
        PH_LOAD: if (in_fire) begin
          load_idx <= load_idx + 1'b1;
          if (load_idx == '1) begin
            phase    <= PH_COMPUTE;
            stage    <= '0;
            slot     <= '0;
            wr_cycle <= 1'b0;
          end
        end
        PH_COMPUTE: begin
          wr_cycle <= ~wr_cycle;
          if (wr_cycle) begin
            slot <= slot + 1'b1;
            if (slot == '1) begin
              stage <= stage + 1'b1;
              if (stage == LAST_STAGE) begin
                phase      <= PH_UNLOAD;
                unload_idx <= '0;
              end
            end
          end
        end
        PH_UNLOAD: begin
          unload_idx <= unload_idx + 1'b1;
          if (unload_idx == '1) phase <= PH_LOAD;
        end
        default: phase <= PH_LOAD;
      endcase
    end
  end

endmodule
