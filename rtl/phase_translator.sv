// phase_translator: sampling clock offset -> accumulated sampling phase.
//
// With a normalized offset delta, sample n is taken n*delta sample periods
// late, which is n*delta*M clock phases of an M-phase clock:
//   SCO_phase(n) = n * delta * M.
// The accumulator adds delta*M (delta in units of 2^-DFB, M a power of two,
// so a shift) on every sample_tick and the output is the accumulator rounded
// to whole clock phases.  `load` replaces the rate from the next tick on and
// keeps the phase already accumulated; `clear` zeroes both.
// sco_phase is the accumulator register rounded, so it moves one clock after
// a tick.
// The formula follows the document; the accumulator form is this design's.
module phase_translator
  import fdts_pkg::*;
#(
  parameter int M_PHASES = 32,
  parameter int ACCW     = 48
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  load,
  input  logic signed [DLW-1:0] delta,
  input  logic                  sample_tick,
  output logic signed [PHW-1:0] sco_phase
);
  localparam int MSH = $clog2(M_PHASES);

  logic signed [DLW-1:0]  rate;
  logic signed [ACCW-1:0] acc, acc_rnd;

  always_comb begin
    acc_rnd   = (acc + (ACCW'(1) <<< (DFB - 1))) >>> DFB;
    sco_phase = PHW'(acc_rnd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rate <= '0; acc <= '0;
    end else begin
      if (clear) begin
        rate <= '0;
        acc  <= '0;
      end else begin
        if (load) rate <= delta;
        if (sample_tick) acc <= acc + (ACCW'(rate) <<< MSH);
      end
    end
  end
endmodule
