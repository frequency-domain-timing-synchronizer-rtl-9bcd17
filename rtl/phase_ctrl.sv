// phase_ctrl: phase select of the multiphase ADC clock.
//
// Combines the sampling phase decisions with the SCO compensation:
//   adcm_phase = offset - sco_phase
// where `offset` sums every step command (the acquisition's quarter-period
// steps and the final phase correction) and sco_phase is the phase
// translator's n*delta*M, subtracted so that the sampling instant moves
// against the clock drift.  adcm_phase is the unwrapped total in clock
// phases; adcm_sel, its value modulo M_PHASES, picks one of the M clock
// phases.  A step takes effect on the next clock; `clear` zeroes the offset.
// The document gives the block's role; the arithmetic is this design's.
module phase_ctrl
  import fdts_pkg::*;
#(
  parameter int M_PHASES = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        step_valid,
  input  logic signed [PHW-1:0]       step,
  input  logic signed [PHW-1:0]       sco_phase,
  output logic signed [PHW-1:0]       adcm_phase,
  output logic [$clog2(M_PHASES)-1:0] adcm_sel
);
  logic signed [PHW-1:0] offset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset <= '0;
    end else if (clear) begin
      offset <= '0;
    end else if (step_valid) begin
      offset <= offset + step;
    end
  end

  always_comb begin
    adcm_phase = offset - sco_phase;
    adcm_sel   = adcm_phase[$clog2(M_PHASES)-1:0];
  end
endmodule
