// phase_mapping: centre phase of a sampling-error region.
//
// The sampling period (-pi..pi) is M_PHASES clock phases, so region r, which
// spans [(r-4)*pi/4, (r-3)*pi/4], maps to its centre (2r-7)*pi/8, that is
// (2r-7)*M_PHASES/16 clock phases: -14, -10, -6, -2, 2, 6, 10, 14 for M = 32.
// The centre-of-region rule and the eight mapping phases follow the document;
// rounding for an M that is not a multiple of 16 is this design's choice.
// Combinational.
module phase_mapping
  import fdts_pkg::*;
#(
  parameter int M_PHASES = 32
) (
  input  logic [2:0]            region,
  output logic signed [PHW-1:0] phase
);
  always_comb phase = PHW'(((2 * int'(region) - 7) * M_PHASES) / 16);
endmodule
