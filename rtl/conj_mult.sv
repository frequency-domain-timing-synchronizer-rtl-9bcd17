// conj_mult: conjugate complex product p = b * conj(a).
//
// a is the bin of the earlier preamble R_{l,k} (Re1, Im1), b the bin of the
// later preamble R_{l+m,k} (Re2, Im2).  The angle of p is the phase difference
// of the two preambles on that subcarrier:
//   p_re = Re2*Re1 + Im2*Im1,  p_im = Im2*Re1 - Re2*Im1
// Four multipliers and two adders, one of them subtracting, as in the
// architecture figure.  One register stage: out_valid follows in_valid by one
// clock.  The full-precision 2*DW+1 bit output is this design's choice.
module conj_mult #(
  parameter int DW = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DW-1:0]    a_re,
  input  logic signed [DW-1:0]    a_im,
  input  logic signed [DW-1:0]    b_re,
  input  logic signed [DW-1:0]    b_im,
  output logic                    out_valid,
  output logic signed [2*DW:0]    p_re,
  output logic signed [2*DW:0]    p_im
);
  logic signed [2*DW-1:0] rr, ii, ir, ri;

  always_comb begin
    rr = b_re * a_re;
    ii = b_im * a_im;
    ir = b_im * a_re;
    ri = b_re * a_im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p_re      <= '0;
      p_im      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        p_re <= (2*DW+1)'(rr) + (2*DW+1)'(ii);
        p_im <= (2*DW+1)'(ir) - (2*DW+1)'(ri);
      end
    end
  end
endmodule
