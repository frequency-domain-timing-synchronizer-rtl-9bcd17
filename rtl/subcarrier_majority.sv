// subcarrier_majority: majority rule on the sign of the phase differences.
//
// The phase difference between two preambles grows linearly with the
// subcarrier index, so all negative subcarriers (group C1) should show one
// sign and all positive subcarriers (group C2) the other.  Within each group
// the signs of the valid entries are counted and the entries whose sign is in
// the minority are deleted (keep bit cleared).  A tie deletes nothing, and a
// zero angle counts as positive; both are choices of this design.
// Purely combinational.  Entry j of a group is subcarrier -(j+1) or +(j+1).
module subcarrier_majority #(
  parameter int KMAX = 6,
  parameter int AW   = 16
) (
  input  logic signed [AW-1:0] ang_neg [KMAX],
  input  logic signed [AW-1:0] ang_pos [KMAX],
  input  logic [KMAX-1:0]      valid_neg,
  input  logic [KMAX-1:0]      valid_pos,
  output logic [KMAX-1:0]      keep_neg,
  output logic [KMAX-1:0]      keep_pos,
  output logic                 deleted      // at least one entry was deleted
);
  localparam int CW = $clog2(KMAX + 1);

  function automatic logic [KMAX-1:0] vote(input logic signed [AW-1:0] a [KMAX],
                                          input logic [KMAX-1:0] v);
    logic [CW-1:0] nneg, npos;
    logic [KMAX-1:0] k;
    nneg = '0;
    npos = '0;
    for (int j = 0; j < KMAX; j++)
      if (v[j]) begin
        if (a[j] < 0) nneg = nneg + 1'b1;
        else          npos = npos + 1'b1;
      end
    for (int j = 0; j < KMAX; j++) begin
      if (nneg > npos)      k[j] = v[j] && (a[j] < 0);
      else if (npos > nneg) k[j] = v[j] && (a[j] >= 0);
      else                  k[j] = v[j];
    end
    return k;
  endfunction

  always_comb begin
    keep_neg = vote(ang_neg, valid_neg);
    keep_pos = vote(ang_pos, valid_pos);
    deleted  = (keep_neg != valid_neg) || (keep_pos != valid_pos);
  end
endmodule
