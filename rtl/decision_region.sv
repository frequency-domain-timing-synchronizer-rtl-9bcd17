// decision_region: which of eight sampling-error regions the phase is in.
//
// dir1 = TD(eps) - TD(eps - M/4) and dir2 = TD(eps) - TD(eps + M/4).  The
// signs of dir1 and dir2 pick a quarter of the sampling period, and which of
// the two is larger in magnitude picks the half of that quarter:
//   region 0 (-pi..-3pi/4)  dir1<0,  dir2<0,  |dir1|<|dir2|
//   region 1 (-3pi/4..-pi/2) dir1>=0, dir2<0,  |dir1|<|dir2|
//   region 2 (-pi/2..-pi/4)  dir1>=0, dir2<0,  |dir1|>=|dir2|
//   region 3 (-pi/4..0)      dir1>=0, dir2>=0, |dir1|>=|dir2|
//   region 4 (0..pi/4)       dir1>=0, dir2>=0, |dir1|<|dir2|
//   region 5 (pi/4..pi/2)    dir1<0,  dir2>=0, |dir1|<|dir2|
//   region 6 (pi/2..3pi/4)   dir1<0,  dir2>=0, |dir1|>=|dir2|
//   region 7 (3pi/4..pi)     dir1<0,  dir2<0,  |dir1|>=|dir2|
// (one sample period spans -pi..pi).  The sign pairs follow the document's
// decision table; comparing magnitudes, treating zero as positive and sending
// ties to the ">=" side are choices of this design.  Combinational.
module decision_region #(
  parameter int DIRW = 30
) (
  input  logic signed [DIRW-1:0] dir1,
  input  logic signed [DIRW-1:0] dir2,
  output logic [2:0]             region
);
  logic            s1, s2, lt;
  logic [DIRW-1:0] a1, a2;

  always_comb begin
    s1 = dir1 < 0;
    s2 = dir2 < 0;
    a1 = s1 ? DIRW'(-dir1) : DIRW'(dir1);
    a2 = s2 ? DIRW'(-dir2) : DIRW'(dir2);
    lt = a1 < a2;
    unique case ({s1, s2})
      2'b11:   region = lt ? 3'd0 : 3'd7;
      2'b01:   region = lt ? 3'd1 : 3'd2;
      2'b00:   region = lt ? 3'd4 : 3'd3;
      default: region = lt ? 3'd5 : 3'd6;   // 2'b10
    endcase
  end
endmodule
