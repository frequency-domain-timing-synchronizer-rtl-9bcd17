// cordic_atan: pipelined CORDIC in vectoring mode, four-quadrant angle.
//
// The input vector is first turned by +-90 degrees into the right half plane,
// then ITER micro-rotations drive y to zero while the rotation angles
// atan(2^-i) are summed.  The result is a binary angle of AW bits (2^AW counts
// per turn, so +pi and -pi coincide).  The angle table is
// round(atan(2^-i) / (2*pi) * 2^24), scaled down to AW bits.
// Fully pipelined: one vector per clock, out_valid and out_tag appear ITER+1
// clocks after in_valid/in_tag.  The document asks for an inverse tangent
// only; CORDIC, ITER = 14 and the tag pass-through are choices of this design.
module cordic_atan #(
  parameter int IW   = 25,   // input component width
  parameter int AW   = 16,   // angle width, at most 24
  parameter int ITER = 14,   // micro-rotations, at most 20
  parameter int TW   = 4     // width of the tag carried alongside
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [TW-1:0]        in_tag,
  input  logic signed [IW-1:0] x_in,
  input  logic signed [IW-1:0] y_in,
  output logic                 out_valid,
  output logic [TW-1:0]        out_tag,
  output logic signed [AW-1:0] angle
);
  localparam int XW = IW + 2;   // headroom for the CORDIC gain of ~1.65

  function automatic logic signed [AW-1:0] atan_tab(input int i);
    logic [23:0] t;
    case (i)
      0: t = 24'd2097152;  1: t = 24'd1238021;  2: t = 24'd654136;
      3: t = 24'd332050;   4: t = 24'd166669;   5: t = 24'd83416;
      6: t = 24'd41718;    7: t = 24'd20860;    8: t = 24'd10430;
      9: t = 24'd5215;    10: t = 24'd2608;    11: t = 24'd1304;
     12: t = 24'd652;     13: t = 24'd326;     14: t = 24'd163;
     15: t = 24'd81;      16: t = 24'd41;      17: t = 24'd20;
     18: t = 24'd10;      default: t = 24'd5;
    endcase
    return AW'((int'(t) + ((1 << (24 - AW)) >> 1)) >> (24 - AW));
  endfunction

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [AW-1:0] zs [ITER+1];
  logic                 vs [ITER+1];
  logic [TW-1:0]        ts [ITER+1];

  // Stage 0: quarter-turn pre-rotation into x >= 0.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0; ts[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      ts[0] <= in_tag;
      if (x_in >= 0) begin
        xs[0] <= XW'(x_in);
        ys[0] <= XW'(y_in);
        zs[0] <= '0;
      end else if (y_in >= 0) begin
        // rotate by -90 degrees, remember +90
        xs[0] <= XW'(y_in);
        ys[0] <= -XW'(x_in);
        zs[0] <= AW'(1) <<< (AW - 2);
      end else begin
        // rotate by +90 degrees, remember -90
        xs[0] <= -XW'(y_in);
        ys[0] <= XW'(x_in);
        zs[0] <= -(AW'(1) <<< (AW - 2));
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; vs[i+1] <= 1'b0; ts[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        ts[i+1] <= ts[i];
        if (ys[i] > 0) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + atan_tab(i);
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - atan_tab(i);
        end
      end
    end
  end

  assign out_valid = vs[ITER];
  assign out_tag   = ts[ITER];
  assign angle     = zs[ITER];
endmodule
