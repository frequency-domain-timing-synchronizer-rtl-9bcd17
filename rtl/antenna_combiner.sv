// antenna_combiner: average of one estimate over all receive antennas.
//
// Each antenna calculator reports its estimate with a valid pulse; the
// combiner keeps the values and, once every antenna has reported, outputs the
// rounded arithmetic mean (sum + N_ANT/2 rounded toward zero by magnitude)
// with a one-clock out_valid pulse.  `clear` forgets partial reports.
// The document averages the antennas' results; the arithmetic mean and the
// wait-for-all handshake are choices of this design.
module antenna_combiner #(
  parameter int N_ANT = 4,
  parameter int W     = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic [N_ANT-1:0]    in_valid,
  input  logic signed [W-1:0] in_val [N_ANT],
  output logic                out_valid,
  output logic signed [W-1:0] out_val
);
  localparam int SW = W + $clog2(N_ANT) + 1;

  logic signed [W-1:0] held [N_ANT];
  logic [N_ANT-1:0]    have;
  logic signed [SW-1:0] sum, mean;

  always_comb begin
    sum = '0;
    for (int a = 0; a < N_ANT; a++) sum = sum + SW'(held[a]);
    if (sum < 0) mean = (sum - SW'(N_ANT / 2)) / SW'(N_ANT);
    else         mean = (sum + SW'(N_ANT / 2)) / SW'(N_ANT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < N_ANT; a++) held[a] <= '0;
      have <= '0; out_valid <= 1'b0; out_val <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        have <= '0;
      end else if (&have) begin
        out_val   <= W'(mean);
        out_valid <= 1'b1;
        have      <= '0;
      end else begin
        for (int a = 0; a < N_ANT; a++)
          if (in_valid[a]) begin
            held[a] <= in_val[a];
            have[a] <= 1'b1;
          end
      end
    end
  end
endmodule
