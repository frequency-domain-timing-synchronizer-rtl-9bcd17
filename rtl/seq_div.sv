// seq_div: signed sequential divider used by the least-squares slope unit.
//
// Restoring radix-2 division on magnitudes, one quotient bit per clock, with
// the sign applied at the end, so the quotient is truncated toward zero.
// Pulse `start` with num/den valid; `done` pulses W+1 clocks later with `quo`.
// A zero divisor returns 0 and raises `div0` together with `done`.  A helper
// of this design: the document prescribes a least-squares solution but no
// divider.
module seq_div #(
  parameter int W = 40
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] num,
  input  logic signed [W-1:0] den,
  output logic                busy,
  output logic                done,
  output logic                div0,
  output logic signed [W-1:0] quo
);
  logic [W-1:0]         q, d;
  logic [W-1:0]         r;
  logic                 neg;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0]           r_sh;
  logic [W:0]           r_sub;

  always_comb begin
    r_sh  = {r, q[W-1]};
    r_sub = r_sh - {1'b0, d};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; d <= '0; r <= '0; neg <= 1'b0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; div0 <= 1'b0; quo <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= num[W-1] ? W'(-num) : num;
        d    <= den[W-1] ? W'(-den) : den;
        neg  <= num[W-1] ^ den[W-1];
        r    <= '0;
        cnt  <= '0;
        busy <= 1'b1;
        div0 <= 1'b0;
      end else if (busy) begin
        if (cnt == W[$clog2(W+1)-1:0]) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (d == '0) begin
            quo  <= '0;
            div0 <= 1'b1;
          end else begin
            quo <= neg ? -$signed(q) : $signed(q);
          end
        end else begin
          cnt <= cnt + 1'b1;
          if (!r_sub[W]) begin
            r <= r_sub[W-1:0];
            q <= {q[W-2:0], 1'b1};
          end else begin
            r <= r_sh[W-1:0];
            q <= {q[W-2:0], 1'b0};
          end
        end
      end
    end
  end
endmodule
