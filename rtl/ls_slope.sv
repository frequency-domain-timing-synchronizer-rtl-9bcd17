// ls_slope: least-squares slope of phase difference against subcarrier index,
// with one round of outlier rejection.
//
// Pass 1 fits the line y = s*k + b to the entries whose keep bit is set,
// solving the normal equations (A^T A) x = A^T b in closed form:
//   s = (n*Sky - Sk*Sy) / (n*Skk - Sk^2),   b = (Sy - s*Sk) / n.
// Every kept entry whose vertical distance |y - s*k - b| to that line exceeds
// THRESH (angle counts) is then dropped, and pass 2 fits the slope again on
// what is left.  If pass 2 has fewer than two distinct indices the pass-1
// slope stands; if pass 1 has none, the result is 0 with ok = 0.
// The slope is in angle counts per subcarrier with SFB fraction bits.
// Sequential: one entry per clock in the sums and in the rejection scan, and
// a shared radix-2 divider (three divisions), so `done` follows `start` after
// 3*NPTS + 3*(DIVW+2) + 2 clocks or so; busy is high meanwhile.
// The fit with intercept, the vertical distance and THRESH = pi/4 are choices
// of this design; the document gives the steps but not these details.
module ls_slope #(
  parameter int NPTS   = 12,
  parameter int AW     = 16,
  parameter int KW     = 5,
  parameter int SFB    = 4,
  parameter int THRESH = 8192,   // pi/4 with AW = 16
  parameter int DIVW   = 40
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [KW-1:0]  k    [NPTS],
  input  logic signed [AW-1:0]  y    [NPTS],
  input  logic [NPTS-1:0]       keep,
  output logic                  busy,
  output logic                  done,
  output logic                  ok,
  output logic signed [DIVW-1:0] slope,
  output logic [$clog2(NPTS+1)-1:0] n_rejected
);
  typedef enum logic [2:0] {S_IDLE, S_ACC, S_SOLVE, S_WAIT_S, S_INT, S_WAIT_B, S_RES, S_DONE} state_e;
  state_e state;

  localparam int IXW = $clog2(NPTS);

  logic signed [KW-1:0]  kr [NPTS];
  logic signed [AW-1:0]  yr [NPTS];
  logic [NPTS-1:0]       mask;
  logic [IXW-1:0]        idx;
  logic                  pass2;
  logic signed [31:0]    n, sk, skk, sy, sky;
  logic signed [DIVW-1:0] b;

  logic                   d_start, d_done, d_div0;
  logic signed [DIVW-1:0] d_num, d_den, d_quo;

  seq_div #(.W(DIVW)) u_div (
    .clk, .rst_n, .start(d_start), .num(d_num), .den(d_den),
    .busy(), .done(d_done), .div0(d_div0), .quo(d_quo)
  );

  logic signed [DIVW-1:0] num_s, den_s, num_b, resid, r_abs;
  always_comb begin
    num_s = (DIVW'(n) * DIVW'(sky) - DIVW'(sk) * DIVW'(sy)) <<< SFB;
    den_s =  DIVW'(n) * DIVW'(skk) - DIVW'(sk) * DIVW'(sk);
    num_b = (DIVW'(sy) <<< SFB) - slope * DIVW'(sk);
    resid = (DIVW'(yr[idx]) <<< SFB) - slope * DIVW'(kr[idx]) - b;
    r_abs = resid < 0 ? -resid : resid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      for (int i = 0; i < NPTS; i++) begin kr[i] <= '0; yr[i] <= '0; end
      mask <= '0; idx <= '0; pass2 <= 1'b0;
      n <= '0; sk <= '0; skk <= '0; sy <= '0; sky <= '0; b <= '0;
      d_start <= 1'b0; d_num <= '0; d_den <= '0;
      done <= 1'b0; ok <= 1'b0; slope <= '0; n_rejected <= '0;
    end else begin
      d_start <= 1'b0;
      done    <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          kr <= k; yr <= y; mask <= keep;
          idx <= '0; pass2 <= 1'b0; n_rejected <= '0;
          n <= '0; sk <= '0; skk <= '0; sy <= '0; sky <= '0;
          state <= S_ACC;
        end
        S_ACC: begin
          if (mask[idx]) begin
            n   <= n + 1;
            sk  <= sk + 32'(kr[idx]);
            skk <= skk + 32'(kr[idx]) * 32'(kr[idx]);
            sy  <= sy + 32'(yr[idx]);
            sky <= sky + 32'(kr[idx]) * 32'(yr[idx]);
          end
          if (idx == IXW'(NPTS - 1)) state <= S_SOLVE;
          else idx <= idx + 1'b1;
        end
        S_SOLVE: begin
          d_num   <= num_s;
          d_den   <= den_s;
          d_start <= 1'b1;
          state   <= S_WAIT_S;
        end
        S_WAIT_S: if (d_done) begin
          if (d_div0) begin
            if (!pass2) begin slope <= '0; ok <= 1'b0; end
            else ok <= 1'b1;          // keep the pass-1 slope
            state <= S_DONE;
          end else begin
            slope <= d_quo;
            ok    <= 1'b1;
            if (pass2) state <= S_DONE;
            else       state <= S_INT;
          end
        end
        S_INT: begin
          // slope now holds the pass-1 value; divide for the intercept
          d_num   <= num_b;
          d_den   <= DIVW'(n);
          d_start <= 1'b1;
          state   <= S_WAIT_B;
        end
        S_WAIT_B: if (d_done) begin
          b     <= d_quo;
          idx   <= '0;
          state <= S_RES;
        end
        S_RES: begin
          if (mask[idx] && r_abs > (DIVW'(THRESH) <<< SFB)) begin
            mask[idx]  <= 1'b0;
            n_rejected <= n_rejected + 1'b1;
          end
          if (idx == IXW'(NPTS - 1)) begin
            idx   <= '0;
            pass2 <= 1'b1;
            n <= '0; sk <= '0; skk <= '0; sy <= '0; sky <= '0;
            state <= S_ACC;
          end else idx <= idx + 1'b1;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
