// tb_ls_slope: least-squares slope with outlier rejection against a real-
// valued reference.  Points lie on random lines y = s*k + b with small noise;
// some sets carry one or two outliers 15000..17000 counts off the line (far
// beyond THRESH = 8192) and some entries are masked off.  The reference fits
// with intercept, drops points farther than THRESH from the first line and
// fits again; the DUT slope (4 fraction bits) must agree within 0.2 counts
// per subcarrier, the rejection count must match, and done must come within
// 200 clocks of start.
module tb_ls_slope;
  localparam int NPTS = 12, AW = 16, KW = 5, SFB = 4, THRESH = 8192, DIVW = 40;
  logic clk = 0, rst_n = 0, start = 0, busy, done, ok;
  logic signed [KW-1:0] k [NPTS];
  logic signed [AW-1:0] y [NPTS];
  logic [NPTS-1:0] keep = '0;
  logic signed [DIVW-1:0] slope;
  logic [3:0] n_rejected;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ls_slope #(.NPTS(NPTS), .AW(AW), .KW(KW), .SFB(SFB), .THRESH(THRESH), .DIVW(DIVW)) dut (.*);

  function automatic void fit(input logic [NPTS-1:0] m, output real s, output real b, output int n);
    real sk = 0, skk = 0, sy = 0, sky = 0;
    n = 0;
    for (int i = 0; i < NPTS; i++) if (m[i]) begin
      n++; sk += real'(k[i]); skk += real'(k[i]) * real'(k[i]); sy += real'(y[i]); sky += real'(k[i]) * real'(y[i]);
    end
    s = (n * sky - sk * sy) / (n * skk - sk * sk);
    b = (sy - s * sk) / n;
  endfunction

  initial begin
    real s0, b0, s, b, r;
    int n, nrej, cyc;
    logic [NPTS-1:0] m;
    for (int i = 0; i < NPTS; i++) k[i] = KW'((i < 6) ? -(i + 1) : i - 5);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      s0 = real'($urandom_range(0, 2000)) - 1000.0;
      b0 = real'($urandom_range(0, 3000)) - 1500.0;
      for (int i = 0; i < NPTS; i++)
        y[i] = AW'($rtoi(s0 * k[i] + b0) + int'($urandom_range(0, 200)) - 100);
      if (t % 3 == 1) y[t % NPTS] = y[t % NPTS] + AW'(15000 + $urandom_range(0, 2000));
      if (t % 6 == 2) y[(t + 5) % NPTS] = y[(t + 5) % NPTS] - AW'(15000 + $urandom_range(0, 2000));
      keep = '1;
      if (t % 4 == 3) keep[$urandom_range(0, NPTS - 1)] = 1'b0;
      // reference
      m = keep;
      fit(m, s, b, n);
      nrej = 0;
      for (int i = 0; i < NPTS; i++) begin
        r = real'(y[i]) - s * real'(k[i]) - b;
        if (m[i] && (r > THRESH || r < -THRESH)) begin m[i] = 1'b0; nrej++; end
      end
      fit(m, s, b, n);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done && cyc < 400) begin @(negedge clk); cyc++; end
      checks++;
      if (!done || !ok || cyc > 200 || int'(n_rejected) != nrej ||
          real'(slope) / 16.0 - s > 0.2 || s - real'(slope) / 16.0 > 0.2) begin
        failures++;
        $display("FAIL: set %0d slope %0.3f expected %0.3f, rejected %0d expected %0d, %0d clocks",
                 t, real'(slope) / 16.0, s, n_rejected, nrej, cyc);
      end
    end
    // fewer than two points: no slope
    keep = 12'b000000000001;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (!done && cyc < 400) begin @(negedge clk); cyc++; end
    checks++;
    if (!done || ok || slope != 0) begin failures++; $display("FAIL: single point"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
