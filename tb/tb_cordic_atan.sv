// tb_cordic_atan: streams vectors at all angles (all four quadrants, the
// axes, magnitudes from 2e4 to 5e6 as the conjugate products have) back to back, one per clock, and checks
// each angle against atan2 within 4 counts of the 16-bit binary angle, the tag
// pass-through, and the pipeline latency of ITER+1 clocks.
module tb_cordic_atan;
  localparam int IW = 25, AW = 16, ITER = 14, TW = 8, NV = 96;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [TW-1:0] in_tag = 0, out_tag;
  logic signed [IW-1:0] x_in = 0, y_in = 0;
  logic signed [AW-1:0] angle;
  real expv [NV];
  int checks = 0, failures = 0, nout = 0, t_in0 = 0, t_out0 = -1, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  cordic_atan #(.IW(IW), .AW(AW), .ITER(ITER), .TW(TW)) dut (.*);

  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    real d;
    if (t_out0 < 0) t_out0 = cyc;
    d = real'(angle) - expv[out_tag];
    if (d > 32768.0) d = d - 65536.0;
    if (d < -32768.0) d = d + 65536.0;
    checks++;
    if (d > 4.0 || d < -4.0 || int'(out_tag) != nout) begin
      failures++;
      $display("FAIL: tag %0d angle %0d expected %0.1f", out_tag, angle, expv[out_tag]);
    end
    nout++;
  end

  initial begin
    real th, mag;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NV; i++) begin
      th = 2.0 * PI * i / NV - PI + 0.013;
      if (i % 12 == 0) th = PI / 2.0 * (i / 12 % 4);   // the axes
      mag = (i % 3 == 0) ? 5.0e6 : ((i % 3 == 1) ? 2.0e5 : 2.0e4);
      x_in = IW'($rtoi(mag * $cos(th)));
      y_in = IW'($rtoi(mag * $sin(th)));
      expv[i] = $atan2(real'(y_in), real'(x_in)) / (2.0 * PI) * 65536.0;
      in_tag = TW'(i);
      in_valid = 1;
      if (i == 0) t_in0 = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (ITER + 4) @(negedge clk);
    checks++;
    // ITER+1 register stages; the monitor sees an output one edge after it is written
    if (nout != NV || t_out0 - t_in0 != ITER + 2) begin
      failures++;
      $display("FAIL: %0d outputs, latency %0d", nout, t_out0 - t_in0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
