// tb_sco_estimator: clock offset estimate of one antenna from two preambles.
//
// A reference preamble is written into a behavioural bin store; a second
// preamble, whose bin k is the first one rotated by 2*pi*k*delta*m plus a
// common phase plus, when h is non-zero, the rotation 2*pi*k*h/(M*N) of a
// known phase step, then streams through the estimator.  The estimate must
// match delta within 1/1000 of a count per ppm scale (see tolerance below).
// Cases cover m = 1 and 2, both signs, a phase step that must be removed,
// and a corrupted subcarrier.  The result must arrive within 250 clocks.
module tb_sco_estimator;
  import fdts_pkg::*;
  localparam int N = 16, DW = 12, KMAX = 6, M = 32;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, clear = 0;
  logic bin_valid = 0, pair_en = 0, m_log2 = 0;
  logic [3:0] bin_idx = 0;
  logic signed [DW-1:0] bin_re = 0, bin_im = 0, ref_re, ref_im;
  logic signed [PHW-1:0] h = 0;
  logic busy, est_valid, est_ok, deleted;
  logic signed [DLW-1:0] delta;
  logic [3:0] n_rej;
  logic signed [DW-1:0] mem_re [N];
  logic signed [DW-1:0] mem_im [N];

  always #5 clk = ~clk;
  assign ref_re = mem_re[bin_idx];
  assign ref_im = mem_im[bin_idx];

  sco_estimator #(.N_FFT(N), .DW(DW), .KMAX(KMAX), .M_PHASES(M)) dut (
    .clk, .rst_n, .clear, .bin_valid, .bin_idx, .bin_re, .bin_im, .ref_re, .ref_im,
    .pair_en, .m_log2, .h, .busy, .est_valid, .est_ok, .delta, .deleted, .n_rejected(n_rej)
  );

  int checks = 0, failures = 0;

  task automatic run(input real d, input int m, input int hh, input int bad_k, input real bad_rot);
    real a0, th, ang, tol;
    int ks, cyc;
    real got;
    // reference preamble
    for (int k = 0; k < N; k++) begin
      ks = (k < N/2) ? k : k - N;
      a0 = 0.37 * ks + 0.2;
      mem_re[k] = DW'($rtoi(900.0 * $cos(a0)));
      mem_im[k] = DW'($rtoi(900.0 * $sin(a0)));
    end
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      ks = (k < N/2) ? k : k - N;
      a0 = 0.37 * ks + 0.2;
      th = 2.0 * PI * ks * d * m + 0.1 + 2.0 * PI * ks * hh / (M * N);
      if (ks == bad_k) th = th + bad_rot;
      ang = a0 + th;
      bin_re = DW'($rtoi(900.0 * $cos(ang)));
      bin_im = DW'($rtoi(900.0 * $sin(ang)));
      bin_idx = k[3:0];
      bin_valid = 1; pair_en = 1; m_log2 = (m == 2); h = PHW'(hh);
      @(negedge clk);
    end
    bin_valid = 0; pair_en = 0;
    cyc = 0;
    while (!est_valid && cyc < 400) begin @(negedge clk); cyc++; end
    got = real'(delta) / 1048576.0;
    tol = 0.0002;
    $display("delta=%0.5f m=%0d h=%0d bad=%0d: est %0.5f deleted=%0d rejected=%0d after %0d clocks",
             d, m, hh, bad_k, got, deleted, n_rej, cyc);
    checks++;
    if (!(est_valid && est_ok && got - d < tol && d - got < tol)) begin
      failures++; $display("FAIL: estimate");
    end
    checks++;
    if (cyc > 250) begin failures++; $display("FAIL: latency"); end
    if (bad_k != 0) begin
      checks++;
      if (!(deleted || n_rej != 0)) begin failures++; $display("FAIL: outlier not removed"); end
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run( 0.02,   1, 0, 0, 0.0);
    run(-0.03,   1, 0, 0, 0.0);
    run( 0.01,   2, 0, 0, 0.0);
    run(-0.004,  2, -9, 0, 0.0);
    run( 0.002,  2, 11, 0, 0.0);
    run( 0.01,   1, 0, 3, 1.5);
    run( 0.01,   1, 0, 2, -1.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
