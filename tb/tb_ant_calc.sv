// tb_ant_calc: one antenna's calculator set fed by six preambles and command
// words as the sequencer would issue them, without closing the loop.  The
// preambles are 802.11 short preambles sampled at chosen instants tau_l (in
// clock phases; bin k is rotated by 2*pi*k*tau/(M*N) and the amplitude falls
// off away from tau = 0).  Checks: SCO from preambles 1-2 and 3-4 (m = 1),
// and from 3-5 (m = 2) with a phase step h between them that must be removed,
// each within 300 ppm of the drift put in; the phase estimate after
// preambles 4, 5, 6 sampled at e, e - M/4, e + M/4 must be the centre of the
// region of e.
module tb_ant_calc;
  import fdts_pkg::*;
  localparam int N = 16, DW = 12, KMAX = 6, M = 32;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, clear = 0, bin_valid = 0;
  ant_ctrl_t ctrl;
  logic [3:0] bin_idx = 0;
  logic signed [DW-1:0] bin_re = 0, bin_im = 0;
  logic busy, sco_valid, sco_ok, sco_deleted, ph_valid;
  logic signed [DLW-1:0] sco_delta;
  logic [3:0] sco_rejected;
  logic [2:0] ph_region;
  logic signed [PHW-1:0] ph_est;
  int checks = 0, failures = 0;
  int n_sco = 0, n_ph = 0;
  real last_sco;

  always #5 clk = ~clk;
  ant_calc #(.N_FFT(N), .DW(DW), .KMAX(KMAX), .M_PHASES(M)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (sco_valid) begin n_sco++; last_sco = real'(sco_delta) / 1048576.0; end
    if (ph_valid) n_ph++;
  end

  function automatic int stf_sign(input int ks);
    case (ks)
      -6: return  1; -5: return -1; -4: return  1; -3: return -1;
      -2: return -1; -1: return  1;  1: return -1;  2: return -1;
       3: return  1;  4: return  1;  5: return  1;  6: return  1;
      default: return 0;
    endcase
  endfunction

  task automatic send(input real tau, input real cpe);
    real w, amp, th;
    int ks;
    w = tau - M * $floor((tau + M / 2.0) / M);
    amp = 800.0 * (0.4 + 0.6 * $cos(PI * w / M) ** 2);
    for (int k = 0; k < N; k++) begin
      ks = (k < N / 2) ? k : k - N;
      th = 2.0 * PI * ks * tau / (M * N) + cpe + PI / 4.0;
      bin_re = DW'($rtoi(stf_sign(ks) * amp * $cos(th)));
      bin_im = DW'($rtoi(stf_sign(ks) * amp * $sin(th)));
      bin_idx = 4'(k);
      bin_valid = 1;
      @(negedge clk);
    end
    bin_valid = 0;
  endtask

  task automatic wait_sco(input real expv, input string what);
    int n0, cyc;
    n0 = n_sco; cyc = 0;
    while (n_sco == n0 && cyc < 400) begin @(negedge clk); cyc++; end
    checks++;
    if (n_sco == n0 || last_sco - expv > 3.0e-4 || expv - last_sco > 3.0e-4) begin
      failures++;
      $display("FAIL: %s: %0.6f expected %0.6f", what, last_sco, expv);
    end
  endtask

  task automatic packet(input real e, input real d, input int h);
    real dphi;
    dphi = d * N * M;   // drift per preamble in phases
    clear = 1; @(negedge clk); clear = 0;
    ctrl = '0; ctrl.store_en = 1; ctrl.store_bank = 0;
    send(e - 3 * dphi, 0.0);
    ctrl = '0; ctrl.pair_en = 1; ctrl.ref_bank = 0;
    send(e - 2 * dphi, 0.04);
    wait_sco(d, "SCO of preambles 1-2");
    ctrl = '0; ctrl.store_en = 1; ctrl.store_bank = 1;
    send(e - dphi, 0.08);
    ctrl = '0; ctrl.pair_en = 1; ctrl.ref_bank = 1; ctrl.td_sel = TD_ZERO;
    send(e, 0.12);
    wait_sco(d, "SCO of preambles 3-4");
    // preamble 5 sampled a quarter period early: step h = -M/4 - drift
    ctrl = '0; ctrl.pair_en = 1; ctrl.ref_bank = 1; ctrl.m_log2 = 1; ctrl.h = PHW'(h);
    ctrl.td_sel = TD_MINUS;
    send(e + dphi + h, 0.16);
    ctrl = '0; ctrl.td_sel = TD_PLUS;
    send(e + 8.0, 0.2);
    wait_sco(d, "SCO of preambles 3-5 with the step removed");
    repeat (3) @(negedge clk);
    checks++;
    if (n_ph != 1 || int'(ph_est) != (2 * int'($floor((e + 16.0) / 4.0)) - 7) * 2) begin
      failures++;
      $display("FAIL: phase estimate %0d for e=%0.2f", ph_est, e);
    end
    n_ph = 0;
  endtask

  initial begin
    ctrl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    packet(-13.0,  0.010, -13);
    packet( -5.5, -0.020,  -3);
    packet(  3.0,  0.0005, -8);
    packet( 11.0, -0.001,  -7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
