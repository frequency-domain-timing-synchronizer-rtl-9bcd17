// tb_fd_timing_sync: end-to-end test of the timing synchronizer at its
// default size (4 antennas, 16-point FFT, 32 clock phases).
//
// The testbench stands in for the multiphase clock, the ADC, the channel and
// the FFT.  For preamble l it computes the sampling instant, in clock phases,
//   tau_l = eps0 + delta*M*N*(l-1) + adcm_phase
// (initial phase error, clock drift, and the synchronizer's own command read
// at the start of the preamble), and produces the 16 FFT bins of an 802.11
// short preamble sampled there: subcarriers +-1..+-6 carry the standard
// +-(1+j) pattern, each antenna has its own mildly frequency-selective
// channel, every preamble gets a small common phase (a residual carrier
// offset), a late sample rotates bin k by 2*pi*k*tau/(M*N), and the amplitude
// falls off as the sampling instant leaves the optimum,
//   a(tau) = 0.4 + 0.6*cos^2(pi*w/M),  w = tau wrapped to [-M/2, M/2),
// which gives the timing detection value its peak at tau = 0.  Small uniform
// noise is added.  Some packets corrupt one subcarrier of preamble 2 so that
// the sign-majority rule or the outlier threshold must act.
// Per packet it checks: the estimated clock offset against the true one, the
// sampling error at the seventh preamble (should be within M/16 plus a
// margin), that exactly six preambles were used, the number of phase steps
// and rate loads, and the estimate of the phase region against the true
// region of preamble 4.  Over all packets every decision region, both signs
// of offset, a majority deletion and a threshold rejection must occur.
module tb_fd_timing_sync;
  import fdts_pkg::*;

  localparam int N_ANT = 4;
  localparam int N_FFT = 16;
  localparam int DW    = 12;
  localparam int M     = 32;
  localparam real PI   = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pkt_start = 1'b0, sample_tick = 1'b0, bin_valid = 1'b0;
  logic [$clog2(N_FFT)-1:0] bin_idx = '0;
  logic signed [DW-1:0] bin_re [N_ANT];
  logic signed [DW-1:0] bin_im [N_ANT];
  logic ready, sync_done;
  logic signed [PHW-1:0] adcm_phase, est_phase;
  logic [$clog2(M)-1:0] adcm_sel;
  logic signed [DLW-1:0] sco_total;
  logic [2:0] region_ant0;
  logic ev_majority, ev_reject, ev_step, ev_rate_load;

  always #5 clk = ~clk;

  fd_timing_sync dut (
    .clk, .rst_n, .pkt_start, .sample_tick, .bin_valid, .bin_idx, .bin_re, .bin_im,
    .ready, .sync_done, .adcm_phase, .adcm_sel, .sco_total, .est_phase, .region_ant0,
    .ev_majority, .ev_reject, .ev_step, .ev_rate_load
  );

  int checks = 0, failures = 0;
  int n_maj = 0, n_rej = 0, n_step = 0, n_load = 0;
  logic [7:0] regions_seen = '0;
  int n_pos = 0, n_neg = 0;

  always @(posedge clk) begin
    if (ev_majority)  n_maj++;
    if (ev_reject)    n_rej++;
    if (ev_step)      n_step++;
    if (ev_rate_load) n_load++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // short-preamble pattern on 16-point bins -6..6 (0 = unused)
  function automatic int stf_sign(input int ks);
    case (ks)
      -6: return  1; -5: return -1; -4: return  1; -3: return -1;
      -2: return -1; -1: return  1;  1: return -1;  2: return -1;
       3: return  1;  4: return  1;  5: return  1;  6: return  1;
      default: return 0;
    endcase
  endfunction

  function automatic real wrap_m(input real t);
    real w;
    w = t - M * $floor((t + M / 2.0) / M);
    return w;
  endfunction

  function automatic int noise(input int amp);
    return int'($urandom_range(0, 2 * amp)) - amp;
  endfunction

  // drive one preamble: 16 bins, one per clock, with one ADC tick each
  task automatic send_preamble(input int l, input real eps0, input real delta,
                               input int inj);
    real tau, amp, th, hr, hi, xr, xi, cr, ci, rot;
    int ks, sg;
    tau = eps0 + delta * M * N_FFT * (l - 1) + real'(adcm_phase);
    amp = 700.0 * (0.4 + 0.6 * $cos(PI * wrap_m(tau) / M) ** 2);
    for (int k = 0; k < N_FFT; k++) begin
      @(negedge clk);
      ks = (k < N_FFT / 2) ? k : k - N_FFT;
      sg = stf_sign(ks);
      for (int a = 0; a < N_ANT; a++) begin
        // channel of antenna a on subcarrier ks
        hr = (0.8 + 0.05 * a) * (1.0 + 0.2 * $cos(0.3 * ks + a));
        hi = (0.8 + 0.05 * a) * (0.2 * $sin(0.3 * ks + a));
        th = 2.0 * PI * ks * tau / (M * N_FFT) + 0.05 * l + 0.7 * a;
        if (a == 0 && l == 2 && inj == 1 && ks == 2)  th = th - ((delta >= 0) ? 1.2 : -1.2);
        if (a == 0 && l == 2 && inj == 2 && ks == 3)  th = th + ((delta >= 0) ? 1.4 : -1.4);
        // X * H * e^{j th}
        xr = sg * amp;
        xi = sg * amp;
        cr = xr * hr - xi * hi;
        ci = xr * hi + xi * hr;
        rot = th;
        bin_re[a] = DW'($rtoi(cr * $cos(rot) - ci * $sin(rot)) + noise(6));
        bin_im[a] = DW'($rtoi(cr * $sin(rot) + ci * $cos(rot)) + noise(6));
      end
      bin_idx     = k[$clog2(N_FFT)-1:0];
      bin_valid   = 1'b1;
      sample_tick = 1'b1;
    end
    @(negedge clk);
    bin_valid   = 1'b0;
    sample_tick = 1'b0;
  endtask

  // tau4_aim: the sampling error wanted at preamble 4; preambles 1 and 2 drift
  // uncompensated, so eps0 = tau4_aim - 2*delta*M*N.
  task automatic run_packet(input real tau4_aim, input real delta_ppm, input int inj);
    real delta, eps0, tau4, tau7, err_sco;
    int used, steps0, loads0, wait_cyc, exp_region;
    delta = delta_ppm * 1.0e-6;
    eps0 = tau4_aim - 2.0 * delta * M * N_FFT;
    steps0 = n_step;
    loads0 = n_load;
    @(negedge clk);
    pkt_start = 1'b1;
    @(negedge clk);
    pkt_start = 1'b0;
    used = 0;
    tau4 = 0.0;
    for (int l = 1; l <= 6; l++) begin
      wait_cyc = 0;
      while (!ready && wait_cyc < 2000) begin
        @(negedge clk);
        wait_cyc++;
      end
      if (l == 4) tau4 = eps0 + delta * M * N_FFT * 3 + real'(adcm_phase);
      send_preamble(l, eps0, delta, inj);
      used++;
    end
    wait_cyc = 0;
    while (!sync_done && wait_cyc < 2000) begin
      @(negedge clk);
      wait_cyc++;
    end
    check(sync_done == 1'b1, "synchronizer finished");
    check(used == 6 && ready == 1'b0, "six preambles used, no more requested");
    @(negedge clk);
    tau7 = wrap_m(eps0 + delta * M * N_FFT * 6 + real'(adcm_phase));
    err_sco = real'(sco_total) / 1048576.0 - delta;
    exp_region = int'($floor((wrap_m(tau4) + M / 2.0) / (M / 8.0)));
    if (exp_region > 7) exp_region = 7;
    $display("packet eps0=%0.1f sco=%0.0f ppm: est sco=%0.0f ppm, region %0d (true %0d), est phase %0d, tau4=%0.2f residual phase %0.2f",
             eps0, delta_ppm, real'(sco_total) / 1.048576, region_ant0, exp_region,
             est_phase, wrap_m(tau4), tau7);
    check(err_sco < 0.0015 && err_sco > -0.0015, "clock offset estimate within 1500 ppm");
    check(tau7 <= 4.0 && tau7 >= -4.0, "sampling error within M/8 phases after sync");
    check(n_step - steps0 == 3, "three phase steps: M1, M2-M1 and the final correction");
    check(n_load - loads0 == 2, "two rate loads: SCO1 then SCO1+SCO2");
    // the region may differ from the true one only when tau4 sits near a border
    if ($floor((wrap_m(tau4) + M / 2.0 + 1.0) / (M / 8.0)) == $floor((wrap_m(tau4) + M / 2.0 - 1.0) / (M / 8.0)))
      check(region_ant0 == exp_region[2:0], "decision region of preamble 4");
    regions_seen[region_ant0] = 1'b1;
    if (delta_ppm > 0) n_pos++;
    if (delta_ppm < 0) n_neg++;
  endtask

  initial begin
    for (int a = 0; a < N_ANT; a++) begin bin_re[a] = '0; bin_im[a] = '0; end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    run_packet(-14.0,  10000.0, 0);
    run_packet(-10.0,  20000.0, 1);
    run_packet( -6.0, -20000.0, 2);
    run_packet( -2.0,  30000.0, 0);
    run_packet(  2.0, -30000.0, 1);
    run_packet(  6.0,  40000.0, 0);
    run_packet( 10.0,   5000.0, 2);
    run_packet( 14.0, -10000.0, 0);
    run_packet( -3.0,  15000.0, 0);
    run_packet( 12.0,      0.0, 0);
    run_packet(-12.0, -40000.0, 2);
    run_packet(  0.5,  25000.0, 1);
    check(regions_seen == 8'hFF, "every decision region occurred");
    check(n_maj > 0, "sign-majority deletion occurred");
    check(n_rej > 0, "threshold rejection occurred");
    check(n_pos > 0 && n_neg > 0, "both signs of clock offset");
    $display("events: majority=%0d reject=%0d steps=%0d loads=%0d regions=%b",
             n_maj, n_rej, n_step, n_load, regions_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
