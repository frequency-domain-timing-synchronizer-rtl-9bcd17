// tb_sco_sweep: clock-offset sweep of the whole synchronizer at its default
// size (4 antennas, 16-point FFT, 32 clock phases).
//
// It runs the offsets whose sampling-phase error the design is meant to keep
// small (+10000, +20000, +30000 and +40000 ppm, and -30000 ppm at the other
// end of the tolerated range), each with 20 packets whose initial sampling
// phase is drawn at random over the whole sample period.  The stand-in for
// the multiphase clock, ADC, channel and FFT is the same as in the end-to-end
// test: preamble l is sampled at
//   tau_l = eps0 + delta*M*N*(l-1) + adcm_phase
// clock phases, its 16 bins carry the 802.11 short-preamble pattern on
// subcarriers +-1..+-6 through a mildly frequency-selective channel per
// antenna, bin k is rotated by 2*pi*k*tau/(M*N), the amplitude falls off
// away from the optimum sampling instant, and small noise is added.
// With small noise and no offset at all, every packet must end within 3.5
// phases: half a decision region (M/16 = 2), plus 1 because with this
// model's TD curve (the square of the amplitude above) the |dir1| = |dir2|
// borders between regions 1 and 2 and between 5 and 6 fall at -+7 phases
// instead of -+8, plus half a phase for rounding the steps.
// The sweep runs twice.  With small noise, per packet it checks that the
// synchronizer finishes, that the clock offset estimate is within 1500 ppm
// and that the sampling error after synchronization is within 4 of the 32
// phases, and per offset that the RMS sampling error stays below 3.9 phases.
// With noise of about 14 dB SNR per bin (uniform +-200 per component
// against bins of magnitude up to about 1000), 30 packets per offset, it
// bounds only the RMS sampling error, at 7 phases; a random unsynchronized
// phase gives 9.2.
// Each run prints the RMS sampling error and the RMS offset error.
module tb_sco_sweep;
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
        bin_re[a] = DW'($rtoi(cr * $cos(rot) - ci * $sin(rot)) + noise(namp));
        bin_im[a] = DW'($rtoi(cr * $sin(rot) + ci * $cos(rot)) + noise(namp));
      end
      bin_idx     = k[$clog2(N_FFT)-1:0];
      bin_valid   = 1'b1;
      sample_tick = 1'b1;
    end
    @(negedge clk);
    bin_valid   = 1'b0;
    sample_tick = 1'b0;
  endtask

  real err2_sum, sco2_sum;
  int  n_pkt;
  int  namp = 6;     // noise amplitude per component
  bit  strict = 1'b1; // per-packet limits on (low-noise runs only)

  // tau4_aim: the sampling error wanted at preamble 4; preambles 1 and 2 drift
  // uncompensated, so eps0 = tau4_aim - 2*delta*M*N.
  task automatic run_packet(input real tau4_aim, input real delta_ppm);
    real delta, eps0, tau7, err_sco;
    int wait_cyc;
    delta = delta_ppm * 1.0e-6;
    eps0 = tau4_aim - 2.0 * delta * M * N_FFT;
    @(negedge clk);
    pkt_start = 1'b1;
    @(negedge clk);
    pkt_start = 1'b0;
    for (int l = 1; l <= 6; l++) begin
      wait_cyc = 0;
      while (!ready && wait_cyc < 2000) begin
        @(negedge clk);
        wait_cyc++;
      end
      send_preamble(l, eps0, delta, 0);
    end
    wait_cyc = 0;
    while (!sync_done && wait_cyc < 2000) begin
      @(negedge clk);
      wait_cyc++;
    end
    check(sync_done == 1'b1, "synchronizer finished");
    @(negedge clk);
    tau7 = wrap_m(eps0 + delta * M * N_FFT * 6 + real'(adcm_phase));
    err_sco = real'(sco_total) / 1048576.0 - delta;
    if (strict && delta_ppm == 0.0)
      check(tau7 <= 3.5 && tau7 >= -3.5, "no offset: sampling error within 3.5 phases");
    if (strict) begin
      check(err_sco < 0.0015 && err_sco > -0.0015, "clock offset estimate within 1500 ppm");
      check(tau7 <= 4.0 && tau7 >= -4.0, "sampling error within 4 phases after sync");
    end
    if (strict && (tau7 > 4.0 || tau7 < -4.0 || err_sco >= 0.0015 || err_sco <= -0.0015 ||
                   (delta_ppm == 0.0 && (tau7 > 3.5 || tau7 < -3.5))))
      $display("  packet tau4=%0.2f sco=%0.0f ppm: est sco=%0.0f ppm, residual %0.2f",
               tau4_aim, delta_ppm, real'(sco_total) / 1.048576, tau7);
    err2_sum += tau7 * tau7;
    sco2_sum += err_sco * err_sco;
    n_pkt++;
  endtask

  task automatic sweep(input real delta_ppm, input int npkt, input real rms_limit);
    real rms;
    err2_sum = 0.0;
    sco2_sum = 0.0;
    n_pkt = 0;
    for (int p = 0; p < npkt; p++)
      run_packet(real'($urandom_range(0, 3199)) / 100.0 - 16.0, delta_ppm);
    rms = $sqrt(err2_sum / n_pkt);
    $display("noise %0d, sco %0.0f ppm: %0d packets, RMS sampling error %0.3f phases, RMS offset error %0.0f ppm",
             namp, delta_ppm, n_pkt, rms, 1.0e6 * $sqrt(sco2_sum / n_pkt));
    check(rms < rms_limit, "RMS sampling error below its limit");
  endtask

  initial begin
    for (int a = 0; a < N_ANT; a++) begin bin_re[a] = '0; bin_im[a] = '0; end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    // low noise: every packet must end within 4 phases; with no clock
    // offset, within 3.5 (see the header)
    sweep(      0.0, 20, 3.9);
    sweep( 10000.0, 20, 3.9);
    sweep( 20000.0, 20, 3.9);
    sweep( 30000.0, 20, 3.9);
    sweep( 40000.0, 20, 3.9);
    sweep(-30000.0, 20, 3.9);
    // about 14 dB per-bin SNR: only the RMS over 30 packets is bounded, well
    // below the 9.2 phases of a random, unsynchronized phase
    namp = 200;
    strict = 1'b0;
    sweep( 10000.0, 30, 7.0);
    sweep( 20000.0, 30, 7.0);
    sweep( 30000.0, 30, 7.0);
    sweep( 40000.0, 30, 7.0);
    sweep(-30000.0, 30, 7.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
