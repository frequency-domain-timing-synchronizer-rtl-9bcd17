// fd_timing_sync: frequency-domain timing synchronizer for an N_ANT x N_ANT
// MIMO-OFDM receiver with a multiphase ADC clock.
//
// The receiver samples with an M_PHASES-phase clock whose phase is chosen by
// this block.  From the FFT of the first six short preambles of a packet it
// estimates, on every antenna in parallel, the sampling clock offset (from
// the growth of the inter-preamble phase difference across subcarriers) and
// the sampling phase (from the preamble power at three phases a quarter
// period apart); the per-antenna results are averaged, and the phase select
// then both removes the phase error and follows the clock drift, so the ADC
// keeps sampling at the optimum instant.
// Input: one FFT bin per clock for all antennas at once (bin_valid, bin_idx
// in FFT order 0..N_FFT-1, bin_re/bin_im per antenna), N_FFT bins per
// preamble; sample_tick once per ADC sample; pkt_start once before the first
// preamble.  A new preamble may start only while `ready` is high (after
// preambles 2 and 4 the estimate must act on the next preamble first).
// Output: adcm_phase, the unwrapped phase command in clock phases, and
// adcm_sel, its value modulo M_PHASES for the clock's phase multiplexer;
// sync_done with sco_total and est_phase when the six preambles are used.
// Event pulses (majority deletion, threshold rejection, phase step, rate
// load) are brought out for observation.
// The structure (per-antenna calculators, averaging, phase translator and
// phase control) and the defaults 4 antennas, 16-point FFT and 32 phases
// follow the document; word widths and the handshake are this design's.
module fd_timing_sync
  import fdts_pkg::*;
#(
  parameter int N_ANT    = 4,
  parameter int N_FFT    = 16,
  parameter int DW       = 12,
  parameter int KMAX     = 6,
  parameter int M_PHASES = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        pkt_start,
  input  logic                        sample_tick,
  input  logic                        bin_valid,
  input  logic [$clog2(N_FFT)-1:0]    bin_idx,
  input  logic signed [DW-1:0]        bin_re [N_ANT],
  input  logic signed [DW-1:0]        bin_im [N_ANT],
  output logic                        ready,
  output logic                        sync_done,
  output logic signed [PHW-1:0]       adcm_phase,
  output logic [$clog2(M_PHASES)-1:0] adcm_sel,
  output logic signed [DLW-1:0]       sco_total,
  output logic signed [PHW-1:0]       est_phase,
  output logic [2:0]                  region_ant0,
  output logic                        ev_majority,
  output logic                        ev_reject,
  output logic                        ev_step,
  output logic                        ev_rate_load
);
  ant_ctrl_t ctrl;
  logic      clear;

  logic [N_ANT-1:0]      a_busy, a_sco_valid, a_sco_ok, a_deleted, a_ph_valid, a_rej;
  logic signed [DLW-1:0] a_delta  [N_ANT];
  logic signed [PHW-1:0] a_ph     [N_ANT];
  logic [2:0]            a_region [N_ANT];

  for (genvar a = 0; a < N_ANT; a++) begin : g_ant
    logic [$clog2(2*KMAX+1)-1:0] rej;
    ant_calc #(.N_FFT(N_FFT), .DW(DW), .KMAX(KMAX), .M_PHASES(M_PHASES)) u_calc (
      .clk, .rst_n, .clear, .ctrl,
      .bin_valid, .bin_idx, .bin_re(bin_re[a]), .bin_im(bin_im[a]),
      .busy(a_busy[a]),
      .sco_valid(a_sco_valid[a]), .sco_ok(a_sco_ok[a]), .sco_delta(a_delta[a]),
      .sco_deleted(a_deleted[a]), .sco_rejected(rej),
      .ph_valid(a_ph_valid[a]), .ph_region(a_region[a]), .ph_est(a_ph[a])
    );
    assign a_rej[a] = a_sco_valid[a] && (rej != '0);
  end

  logic                  c_sco_valid, c_ph_valid;
  logic signed [DLW-1:0] c_delta;
  logic signed [PHW-1:0] c_ph;

  antenna_combiner #(.N_ANT(N_ANT), .W(DLW)) u_comb_sco (
    .clk, .rst_n, .clear, .in_valid(a_sco_valid), .in_val(a_delta),
    .out_valid(c_sco_valid), .out_val(c_delta)
  );

  antenna_combiner #(.N_ANT(N_ANT), .W(PHW)) u_comb_ph (
    .clk, .rst_n, .clear, .in_valid(a_ph_valid), .in_val(a_ph),
    .out_valid(c_ph_valid), .out_val(c_ph)
  );

  logic                  step_valid, delta_load;
  logic signed [PHW-1:0] step, sco_phase, phase2;
  logic signed [DLW-1:0] delta_out, sco1, sco2, sco3;

  sync_controller #(.N_FFT(N_FFT), .M_PHASES(M_PHASES)) u_ctl (
    .clk, .rst_n, .pkt_start, .bin_valid, .bin_idx,
    .sco_valid(c_sco_valid), .sco_delta(c_delta),
    .ph_valid(c_ph_valid), .ph_est(c_ph),
    .ctrl, .clear, .ready, .done(sync_done),
    .step_valid, .step, .delta_load, .delta_out,
    .sco1, .sco2, .sco3, .est_phase, .phase2
  );

  phase_translator #(.M_PHASES(M_PHASES)) u_tr (
    .clk, .rst_n, .clear, .load(delta_load), .delta(delta_out),
    .sample_tick, .sco_phase
  );

  phase_ctrl #(.M_PHASES(M_PHASES)) u_pc (
    .clk, .rst_n, .clear, .step_valid, .step, .sco_phase,
    .adcm_phase, .adcm_sel
  );

  assign sco_total    = delta_out;
  assign region_ant0  = a_region[0];
  assign ev_majority  = |(a_sco_valid & a_deleted);
  assign ev_reject    = |a_rej;
  assign ev_step      = step_valid;
  assign ev_rate_load = delta_load;
endmodule
