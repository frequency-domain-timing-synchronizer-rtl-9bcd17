// ant_calc: the calculator set of one receive antenna.
//
// Holds the FFT data buffer of the antenna, the sampling clock estimation
// chain (conjugate product, inverse tangent, subcarrier majority, least
// squares, division by the preamble distance) and the sampling phase
// acquisition chain (autocorrelation TD, three TD registers, decision region,
// phase mapping).  The per-preamble command word `ctrl` from the sequencer
// says whether the streaming preamble is stored, paired with a stored one,
// and which TD register it loads; it must stay constant while a preamble's
// N_FFT bins stream in (one per clock, FFT order, bin_valid high).
// One such set per antenna, all driven in parallel, follows the architecture
// of the document; the command word is this design's own interface.
module ant_calc
  import fdts_pkg::*;
#(
  parameter int N_FFT    = 16,
  parameter int DW       = 12,
  parameter int KMAX     = 6,
  parameter int M_PHASES = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  ant_ctrl_t                ctrl,
  input  logic                     bin_valid,
  input  logic [$clog2(N_FFT)-1:0] bin_idx,
  input  logic signed [DW-1:0]     bin_re,
  input  logic signed [DW-1:0]     bin_im,
  output logic                     busy,
  output logic                     sco_valid,
  output logic                     sco_ok,
  output logic signed [DLW-1:0]    sco_delta,
  output logic                     sco_deleted,
  output logic [$clog2(2*KMAX+1)-1:0] sco_rejected,
  output logic                     ph_valid,
  output logic [2:0]               ph_region,
  output logic signed [PHW-1:0]    ph_est
);
  localparam int TDW = 2 * DW + $clog2(N_FFT);

  logic signed [DW-1:0] ref_re, ref_im;

  fft_data_buffer #(.N_FFT(N_FFT), .DW(DW)) u_buf (
    .clk, .rst_n,
    .wr_en(bin_valid && ctrl.store_en), .wr_bank(ctrl.store_bank), .wr_idx(bin_idx),
    .wr_re(bin_re), .wr_im(bin_im),
    .rd_bank(ctrl.ref_bank), .rd_idx(bin_idx), .rd_re(ref_re), .rd_im(ref_im)
  );

  sco_estimator #(.N_FFT(N_FFT), .DW(DW), .KMAX(KMAX), .M_PHASES(M_PHASES)) u_sco (
    .clk, .rst_n, .clear,
    .bin_valid, .bin_idx, .bin_re, .bin_im, .ref_re, .ref_im,
    .pair_en(ctrl.pair_en), .m_log2(ctrl.m_log2), .h(ctrl.h),
    .busy, .est_valid(sco_valid), .est_ok(sco_ok), .delta(sco_delta),
    .deleted(sco_deleted), .n_rejected(sco_rejected)
  );

  logic           td_valid;
  logic [TDW-1:0] td;
  td_sel_e        td_sel_r;

  autocorr_td #(.N_FFT(N_FFT), .DW(DW), .TDW(TDW)) u_td (
    .clk, .rst_n, .clear, .bin_valid, .bin_idx, .bin_re, .bin_im,
    .td_valid, .td
  );

  // the TD value leaves one clock after the preamble's last bin, when the
  // sequencer may already show the next preamble's command: keep this one's
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) td_sel_r <= TD_NONE;
    else if (bin_valid) td_sel_r <= ctrl.td_sel;

  sampling_phase_acq #(.TDW(TDW), .M_PHASES(M_PHASES)) u_acq (
    .clk, .rst_n, .clear, .td_valid, .td, .td_sel(td_sel_r),
    .est_valid(ph_valid), .region(ph_region), .est_phase(ph_est)
  );
endmodule
