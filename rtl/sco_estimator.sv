// sco_estimator: sampling clock offset of one antenna from two short preambles.
//
// While a later preamble R_{l+m} streams in (one FFT bin per clock, pair_en
// high), every used bin is multiplied by the conjugate of the same bin of the
// stored earlier preamble R_l, and a CORDIC gives the angle of the product,
// the phase difference dphi_k(m) = 2*pi*k*delta*m.  If the sampling phase was
// stepped by h clock phases between the two preambles, the rotation that
// step causes, 2*pi*k*h/(M*N), is subtracted (h = 0 when no step was made).
// The differences of subcarriers -KMAX..-1 and 1..KMAX are then cleaned by the
// sign-majority rule, fitted by least squares with one round of outlier
// rejection, and the slope divided by the preamble distance m (1 or 2):
//   delta * 2^DFB = slope / m.
// Interface: bins with bin_valid/bin_idx (0..N_FFT-1 in FFT order) and the
// reference bin ref_re/ref_im of the same index in the same clock; m_log2 and
// h are sampled with the bins.  est_valid pulses once, after the last used bin
// has left the CORDIC and the fit is done (about 200 clocks at the defaults).
// The chain of operations follows the document; KMAX = 6 (the bins a 16-point
// FFT of an 802.11 short preamble occupies), binary angles and the timing
// are choices of this design.
module sco_estimator
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
  input  logic                     bin_valid,
  input  logic [$clog2(N_FFT)-1:0] bin_idx,
  input  logic signed [DW-1:0]     bin_re,
  input  logic signed [DW-1:0]     bin_im,
  input  logic signed [DW-1:0]     ref_re,
  input  logic signed [DW-1:0]     ref_im,
  input  logic                     pair_en,
  input  logic                     m_log2,
  input  logic signed [PHW-1:0]    h,
  output logic                     busy,
  output logic                     est_valid,
  output logic                     est_ok,
  output logic signed [DLW-1:0]    delta,
  output logic                     deleted,      // majority rule removed entries
  output logic [$clog2(2*KMAX+1)-1:0] n_rejected // entries removed by the threshold
);
  localparam int NPTS  = 2 * KMAX;
  localparam int TW    = $clog2(NPTS);
  localparam int IXW   = $clog2(N_FFT);
  localparam int CSH   = AW - $clog2(M_PHASES * N_FFT);  // angle counts per (k*h)
  localparam int PW    = 2 * DW + 1;
  localparam int DIVW  = 40;

  // Signed subcarrier index of a slot: slots 0..KMAX-1 are -1..-KMAX,
  // slots KMAX..2*KMAX-1 are +1..+KMAX.
  function automatic logic signed [KW-1:0] slot_k(input int s);
    return (s < KMAX) ? KW'(-(s + 1)) : KW'(s - KMAX + 1);
  endfunction

  // ---- slot of the incoming bin -------------------------------------------
  logic signed [IXW:0] ks;
  logic                use_bin;
  logic [TW-1:0]       slot;
  always_comb begin
    ks = (int'(bin_idx) < N_FFT / 2) ? (IXW+1)'(bin_idx) : (IXW+1)'(int'(bin_idx) - N_FFT);
    use_bin = pair_en && bin_valid && ks != 0 && ks >= -(IXW+1)'(KMAX) && ks <= (IXW+1)'(KMAX);
    slot = (ks < 0) ? TW'(-int'(ks) - 1) : TW'(int'(ks) + KMAX - 1);
  end

  // ---- conjugate product, delayed tag ---------------------------------------
  logic                 cm_valid;
  logic signed [PW-1:0] cm_re, cm_im;
  logic [TW-1:0]        slot_d;

  conj_mult #(.DW(DW)) u_cm (
    .clk, .rst_n, .in_valid(use_bin),
    .a_re(ref_re), .a_im(ref_im), .b_re(bin_re), .b_im(bin_im),
    .out_valid(cm_valid), .p_re(cm_re), .p_im(cm_im)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) slot_d <= '0;
    else if (use_bin) slot_d <= slot;

  // ---- inverse tangent --------------------------------------------------------
  logic                 at_valid;
  logic [TW-1:0]        at_slot;
  logic signed [AW-1:0] at_ang;

  cordic_atan #(.IW(PW), .AW(AW), .ITER(14), .TW(TW)) u_atan (
    .clk, .rst_n, .in_valid(cm_valid), .in_tag(slot_d),
    .x_in(cm_re), .y_in(cm_im),
    .out_valid(at_valid), .out_tag(at_slot), .angle(at_ang)
  );

  // ---- collection with phase-step correction ----------------------------------
  logic signed [AW-1:0] y     [NPTS];
  logic signed [KW-1:0] kvec  [NPTS];
  logic [NPTS-1:0]      got;
  logic                 m_r;
  logic signed [PHW-1:0] h_r;
  logic signed [AW-1:0] corr;
  logic                 ls_start;

  for (genvar s = 0; s < NPTS; s++) begin : g_k
    assign kvec[s] = slot_k(s);
  end

  always_comb corr = AW'((32'(kvec[at_slot]) * 32'(h_r)) <<< CSH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NPTS; s++) y[s] <= '0;
      got <= '0; m_r <= 1'b0; h_r <= '0; ls_start <= 1'b0;
    end else begin
      ls_start <= 1'b0;
      if (clear) begin
        got <= '0;
      end else begin
        if (use_bin) begin
          m_r <= m_log2;
          h_r <= h;
        end
        if (at_valid) begin
          y[at_slot]   <= at_ang - corr;
          got[at_slot] <= 1'b1;
        end
        if (&got) begin
          got      <= '0;
          ls_start <= 1'b1;
        end
      end
    end
  end

  // ---- step 1: sign majority --------------------------------------------------
  logic signed [AW-1:0] y_neg [KMAX];
  logic signed [AW-1:0] y_pos [KMAX];
  logic [KMAX-1:0]      keep_neg, keep_pos;
  logic                 maj_del;

  for (genvar j = 0; j < KMAX; j++) begin : g_split
    assign y_neg[j] = y[j];
    assign y_pos[j] = y[KMAX + j];
  end

  subcarrier_majority #(.KMAX(KMAX), .AW(AW)) u_maj (
    .ang_neg(y_neg), .ang_pos(y_pos),
    .valid_neg('1), .valid_pos('1),
    .keep_neg, .keep_pos, .deleted(maj_del)
  );

  // ---- steps 2 and 3: least squares with rejection ----------------------------
  logic                   ls_busy, ls_done, ls_ok, maj_del_r;
  logic signed [DIVW-1:0] ls_slope_q;
  logic [$clog2(NPTS+1)-1:0] ls_rej;

  ls_slope #(.NPTS(NPTS), .AW(AW), .KW(KW), .SFB(SFB), .DIVW(DIVW)) u_ls (
    .clk, .rst_n, .start(ls_start), .k(kvec), .y(y), .keep({keep_pos, keep_neg}),
    .busy(ls_busy), .done(ls_done), .ok(ls_ok), .slope(ls_slope_q), .n_rejected(ls_rej)
  );

  // ---- division by the symbol interval ------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_valid <= 1'b0; est_ok <= 1'b0; delta <= '0;
      deleted <= 1'b0; maj_del_r <= 1'b0; n_rejected <= '0;
    end else begin
      est_valid <= ls_done;
      if (ls_start) maj_del_r <= maj_del;
      if (ls_done) begin
        delta      <= DLW'(ls_slope_q >>> m_r);
        est_ok     <= ls_ok;
        deleted    <= maj_del_r;
        n_rejected <= ls_rej;
      end
    end
  end

  assign busy = (|got) || ls_start || ls_busy || at_valid || cm_valid;
endmodule
