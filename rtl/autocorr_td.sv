// autocorr_td: timing detection value of one short preamble.
//
// TD = sum over all N_FFT bins of R_k * conj(R_k) = Re^2 + Im^2, the power of
// the preamble in the frequency domain.  It is largest when the ADC samples at
// the optimum phase.  One bin per clock in FFT order; the bin with index
// N_FFT-1 closes the sum, and td_valid pulses with the result one clock later.
// `clear` restarts the sum.  Full-precision width is this design's choice.
module autocorr_td #(
  parameter int N_FFT = 16,
  parameter int DW    = 12,
  parameter int TDW   = 2 * DW + $clog2(N_FFT)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     bin_valid,
  input  logic [$clog2(N_FFT)-1:0] bin_idx,
  input  logic signed [DW-1:0]     bin_re,
  input  logic signed [DW-1:0]     bin_im,
  output logic                     td_valid,
  output logic [TDW-1:0]           td
);
  logic [TDW-1:0] acc, pwr;

  always_comb pwr = TDW'(bin_re * bin_re) + TDW'(bin_im * bin_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; td <= '0; td_valid <= 1'b0;
    end else begin
      td_valid <= 1'b0;
      if (clear) begin
        acc <= '0;
      end else if (bin_valid) begin
        if (bin_idx == $clog2(N_FFT)'(N_FFT - 1)) begin
          td       <= acc + pwr;
          td_valid <= 1'b1;
          acc      <= '0;
        end else begin
          acc <= acc + pwr;
        end
      end
    end
  end
endmodule
