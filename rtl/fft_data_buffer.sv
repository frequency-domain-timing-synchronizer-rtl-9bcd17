// fft_data_buffer: two banks of FFT bins of one antenna.
//
// Each bank holds the N_FFT complex bins (real and imaginary part) of one short
// preamble, written one bin per clock as the FFT delivers them.  The two banks
// ("1st" and "2nd" in the architecture) let the sequencer keep a reference
// preamble while a later one streams past: the read port is combinational and
// addressed by the bin index of the incoming preamble, so the stored bin k
// lines up with the incoming bin k in the same clock.
// Write: wr_en with wr_bank/wr_idx/wr_re/wr_im, stored at the clock edge.
// Read: rd_bank/rd_idx -> rd_re/rd_im in the same clock.  Banks clear on reset.
// Bank count and the Re/Im organisation follow the architecture figure; the
// one-bin-per-clock write and the combinational read are choices of this design.
module fft_data_buffer #(
  parameter int N_FFT = 16,
  parameter int DW    = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic                     wr_bank,
  input  logic [$clog2(N_FFT)-1:0] wr_idx,
  input  logic signed [DW-1:0]     wr_re,
  input  logic signed [DW-1:0]     wr_im,
  input  logic                     rd_bank,
  input  logic [$clog2(N_FFT)-1:0] rd_idx,
  output logic signed [DW-1:0]     rd_re,
  output logic signed [DW-1:0]     rd_im
);
  logic signed [DW-1:0] mem_re [2][N_FFT];
  logic signed [DW-1:0] mem_im [2][N_FFT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < N_FFT; i++) begin
          mem_re[b][i] <= '0;
          mem_im[b][i] <= '0;
        end
    end else if (wr_en) begin
      mem_re[wr_bank][wr_idx] <= wr_re;
      mem_im[wr_bank][wr_idx] <= wr_im;
    end
  end

  assign rd_re = mem_re[rd_bank][rd_idx];
  assign rd_im = mem_im[rd_bank][rd_idx];
endmodule
