// tb_fft_data_buffer: writes two different preambles into the two banks,
// then reads every bin of both banks back (combinational read) and checks the
// values against a reference model, including a rewrite of one bank that must
// leave the other untouched.
module tb_fft_data_buffer;
  localparam int N = 16, DW = 12;
  logic clk = 0, rst_n = 0, wr_en = 0, wr_bank = 0, rd_bank = 0;
  logic [3:0] wr_idx = 0, rd_idx = 0;
  logic signed [DW-1:0] wr_re = 0, wr_im = 0, rd_re, rd_im;
  logic signed [DW-1:0] ref_re [2][N];
  logic signed [DW-1:0] ref_im [2][N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fft_data_buffer #(.N_FFT(N), .DW(DW)) dut (.*);

  task automatic fill(input int b, input int seed);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      wr_en = 1; wr_bank = b[0]; wr_idx = k[3:0];
      wr_re = DW'(seed * 37 + k * 101 - 900);
      wr_im = DW'(seed * 53 - k * 77 + 300);
      ref_re[b][k] = wr_re; ref_im[b][k] = wr_im;
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic check_all;
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < N; k++) begin
        rd_bank = b[0]; rd_idx = k[3:0];
        #1;
        checks++;
        if (rd_re !== ref_re[b][k] || rd_im !== ref_im[b][k]) begin
          failures++;
          $display("FAIL: bank %0d bin %0d: %0d %0d", b, k, rd_re, rd_im);
        end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    fill(0, 1);
    fill(1, 7);
    check_all();
    fill(0, 13);
    check_all();
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
