// tb_autocorr_td: random preambles of 16 bins; TD must equal the sum of
// Re^2 + Im^2 worked out in the testbench, appear exactly one clock after the
// last bin, and a clear in the middle of a preamble must restart the sum.
module tb_autocorr_td;
  localparam int N = 16, DW = 12, TDW = 28;
  logic clk = 0, rst_n = 0, clear = 0, bin_valid = 0, td_valid;
  logic [3:0] bin_idx = 0;
  logic signed [DW-1:0] bin_re = 0, bin_im = 0;
  logic [TDW-1:0] td;
  int checks = 0, failures = 0;
  longint expv;

  always #5 clk = ~clk;
  autocorr_td #(.N_FFT(N), .DW(DW), .TDW(TDW)) dut (.*);

  task automatic preamble(input int gap, input bit do_clear);
    expv = 0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      bin_re = DW'($urandom); bin_im = DW'($urandom);
      if (k == 5 && do_clear) begin
        // garbage then clear: the sum must restart from bin 6
        bin_valid = 1; bin_idx = 4'(k);
        @(negedge clk);
        bin_valid = 0; clear = 1;
        @(negedge clk);
        clear = 0;
        expv = 0;
        continue;
      end
      bin_valid = 1; bin_idx = 4'(k);
      if (!(do_clear && k < 5)) expv += longint'(bin_re) * bin_re + longint'(bin_im) * bin_im;
      if (k == N - 1) begin
        @(negedge clk);
        bin_valid = 0;
        checks++;
        if (!td_valid || longint'(td) != expv) begin
          failures++;
          $display("FAIL: td %0d expected %0d valid %0d", td, expv, td_valid);
        end
        @(negedge clk);
        checks++;
        if (td_valid) begin failures++; $display("FAIL: td_valid longer than one clock"); end
      end else if (gap > 0 && k % 4 == 3) begin
        @(negedge clk);
        bin_valid = 0;
        repeat (gap) @(negedge clk);
      end
    end
    bin_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) preamble(i % 3, 1'b0);
    preamble(0, 1'b1);
    preamble(1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
