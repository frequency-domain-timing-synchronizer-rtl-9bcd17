// tb_antenna_combiner: four antennas report random values at random times;
// exactly one output must follow the last report, equal to the mean rounded
// half away from zero, and a clear must discard partial reports.
module tb_antenna_combiner;
  localparam int N_ANT = 4, W = 24;
  logic clk = 0, rst_n = 0, clear = 0, out_valid;
  logic [N_ANT-1:0] in_valid = '0;
  logic signed [W-1:0] in_val [N_ANT];
  logic signed [W-1:0] out_val;
  int checks = 0, failures = 0, nout = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && out_valid) nout++;
  antenna_combiner #(.N_ANT(N_ANT), .W(W)) dut (.*);

  initial begin
    int v [N_ANT];
    int sum, expv, n0;
    for (int a = 0; a < N_ANT; a++) in_val[a] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      sum = 0;
      for (int a = 0; a < N_ANT; a++) begin
        v[a] = int'($urandom_range(0, 200000)) - 100000;
        if (t < 10) v[a] = t - 5 + a;      // small values exercise rounding
        sum += v[a];
      end
      expv = (sum >= 0) ? (sum + 2) / 4 : -((-sum + 2) / 4);
      if (t % 10 == 9) begin
        // partial report, then clear: must be forgotten
        @(negedge clk);
        in_valid = 4'b0011; in_val[0] = 24'sd999999; in_val[1] = 24'sd999999;
        @(negedge clk);
        in_valid = '0; clear = 1;
        @(negedge clk);
        clear = 0;
      end
      n0 = nout;
      for (int a = 0; a < N_ANT; a++) begin
        @(negedge clk);
        in_valid = '0;
        in_valid[a] = 1'b1;
        in_val[a] = W'(v[a]);
        if ($urandom_range(0, 1) == 1) begin @(negedge clk); in_valid = '0; end
      end
      @(negedge clk);
      in_valid = '0;
      repeat (2) @(negedge clk);
      checks++;
      if (nout != n0 + 1 || int'(out_val) != expv) begin
        failures++;
        $display("FAIL: mean %0d expected %0d (outputs %0d)", out_val, expv, nout - n0);
      end
    end
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
