// tb_phase_translator: after loading an offset delta the output must follow
// SCO_phase(n) = n*delta*M (rounded to a whole clock phase) for n sample
// ticks, worked out in real arithmetic; a second load must change the rate
// while keeping the phase already reached, and clear must return to zero.
module tb_phase_translator;
  import fdts_pkg::*;
  localparam int M = 32;
  logic clk = 0, rst_n = 0, clear = 0, load = 0, sample_tick = 0;
  logic signed [DLW-1:0] delta = 0;
  logic signed [PHW-1:0] sco_phase;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  phase_translator #(.M_PHASES(M)) dut (.*);

  task automatic expect_phase(input real p);
    checks++;
    if (real'(sco_phase) - p > 0.5001 || p - real'(sco_phase) > 0.5001) begin
      failures++;
      $display("FAIL: phase %0d expected %0.3f", sco_phase, p);
    end
  endtask

  initial begin
    real d1, d2, p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      d1 = (real'($urandom_range(0, 80000)) - 40000.0) * 1.0e-6;
      d2 = (real'($urandom_range(0, 2000)) - 1000.0) * 1.0e-6;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      expect_phase(0.0);
      delta = DLW'($rtoi(d1 * 1048576.0));
      d1 = real'(delta) / 1048576.0;
      load = 1;
      @(negedge clk);
      load = 0;
      p = 0.0;
      for (int n = 1; n <= 200; n++) begin
        sample_tick = 1;
        @(negedge clk);
        sample_tick = 0;
        p = p + d1 * M;
        expect_phase(p);
        if (n % 7 == 0) @(negedge clk);     // idle clocks between ticks
      end
      delta = DLW'($rtoi(d2 * 1048576.0));
      d2 = real'(delta) / 1048576.0;
      load = 1;
      @(negedge clk);
      load = 0;
      for (int n = 1; n <= 100; n++) begin
        sample_tick = 1;
        @(negedge clk);
        sample_tick = 0;
        p = p + d2 * M;
        expect_phase(p);
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
