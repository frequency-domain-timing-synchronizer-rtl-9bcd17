// tb_sampling_phase_acq: for sampling errors across the whole period the
// three TD values of a symmetric characteristic curve are written in the
// order TD(e), TD(e-M/4), TD(e+M/4); the estimate must be the centre of the
// eighth of the period e lies in, arrive exactly one clock after the third
// write, and nothing may come out after the first two writes.
module tb_sampling_phase_acq;
  import fdts_pkg::*;
  localparam int TDW = 28, M = 32;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, clear = 0, td_valid = 0, est_valid;
  logic [TDW-1:0] td = 0;
  td_sel_e td_sel = TD_NONE;
  logic [2:0] region;
  logic signed [PHW-1:0] est_phase;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sampling_phase_acq #(.TDW(TDW), .M_PHASES(M)) dut (.*);

  function automatic real tdv(input real x);
    return 3.0e6 * (0.4 + 0.6 * $cos(PI * x / M) ** 2);
  endfunction

  task automatic write_td(input real x, input td_sel_e s);
    @(negedge clk);
    td = TDW'($rtoi(tdv(x))); td_sel = s; td_valid = 1;
    @(negedge clk);
    td_valid = 0; td_sel = TD_NONE;
  endtask

  initial begin
    real e, f;
    int r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      e = -16.0 + 0.5 * i + 0.25;
      f = (e + 16.0) / 4.0;
      r = int'($floor(f));
      write_td(e, TD_ZERO);
      checks++;
      if (est_valid) begin failures++; $display("FAIL: early estimate"); end
      write_td(e - 8.0, TD_MINUS);
      checks++;
      if (est_valid) begin failures++; $display("FAIL: early estimate"); end
      @(negedge clk);
      td = TDW'($rtoi(tdv(e + 8.0))); td_sel = TD_PLUS; td_valid = 1;
      @(negedge clk);
      td_valid = 0; td_sel = TD_NONE;
      // the register is written at the edge just passed; one clock later
      checks++;
      if (est_valid) begin failures++; $display("FAIL: estimate too early"); end
      @(negedge clk);
      checks++;
      if (!est_valid || int'(est_phase) != (2 * r - 7) * 2 || int'(region) != r) begin
        failures++;
        $display("FAIL: e=%0.2f est %0d region %0d (valid %0d) expected region %0d", e, est_phase, region, est_valid, r);
      end
    end
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
