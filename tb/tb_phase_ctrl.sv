// tb_phase_ctrl: random phase steps and a moving SCO phase; the phase command
// must equal the sum of all steps since the last clear minus the SCO phase,
// and the select must be that command modulo 32 (so it wraps at the ends).
module tb_phase_ctrl;
  import fdts_pkg::*;
  localparam int M = 32;
  logic clk = 0, rst_n = 0, clear = 0, step_valid = 0;
  logic signed [PHW-1:0] step = 0, sco_phase = 0, adcm_phase;
  logic [4:0] adcm_sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  phase_ctrl #(.M_PHASES(M)) dut (.*);

  initial begin
    int off = 0, expv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (t % 50 == 0) begin
        clear = 1; off = 0;
        @(negedge clk);
        clear = 0;
      end
      step_valid = ($urandom_range(0, 2) == 0);
      step = PHW'(int'($urandom_range(0, 40)) - 20);
      if (step_valid) off += int'(step);
      @(negedge clk);
      step_valid = 0;
      sco_phase = PHW'(int'($urandom_range(0, 200)) - 100);
      #1;
      expv = off - int'(sco_phase);
      checks++;
      if (int'(adcm_phase) != expv || int'(adcm_sel) != ((expv % M) + M) % M) begin
        failures++;
        $display("FAIL: phase %0d sel %0d expected %0d", adcm_phase, adcm_sel, expv);
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
