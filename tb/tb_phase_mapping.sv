// tb_phase_mapping: each of the eight regions must map to its centre,
// -7pi/8 .. 7pi/8 in steps of pi/4, which with 32 phases per period (2*pi)
// is -14, -10, -6, -2, 2, 6, 10, 14 phases; a second instance with 64 phases
// must give twice those.
module tb_phase_mapping;
  import fdts_pkg::*;
  logic [2:0] region;
  logic signed [PHW-1:0] phase, phase64;
  int checks = 0, failures = 0;
  int exp32 [8] = '{-14, -10, -6, -2, 2, 6, 10, 14};

  phase_mapping #(.M_PHASES(32)) dut (.region, .phase);
  phase_mapping #(.M_PHASES(64)) dut64 (.region, .phase(phase64));

  initial begin
    for (int r = 0; r < 8; r++) begin
      region = 3'(r);
      #1;
      checks++;
      if (int'(phase) != exp32[r] || int'(phase64) != 2 * exp32[r]) begin
        failures++;
        $display("FAIL: region %0d -> %0d / %0d", r, phase, phase64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
