// tb_decision_region: TD values from a symmetric characteristic curve with
// its peak at zero sampling error and period M = 32 phases,
//   TD(x) = 1e6 * (0.4 + 0.6*cos^2(pi*x/32)),
// give dir1 = TD(e) - TD(e-8) and dir2 = TD(e) - TD(e+8) for e across the whole
// period; the region must be the eighth of the period e lies in (points
// within 0.3 phases of a border are skipped).
module tb_decision_region;
  localparam int DIRW = 30;
  localparam real PI = 3.14159265358979;
  logic signed [DIRW-1:0] dir1, dir2;
  logic [2:0] region;
  int checks = 0, failures = 0;

  decision_region #(.DIRW(DIRW)) dut (.*);

  function automatic real tdv(input real x);
    return 1.0e6 * (0.4 + 0.6 * $cos(PI * x / 32.0) ** 2);
  endfunction

  initial begin
    real e, f;
    int r;
    for (int i = 0; i < 256; i++) begin
      e = -16.0 + 0.125 * i + 0.0625;
      f = (e + 16.0) / 4.0;
      r = int'($floor(f));
      if (f - r < 0.075 || f - r > 0.925) continue;
      dir1 = DIRW'($rtoi(tdv(e) - tdv(e - 8.0)));
      dir2 = DIRW'($rtoi(tdv(e) - tdv(e + 8.0)));
      #1;
      checks++;
      if (int'(region) != r) begin
        failures++;
        $display("FAIL: e=%0.3f dir1=%0d dir2=%0d region %0d expected %0d", e, dir1, dir2, region, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
