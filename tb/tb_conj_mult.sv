// tb_conj_mult: random and extreme operands; the registered product must equal
// b * conj(a) computed in the testbench, one clock after the input.
module tb_conj_mult;
  localparam int DW = 12;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [DW-1:0] a_re = 0, a_im = 0, b_re = 0, b_im = 0;
  logic signed [2*DW:0] p_re, p_im;
  int checks = 0, failures = 0;
  longint er, ei;

  always #5 clk = ~clk;
  conj_mult #(.DW(DW)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (i < 4) begin
        a_re = (i[0]) ? -12'sd2048 : 12'sd2047; a_im = (i[1]) ? -12'sd2048 : 12'sd2047;
        b_re = -12'sd2048; b_im = (i[0]) ? 12'sd2047 : -12'sd2048;
      end else begin
        a_re = DW'($urandom); a_im = DW'($urandom); b_re = DW'($urandom); b_im = DW'($urandom);
      end
      in_valid = 1;
      er = longint'(b_re) * a_re + longint'(b_im) * a_im;
      ei = longint'(b_im) * a_re - longint'(b_re) * a_im;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(p_re) != er || longint'(p_im) != ei) begin
        failures++;
        $display("FAIL: %0d %0d %0d %0d -> %0d %0d expected %0d %0d", a_re, a_im, b_re, b_im, p_re, p_im, er, ei);
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
