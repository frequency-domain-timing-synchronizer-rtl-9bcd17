// tb_sync_controller: walks the six-preamble schedule with stand-in results.
// For several clock offsets it checks, preamble by preamble, the command
// word (store/pair, banks, m, h, TD register), that `ready` holds the next
// preamble back until SCO1 is loaded and M1 is issued, and the values of the
// steps and rate loads against the rules worked out here in real arithmetic:
//   M1 = -M/4 - d3,  M2 = M/4 - 2*d3,  d = delta*N*M
//   final step = -M2 - (est + 3*d2),   final rate = SCO1 + SCO2
// and that exactly three steps and two rate loads happen per packet.
module tb_sync_controller;
  import fdts_pkg::*;
  localparam int N = 16, M = 32;
  logic clk = 0, rst_n = 0, pkt_start = 0, bin_valid = 0;
  logic [3:0] bin_idx = 0;
  logic sco_valid = 0, ph_valid = 0;
  logic signed [DLW-1:0] sco_delta = 0;
  logic signed [PHW-1:0] ph_est = 0;
  ant_ctrl_t ctrl;
  logic clear, ready, done, step_valid, delta_load;
  logic signed [PHW-1:0] step, est_phase, phase2;
  logic signed [DLW-1:0] delta_out, sco1, sco2, sco3;
  int checks = 0, failures = 0;
  int steps [$];
  int loads [$];

  always #5 clk = ~clk;
  sync_controller #(.N_FFT(N), .M_PHASES(M)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (step_valid) steps.push_back(int'(step));
    if (delta_load) loads.push_back(int'(delta_out));
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic preamble;
    for (int k = 0; k < N; k++) begin
      bin_valid = 1; bin_idx = 4'(k);
      @(negedge clk);
    end
    bin_valid = 0;
  endtask

  task automatic result_sco(input int d);
    sco_valid = 1; sco_delta = DLW'(d);
    @(negedge clk);
    sco_valid = 0;
  endtask

  function automatic int rnd(input real x);
    return int'($floor(x + 0.5));
  endfunction

  task automatic run(input int d1, input int d3, input int d2, input int est);
    int m1, m2, fin;
    real dd3, dd2;
    steps.delete(); loads.delete();
    dd3 = real'(d3) / 1048576.0 * N * M;
    dd2 = real'(d2) / 1048576.0 * N * M;
    m1 = rnd(-M / 4.0 - dd3);
    m2 = rnd(M / 4.0 - 2.0 * dd3);
    fin = -m2 - rnd(est + 3.0 * dd2);
    pkt_start = 1;
    @(negedge clk);
    pkt_start = 0;
    chk(clear, "clear follows pkt_start");
    @(negedge clk);
    chk(ready && ctrl.store_en && !ctrl.store_bank && !ctrl.pair_en && ctrl.td_sel == TD_NONE, "preamble 1: store in bank 0");
    preamble();
    chk(ready && ctrl.pair_en && !ctrl.ref_bank && !ctrl.m_log2 && ctrl.h == 0 && !ctrl.store_en, "preamble 2: pair with bank 0, m = 1");
    preamble();
    repeat (3) @(negedge clk);
    chk(!ready, "held after preamble 2 until SCO1");
    result_sco(d1);
    chk(!ready, "held while the rate loads");
    @(negedge clk);
    chk(ready && ctrl.store_en && ctrl.store_bank && !ctrl.pair_en, "preamble 3: store in bank 1");
    preamble();
    chk(ready && ctrl.pair_en && ctrl.ref_bank && !ctrl.m_log2 && ctrl.td_sel == TD_ZERO, "preamble 4: pair with bank 1, TD(eps)");
    preamble();
    repeat (3) @(negedge clk);
    chk(!ready, "held after preamble 4 until M1");
    result_sco(d3);
    @(negedge clk);
    chk(ready && ctrl.pair_en && ctrl.ref_bank && ctrl.m_log2 && int'(ctrl.h) == m1 && ctrl.td_sel == TD_MINUS,
        "preamble 5: pair with bank 1, m = 2, h = M1, TD(eps-M/4)");
    preamble();
    @(negedge clk);
    chk(ready && !ctrl.pair_en && !ctrl.store_en && ctrl.td_sel == TD_PLUS, "preamble 6: TD(eps+M/4)");
    preamble();
    result_sco(d2);
    repeat (2) @(negedge clk);
    chk(!done, "not done before the phase estimate");
    ph_valid = 1; ph_est = PHW'(est);
    @(negedge clk);
    ph_valid = 0;
    repeat (3) @(negedge clk);
    chk(done && !ready, "done after six preambles");
    chk(steps.size() == 3 && loads.size() == 2, "three steps and two rate loads");
    if (steps.size() == 3 && loads.size() == 2) begin
      chk(steps[0] == m1, $sformatf("M1 step %0d expected %0d", steps[0], m1));
      chk(steps[1] == m2 - m1, $sformatf("M2-M1 step %0d expected %0d", steps[1], m2 - m1));
      chk(steps[2] == fin, $sformatf("final step %0d expected %0d", steps[2], fin));
      chk(loads[0] == d1 && loads[1] == d1 + d2, "rates SCO1, then SCO1+SCO2");
    end
    chk(sco1 == d1 && sco3 == d3 && sco2 == d2 && est_phase == est, "results held");
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(10486, 300, 150, -6);
    run(-41943, -800, -500, 14);
    run(0, 0, 0, 2);
    run(31457, 1500, -900, -10);
    run(-5000, -2500, 2000, 6);
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
