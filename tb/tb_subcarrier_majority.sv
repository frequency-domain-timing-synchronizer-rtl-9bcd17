// tb_subcarrier_majority: random angle sets with random valid masks; the keep
// masks must equal a reference majority vote per group (minority sign
// deleted, tie keeps all, zero counts as positive), plus hand-made cases.
module tb_subcarrier_majority;
  localparam int KMAX = 6, AW = 16;
  logic signed [AW-1:0] ang_neg [KMAX];
  logic signed [AW-1:0] ang_pos [KMAX];
  logic [KMAX-1:0] valid_neg, valid_pos, keep_neg, keep_pos;
  logic deleted;
  int checks = 0, failures = 0;

  subcarrier_majority #(.KMAX(KMAX), .AW(AW)) dut (.*);

  function automatic logic [KMAX-1:0] ref_vote(input logic signed [AW-1:0] a [KMAX],
                                               input logic [KMAX-1:0] v);
    int nn = 0, np = 0;
    logic [KMAX-1:0] k;
    for (int j = 0; j < KMAX; j++) if (v[j]) begin if (a[j] < 0) nn++; else np++; end
    for (int j = 0; j < KMAX; j++)
      k[j] = v[j] && ((nn == np) || (nn > np && a[j] < 0) || (np > nn && a[j] >= 0));
    return k;
  endfunction

  task automatic check_now;
    logic [KMAX-1:0] en, ep;
    #1;
    en = ref_vote(ang_neg, valid_neg);
    ep = ref_vote(ang_pos, valid_pos);
    checks++;
    if (keep_neg !== en || keep_pos !== ep || deleted !== ((en != valid_neg) || (ep != valid_pos))) begin
      failures++;
      $display("FAIL: keep %b %b expected %b %b", keep_neg, keep_pos, en, ep);
    end
  endtask

  initial begin
    // ideal line: negatives all negative, positives all positive
    for (int j = 0; j < KMAX; j++) begin ang_neg[j] = AW'(-(j + 1) * 300); ang_pos[j] = AW'((j + 1) * 300); end
    valid_neg = '1; valid_pos = '1;
    check_now();
    checks++;
    if (deleted || keep_neg != '1 || keep_pos != '1) begin failures++; $display("FAIL: ideal line"); end
    // one outlier of opposite sign in the positive group (point A)
    ang_pos[2] = -16'sd900;
    check_now();
    checks++;
    if (!deleted || keep_pos != 6'b111011) begin failures++; $display("FAIL: point A"); end
    for (int i = 0; i < 300; i++) begin
      for (int j = 0; j < KMAX; j++) begin
        ang_neg[j] = AW'($urandom); ang_pos[j] = AW'($urandom);
        if ($urandom_range(0, 9) == 0) ang_pos[j] = '0;
      end
      valid_neg = KMAX'($urandom); valid_pos = KMAX'($urandom);
      if (i < 100) begin valid_neg = '1; valid_pos = '1; end
      check_now();
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
