// tb_selector: checks the longest-match selector at N = 16 (IPv4, 5-bit ML) and at N = 128
// with 7-bit ML (the largest configuration of the IPv6 cost/delay evaluation). Inputs are
// random match-length vectors with distinct non-zero values (as a valid partitioned table
// gives) plus vectors with ties and all-zero vectors. Expected: PS one-hot at the unique
// maximum, all zero when the maximum is 0 or shared. Also the worked example: ML_1 = 10
// (198.64.0.0/11), ML_2 = 9 (198.64.0.0/10), ML_3 = 0 selects port 1.
module tb_selector;
  int checks = 0, failures = 0;

  logic [15:0][4:0]  ml16;
  logic [15:0]       ps16;
  logic [127:0][6:0] ml128;
  logic [127:0]      ps128;

  selector #(.N(16),  .ML_W(5)) dut16  (.ml(ml16),  .ps(ps16));
  selector #(.N(128), .ML_W(7)) dut128 (.ml(ml128), .ps(ps128));

  function automatic logic [127:0] ref_ps(int n, int v[128]);
    int mx, cnt, at;
    mx = 0; cnt = 0; at = 0;
    for (int i = 0; i < n; i++) if (v[i] > mx) mx = v[i];
    for (int i = 0; i < n; i++) if (v[i] == mx) begin cnt++; at = i; end
    ref_ps = '0;
    if (mx > 0 && cnt == 1) ref_ps[at] = 1'b1;
  endfunction

  task automatic run(int n, int v[128]);
    logic [127:0] exp;
    if (n == 16) for (int i = 0; i < 16; i++) ml16[i] = 5'(v[i]);
    else         for (int i = 0; i < 128; i++) ml128[i] = 7'(v[i]);
    #1;
    exp = ref_ps(n, v);
    checks++;
    if ((n == 16 && ps16 !== exp[15:0]) || (n == 128 && ps128 !== exp)) begin
      failures++;
      $display("FAIL n=%0d ps16=%h ps128=%h exp=%h", n, ps16, ps128, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[128];
    ml16 = '0; ml128 = '0;
    foreach (v[i]) v[i] = 0;
    v[0] = 10; v[1] = 9;
    run(16, v);
    checks++;
    if (ps16 !== 16'h0001) begin failures++; $display("FAIL worked example ps=%h", ps16); end
    foreach (v[i]) v[i] = 0;
    run(16, v); run(128, v);
    for (int t = 0; t < 600; t++) begin
      foreach (v[i]) v[i] = 0;
      // a few non-zero match lengths, usually distinct, sometimes tied
      for (int k = 0; k < 1 + t % 5; k++) v[$urandom_range(0, 15)] = $urandom_range(7, 31);
      if (t % 7 == 0) begin v[3] = 20; v[9] = 20; end
      run(16, v);
      foreach (v[i]) v[i] = 0;
      for (int k = 0; k < 1 + t % 9; k++) v[$urandom_range(0, 127)] = $urandom_range(7, 127);
      if (t % 11 == 0) begin v[100] = 127; v[5] = 127; end
      run(128, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
