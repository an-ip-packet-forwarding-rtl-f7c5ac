// tb_comp_slice: checks one selector slice (N = 6, slice J = 2) on directed and random match
// length vectors. Expected: PS = 1 exactly when ML_J is strictly larger than all five others.
module tb_comp_slice;
  localparam int N = 6, W = 5, J = 2;
  int checks = 0, failures = 0;

  logic [N-1:0][W-1:0] ml;
  logic ps;

  comp_slice #(.N(N), .ML_W(W), .J(J)) dut (.ml(ml), .ps(ps));

  task automatic check();
    logic exp;
    #1;
    exp = 1'b1;
    for (int i = 0; i < N; i++) if (i != J && !(ml[J] > ml[i])) exp = 1'b0;
    checks++;
    if (ps !== exp) begin
      failures++;
      $display("FAIL ml=%h ps=%b exp=%b", ml, ps, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ml = '0; check();                       // no match anywhere: not selected
    ml = '0; ml[J] = 5'd10; check();        // only match: selected
    ml[0] = 5'd10; check();                 // tie: not selected
    ml[0] = 5'd9; ml[5] = 5'd31; check();   // larger elsewhere
    ml[5] = 5'd1; check();
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) ml[i] = W'($urandom_range(0, 31));
      if (t % 3 == 0) ml[J] = 5'd31;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
