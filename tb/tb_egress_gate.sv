// tb_egress_gate: random packets with a one-hot or empty port-select vector (N = 16).
// Checks, one cycle later: eg_valid[k] = valid & PS_k, the packet only on the selected port
// (zeros elsewhere), and no_route for a valid packet with no select.
module tb_egress_gate;
  localparam int N = 16, W = 160;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [W-1:0] in_pkt = '0;
  logic [N-1:0] ps = '0;
  logic [N-1:0] eg_valid;
  logic [N-1:0][W-1:0] eg_pkt;
  logic no_route;

  egress_gate #(.N(N), .PKT_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v; logic [W-1:0] p; logic [N-1:0] s;
    int routed = 0, dropped = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      v = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < W / 32; i++) p[32*i +: 32] = $urandom;
      s = '0;
      if ($urandom_range(0, 4) != 0) s[$urandom_range(0, N - 1)] = 1'b1;
      in_valid = v; in_pkt = p; ps = s;
      @(negedge clk);
      in_valid = 0;
      for (int k = 0; k < N; k++) begin
        checks += 2;
        if (eg_valid[k] !== (v && s[k])) begin failures++; $display("FAIL eg_valid[%0d]", k); end
        if (eg_pkt[k] !== ((v && s[k]) ? p : '0)) begin failures++; $display("FAIL eg_pkt[%0d]", k); end
      end
      checks++;
      if (no_route !== (v && s == '0)) begin failures++; $display("FAIL no_route"); end
      if (v && s != '0) routed++;
      if (v && s == '0) dropped++;
    end
    checks++;
    if (routed == 0 || dropped == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
