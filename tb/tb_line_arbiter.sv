// tb_line_arbiter: four input ports (N = 4) offering numbered packets at random and holding
// each until granted. Checks: at most one grant per cycle, only to a requesting port; the
// granted packet on the output one cycle later; packets of each port delivered in order;
// no requesting port waits more than N - 1 cycles; and with all ports requesting, grants
// rotate 0, 1, 2, 3.
module tb_line_arbiter;
  localparam int N = 4, W = 32;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid = '0;
  logic [N-1:0][W-1:0] in_pkt = '0;
  logic [N-1:0] in_ready;
  logic out_valid;
  logic [W-1:0] out_pkt;

  line_arbiter #(.N(N), .PKT_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seq[N];
  int expect_seq[N];
  int wait_cyc[N];

  initial begin
    logic [W-1:0] granted_pkt;
    bit granted;
    int last_grant, contention;
    foreach (seq[i]) begin seq[i] = 0; expect_seq[i] = 0; wait_cyc[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    granted = 0; last_grant = -1; contention = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // output of the grant made at the previous edge
      checks++;
      if (out_valid !== granted || (granted && out_pkt !== granted_pkt)) begin
        failures++;
        $display("FAIL t=%0d out_valid=%b out_pkt=%h exp %b %h", t, out_valid, out_pkt, granted, granted_pkt);
      end
      if (out_valid) begin
        int p, s;
        p = int'(out_pkt[31:24]); s = int'(out_pkt[23:0]);
        checks++;
        if (s != expect_seq[p]) begin failures++; $display("FAIL port %0d order %0d exp %0d", p, s, expect_seq[p]); end
        expect_seq[p] = s + 1;
      end
      // new requests: the phase 1000..1099 keeps every port busy
      for (int i = 0; i < N; i++) if (!in_valid[i] && ((t >= 1000 && t < 1100) || $urandom_range(0, 2) == 0)) begin
        in_valid[i] = 1'b1;
        in_pkt[i] = {8'(i), 24'(seq[i])};
        seq[i]++;
      end
      #1;
      checks++;
      if (!$onehot0(in_ready) || (in_ready & ~in_valid) != '0 || (in_valid != '0 && in_ready == '0)) begin
        failures++; $display("FAIL grant %b for requests %b", in_ready, in_valid);
      end
      if ($countones(in_valid) > 1) contention++;
      granted = 0;
      for (int i = 0; i < N; i++) begin
        if (in_ready[i]) begin
          granted = 1; granted_pkt = in_pkt[i];
          if (t > 1001 && t < 1100) begin
            checks++;
            if (i != (last_grant + 1) % N) begin failures++; $display("FAIL rotation %0d after %0d", i, last_grant); end
          end
          last_grant = i;
        end
        if (in_valid[i] && !in_ready[i]) wait_cyc[i]++; else wait_cyc[i] = 0;
        checks++;
        if (wait_cyc[i] > N - 1) begin failures++; $display("FAIL port %0d starved", i); end
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) if (granted && granted_pkt == in_pkt[i] && in_valid[i]) in_valid[i] = 1'b0;
    end
    checks++;
    if (contention < 100) begin failures++; $display("FAIL little contention"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
