// tb_plut_tcam_ipv6: the TCAM partial lookup table at IPv6 widths (128-bit addresses,
// 7-bit match length, 16 entries). Fills it with random disjoint prefixes of length 16..128,
// looks up addresses inside each prefix and random ones, and compares with a reference
// search; also checks a /128 host route (ML 127) and deletion.
module tb_plut_tcam_ipv6;
  localparam int DEPTH = 16;
  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0;
  logic         lk_valid = 0;
  logic [127:0] lk_addr = '0;
  logic         ml_valid;
  logic [6:0]   ml;
  logic         wr_en = 0, wr_add = 0;
  logic [3:0]   wr_idx = '0;
  logic [127:0] wr_ipn = '0;
  logic [7:0]   wr_len = '0;

  plut_tcam #(.ADDR_W(128), .ML_W(7), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  bit           r_valid[DEPTH];
  logic [127:0] r_ipn[DEPTH];
  int           r_len[DEPTH];

  function automatic logic [127:0] pmask(int len);
    logic [127:0] ones;
    ones = '1;
    return (len == 0) ? '0 : ~(ones >> len);
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic int ref_ml(logic [127:0] a);
    ref_ml = 0;
    for (int e = 0; e < DEPTH; e++)
      if (r_valid[e] && (a & pmask(r_len[e])) == (r_ipn[e] & pmask(r_len[e]))) ref_ml = r_len[e] - 1;
  endfunction

  function automatic bit overlaps(logic [127:0] ipn, int len);
    overlaps = 0;
    for (int e = 0; e < DEPTH; e++) if (r_valid[e]) begin
      int m;
      m = (len < r_len[e]) ? len : r_len[e];
      if ((ipn & pmask(m)) == (r_ipn[e] & pmask(m))) overlaps = 1;
    end
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (r_valid[i]) r_valid[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int e;
      e = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      wr_en = 0; lk_valid = 0;
      if (!r_valid[e] || t % 97 == 0) begin
        // (re)write slot e with a new disjoint prefix; slot 0 first gets a /128 host route
        logic [127:0] ipn; int len;
        r_valid[e] = 0;
        do begin
          len = (t == 0) ? 128 : $urandom_range(16, 128);
          ipn = rand128() & pmask(len);
        end while (overlaps(ipn, len));
        wr_en = 1; wr_add = 1; wr_idx = 4'(e); wr_ipn = ipn; wr_len = 8'(len);
        r_valid[e] = 1; r_ipn[e] = ipn; r_len[e] = len;
      end else begin
        logic [127:0] a; int exp;
        a = (t % 3 == 0) ? rand128() : (r_ipn[e] | (rand128() & ~pmask(r_len[e])));
        exp = ref_ml(a);
        lk_valid = 1; lk_addr = a;
        @(negedge clk);
        lk_valid = 0;
        checks++;
        if (!ml_valid || ml !== 7'(exp)) begin failures++; $display("FAIL %h ml=%0d exp=%0d", a, ml, exp); end
        if (t % 50 == 1) begin           // delete the slot and check the miss
          wr_en = 1; wr_add = 0; wr_idx = 4'(e);
          @(negedge clk);
          wr_en = 0; r_valid[e] = 0;
          lk_valid = 1; lk_addr = r_ipn[e];
          exp = ref_ml(r_ipn[e]);
          @(negedge clk);
          lk_valid = 0;
          checks++;
          if (ml !== 7'(exp)) begin failures++; $display("FAIL after delete"); end
        end
      end
    end
    @(negedge clk);
    wr_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
