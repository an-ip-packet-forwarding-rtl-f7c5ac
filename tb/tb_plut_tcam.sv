// tb_plut_tcam: one partial lookup table at its default size (64 entries, IPv4).
// Phase 1 loads the port-1 partition of the sample route set (198.152.0.0/14,
// 198.96.0.0/11, 198.64.0.0/11, 215.11.0.0/16) into scattered slots and looks up
// 198.88.191.1, which must return ML = 10 (the /11). Phase 2 fills the table with random
// disjoint prefixes, deletes and re-adds some, and compares every lookup with a reference
// search over the tb's own copy of the entries. Lookup latency must be one cycle.
module tb_plut_tcam;
  localparam int DEPTH = 64;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        lk_valid = 0;
  logic [31:0] lk_addr = '0;
  logic        ml_valid;
  logic [4:0]  ml;
  logic        wr_en = 0, wr_add = 0;
  logic [5:0]  wr_idx = '0;
  logic [31:0] wr_ipn = '0;
  logic [5:0]  wr_len = '0;

  plut_tcam #(.ADDR_W(32), .ML_W(5), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // reference copy
  bit          r_valid[DEPTH];
  logic [31:0] r_ipn[DEPTH];
  int          r_len[DEPTH];

  function automatic logic [31:0] pmask(int len);
    return (len == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> len);
  endfunction

  function automatic int ref_ml(logic [31:0] a);
    ref_ml = 0;
    for (int e = 0; e < DEPTH; e++)
      if (r_valid[e] && ((a & pmask(r_len[e])) == (r_ipn[e] & pmask(r_len[e])))) ref_ml = r_len[e] - 1;
  endfunction

  function automatic bit overlaps(logic [31:0] ipn, int len);
    int m;
    overlaps = 0;
    for (int e = 0; e < DEPTH; e++) if (r_valid[e]) begin
      m = (len < r_len[e]) ? len : r_len[e];
      if ((ipn & pmask(m)) == (r_ipn[e] & pmask(m))) overlaps = 1;
    end
  endfunction

  task automatic write(int idx, bit add, logic [31:0] ipn, int len);
    @(negedge clk);
    wr_en = 1; wr_add = add; wr_idx = 6'(idx); wr_ipn = ipn; wr_len = 6'(len);
    @(negedge clk);
    wr_en = 0;
    r_valid[idx] = add; r_ipn[idx] = ipn; r_len[idx] = len;
  endtask

  task automatic lookup(logic [31:0] a);
    int exp;
    exp = ref_ml(a);
    @(negedge clk);
    lk_valid = 1; lk_addr = a;
    @(negedge clk);             // one clock edge later the result must be there
    lk_valid = 0;
    checks++;
    if (!ml_valid || ml !== 5'(exp)) begin
      failures++;
      $display("FAIL lookup %h: ml=%0d valid=%b exp=%0d", a, ml, ml_valid, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits;
    foreach (r_valid[i]) r_valid[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    write(3,  1, 32'hC698_0000, 14);   // 198.152.0.0/14
    write(17, 1, 32'hC660_0000, 11);   // 198.96.0.0/11
    write(40, 1, 32'hC640_0000, 11);   // 198.64.0.0/11
    write(63, 1, 32'hD70B_0000, 16);   // 215.11.0.0/16
    lookup(32'hC658_BF01);             // 198.88.191.1 -> /11, ML 10
    checks++;
    if (ml !== 5'd10) begin failures++; $display("FAIL worked example"); end
    lookup(32'hD70B_1234);             // 215.11.18.52 -> /16, ML 15
    lookup(32'h0A00_0001);             // no match
    // idle cycle: ml_valid must drop
    @(negedge clk);
    checks++;
    if (ml_valid) begin failures++; $display("FAIL ml_valid without lookup"); end
    // fill with random disjoint prefixes
    for (int e = 0; e < DEPTH; e++) if (!r_valid[e]) begin
      logic [31:0] ipn; int len;
      do begin
        len = $urandom_range(8, 32);
        ipn = $urandom & pmask(len);
      end while (overlaps(ipn, len));
      write(e, 1, ipn, len);
    end
    hits = 0;
    for (int t = 0; t < 1500; t++) begin
      logic [31:0] a;
      int e;
      e = $urandom_range(0, DEPTH - 1);
      if (t % 4 == 0) a = $urandom;
      else a = (r_ipn[e] & pmask(r_len[e])) | ($urandom & ~pmask(r_len[e]));
      if (ref_ml(a) != 0) hits++;
      lookup(a);
      if (t % 50 == 25) begin
        logic [31:0] old; int ol;
        old = r_ipn[e]; ol = r_len[e];
        write(e, 0, old, ol);             // delete
        lookup(old);                      // that prefix must now miss
        write(e, 1, old, ol);             // re-add
      end
    end
    checks++;
    if (hits < 500) begin failures++; $display("FAIL too few hits %0d", hits); end
    // back-to-back lookups: a new result every cycle
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      lk_valid = 1; lk_addr = (r_ipn[t] & pmask(r_len[t]));
      @(posedge clk); #1;
      checks++;
      if (ml !== 5'(r_len[t] - 1)) begin failures++; $display("FAIL pipelined lookup %0d", t); end
    end
    lk_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
