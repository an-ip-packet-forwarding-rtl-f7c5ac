// tb_plut_bsearch: sorted-list partial lookup table with binary search, 16 entries, IPv4.
// Loads the port-3 partition of the sample route set (198.154.0.0/16, 138.200.0.0/13,
// 120.56.0.0/14, 198.112.0.0/13) in that unsorted order and checks that the list comes out
// sorted by IPN (120.56, 138.200, 198.112, 198.154), then looks up addresses inside and
// outside each. Then fills the list with random disjoint prefixes, deletes and re-adds
// some, and compares every lookup with a reference search. Checks the lookup latency of
// clog2(DEPTH + 1) + 2 cycles, the refusal of a delete of an absent entry and of an add to
// a full list.
module tb_plut_bsearch;
  localparam int DEPTH = 16;
  localparam int LAT = $clog2(DEPTH + 1) + 2;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        ready;
  logic        lk_valid = 0;
  logic [31:0] lk_addr = '0;
  logic        ml_valid;
  logic [4:0]  ml;
  logic        wr_en = 0, wr_add = 0;
  logic [31:0] wr_ipn = '0;
  logic [5:0]  wr_len = '0;
  logic        wr_err;
  logic [4:0]  count;

  plut_bsearch #(.ADDR_W(32), .ML_W(5), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] r_ipn[$];
  int          r_len[$];

  function automatic logic [31:0] pmask(int len);
    return (len == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> len);
  endfunction

  function automatic int ref_ml(logic [31:0] a);
    ref_ml = 0;
    foreach (r_ipn[e]) if ((a & pmask(r_len[e])) == r_ipn[e]) ref_ml = r_len[e] - 1;
  endfunction

  function automatic bit overlaps(logic [31:0] ipn, int len);
    overlaps = 0;
    foreach (r_ipn[e]) begin
      int m;
      m = (len < r_len[e]) ? len : r_len[e];
      if ((ipn & pmask(m)) == (r_ipn[e] & pmask(m))) overlaps = 1;
    end
  endfunction

  task automatic write(bit add, logic [31:0] ipn, int len, bit expect_err);
    @(negedge clk);
    while (!ready) @(negedge clk);
    wr_en = 1; wr_add = add; wr_ipn = ipn; wr_len = 6'(len);
    @(negedge clk);
    wr_en = 0;
    checks++;
    if (wr_err !== expect_err) begin failures++; $display("FAIL wr_err=%b for %h/%0d", wr_err, ipn, len); end
    if (!expect_err) begin
      if (add) begin r_ipn.push_back(ipn & pmask(len)); r_len.push_back(len); end
      else foreach (r_ipn[e]) if (r_ipn[e] == (ipn & pmask(len)) && r_len[e] == len) begin
        r_ipn.delete(e); r_len.delete(e); break;
      end
    end
  endtask

  task automatic lookup(logic [31:0] a);
    int exp, waited;
    exp = ref_ml(a);
    @(negedge clk);
    while (!ready) @(negedge clk);
    lk_valid = 1; lk_addr = a;
    @(negedge clk);
    lk_valid = 0; lk_addr = $urandom;    // address is captured at the request
    waited = 1;
    while (!ml_valid && waited < 100) begin @(negedge clk); waited++; end
    checks += 2;
    if (ml !== 5'(exp)) begin failures++; $display("FAIL lookup %h: ml=%0d exp=%0d", a, ml, exp); end
    if (waited != LAT) begin failures++; $display("FAIL latency %0d exp %0d", waited, LAT); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The stimulus is a sequence of operations chosen one at a time by next_op() from the
  // current reference contents, and run by a single call of each driver task.
  typedef enum int {OP_ADD, OP_DEL, OP_ADD_ERR, OP_DEL_ERR, OP_LOOKUP, OP_CHECK_SORT, OP_DONE} op_e;
  typedef struct { op_e kind; logic [31:0] ipn; int len; } op_t;

  op_t directed[$];
  int  phase = 0, churn_t = 0, churn_sub = 0;
  logic [31:0] churn_ipn;
  int          churn_len;

  function automatic op_t next_op();
    op_t o;
    if (directed.size() > 0) return directed.pop_front();
    case (phase)
      0: begin                                   // fill with random disjoint prefixes
        if (r_ipn.size() < DEPTH) begin
          do begin
            o.len = $urandom_range(8, 32);
            o.ipn = $urandom & pmask(o.len);
          end while (overlaps(o.ipn, o.len));
          o.kind = OP_ADD;
          return o;
        end
        phase = 1;
        o.kind = OP_ADD_ERR; o.ipn = 32'h0102_0300; o.len = 24;   // full list: refused
        return o;
      end
      1: begin                                   // lookups with delete / re-add churn
        if (churn_t >= 800) begin phase = 2; o.kind = OP_CHECK_SORT; return o; end
        if (churn_sub == 1) begin churn_sub = 2; o.kind = OP_LOOKUP; o.ipn = churn_ipn; return o; end
        if (churn_sub == 2) begin churn_sub = 0; o.kind = OP_ADD; o.ipn = churn_ipn; o.len = churn_len; return o; end
        begin
          int e;
          e = $urandom_range(0, r_ipn.size() - 1);
          if (churn_t % 20 == 10) begin
            churn_ipn = r_ipn[e]; churn_len = r_len[e]; churn_sub = 1; churn_t++;
            o.kind = OP_DEL; o.ipn = churn_ipn; o.len = churn_len;
            return o;
          end
          o.kind = OP_LOOKUP;
          o.ipn = (churn_t % 4 == 0) ? $urandom : (r_ipn[e] | ($urandom & ~pmask(r_len[e])));
          churn_t++;
          return o;
        end
      end
      default: begin o.kind = OP_DONE; return o; end
    endcase
  endfunction

  function automatic op_t mk(op_e k, logic [31:0] ipn, int len);
    op_t o;
    o.kind = k; o.ipn = ipn; o.len = len;
    return o;
  endfunction

  initial begin
    op_t o;
    // port-3 partition, unsorted, then lookups inside and outside each prefix
    directed.push_back(mk(OP_ADD, 32'hC69A_0000, 16));     // 198.154.0.0/16
    directed.push_back(mk(OP_ADD, 32'h8AC8_0000, 13));     // 138.200.0.0/13
    directed.push_back(mk(OP_ADD, 32'h7838_0000, 14));     // 120.56.0.0/14
    directed.push_back(mk(OP_ADD, 32'hC670_0000, 13));     // 198.112.0.0/13
    directed.push_back(mk(OP_CHECK_SORT, 0, 4));
    directed.push_back(mk(OP_LOOKUP, 32'hC658_BF01, 0));   // 198.88.191.1: no match here
    directed.push_back(mk(OP_LOOKUP, 32'hC69A_0102, 0));   // 198.154.1.2 -> /16
    directed.push_back(mk(OP_LOOKUP, 32'h7839_0000, 0));   // 120.57.0.0 -> /14
    directed.push_back(mk(OP_LOOKUP, 32'h8ACF_FFFF, 0));   // 138.207.255.255 -> /13
    directed.push_back(mk(OP_LOOKUP, 32'h0000_0001, 0));   // below every entry
    directed.push_back(mk(OP_LOOKUP, 32'hFFFF_FFFF, 0));   // above every entry
    directed.push_back(mk(OP_DEL_ERR, 32'h0A00_0000, 8));  // delete of an absent entry: refused
    repeat (2) @(negedge clk);
    rst_n = 1;
    forever begin
      o = next_op();
      if (o.kind == OP_DONE) break;
      if (o.kind == OP_LOOKUP) lookup(o.ipn);
      else if (o.kind == OP_CHECK_SORT) begin
        @(negedge clk);
        checks += 2;
        if (count !== 5'(r_ipn.size())) begin failures++; $display("FAIL count %0d", count); end
        for (int i = 1; i < int'(count); i++) if (dut.ent_ipn[i-1] >= dut.ent_ipn[i]) begin
          failures++; $display("FAIL unsorted at %0d", i); break;
        end
        if (o.len == 4 && (dut.ent_ipn[0] !== 32'h7838_0000 || dut.ent_ipn[3] !== 32'hC69A_0000)) begin
          failures++; $display("FAIL sorted order of the sample partition");
        end
      end else write(o.kind == OP_ADD || o.kind == OP_ADD_ERR, o.ipn, o.len,
                     o.kind == OP_ADD_ERR || o.kind == OP_DEL_ERR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
