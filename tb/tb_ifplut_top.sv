// tb_ifplut_top: end-to-end test of the forwarding engine at its default size (16 ports,
// 64 TCAM entries per partial table, IPv4).
//
// 1. Loads the 16-route sample table (198.152.0.0/14 -> port 1, 198.128.0.0/11 -> port 2,
//    ...), each route sent to the table of its port, and forwards a packet for
//    198.88.191.1, which must leave on port 1 (matches /11 on port 1 and /10 on port 2).
// 2. Grows the table with random routes, many of them nested inside routes of other ports
//    so that several partial tables match at once, then runs random traffic on all 16
//    inputs while routes are added and deleted. Every packet's egress port is predicted by
//    a plain longest-prefix search over the testbench's flat copy of the routing table.
// Checked for each packet: the egress port (or no_route, or bad_version), the packet
// contents, and the latency: egress three cycles after acceptance, bad_version two.
// Mechanisms counted, each must occur: input contention, multi-table matches, no-route
// drops, bad-version drops, route adds and deletes under traffic, refused updates, and
// runs of one packet per cycle.
module tb_ifplut_top;
  localparam int N = 16, DEPTH = 64, W = 160;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid = '0;
  logic [N-1:0][W-1:0] in_pkt = '0;
  logic [N-1:0] in_ready;
  logic upd_valid = 0;
  ifplut_pkg::upd_op_e upd_op = ifplut_pkg::UPD_ADD;
  logic [4:0]  upd_port = '0;
  logic [5:0]  upd_idx = '0;
  logic [31:0] upd_ipn = '0;
  logic [5:0]  upd_len = '0;
  logic upd_err;
  logic [N-1:0] eg_valid;
  logic [N-1:0][W-1:0] eg_pkt;
  logic no_route, bad_version;

  ifplut_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference routing table (flat) ----------------
  bit          m_valid[N][DEPTH];
  logic [31:0] m_ipn[N][DEPTH];
  int          m_len[N][DEPTH];

  function automatic logic [31:0] pmask(int len);
    return (len == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> len);
  endfunction

  // longest prefix match over all routes; returns port index or -1; nmatch = tables hit
  function automatic int lpm(logic [31:0] a, output int nmatch);
    int best, bport;
    best = 0; bport = -1; nmatch = 0;
    for (int p = 0; p < N; p++) begin
      bit hit; hit = 0;
      for (int e = 0; e < DEPTH; e++)
        if (m_valid[p][e] && ((a & pmask(m_len[p][e])) == (m_ipn[p][e] & pmask(m_len[p][e])))) begin
          hit = 1;
          if (m_len[p][e] > best) begin best = m_len[p][e]; bport = p; end
        end
      if (hit) nmatch++;
    end
    return bport;
  endfunction

  // a route may join port p if no route of p overlaps it and no other port has it exactly
  function automatic bit route_ok(int p, logic [31:0] ipn, int len);
    for (int q = 0; q < N; q++)
      for (int e = 0; e < DEPTH; e++) if (m_valid[q][e]) begin
        int m;
        m = (len < m_len[q][e]) ? len : m_len[q][e];
        if (q == p && (ipn & pmask(m)) == (m_ipn[q][e] & pmask(m))) return 0;
        if (q != p && len == m_len[q][e] && (ipn & pmask(len)) == (m_ipn[q][e] & pmask(len))) return 0;
      end
    return 1;
  endfunction

  function automatic int free_slot(int p);
    for (int e = 0; e < DEPTH; e++) if (!m_valid[p][e]) return e;
    return -1;
  endfunction

  // ---------------- expected results ----------------
  typedef struct { int due; int port; bit bad; logic [W-1:0] pkt; } exp_t;
  exp_t exp_q[$];
  int   err_due[$];
  int   cyc = 0;

  // counters of mechanisms
  int n_contention = 0, n_multi = 0, n_noroute = 0, n_bad = 0, n_add = 0, n_del = 0;
  int n_upd_busy = 0, n_upd_err = 0, n_routed = 0, n_burst = 0, run_len = 0;

  // pending update of this cycle (applied to the model after this cycle's accepts)
  bit          pu_v;
  bit          pu_add;
  int          pu_port, pu_idx, pu_len;
  logic [31:0] pu_ipn;

  int          seq = 0;

  function automatic logic [W-1:0] make_pkt(logic [31:0] dst, bit bad);
    logic [W-1:0] p;
    for (int i = 0; i < W / 32; i++) p[32*i +: 32] = $urandom;
    p[W-1 -: 8] = bad ? 8'h65 : 8'h45;
    p[W-1-32 -: 32] = 32'(seq);            // bytes 4..7: sequence number
    p[W-1-128 -: 32] = dst;                // bytes 16..19: destination address
    seq++;
    return p;
  endfunction

  task automatic check_outputs();
    logic [N-1:0] e_valid;
    bit e_noroute, e_bad, e_err;
    logic [W-1:0] e_pkt;
    int e_port;
    e_valid = '0; e_noroute = 0; e_bad = 0; e_port = -1; e_err = 0;
    while (err_due.size() > 0 && err_due[0] == cyc) begin void'(err_due.pop_front()); e_err = 1; end
    foreach (exp_q[i]) begin
      if (exp_q[i].due == cyc) begin
        if (exp_q[i].bad) e_bad = 1;
        else if (exp_q[i].port < 0) e_noroute = 1;
        else begin e_valid[exp_q[i].port] = 1'b1; e_port = exp_q[i].port; e_pkt = exp_q[i].pkt; end
      end
    end
    while (exp_q.size() > 0 && exp_q[0].due <= cyc) void'(exp_q.pop_front());
    checks += 4;
    if (eg_valid !== e_valid) begin failures++; $display("FAIL cyc %0d eg_valid %h exp %h", cyc, eg_valid, e_valid); end
    if (no_route !== e_noroute) begin failures++; $display("FAIL cyc %0d no_route %b", cyc, no_route); end
    if (bad_version !== e_bad) begin failures++; $display("FAIL cyc %0d bad_version %b", cyc, bad_version); end
    if (upd_err !== e_err) begin failures++; $display("FAIL cyc %0d upd_err %b", cyc, upd_err); end
    if (e_port >= 0) begin
      checks++;
      if (eg_pkt[e_port] !== e_pkt) begin failures++; $display("FAIL cyc %0d packet contents", cyc); end
    end
    if (e_valid != '0 || e_noroute) run_len++; else run_len = 0;
    if (run_len == 8) n_burst++;
  endtask

  // one clock cycle: check, drive, record accepts, apply the update to the model
  task automatic step(bit traffic, int load);
    logic [N-1:0] accepted;
    @(negedge clk);
    check_outputs();
    if (traffic) begin
      for (int i = 0; i < N; i++) if (!in_valid[i] && $urandom_range(0, 99) < load) begin
        logic [31:0] dst; int r, p, e;
        r = $urandom_range(0, 99);
        if (r < 65) begin
          do begin p = $urandom_range(0, N - 1); e = $urandom_range(0, DEPTH - 1); end
          while (!m_valid[p][e] && $urandom_range(0, 20) != 0);
          dst = (m_ipn[p][e] & pmask(m_len[p][e])) | ($urandom & ~pmask(m_len[p][e]));
        end else if (r < 75) dst = 32'hC658_BF01 ^ 32'($urandom_range(0, 255));
        else dst = $urandom;
        in_pkt[i] = make_pkt(dst, $urandom_range(0, 19) == 0);
        in_valid[i] = 1'b1;
      end
    end
    upd_valid = pu_v;
    upd_op    = pu_add ? ifplut_pkg::UPD_ADD : ifplut_pkg::UPD_DELETE;
    upd_port  = 5'(pu_port);
    upd_idx   = 6'(pu_idx);
    upd_ipn   = pu_ipn;
    upd_len   = 6'(pu_len);
    #1;
    if ($countones(in_valid) > 1) n_contention++;
    accepted = in_ready;
    for (int i = 0; i < N; i++) if (in_ready[i]) begin
      exp_t x; int nm;
      checks++;
      if (!in_valid[i]) begin failures++; $display("FAIL grant without request"); end
      x.pkt = in_pkt[i];
      x.bad = (in_pkt[i][W-1 -: 4] != 4'd4);
      x.port = lpm(in_pkt[i][W-1-128 -: 32], nm);
      x.due = x.bad ? cyc + 2 : cyc + 3;
      if (!x.bad && nm > 1) n_multi++;
      if (x.bad) n_bad++; else if (x.port < 0) n_noroute++; else n_routed++;
      exp_q.push_back(x);
      exp_q.sort() with (item.due);
    end
    if (pu_v) begin
      if (pu_port >= N) begin err_due.push_back(cyc + 1); n_upd_err++; end
      else begin
        m_valid[pu_port][pu_idx] = pu_add;
        m_ipn[pu_port][pu_idx] = pu_ipn;
        m_len[pu_port][pu_idx] = pu_len;
        if (pu_add) n_add++; else n_del++;
        if (exp_q.size() > 0) n_upd_busy++;
      end
    end
    pu_v = 0;
    @(posedge clk);
    cyc++;
    #1;
    in_valid = in_valid & ~accepted;
  endtask

  task automatic route_add(int p, logic [31:0] ipn, int len);
    int e;
    e = free_slot(p);
    if (e < 0 || !route_ok(p, ipn, len)) return;
    pu_v = 1; pu_add = 1; pu_port = p; pu_idx = e; pu_ipn = ipn & pmask(len); pu_len = len;
  endtask

  // random route: often nested inside an existing route of another port
  task automatic random_route();
    int p, q, e, len;
    logic [31:0] ipn;
    p = $urandom_range(0, N - 1);
    if ($urandom_range(0, 1) == 1) begin
      q = $urandom_range(0, N - 1); e = $urandom_range(0, DEPTH - 1);
      if (!m_valid[q][e] || m_len[q][e] >= 32) return;
      len = $urandom_range(m_len[q][e] + 1, (m_len[q][e] + 8 > 32) ? 32 : m_len[q][e] + 8);
      ipn = m_ipn[q][e] | ($urandom & ~pmask(m_len[q][e]));
    end else begin
      len = $urandom_range(8, 24);
      ipn = $urandom;
    end
    route_add(p, ipn, len);
  endtask

  initial begin
    typedef struct { logic [31:0] ipn; int len; int port; } route_t;
    route_t t1[16];
    t1 = '{'{32'hC698_0000, 14, 1}, '{32'hC680_0000, 11, 2}, '{32'hC69A_0000, 16, 3},
           '{32'hC640_0000, 10, 2}, '{32'h8AC8_0000, 13, 3}, '{32'h7830_0000, 12, 2},
           '{32'hC660_0000, 11, 1}, '{32'h8ACC_0000, 14, 2}, '{32'h8AB0_0000, 12, 2},
           '{32'hC670_0000, 13, 3}, '{32'h78A0_0000, 11, 2}, '{32'hC640_0000, 11, 1},
           '{32'h78E0_0000, 13, 2}, '{32'hEF40_0000, 10, 2}, '{32'hD70B_0000, 16, 1},
           '{32'h7838_0000, 14, 3}};
    foreach (m_valid[p, e]) m_valid[p][e] = 0;
    pu_v = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. sample table, one update per cycle, each to the table of its port (paper port k = index k-1)
    foreach (t1[i]) begin
      route_add(t1[i].port - 1, t1[i].ipn, t1[i].len);
      step(0, 0);
    end
    step(0, 0); step(0, 0);
    begin
      int nm, port;
      port = lpm(32'hC658_BF01, nm);
      checks++;
      if (port != 0 || nm != 2) begin failures++; $display("FAIL model of worked example"); end
      in_pkt[5] = make_pkt(32'hC658_BF01, 0);   // arrives on input port 6
      in_valid[5] = 1'b1;
      repeat (3) step(0, 0);                    // accepted, looked up, on its egress
      checks++;
      if (eg_valid !== 16'h0001 || eg_pkt[0][W-1-128 -: 32] !== 32'hC658_BF01) begin
        failures++; $display("FAIL worked example: egress %h", eg_valid);
      end
      step(0, 0);
      checks++;
      if (n_routed != 1) begin failures++; $display("FAIL worked example not forwarded"); end
    end
    // 2. grow the table
    for (int k = 0; k < 600; k++) begin random_route(); step(0, 0); end
    // 3. traffic with updates
    for (int t = 0; t < 6000; t++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 4) random_route();
      else if (r < 7) begin
        int p, e;
        p = $urandom_range(0, N - 1); e = $urandom_range(0, DEPTH - 1);
        if (m_valid[p][e]) begin pu_v = 1; pu_add = 0; pu_port = p; pu_idx = e; pu_ipn = m_ipn[p][e]; pu_len = m_len[p][e]; end
      end else if (r == 7) begin
        pu_v = 1; pu_add = 1; pu_port = $urandom_range(N, 31); pu_idx = 0; pu_ipn = $urandom; pu_len = 16;
      end
      step(1, (t / 1000) % 2 == 0 ? 8 : 40);
    end
    in_valid = '0;
    repeat (6) step(0, 0);
    $display("mechanisms: contention=%0d multi_match=%0d routed=%0d no_route=%0d bad_version=%0d adds=%0d deletes=%0d updates_under_traffic=%0d refused_updates=%0d back_to_back_runs=%0d",
             n_contention, n_multi, n_routed, n_noroute, n_bad, n_add, n_del, n_upd_busy, n_upd_err, n_burst);
    checks++;
    if (n_contention == 0 || n_multi == 0 || n_noroute == 0 || n_bad == 0 || n_add == 0 || n_del == 0 ||
        n_upd_busy == 0 || n_upd_err == 0 || n_burst == 0 || exp_q.size() != 0) begin
      failures++; $display("FAIL a mechanism never occurred or results are missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
