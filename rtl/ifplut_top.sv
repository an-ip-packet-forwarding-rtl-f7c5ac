// ifplut_top: IP forwarding engine based on a partitioned lookup table (IFPLUT).
//
// The routing table is split by egress port: partial lookup table k (PLUT k) holds only the
// prefixes that lead to port k. Prefixes inside one PLUT are disjoint, so each PLUT returns
// zero or one match, and the longest prefix match of the whole table becomes N parallel
// single-match searches followed by a pick of the longest result:
//
//   input ports -> line_arbiter -> separator --dst addr--> plut_tcam x N --ML[1:N]-->
//   selector --PS[1:N]--> egress_gate -> output ports
//
// with the packet itself carried past the lookup to the egress drivers. Route updates
// enter on the upd_* port and go, through update_dispatch, to the one PLUT of their port.
//
// Ports are numbered 0..N-1 here (index k is port k+1). Each match length ML is 0 for no
// match and len - 1 otherwise (5 bits for IPv4, 7 for IPv6 with ADDR_W = 128).
//
// Timing (this design's pipeline): a packet accepted from input i (in_valid[i] && in_ready[i]
// at clock edge t) is registered by the arbiter at t, looked up by all PLUTs at t+1, and
// appears on eg_valid/eg_pkt of its egress port after edge t+2, i.e. three cycles later.
// One packet is accepted per cycle. A packet no PLUT matches is dropped with a pulse on
// no_route in the cycle its egress would have been valid; a packet whose version field is
// wrong is dropped with a pulse on bad_version one cycle earlier. An update presented at
// edge u is visible to packets looked up from edge u+2 on.
module ifplut_top #(
  parameter int unsigned N        = ifplut_pkg::DEF_PORTS,
  parameter int unsigned DEPTH    = ifplut_pkg::DEF_PLUT_DEPTH,
  parameter int unsigned ADDR_W   = ifplut_pkg::IPV4_ADDR_W,
  parameter int unsigned ML_W     = ifplut_pkg::IPV4_ML_W,
  parameter int unsigned PKT_W    = ifplut_pkg::IPV4_HDR_W,
  parameter int unsigned DST_BYTE = ifplut_pkg::IPV4_DST_BYTE,
  parameter logic [3:0]  VERSION  = 4'd4,
  parameter int unsigned LEN_W    = $clog2(ADDR_W + 1),
  parameter int unsigned IDX_W    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned PORT_W   = $clog2(N + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // input ports
  input  logic [N-1:0]            in_valid,
  input  logic [N-1:0][PKT_W-1:0] in_pkt,
  output logic [N-1:0]            in_ready,
  // route updates
  input  logic                    upd_valid,
  input  ifplut_pkg::upd_op_e     upd_op,
  input  logic [PORT_W-1:0]       upd_port,
  input  logic [IDX_W-1:0]        upd_idx,
  input  logic [ADDR_W-1:0]       upd_ipn,
  input  logic [LEN_W-1:0]        upd_len,
  output logic                    upd_err,
  // output ports
  output logic [N-1:0]            eg_valid,
  output logic [N-1:0][PKT_W-1:0] eg_pkt,
  output logic                    no_route,
  output logic                    bad_version
);

  // stage 1: arbitrated packet
  logic              s1_valid;
  logic [PKT_W-1:0]  s1_pkt;
  logic              s1_addr_valid;
  logic [ADDR_W-1:0] s1_dst;
  logic              s1_bad;

  // stage 2: packet beside the registered match lengths
  logic              s2_valid;
  logic [PKT_W-1:0]  s2_pkt;
  logic [N-1:0][ML_W-1:0] s2_ml;
  logic [N-1:0]      s2_ml_valid;
  logic [N-1:0]      s2_ps;

  // update write bus
  logic [N-1:0]      wr_en;
  logic              wr_add;
  logic [IDX_W-1:0]  wr_idx;
  logic [ADDR_W-1:0] wr_ipn;
  logic [LEN_W-1:0]  wr_len;

  line_arbiter #(.N(N), .PKT_W(PKT_W)) u_arb (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_pkt    (in_pkt),
    .in_ready  (in_ready),
    .out_valid (s1_valid),
    .out_pkt   (s1_pkt)
  );

  separator #(.PKT_W(PKT_W), .ADDR_W(ADDR_W), .DST_BYTE(DST_BYTE), .VERSION(VERSION)) u_sep (
    .in_valid    (s1_valid),
    .in_pkt      (s1_pkt),
    .addr_valid  (s1_addr_valid),
    .dst_addr    (s1_dst),
    .bad_version (s1_bad)
  );

  update_dispatch #(.N(N), .ADDR_W(ADDR_W), .DEPTH(DEPTH), .LEN_W(LEN_W), .IDX_W(IDX_W),
                    .PORT_W(PORT_W)) u_upd (
    .clk       (clk),
    .rst_n     (rst_n),
    .upd_valid (upd_valid),
    .upd_op    (upd_op),
    .upd_port  (upd_port),
    .upd_idx   (upd_idx),
    .upd_ipn   (upd_ipn),
    .upd_len   (upd_len),
    .wr_en     (wr_en),
    .wr_add    (wr_add),
    .wr_idx    (wr_idx),
    .wr_ipn    (wr_ipn),
    .wr_len    (wr_len),
    .upd_err   (upd_err)
  );

  for (genvar k = 0; k < N; k++) begin : g_plut
    plut_tcam #(.ADDR_W(ADDR_W), .ML_W(ML_W), .DEPTH(DEPTH), .LEN_W(LEN_W), .IDX_W(IDX_W)) u_plut (
      .clk      (clk),
      .rst_n    (rst_n),
      .lk_valid (s1_addr_valid),
      .lk_addr  (s1_dst),
      .ml_valid (s2_ml_valid[k]),
      .ml       (s2_ml[k]),
      .wr_en    (wr_en[k]),
      .wr_add   (wr_add),
      .wr_idx   (wr_idx),
      .wr_ipn   (wr_ipn),
      .wr_len   (wr_len)
    );
  end

  // The packet bypasses the lookup, kept in step with the PLUT outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid    <= 1'b0;
      s2_pkt      <= '0;
      bad_version <= 1'b0;
    end else begin
      s2_valid    <= s1_addr_valid;
      s2_pkt      <= s1_pkt;
      bad_version <= s1_bad;
    end
  end

  selector #(.N(N), .ML_W(ML_W)) u_sel (
    .ml (s2_ml),
    .ps (s2_ps)
  );

  egress_gate #(.N(N), .PKT_W(PKT_W)) u_egress (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s2_valid),
    .in_pkt   (s2_pkt),
    .ps       (s2_ps),
    .eg_valid (eg_valid),
    .eg_pkt   (eg_pkt),
    .no_route (no_route)
  );

  a_plut_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    s2_ml_valid == {N{s2_valid}})
    else $error("ifplut_top: PLUT outputs out of step with the packet");

endmodule
