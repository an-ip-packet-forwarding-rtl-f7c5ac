// line_arbiter: input line arbiter and multiplexer of the IFPLUT engine.
//
// It chooses one of the N input ports per cycle and delivers that port's packet to the
// lookup path. Each input offers a packet with in_valid[i] and holds it until in_ready[i]
// (the grant) is seen high at a clock edge. The choice is round-robin: the search starts
// one port after the last port served, so a busy port cannot starve the others. The
// round-robin policy and the valid/ready handshake are this design's choices; the
// architecture only calls for an arbiter that selects one line, such as a multiplexer.
//
// Timing: in_ready is combinational from in_valid and the round-robin pointer. The
// selected packet and out_valid are registered, so the
// packet appears on the output one cycle after it is accepted. One packet per cycle.
module line_arbiter #(
  parameter int unsigned N     = 16,
  parameter int unsigned PKT_W = 160,
  parameter int unsigned SRC_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           in_valid,
  input  logic [N-1:0][PKT_W-1:0] in_pkt,
  output logic [N-1:0]           in_ready,
  output logic                   out_valid,
  output logic [PKT_W-1:0]       out_pkt
);

  logic [SRC_W-1:0] ptr;      // port with the highest priority this cycle
  logic [SRC_W-1:0] sel;
  logic             any;

  always_comb begin
    any      = 1'b0;
    sel      = ptr;
    in_ready = '0;
    for (int unsigned off = 0; off < N; off++) begin
      logic [SRC_W-1:0] idx;
      idx = SRC_W'((32'(ptr) + off) % N);
      if (!any && in_valid[idx]) begin
        any = 1'b1;
        sel = idx;
      end
    end
    if (any) in_ready[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else begin
      out_valid <= any;
      if (any) begin
        out_pkt <= in_pkt[sel];
        ptr     <= (32'(sel) == N - 1) ? '0 : sel + SRC_W'(1);
      end
    end
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_ready))
    else $error("line_arbiter: more than one grant");

endmodule
