// egress_gate: output drivers that put a looked-up packet on its egress port.
//
// The packet travels beside the lookup on a bus shared by all egress ports; the driver of
// port k passes it only when the selector's PS_k is true. Here each driver is a register
// stage gated by PS_k: eg_valid[k] is in_valid & ps[k], and eg_pkt[k] carries the packet
// only while port k is selected (all zero otherwise), standing in for a disabled driver. A
// valid packet with no PS set has no route and is dropped; no_route pulses for it.
//
// Timing: all outputs are registered, one cycle after in_valid/ps.
module egress_gate #(
  parameter int unsigned N     = 16,
  parameter int unsigned PKT_W = 160
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [PKT_W-1:0]        in_pkt,
  input  logic [N-1:0]            ps,
  output logic [N-1:0]            eg_valid,
  output logic [N-1:0][PKT_W-1:0] eg_pkt,
  output logic                    no_route
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eg_valid <= '0;
      eg_pkt   <= '0;
      no_route <= 1'b0;
    end else begin
      for (int unsigned k = 0; k < N; k++) begin
        eg_valid[k] <= in_valid && ps[k];
        eg_pkt[k]   <= (in_valid && ps[k]) ? in_pkt : '0;
      end
      no_route <= in_valid && (ps == '0);
    end
  end

  a_unicast: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> $onehot0(ps))
    else $error("egress_gate: more than one egress selected for a unicast packet");

endmodule
