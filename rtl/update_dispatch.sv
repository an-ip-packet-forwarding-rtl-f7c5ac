// update_dispatch: routes a table update to the partial lookup table of its port.
//
// Every route belongs to exactly one egress port, and the partial lookup table (PLUT) of
// port k holds only routes of port k. An add or delete therefore goes to a single PLUT,
// chosen by the route's port number; no other table is touched. This block decodes
// upd_port (0 = port 1, ..., N-1 = port N) into one write enable per PLUT and registers the
// shared write fields. An update naming a port outside 0..N-1 is refused and flagged on
// upd_err. Which slot of the PLUT an entry occupies is chosen by the issuer (upd_idx).
//
// Timing: one register stage; the write reaches the PLUT one cycle after upd_valid and is
// visible to lookups the cycle after that.
module update_dispatch #(
  parameter int unsigned N      = 16,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned LEN_W  = $clog2(ADDR_W + 1),
  parameter int unsigned IDX_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned PORT_W = $clog2(N + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 upd_valid,
  input  ifplut_pkg::upd_op_e  upd_op,
  input  logic [PORT_W-1:0]    upd_port,
  input  logic [IDX_W-1:0]     upd_idx,
  input  logic [ADDR_W-1:0]    upd_ipn,
  input  logic [LEN_W-1:0]     upd_len,
  output logic [N-1:0]         wr_en,
  output logic                 wr_add,
  output logic [IDX_W-1:0]     wr_idx,
  output logic [ADDR_W-1:0]    wr_ipn,
  output logic [LEN_W-1:0]     wr_len,
  output logic                 upd_err
);

  logic port_ok;
  assign port_ok = (32'(upd_port) < N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en   <= '0;
      wr_add  <= 1'b0;
      wr_idx  <= '0;
      wr_ipn  <= '0;
      wr_len  <= '0;
      upd_err <= 1'b0;
    end else begin
      for (int unsigned k = 0; k < N; k++) begin
        wr_en[k] <= upd_valid && port_ok && (32'(upd_port) == k);
      end
      upd_err <= upd_valid && !port_ok;
      if (upd_valid) begin
        wr_add <= (upd_op == ifplut_pkg::UPD_ADD);
        wr_idx <= upd_idx;
        wr_ipn <= upd_ipn;
        wr_len <= upd_len;
      end
    end
  end

endmodule
