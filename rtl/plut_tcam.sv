// plut_tcam: partial lookup table (PLUT) of one egress port, built as a ternary CAM.
//
// All prefixes in one PLUT lead to the same port and, after redundant enclosed prefixes
// have been dropped, are disjoint: an address matches at most one entry. The table
// therefore needs neither sorted entries nor a priority encoder. Every entry holds a
// valid bit, the prefix value IPN, its mask and its match length ML = len - 1; all entries
// compare the masked destination address in parallel, and the ML of the (single) hit is
// obtained by ORing the hit-gated ML of all entries. ML = 0 means no match. The port
// number is not stored: it is implied by which PLUT the entry sits in.
//
// Update: an entry can go in any free slot, so add and delete are single writes. A write
// (wr_en) stores prefix wr_ipn/wr_len in slot wr_idx with valid = wr_add; a delete is a
// write with wr_add = 0. The mask is generated from len once, at write time (mask_gen).
// Prefix lengths must lie in 2..ADDR_W so that ML = len - 1 is non-zero and fits ML_W
// bits (IPv4 prefixes are 8 bits or longer in practice, so 5 bits suffice).
//
// Timing: lookup is one cycle. lk_addr is sampled with lk_valid at a rising edge; ml and
// ml_valid are registered there. A write in the same cycle as a lookup takes effect for the
// next lookup. The slot addressing of writes and the one-cycle registered lookup are this
// design's choices; the architecture leaves the choice of slot to the software.
module plut_tcam #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned ML_W   = 5,
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned LEN_W  = $clog2(ADDR_W + 1),
  parameter int unsigned IDX_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic              lk_valid,
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              ml_valid,
  output logic [ML_W-1:0]   ml,
  // update
  input  logic              wr_en,
  input  logic              wr_add,
  input  logic [IDX_W-1:0]  wr_idx,
  input  logic [ADDR_W-1:0] wr_ipn,
  input  logic [LEN_W-1:0]  wr_len
);

  logic [DEPTH-1:0]             ent_valid;
  logic [ADDR_W-1:0]            ent_value [DEPTH];
  logic [ADDR_W-1:0]            ent_mask  [DEPTH];
  logic [ML_W-1:0]              ent_ml    [DEPTH];

  logic [ADDR_W-1:0] wr_mask;
  logic [DEPTH-1:0]  hit;
  logic [ML_W-1:0]   ml_or;

  mask_gen #(.ADDR_W(ADDR_W), .LEN_W(LEN_W)) u_mask (
    .len  (wr_len),
    .mask (wr_mask)
  );

  // Entry storage. Only the valid bits need a reset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid <= '0;
    end else if (wr_en) begin
      ent_valid[wr_idx] <= wr_add;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_add) begin
      ent_value[wr_idx] <= wr_ipn & wr_mask;
      ent_mask[wr_idx]  <= wr_mask;
      ent_ml[wr_idx]    <= ML_W'(wr_len - LEN_W'(1));
    end
  end

  // Parallel ternary match; at most one hit, so the hit MLs are simply ORed
  always_comb begin
    ml_or = '0;
    for (int unsigned e = 0; e < DEPTH; e++) begin
      hit[e] = ent_valid[e] && ((lk_addr & ent_mask[e]) == ent_value[e]);
      if (hit[e]) ml_or = ml_or | ent_ml[e];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ml_valid <= 1'b0;
      ml       <= '0;
    end else begin
      ml_valid <= lk_valid;
      ml       <= lk_valid ? ml_or : '0;
    end
  end

  // A partial table holds disjoint prefixes: never more than one hit
  a_single_hit: assert property (@(posedge clk) disable iff (!rst_n)
    lk_valid |-> $onehot0(hit))
    else $error("plut_tcam: more than one entry matched; prefixes are not disjoint");

  a_len_range: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && wr_add) |-> (wr_len >= LEN_W'(2) && 32'(wr_len) <= ADDR_W))
    else $error("plut_tcam: prefix length out of range");

endmodule
