// plut_bsearch: partial lookup table (PLUT) of one egress port as a sorted list searched
// by binary search.
//
// The prefixes of one PLUT are disjoint, so they can be kept sorted by their value IPN,
// something a general routing table does not allow. The only prefix that can contain an
// address A is then the one with the largest IPN not above A. The lookup finds that entry by
// binary search over the sorted list and checks it with a masked compare: a hit when
// (A & mask(len)) == IPN, giving ML = len - 1, and ML = 0 otherwise.
//
// Storage: up to DEPTH entries kept in ascending IPN order in slots 0..count-1. An add
// places the new entry at its sorted position and moves the entries above it up by one slot;
// a delete removes the entry with the given IPN/len and closes the gap. Both are done in one
// clock cycle with one comparator per slot, so the list is never searched while it changes.
//
// Interface and timing: lookups and updates share a request handshake (ready high = idle).
// A lookup (lk_valid && ready) runs ITER = clog2(DEPTH + 1) halving steps and one compare
// step; ml_valid pulses with ml ITER + 2 clock edges after the edge that took the request
// (7 cycles for 16 entries, 9 for 64).
// An update (wr_en && ready, lookups first if both are requested) completes at the
// clock edge that accepts it. An add into a full list or a delete of an absent entry is
// ignored and reported on wr_err. The single-cycle sorted insert and this handshake are
// this design's choices; the search itself is the conventional binary search.
module plut_bsearch #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned ML_W   = 5,
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned LEN_W  = $clog2(ADDR_W + 1),
  parameter int unsigned CNT_W  = $clog2(DEPTH + 1),
  parameter int unsigned IDX_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,
  // lookup
  input  logic              lk_valid,
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              ml_valid,
  output logic [ML_W-1:0]   ml,
  // update
  input  logic              wr_en,
  input  logic              wr_add,
  input  logic [ADDR_W-1:0] wr_ipn,
  input  logic [LEN_W-1:0]  wr_len,
  output logic              wr_err,
  output logic [CNT_W-1:0]  count
);

  typedef enum logic [1:0] {S_IDLE, S_SEARCH, S_CHECK} state_e;

  state_e                       state;
  logic [ADDR_W-1:0]            ent_ipn [DEPTH];
  logic [LEN_W-1:0]             ent_len [DEPTH];
  logic [ADDR_W-1:0]            addr_q;
  logic [CNT_W-1:0]             lo, hi;

  // ---------------- search ----------------
  logic [CNT_W-1:0]  mid;
  logic [ADDR_W-1:0] cand_ipn, cand_mask;
  logic [LEN_W-1:0]  cand_len;
  logic              cand_hit;

  assign mid = CNT_W'((32'(lo) + 32'(hi)) >> 1);

  // candidate: the last entry with IPN <= address, i.e. slot lo - 1 once lo == hi
  assign cand_ipn = (lo != '0) ? ent_ipn[IDX_W'(lo - CNT_W'(1))] : '0;
  assign cand_len = (lo != '0) ? ent_len[IDX_W'(lo - CNT_W'(1))] : '0;

  mask_gen #(.ADDR_W(ADDR_W), .LEN_W(LEN_W)) u_cand_mask (
    .len  (cand_len),
    .mask (cand_mask)
  );

  assign cand_hit = (lo != '0) && ((addr_q & cand_mask) == cand_ipn);

  // ---------------- sorted insert / delete ----------------
  logic [ADDR_W-1:0] wr_mask, wr_value;
  logic [DEPTH-1:0]  below;    // below[i]: slot i holds an entry sorted before the new one
  logic [DEPTH-1:0]  same;     // same[i]:  slot i holds exactly the entry to delete
  logic [CNT_W-1:0]  ins_pos, del_pos;
  logic              del_found;

  mask_gen #(.ADDR_W(ADDR_W), .LEN_W(LEN_W)) u_wr_mask (
    .len  (wr_len),
    .mask (wr_mask)
  );

  assign wr_value = wr_ipn & wr_mask;

  always_comb begin
    ins_pos   = '0;
    del_pos   = '0;
    del_found = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      below[i] = (i < 32'(count)) && (ent_ipn[i] < wr_value);
      same[i]  = (i < 32'(count)) && (ent_ipn[i] == wr_value) && (ent_len[i] == wr_len);
      if (below[i]) ins_pos = ins_pos + CNT_W'(1);
      if (same[i] && !del_found) begin
        del_found = 1'b1;
        del_pos   = CNT_W'(i);
      end
    end
  end

  logic do_lookup, do_write, do_add, do_del;
  assign do_lookup = (state == S_IDLE) && lk_valid;
  assign do_write  = (state == S_IDLE) && !lk_valid && wr_en;
  assign do_add    = do_write && wr_add && (32'(count) < DEPTH);
  assign do_del    = do_write && !wr_add && del_found;
  assign ready     = (state == S_IDLE);

  // next contents of the list: the shift for an insert or a removal, one mux per slot
  logic [ADDR_W-1:0] ipn_nx [DEPTH];
  logic [LEN_W-1:0]  len_nx [DEPTH];

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      ipn_nx[i] = ent_ipn[i];
      len_nx[i] = ent_len[i];
      if (do_add) begin
        if (i == 32'(ins_pos)) begin
          ipn_nx[i] = wr_value;
          len_nx[i] = wr_len;
        end else if (i > 32'(ins_pos)) begin
          ipn_nx[i] = ent_ipn[i-1];
          len_nx[i] = ent_len[i-1];
        end
      end else if (do_del && i + 1 < DEPTH && i >= 32'(del_pos)) begin
        ipn_nx[i] = ent_ipn[i+1];
        len_nx[i] = ent_len[i+1];
      end
    end
  end

  always_ff @(posedge clk) begin
    ent_ipn <= ipn_nx;
    ent_len <= len_nx;
  end

  // search step counter: a fixed number of steps gives a fixed lookup latency
  localparam int unsigned ITER   = $clog2(DEPTH + 1);
  localparam int unsigned ITER_W = (ITER > 1) ? $clog2(ITER) : 1;
  logic [ITER_W-1:0] iter;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 iter <= '0;
    else if (state != S_SEARCH) iter <= '0;
    else                        iter <= iter + ITER_W'(1);
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      count    <= '0;
      lo       <= '0;
      hi       <= '0;
      addr_q   <= '0;
      ml_valid <= 1'b0;
      ml       <= '0;
      wr_err   <= 1'b0;
    end else begin
      ml_valid <= 1'b0;
      wr_err   <= do_write && !(do_add || do_del);
      if (do_add) count <= count + CNT_W'(1);
      if (do_del) count <= count - CNT_W'(1);
      unique case (state)
        S_IDLE: begin
          if (do_lookup) begin
            addr_q <= lk_addr;
            lo     <= '0;
            hi     <= count;
            state  <= S_SEARCH;
          end
        end
        S_SEARCH: begin
          // one halving step per cycle; ITER steps always suffice, extra steps are no-ops
          if (lo < hi) begin
            if (ent_ipn[IDX_W'(mid)] <= addr_q) lo <= mid + CNT_W'(1);
            else                        hi <= mid;
          end
          if (iter == ITER_W'(ITER - 1)) state <= S_CHECK;
        end
        S_CHECK: begin
          ml_valid <= 1'b1;
          ml       <= cand_hit ? ML_W'(cand_len - LEN_W'(1)) : '0;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_len_range: assert property (@(posedge clk) disable iff (!rst_n)
    do_add |-> (wr_len >= LEN_W'(2) && 32'(wr_len) <= ADDR_W))
    else $error("plut_bsearch: prefix length out of range");

endmodule
