// mask_gen: prefix-length to address-mask converter.
//
// A prefix IPN/len only constrains the leftmost len bits of an address, so before an
// address is compared with the stored IPN it is ANDed with a mask whose leftmost len bits
// are 1 and whose other bits are 0 (for /13: 11111111 11111000 00000000 00000000). This
// block builds that mask with one comparison per bit: bit ADDR_W-1-i is set when i < len.
//
// Interface: len (0..ADDR_W) in, mask out. Purely combinational.
module mask_gen #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LEN_W  = $clog2(ADDR_W + 1)
) (
  input  logic [LEN_W-1:0]  len,
  output logic [ADDR_W-1:0] mask
);

  always_comb begin
    for (int unsigned i = 0; i < ADDR_W; i++) begin
      mask[ADDR_W-1-i] = (i < 32'(len));
    end
  end

endmodule
