// ifplut_pkg: constants shared by the partitioned-lookup-table (IFPLUT) forwarding engine.
//
// The engine splits the routing table into one partial table (PLUT) per egress port. Inside
// one PLUT no prefix encloses another, so a lookup there gives zero or one hit, and the
// longest match of the whole table is the longest of the N per-port hits.
//
// Widths follow the IPv4 numbers used throughout: 32-bit addresses and a 5-bit match length
// ML, where ML = 0 means "no match" and ML = len - 1 for a matched prefix of length len.
// IPv6 uses 128-bit addresses and a 7-bit ML. The header layout (destination address at byte
// 16 of the 20-byte IPv4 header, byte 24 of the 40-byte IPv6 header) comes from the IP
// standards, not from the architecture itself.
package ifplut_pkg;

  // IPv4 (default) and IPv6 address and match-length widths
  localparam int unsigned IPV4_ADDR_W = 32;
  localparam int unsigned IPV4_ML_W   = 5;
  localparam int unsigned IPV6_ADDR_W = 128;
  localparam int unsigned IPV6_ML_W   = 7;

  // Packet word: the IP header, most significant byte first (byte 0 in the top bits)
  localparam int unsigned IPV4_HDR_W    = 160;
  localparam int unsigned IPV4_DST_BYTE = 16;
  localparam int unsigned IPV6_HDR_W    = 320;
  localparam int unsigned IPV6_DST_BYTE = 24;

  // Default router size: 16 egress ports (smallest configuration evaluated), 64 TCAM
  // entries per partial lookup table
  localparam int unsigned DEF_PORTS      = 16;
  localparam int unsigned DEF_PLUT_DEPTH = 64;

  // Route update operation
  typedef enum logic {
    UPD_DELETE = 1'b0,
    UPD_ADD    = 1'b1
  } upd_op_e;

endpackage
