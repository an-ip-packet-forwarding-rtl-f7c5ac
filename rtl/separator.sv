// separator: pulls the destination IP address field out of a received packet.
//
// The destination address is the only field the lookup needs; the separator cuts it out of
// the header and broadcasts it to all partial lookup tables. The packet word holds the IP
// header with byte 0 in its most significant bits, so the address starts DST_BYTE bytes
// from the top (byte 16 for IPv4, byte 24 for IPv6, as in the IP standards). The separator
// also checks the 4-bit version field at the top of the header against VERSION and only
// raises addr_valid for packets of that version; a packet of another version is reported on
// bad_version and not looked up. That version check is this design's own addition.
//
// Interface: in_valid/in_pkt in; addr_valid, dst_addr, bad_version out. Combinational.
module separator #(
  parameter int unsigned PKT_W    = 160,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned DST_BYTE = 16,
  parameter logic [3:0]  VERSION  = 4'd4
) (
  input  logic              in_valid,
  input  logic [PKT_W-1:0]  in_pkt,
  output logic              addr_valid,
  output logic [ADDR_W-1:0] dst_addr,
  output logic              bad_version
);

  localparam int unsigned DST_MSB = PKT_W - 1 - 8 * DST_BYTE;

  logic version_ok;

  assign version_ok  = (in_pkt[PKT_W-1 -: 4] == VERSION);
  assign dst_addr    = in_pkt[DST_MSB -: ADDR_W];
  assign addr_valid  = in_valid && version_ok;
  assign bad_version = in_valid && !version_ok;

endmodule
