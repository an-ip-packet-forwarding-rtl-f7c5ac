// tb_separator: random IPv4 headers (and some with another version number) through the
// destination-address separator. Expected address: header bytes 16..19, assembled byte by
// byte from the generated header bytes.
module tb_separator;
  int checks = 0, failures = 0;

  logic         in_valid;
  logic [159:0] in_pkt;
  logic         addr_valid, bad_version;
  logic [31:0]  dst_addr;

  separator #(.PKT_W(160), .ADDR_W(32), .DST_BYTE(16), .VERSION(4'd4)) dut (
    .in_valid(in_valid), .in_pkt(in_pkt), .addr_valid(addr_valid),
    .dst_addr(dst_addr), .bad_version(bad_version));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned b[20];
    logic [31:0] exp_dst;
    logic good;
    for (int t = 0; t < 1000; t++) begin
      foreach (b[i]) b[i] = 8'($urandom);
      good = (t % 5 != 0);
      b[0] = good ? 8'h45 : 8'h60 | 8'($urandom_range(0, 15));
      in_valid = (t % 9 != 0);
      for (int i = 0; i < 20; i++) in_pkt[159 - 8*i -: 8] = b[i];
      exp_dst = {b[16], b[17], b[18], b[19]};
      #1;
      checks += 3;
      if (dst_addr !== exp_dst) begin failures++; $display("FAIL dst %h exp %h", dst_addr, exp_dst); end
      if (addr_valid !== (in_valid && good)) begin failures++; $display("FAIL addr_valid"); end
      if (bad_version !== (in_valid && !good)) begin failures++; $display("FAIL bad_version"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
