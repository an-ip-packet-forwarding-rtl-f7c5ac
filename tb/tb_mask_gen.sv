// tb_mask_gen: exhaustive check of the prefix-length to mask converter for IPv4 (len 0..32)
// and a sweep of IPv6 (len 0..128). The expected mask is the all-ones word shifted left by
// (ADDR_W - len), worked out on a wider integer. Includes the /13 example 255.248.0.0.
module tb_mask_gen;
  int checks = 0, failures = 0;

  logic [5:0]   len4;
  logic [31:0]  mask4;
  logic [7:0]   len6;
  logic [127:0] mask6;

  mask_gen #(.ADDR_W(32))  dut4 (.len(len4), .mask(mask4));
  mask_gen #(.ADDR_W(128)) dut6 (.len(len6), .mask(mask6));

  function automatic logic [127:0] ref_mask(int len, int w);
    logic [255:0] ones, keep;
    ones = '1;
    keep = (256'(1) << w) - 256'(1);
    ref_mask = 128'((ones << (w - len)) & keep);
    if (len == 0) ref_mask = '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l <= 32; l++) begin
      len4 = 6'(l);
      #1;
      checks++;
      if (mask4 !== 32'(ref_mask(l, 32))) begin
        failures++;
        $display("FAIL v4 len=%0d mask=%h", l, mask4);
      end
    end
    len4 = 6'd13;
    #1;
    checks++;
    if (mask4 !== 32'hFFF8_0000) begin
      failures++;
      $display("FAIL /13 example mask=%h", mask4);
    end
    for (int l = 0; l <= 128; l++) begin
      len6 = 8'(l);
      #1;
      checks++;
      if (mask6 !== ref_mask(l, 128)) begin
        failures++;
        $display("FAIL v6 len=%0d mask=%h", l, mask6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
