// tb_update_dispatch: random add/delete updates, including port numbers beyond N, at
// N = 16. One cycle later exactly the named PLUT's write enable must be set (none, and
// upd_err, for a bad port) and the shared write fields must carry the update.
module tb_update_dispatch;
  localparam int N = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic upd_valid = 0;
  ifplut_pkg::upd_op_e upd_op = ifplut_pkg::UPD_ADD;
  logic [4:0]  upd_port = '0;
  logic [5:0]  upd_idx = '0;
  logic [31:0] upd_ipn = '0;
  logic [5:0]  upd_len = '0;
  logic [N-1:0] wr_en;
  logic wr_add;
  logic [5:0]  wr_idx;
  logic [31:0] wr_ipn;
  logic [5:0]  wr_len;
  logic upd_err;

  update_dispatch #(.N(N), .ADDR_W(32), .DEPTH(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int port, idx, len; bit add, v; logic [31:0] ipn;
    logic [N-1:0] exp_en;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      v = ($urandom_range(0, 4) != 0);
      port = $urandom_range(0, 19); idx = $urandom_range(0, 63);
      len = $urandom_range(8, 32); ipn = $urandom; add = $urandom_range(0, 1);
      upd_valid = v; upd_port = 5'(port); upd_idx = 6'(idx); upd_len = 6'(len); upd_ipn = ipn;
      upd_op = add ? ifplut_pkg::UPD_ADD : ifplut_pkg::UPD_DELETE;
      @(negedge clk);
      upd_valid = 0;
      exp_en = '0;
      if (v && port < N) exp_en[port] = 1'b1;
      checks += 2;
      if (wr_en !== exp_en) begin failures++; $display("FAIL wr_en %h exp %h", wr_en, exp_en); end
      if (upd_err !== (v && port >= N)) begin failures++; $display("FAIL upd_err"); end
      if (v) begin
        checks++;
        if (wr_add !== add || wr_idx !== 6'(idx) || wr_ipn !== ipn || wr_len !== 6'(len)) begin
          failures++; $display("FAIL write fields");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
