// Testbench for axi_reg_slave: read registers at 0x0000, write registers at
// 0x1000 (written, strobed and read back), unmapped addresses read zero and
// ignore writes, writes to read registers are ignored.
module tb_axi_reg_slave;
  import ffqf_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t    req;
  axi_resp_t   resp;
  logic [31:0] rd_regs [6];
  logic [31:0] wr_regs [7];
  logic [6:0]  wr_stb, stb_seen;
  int checks = 0, failures = 0;

  axi_reg_slave dut (.clk, .rst_n, .axi_req(req), .axi_resp(resp),
                     .rd_regs, .wr_regs, .wr_stb);
  axi_tb_master bfm (.clk, .req, .resp);

  always @(posedge clk) if (!rst_n) stb_seen <= '0; else stb_seen <= stb_seen | wr_stb;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] d [16], q [16], v;
    logic [1:0] r;
    for (int i = 0; i < 6; i++) rd_regs[i] = 32'h1000_0000 + $urandom_range(0, 32'hFFFF);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 7; i++) check(wr_regs[i], 0, "write regs reset");
    bfm.read(32'h0, 6, q, r);
    for (int i = 0; i < 6; i++) check(q[i], rd_regs[i], $sformatf("read reg %0d", i));
    for (int i = 0; i < 16; i++) d[i] = $urandom;
    bfm.write(32'h1000, d, 7, 4'hF, r);
    check(32'(r), 0, "bresp");
    for (int i = 0; i < 7; i++) check(wr_regs[i], d[i], $sformatf("write reg %0d", i));
    @(posedge clk); @(posedge clk);
    check(32'(stb_seen), 32'h7F, "write strobes");
    bfm.read(32'h1000, 7, q, r);
    for (int i = 0; i < 7; i++) check(q[i], d[i], $sformatf("write reg readback %0d", i));
    // rd_regs change is visible on the next read
    rd_regs[2] = 32'hDEAD_0002;
    bfm.read1(32'h8, v);
    check(v, 32'hDEAD_0002, "live read register");
    // unmapped
    bfm.write1(32'h0800, 32'h1234_5678);
    bfm.read1(32'h0800, v);
    check(v, 0, "unmapped reads zero");
    bfm.read1(32'h101C, v);
    check(v, 0, "past last write register reads zero");
    bfm.write1(32'h0004, 32'h5555_5555);
    bfm.read1(32'h0004, v);
    check(v, rd_regs[1], "read register not writable");
    // partial strobe
    for (int i = 0; i < 16; i++) q[i] = 32'hFFFF_FFFF;
    bfm.write(32'h1008, q, 1, 4'b1000, r);
    check(wr_regs[2], {8'hFF, d[2][23:0]}, "byte strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
