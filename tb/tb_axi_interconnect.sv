// Testbench for axi_interconnect with three blockram slaves: each slave is
// reached through its own 64 KB window and only there, bursts pass intact,
// and an address outside the populated windows gets DECERR on both reads
// and writes.
module tb_axi_interconnect;
  import ffqf_pkg::*;

  localparam int NS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t  m_req;
  axi_resp_t m_resp;
  axi_req_t  s_req  [NS];
  axi_resp_t s_resp [NS];
  logic [31:0] a_rdata [NS];
  logic        a_en = 0;
  logic [5:0]  a_addr = '0;
  int checks = 0, failures = 0;

  axi_interconnect #(.NUM_SLAVES(NS)) dut (.clk, .rst_n, .m_req, .m_resp, .s_req, .s_resp);
  for (genvar s = 0; s < NS; s++) begin : g_s
    axi_bram_slave #(.MEM_AW(6)) u_mem (
      .clk, .rst_n, .a_en(a_en), .a_we(1'b0), .a_addr(a_addr), .a_wdata('0),
      .a_rdata(a_rdata[s]), .axi_req(s_req[s]), .axi_resp(s_resp[s]));
  end
  axi_tb_master bfm (.clk, .req(m_req), .resp(m_resp));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] d [16], q [16];
    logic [1:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < 16; i++) d[i] = {8'(s), 24'(i * 7 + 1)};
      bfm.write(32'(s) << 16 | 32'h10, d, 4 + s, 4'hF, r);
      check(32'(r), 0, "bresp ok");
    end
    // every slave holds only its own data, checked on the native ports
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); a_en = 1; a_addr = 6'(4 + i);
      @(negedge clk); a_en = 0;
      for (int s = 0; s < NS; s++)
        check(a_rdata[s], (i < 4 + s) ? {8'(s), 24'(i * 7 + 1)} : 32'h0,
              $sformatf("slave %0d word %0d", s, i));
    end
    for (int s = NS - 1; s >= 0; s--) begin
      bfm.read(32'(s) << 16 | 32'h10, 4 + s, q, r);
      check(32'(r), 0, "rresp ok");
      for (int i = 0; i < 4 + s; i++) check(q[i], {8'(s), 24'(i * 7 + 1)}, $sformatf("read slave %0d beat %0d", s, i));
    end
    // decode error
    bfm.write(32'h0005_0000, d, 3, 4'hF, r);
    check(32'(r), 32'(RESP_DECERR), "write decerr");
    bfm.read(32'h0005_0000, 2, q, r);
    check(32'(r), 32'(RESP_DECERR), "read decerr");
    bfm.read(32'h0001_0010, 1, q, r);
    check(q[0], 32'h0100_0001, "slave still reachable after decerr");
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
