// Testbench for axi_master: copies of 1..16 words between two blockram
// slaves behind an interconnect, length clipping, an error response, the
// pipelining of write after the first read word, and the copy latency, which
// must stay within the template's worst-case copy latency of 16 + n + 1
// cycles for a burst of n words.
module tb_axi_master;
  import ffqf_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cmd_valid = 0, cmd_ready, done, err;
  logic [31:0] cmd_src = 0, cmd_dst = 0;
  logic [7:0]  cmd_len = 0;
  axi_req_t    m_req;
  axi_resp_t   m_resp;
  axi_req_t    s_req  [2];
  axi_resp_t   s_resp [2];
  logic        a_en [2], a_we [2];
  logic [7:0]  a_addr [2];
  logic [31:0] a_wdata [2], a_rdata [2];
  int checks = 0, failures = 0;
  int overlap = 0;

  axi_master dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_src, .cmd_dst, .cmd_len,
                  .done, .err, .m_req, .m_resp);
  axi_interconnect #(.NUM_SLAVES(2)) u_ic (.clk, .rst_n, .m_req, .m_resp, .s_req, .s_resp);
  for (genvar s = 0; s < 2; s++) begin : g_s
    axi_bram_slave #(.MEM_AW(8)) u_mem (
      .clk, .rst_n, .a_en(a_en[s]), .a_we(a_we[s]), .a_addr(a_addr[s]), .a_wdata(a_wdata[s]),
      .a_rdata(a_rdata[s]), .axi_req(s_req[s]), .axi_resp(s_resp[s]));
  end

  // read and write data moving in the same cycle shows the pipelined copy
  always @(posedge clk)
    if (m_resp.r_valid && m_req.r_ready && m_req.w_valid && m_resp.w_ready) overlap++;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic native(input int s, input logic we, input logic [7:0] addr,
                        input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    a_en[s] = 1; a_we[s] = we; a_addr[s] = addr; a_wdata[s] = wd;
    @(negedge clk);
    a_en[s] = 0; a_we[s] = 0;
    rd = a_rdata[s];
  endtask

  task automatic copy(input logic [31:0] src, input logic [31:0] dst, input int len,
                      output int cycles, output logic e);
    int c;
    @(posedge clk);
    cmd_valid <= 1; cmd_src <= src; cmd_dst <= dst; cmd_len <= 8'(len);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_valid <= 0;
    c = 0;
    do begin
      @(posedge clk); c++;
    end while (!done);
    cycles = c;
    e = err;
  endtask

  initial begin
    logic [31:0] v;
    int cyc; logic e;
    for (int s = 0; s < 2; s++) begin a_en[s] = 0; a_we[s] = 0; a_addr[s] = 0; a_wdata[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) native(0, 1, 8'(i), 32'h5A00_0000 + i * 3, v);
    for (int n = 1; n <= 16; n++) begin
      copy(32'h0000_0000 + 4 * n, 32'h0001_0000 + 4 * 8 * (n % 8), n, cyc, e);
      check(32'(e), 0, "no error");
      for (int i = 0; i < n; i++) begin
        native(1, 0, 8'(8 * (n % 8) + i), 0, v);
        check(v, 32'h5A00_0000 + (n + i) * 3, $sformatf("copy n=%0d word %0d", n, i));
      end
      $display("copy of %0d words: %0d cycles", n, cyc);
      checks++;
      if (cyc > 16 + n + 1) begin
        failures++;
        $display("FAIL latency %0d > %0d", cyc, 16 + n + 1);
      end
    end
    // length 20 is cut to 16: word 16 of the destination stays untouched
    native(1, 1, 8'd200, 32'hFEED_F00D, v);
    copy(32'h0, 32'h0001_0000 + 4 * 184, 20, cyc, e);
    native(1, 0, 8'd199, 0, v);
    check(v, 32'h5A00_0000 + 15 * 3, "clipped copy last word");
    native(1, 0, 8'd200, 0, v);
    check(v, 32'hFEED_F00D, "clipped copy stops at 16");
    // error response from an unpopulated window
    copy(32'h0000_0000, 32'h0007_0000, 2, cyc, e);
    check(32'(e), 1, "error flagged");
    copy(32'h0000_0000, 32'h0001_0000, 1, cyc, e);
    check(32'(e), 0, "error cleared on next copy");
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL read and write never overlapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
