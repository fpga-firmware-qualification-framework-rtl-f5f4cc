// Workload testbench: the interconnect in the 2, 4, 6 and 8 slave
// configurations of the area study, each slave a blockram behind its own
// 64 KB window.
//
// For every configuration a separate master writes a 16-word burst to each
// slave with data tagged by configuration and slave, reads every slave back,
// checks that the first window past the last slave answers DECERR, and
// measures how many cycles a 16-word read burst takes (it must not depend on
// the number of slaves). The four configurations run side by side; the test
// ends when all have finished.
module tb_interconnect_scaling;
  import ffqf_pkg::*;

  localparam int NCFG = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int finished = 0;
  int rd_cycles [NCFG];

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int NS = 2 * (c + 1);
    axi_req_t  m_req;
    axi_resp_t m_resp;
    axi_req_t  s_req  [NS];
    axi_resp_t s_resp [NS];

    axi_interconnect #(.NUM_SLAVES(NS)) u_ic (.clk, .rst_n, .m_req, .m_resp, .s_req, .s_resp);
    for (genvar s = 0; s < NS; s++) begin : g_s
      logic [31:0] unused_rdata;
      axi_bram_slave #(.MEM_AW(6)) u_mem (
        .clk, .rst_n, .a_en(1'b0), .a_we(1'b0), .a_addr('0), .a_wdata('0),
        .a_rdata(unused_rdata), .axi_req(s_req[s]), .axi_resp(s_resp[s]));
    end
    axi_tb_master bfm (.clk, .req(m_req), .resp(m_resp));

    initial begin
      logic [31:0] d [16], q [16];
      logic [1:0] r;
      int t0;
      wait (rst_n);
      for (int s = 0; s < NS; s++) begin
        for (int i = 0; i < 16; i++) d[i] = {4'(c), 4'(s), 24'(i * 5 + 3)};
        bfm.write(32'(s) << 16, d, 16, 4'hF, r);
        check(32'(r), 32'(RESP_OKAY), $sformatf("%0d slaves: write to slave %0d", NS, s));
      end
      for (int s = NS - 1; s >= 0; s--) begin
        t0 = $time;
        bfm.read(32'(s) << 16, 16, q, r);
        if (s == 0) rd_cycles[c] = ($time - t0) / 10;
        check(32'(r), 32'(RESP_OKAY), $sformatf("%0d slaves: read slave %0d", NS, s));
        for (int i = 0; i < 16; i++)
          check(q[i], {4'(c), 4'(s), 24'(i * 5 + 3)}, $sformatf("%0d slaves: slave %0d word %0d", NS, s, i));
      end
      bfm.read(32'(NS) << 16, 2, q, r);
      check(32'(r), 32'(RESP_DECERR), $sformatf("%0d slaves: window %0d unmapped", NS, NS));
      d[0] = 32'hFFFF_FFFF;
      bfm.write(32'(NS) << 16, d, 1, 4'hF, r);
      check(32'(r), 32'(RESP_DECERR), $sformatf("%0d slaves: write to window %0d", NS, NS));
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished == NCFG);
    for (int c = 0; c < NCFG; c++) begin
      $display("%0d slaves: 16-word read burst %0d cycles", 2 * (c + 1), rd_cycles[c]);
      check(32'(rd_cycles[c]), 32'(rd_cycles[0]), "read burst time independent of slave count");
    end
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
