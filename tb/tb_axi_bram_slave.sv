// Testbench for axi_bram_slave: AXI burst writes and reads, native port
// writes seen over AXI, AXI writes seen on the native port, byte strobes,
// and a streaming read burst of one beat per cycle.
module tb_axi_bram_slave;
  import ffqf_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        a_en = 0, a_we = 0;
  logic [5:0]  a_addr = '0;
  logic [31:0] a_wdata = '0, a_rdata;
  axi_req_t    req;
  axi_resp_t   resp;
  int checks = 0, failures = 0;

  axi_bram_slave #(.MEM_AW(6)) dut (
    .clk, .rst_n, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .axi_req(req), .axi_resp(resp));
  axi_tb_master bfm (.clk, .req, .resp);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // count cycles with an R beat during a burst
  int rbeats = 0, rcycles = 0; logic inburst = 0;
  always @(posedge clk) begin
    if (resp.r_valid && req.r_ready) rbeats++;
    if (inburst) rcycles++;
  end

  initial begin
    logic [31:0] d [16], q [16], v;
    logic [1:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 16; i++) d[i] = 32'hA500_0000 + i * 32'h1111;
    bfm.write(32'h40, d, 8, 4'hF, r);              // words 16..23
    check(32'(r), 0, "bresp");
    bfm.read(32'h40, 8, q, r);
    for (int i = 0; i < 8; i++) check(q[i], d[i], $sformatf("axi readback %0d", i));
    // native port reads what AXI wrote
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); a_en = 1; a_we = 0; a_addr = 6'(16 + i);
      @(negedge clk); a_en = 0;
      check(a_rdata, d[i], $sformatf("native read %0d", i));
    end
    // native writes seen over AXI
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = 6'(40 + i); a_wdata = 32'hC0DE_0000 + i;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    bfm.read(32'd160, 4, q, r);
    for (int i = 0; i < 4; i++) check(q[i], 32'hC0DE_0000 + i, $sformatf("native write %0d", i));
    // byte strobe
    for (int i = 0; i < 16; i++) q[i] = 32'hFFFF_FFFF;
    bfm.write(32'd160, q, 1, 4'b0010, r);
    bfm.read1(32'd160, v);
    check(v, 32'hC0DE_FF00, "byte strobe");
    // streaming: 16 beats arrive in consecutive cycles
    bfm.write(32'h0, d, 16, 4'hF, r);
    rbeats = 0;
    fork
      bfm.read(32'h0, 16, q, r);
      begin
        wait (resp.r_valid); inburst = 1;
        wait (rbeats == 16); inburst = 0;
      end
    join
    for (int i = 0; i < 16; i++) check(q[i], d[i], $sformatf("stream %0d", i));
    check(32'(rcycles), 16, "burst of 16 in 16 cycles");
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
