// Testbench for axi_monitor_slave at reduced sizes (32-word configuration
// memory, 16-word acquisition buffers).
//
// Checks: AXI writes land in the configuration memory and are read back
// through the monitor port one cycle after cfg_en, with byte strobes; writes
// above the configuration memory change nothing; each of the four
// acquisition buffers, filled through its native port, is returned by AXI
// bursts in its own quarter of the window and nowhere else; and AXI reads
// never return configuration data.
module tb_axi_monitor_slave;
  import ffqf_pkg::*;

  localparam int CAW = 5, AAW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t  req;
  axi_resp_t resp;
  logic            cfg_en = 0;
  logic [CAW-1:0]  cfg_addr = '0;
  logic [31:0]     cfg_rdata;
  logic [3:0]      acq_we = '0;
  logic [AAW-1:0]  acq_addr  [4];
  logic [31:0]     acq_wdata [4];
  int checks = 0, failures = 0;

  axi_monitor_slave #(.CFG_AW(CAW), .ACQ_AW(AAW)) dut (
    .clk, .rst_n, .axi_req(req), .axi_resp(resp),
    .cfg_en, .cfg_addr, .cfg_rdata, .acq_we, .acq_addr, .acq_wdata);
  axi_tb_master bfm (.clk, .req, .resp);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cfg_read(input int a, output logic [31:0] v);
    @(negedge clk); cfg_en = 1; cfg_addr = CAW'(a);
    @(negedge clk); cfg_en = 0; v = cfg_rdata;
  endtask

  function automatic logic [31:0] acq_val(int k, int i);
    return 32'hA000_0000 | (32'(k) << 16) | 32'(i * 3 + 1);
  endfunction

  initial begin
    logic [31:0] d [16], q [16], v;
    logic [1:0] r;
    for (int k = 0; k < 4; k++) begin acq_addr[k] = '0; acq_wdata[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // configuration: a burst of 8 words, then a partial write
    for (int i = 0; i < 8; i++) d[i] = 32'hC0DE_0000 + 32'(i * 11);
    bfm.write(32'h0000_0010, d, 8, 4'hF, r);   // words 4..11
    check(32'(r), 32'(RESP_OKAY), "config write response");
    for (int i = 0; i < 8; i++) begin
      cfg_read(4 + i, v);
      check(v, d[i], $sformatf("config word %0d", 4 + i));
    end
    d[0] = 32'h1122_3344;
    bfm.write(32'h0000_0014, d, 1, 4'b0011, r);
    cfg_read(5, v);
    check(v, 32'hC0DE_3344, "config partial write");
    // a write past the configuration memory is dropped
    d[0] = 32'hDEAD_0001;
    bfm.write(32'(4 << AAW) * 4 - 4, d, 1, 4'hF, r);
    for (int i = 0; i < 32; i++) begin
      cfg_read(i, v);
      checks++;
      if (v == 32'hDEAD_0001) begin failures++; $display("FAIL stray write reached config word %0d", i); end
    end
    // acquisition: fill all four buffers at once, one word per cycle
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      acq_we = 4'hF;
      for (int k = 0; k < 4; k++) begin acq_addr[k] = AAW'(i); acq_wdata[k] = acq_val(k, i); end
    end
    @(negedge clk); acq_we = '0;
    for (int k = 3; k >= 0; k--) begin
      bfm.read(32'(k << AAW) * 4, 16, q, r);
      check(32'(r), 32'(RESP_OKAY), "acquisition read response");
      for (int i = 0; i < 16; i++) check(q[i], acq_val(k, i), $sformatf("buffer %0d word %0d", k, i));
    end
    // single reads alternating between buffers
    for (int i = 0; i < 8; i++) begin
      bfm.read1(32'(((i % 4) << AAW) + 15 - i) * 4, v);
      check(v, acq_val(i % 4, 15 - i), $sformatf("single read %0d", i));
    end
    // an AXI read of a configured word returns acquisition data, not config
    bfm.read1(32'h0000_0010, v);
    check(v, acq_val(0, 4), "reads come from the acquisition buffers");
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
