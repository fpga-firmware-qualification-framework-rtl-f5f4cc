// Testbench for axi_inject_bram: data written over the debug port is read
// over the functional port and the other way round, with both ports busy at
// the same time.
module tb_axi_inject_bram;
  import ffqf_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t  dreq, freq;
  axi_resp_t dresp, fresp;
  int checks = 0, failures = 0;

  axi_inject_bram #(.MEM_AW(8)) dut (.clk, .rst_n, .dbg_req(dreq), .dbg_resp(dresp),
                                     .fn_req(freq), .fn_resp(fresp));
  axi_tb_master bfm_d (.clk, .req(dreq), .resp(dresp));
  axi_tb_master bfm_f (.clk, .req(freq), .resp(fresp));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] d [16], e [16], q [16], p [16];
    logic [1:0] r1, r2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // stimulus blocks, step 0x10 apart as a test-vector memory would be
    for (int b = 0; b < 4; b++) begin
      for (int i = 0; i < 16; i++) d[i] = 32'hB000_0000 + b * 16 + i;
      bfm_d.write(32'(b * 16), d, 4, 4'hF, r1);
    end
    for (int b = 0; b < 4; b++) begin
      bfm_f.read(32'(b * 16), 4, q, r1);
      for (int i = 0; i < 4; i++) check(q[i], 32'hB000_0000 + b * 16 + i, $sformatf("fn read block %0d word %0d", b, i));
    end
    // both ports at once: debug writes a new area while functional reads the old one
    for (int i = 0; i < 16; i++) e[i] = 32'hE000_0000 + i;
    fork
      bfm_d.write(32'h100, e, 16, 4'hF, r1);
      bfm_f.read(32'h0, 16, q, r2);
    join
    for (int i = 0; i < 16; i++) check(q[i], 32'hB000_0000 + (i / 4) * 16 + i % 4, $sformatf("concurrent fn read %0d", i));
    // functional side writes, debug side reads
    bfm_f.write(32'h200, e, 8, 4'hF, r1);
    bfm_d.read(32'h200, 8, p, r2);
    for (int i = 0; i < 8; i++) check(p[i], e[i], $sformatf("dbg read %0d", i));
    bfm_d.read(32'h100, 16, p, r2);
    for (int i = 0; i < 16; i++) check(p[i], e[i], $sformatf("dbg readback %0d", i));
    // byte strobes on each port: only the enabled bytes change
    d[0] = 32'hAABB_CCDD;
    bfm_d.write(32'h200, d, 1, 4'b0101, r1);
    bfm_f.read(32'h200, 1, q, r2);
    check(q[0], 32'hE0BB_00DD, "dbg partial write");
    d[0] = 32'h1122_3344;
    bfm_f.write(32'h204, d, 1, 4'b1000, r1);
    bfm_d.read(32'h204, 1, p, r2);
    check(p[0], 32'h1100_0001, "fn partial write");
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
