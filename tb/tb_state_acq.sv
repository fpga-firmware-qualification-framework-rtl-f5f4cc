// Testbench for state_acq with small ring buffers (16 records, 3 channels):
// records are only written while capture is high, reads before wrapping
// return records from the first, after wrapping the oldest record comes
// first and the newest (the last cycle before capture dropped) last; the
// status words give the number of valid and total records.
module tb_state_acq;
  import ffqf_pkg::*;

  localparam int NCH = 3, DAW = 4, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        capture = 0;
  logic [31:0] data [NCH];
  axi_req_t    req;
  axi_resp_t   resp;
  int checks = 0, failures = 0;

  state_acq #(.N_CH(NCH), .DEPTH_AW(DAW)) dut (.clk, .rst_n, .capture, .data,
                                              .axi_req(req), .axi_resp(resp));
  axi_tb_master bfm (.clk, .req, .resp);

  // reference trace
  logic [31:0] hist [NCH][$];
  always @(posedge clk) if (rst_n && capture) for (int c = 0; c < NCH; c++) hist[c].push_back(data[c]);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk);
      capture <= ($urandom_range(0, 3) != 0);
      for (int c = 0; c < NCH; c++) data[c] <= {8'(c), 24'($urandom)};
    end
    @(posedge clk); capture <= 0;
    @(posedge clk);
  endtask

  task automatic compare(input string tag);
    logic [31:0] q [16], v;
    logic [1:0] r;
    int n = hist[0].size();
    int valid = (n < DEPTH) ? n : DEPTH;
    bfm.read1(32'(4 * NCH * 0 + 4 * (4 * DEPTH)), v);   // status word after the channels
    check(v, 32'(valid), {tag, " valid records"});
    bfm.read1(32'(4 * (4 * DEPTH) + 4), v);
    check(v, 32'(n), {tag, " total records"});
    for (int c = 0; c < NCH; c++) begin
      bfm.read(32'(4 * DEPTH * c), valid, q, r);
      for (int i = 0; i < valid; i++)
        check(q[i], hist[c][n - valid + i], $sformatf("%s ch%0d rec%0d", tag, c, i));
    end
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) data[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(10);                // fewer than 16 records
    compare("partial");
    run(40);                // wrapped
    compare("wrapped");
    run(7);
    compare("wrapped again");
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
