// Testbench for axi_monitor. The spied bus is driven directly. Checks: the
// configuration reader states, AXI trigger on an address match followed by
// a data match (and no trigger on address-only or data-only matches),
// acquisition into the four buffers in beat order until the requested
// count, the status codes of each state machine, break on trigger, Reset,
// parallel-register trigger with a "larger than" compare, the capture pulse
// and hard break, and the direct Break bit.
module tb_axi_monitor;
  import ffqf_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  ctrl = 0, status;
  axi_req_t    sreq;
  axi_resp_t   sresp;
  logic [31:0] par_reg = 0;
  logic        cfg_en;
  logic [8:0]  cfg_addr;
  logic [31:0] cfg_rdata;
  logic [3:0]  acq_we;
  logic [9:0]  acq_addr [4];
  logic [31:0] acq_wdata [4];
  logic [10:0] acq_count [4];
  logic        trig, break_req, cap, hard_break;
  int checks = 0, failures = 0;
  int trig_cnt = 0, cap_cnt = 0;

  axi_monitor dut (.clk, .rst_n, .ctrl, .status, .spy_req(sreq), .spy_resp(sresp), .par_reg,
                   .cfg_en, .cfg_addr, .cfg_rdata, .acq_we, .acq_addr, .acq_wdata, .acq_count,
                   .trig, .break_req, .cap, .hard_break);

  logic [31:0] cfg [512];
  always_ff @(posedge clk) if (cfg_en) cfg_rdata <= cfg[cfg_addr];

  logic [31:0] acq [4][1024];
  always @(posedge clk) begin
    for (int k = 0; k < 4; k++) if (acq_we[k]) acq[k][acq_addr[k]] <= acq_wdata[k];
    if (trig) trig_cnt++;
    if (cap) cap_cnt++;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one beat per cycle on the spied bus
  task automatic bus_read(input logic [31:0] addr, input logic [31:0] d [16], input int n);
    @(posedge clk);
    sreq.ar_valid <= 1; sreq.ar.addr <= addr; sresp.ar_ready <= 1; sreq.ar.len <= 8'(n-1);
    @(posedge clk);
    sreq.ar_valid <= 0; sresp.ar_ready <= 0;
    for (int i = 0; i < n; i++) begin
      sresp.r_valid <= 1; sreq.r_ready <= 1; sresp.r_data <= d[i]; sresp.r_last <= (i == n-1);
      @(posedge clk);
    end
    sresp.r_valid <= 0; sreq.r_ready <= 0;
  endtask

  task automatic bus_write(input logic [31:0] addr, input logic [31:0] d [16], input int n);
    @(posedge clk);
    sreq.aw_valid <= 1; sreq.aw.addr <= addr; sresp.aw_ready <= 1;
    @(posedge clk);
    sreq.aw_valid <= 0; sresp.aw_ready <= 0;
    for (int i = 0; i < n; i++) begin
      sreq.w_valid <= 1; sresp.w_ready <= 1; sreq.w_data <= d[i]; sreq.w_last <= (i == n-1);
      @(posedge clk);
    end
    sreq.w_valid <= 0; sresp.w_ready <= 0;
  endtask

  task automatic load_cfg();
    @(posedge clk); ctrl[CTRL_READCFG] <= 1;
    repeat (40) @(posedge clk);
    check(32'(status[1:0]), 32'(CFG_DONE), "config reader done");
    ctrl[CTRL_READCFG] <= 0;
    @(posedge clk); @(posedge clk);
    check(32'(status[1:0]), 32'(CFG_IDLE), "config reader idle");
  endtask

  initial begin
    logic [31:0] d [16];
    for (int i = 0; i < 512; i++) cfg[i] = 0;
    sreq = '0; sresp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(32'(status), 0, "status after reset");
    // ---- AXI trigger: read of 0x010004 returning 0x77 in the low byte
    cfg[0] = 32'h0001_0004; cfg[1] = 32'h00FF_FFFF;
    cfg[2] = 32'h0000_0077; cfg[3] = 32'h0000_00FF;
    cfg[6] = {19'd0, 1'b1, 2'b0, 1'b0, 1'b1, 2'b0, 2'b0, 2'(CMP_EQ), 2'(CMP_EQ)}; // watch reads, break on trig
    cfg[7] = 6;
    load_cfg();
    ctrl[1:0] <= MON_AXI; ctrl[CTRL_ENABLE] <= 1;
    repeat (2) @(posedge clk);
    check(32'(status[6:4]), 32'(AXM_WAIT_ADDRESS), "waiting for address");
    d[0] = 32'h77; d[1] = 32'h77;
    bus_read(32'h0000_0000, d, 2);                  // data matches, address does not
    check(32'(status[6:4]), 32'(AXM_WAIT_ADDRESS), "no trigger on data only");
    d[0] = 32'h11; d[1] = 32'h22;
    bus_read(32'h0001_0004, d, 2);                  // address matches, data does not
    @(posedge clk);
    check(32'(status[6:4]), 32'(AXM_WAIT_ADDRESS), "back to address wait after burst");
    check(32'(trig_cnt), 0, "no trigger yet");
    d[0] = 32'h33; d[1] = 32'hAB77; d[2] = 32'h88;
    bus_read(32'h0001_0004, d, 3);
    check(32'(trig_cnt), 1, "one trigger");
    check(32'(status[6:4]), 32'(AXM_TRIGGERED), "triggered");
    check(32'(break_req), 1, "break on trigger");
    d[0] = 32'hD0; d[1] = 32'hD1; d[2] = 32'hD2;
    bus_write(32'h0000_1000, d, 3);
    @(posedge clk);
    check(32'(status[6:4]), 32'(AXM_DONE), "done after six words");
    check(32'(acq_count[1]), 2, "two R words");
    check(32'(acq_count[2]), 1, "one AW word");
    check(32'(acq_count[3]), 3, "three W words");
    check(acq[1][0], 32'hAB77, "R word 0 is the trigger beat");
    check(acq[1][1], 32'h88, "R word 1");
    check(acq[2][0], 32'h0000_1000, "AW address");
    check(acq[3][2], 32'hD2, "W word 2");
    check(32'(cap_cnt), 0, "no capture without TriggerCapture");
    // ---- Reset
    ctrl <= 8'(1 << CTRL_RESET);
    @(posedge clk); @(posedge clk);
    ctrl <= 0;
    @(posedge clk);
    check(32'(status), 0, "reset to idle");
    check(32'(break_req), 0, "break cleared by reset");
    check(32'(acq_count[1]), 0, "counts cleared");
    // ---- parallel trigger, larger than 100, with capture
    cfg[4] = 100; cfg[5] = 32'hFFFF_FFFF;
    cfg[6] = {26'd0, 2'(CMP_GT), 4'd0};
    cfg[7] = 4;
    load_cfg();
    ctrl <= 8'((1 << CTRL_ENABLE) | (1 << CTRL_CAPTURE) | 32'(MON_PARALLEL));
    repeat (2) @(posedge clk);
    check(32'(status[3:2]), 32'(PAR_WAIT_DATA), "parallel waiting");
    for (int i = 0; i < 20; i++) begin
      par_reg <= 50 + 7 * i;
      @(posedge clk);
    end
    check(32'(status[3:2]), 32'(PAR_DONE), "parallel done");
    check(32'(acq_count[0]), 4, "four parallel words");
    check(acq[0][0], 106, "first parallel word");
    check(acq[0][3], 127, "last parallel word");
    check(32'(cap_cnt), 1, "one capture pulse");
    check(32'(hard_break), 1, "hard break held");
    check(32'(break_req), 0, "no soft break without break-on-trigger");
    // ---- direct Break bit
    ctrl <= 8'(1 << CTRL_BREAK);
    @(posedge clk); @(posedge clk);
    check(32'(break_req), 1, "break bit");
    check(32'(hard_break), 1, "hard break held until reset");
    ctrl <= 8'(1 << CTRL_RESET);
    @(posedge clk); @(posedge clk);
    check(32'(hard_break), 0, "hard break cleared");
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
