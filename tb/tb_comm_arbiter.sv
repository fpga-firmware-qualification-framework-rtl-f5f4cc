// Testbench for comm_arbiter with a configuration memory and a copy engine
// modelled here. Checks: the schedule is executed in order and stops at
// 0xDEADBEEF; a start pulse during a cycle is kept; a break request raised
// during a copy waits for that copy to finish; during the break the
// alternative schedule runs repeatedly; after release the alternative copy
// in progress completes and the normal schedule resumes where it stopped;
// a break from idle returns to idle; injection stepping; hold freezes the
// arbiter and makes it ignore start pulses.
module tb_comm_arbiter;
  import ffqf_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, free_run = 0, break_req = 0, hold = 0;
  logic        break_active, busy;
  logic [7:0]  inj_slave = 8'd2;
  logic [23:0] inj_step = 24'h10;
  logic [15:0] inj_blocks = 0;
  logic        cfg_en;
  logic [8:0]  cfg_addr;
  logic [31:0] cfg_rdata;
  logic        cmd_valid, cmd_ready, cmd_done;
  logic [31:0] cmd_src, cmd_dst;
  logic [7:0]  cmd_len;
  logic [31:0] cycles_done, copies_done;
  int checks = 0, failures = 0;

  comm_arbiter dut (.clk, .rst_n, .start, .free_run, .break_req, .hold, .break_active, .busy,
                    .inj_slave, .inj_step, .inj_blocks, .cfg_en, .cfg_addr, .cfg_rdata,
                    .cmd_valid, .cmd_ready, .cmd_src, .cmd_dst, .cmd_len, .cmd_done,
                    .cycles_done, .copies_done);

  // configuration memory, one cycle read latency
  logic [31:0] cfg [512];
  always_ff @(posedge clk) if (cfg_en) cfg_rdata <= cfg[cfg_addr];

  // copy engine model: accepts when idle, done 6 cycles later
  int  eng_cnt = 0;
  logic eng_busy = 0;
  assign cmd_ready = !eng_busy;
  assign cmd_done  = eng_busy && eng_cnt == 6;
  logic [31:0] log_src [$];
  logic [31:0] log_dst [$];
  logic [7:0]  log_len [$];
  logic        log_brk [$];       // break_active while that copy ran
  logic        brk_during_copy = 0;
  always @(posedge clk) begin
    if (!eng_busy && cmd_valid) begin
      eng_busy <= 1; eng_cnt <= 0;
      log_src.push_back(cmd_src); log_dst.push_back(cmd_dst); log_len.push_back(cmd_len);
      log_brk.push_back(break_active);
    end else if (eng_busy) begin
      eng_cnt <= eng_cnt + 1;
      if (eng_cnt == 6) eng_busy <= 0;
    end
    // a break must never become active while a normal copy is in flight
    if (eng_busy && break_active && !log_brk[$]) brk_during_copy <= 1;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] line(input logic [7:0] len, input logic [23:0] a);
    return {len, a};
  endfunction

  task automatic pulse_start();
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
  endtask

  task automatic wait_idle();
    do @(posedge clk); while (busy);
  endtask

  initial begin
    int n0;
    for (int i = 0; i < 512; i++) cfg[i] = SCHED_END;
    // normal schedule: three copies
    cfg[0] = line(1, 24'h00_0000); cfg[1] = line(1, 24'h01_1000);
    cfg[2] = line(5, 24'h00_0004); cfg[3] = line(5, 24'h01_1004);
    cfg[4] = line(5, 24'h01_0000); cfg[5] = line(5, 24'h00_1000);
    cfg[6] = SCHED_END;
    // alternative schedule: one copy from the injection window
    cfg[256] = line(1, 24'h02_0000); cfg[257] = line(1, 24'h01_1000);
    cfg[258] = SCHED_END;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(32'(busy), 0, "idle after reset");
    // 1: one schedule cycle
    pulse_start();
    wait_idle();
    check(32'(log_src.size()), 3, "three copies");
    check(log_src[0], 32'h00_0000, "copy0 src"); check(log_dst[0], 32'h01_1000, "copy0 dst"); check(32'(log_len[0]), 1, "copy0 len");
    check(log_src[1], 32'h00_0004, "copy1 src"); check(log_dst[1], 32'h01_1004, "copy1 dst"); check(32'(log_len[1]), 5, "copy1 len");
    check(log_src[2], 32'h01_0000, "copy2 src"); check(log_dst[2], 32'h00_1000, "copy2 dst");
    check(cycles_done, 1, "one cycle done");
    repeat (20) @(posedge clk);
    check(32'(log_src.size()), 3, "stays idle without start");
    // 2: start during a cycle is kept
    pulse_start();
    repeat (4) @(posedge clk);
    pulse_start();
    wait_idle();
    repeat (3) @(posedge clk);
    wait_idle();
    check(cycles_done, 3, "pending start ran a second cycle");
    check(32'(log_src.size()), 9, "nine copies");
    // 3: break during the first copy of a cycle
    log_src.delete(); log_dst.delete(); log_len.delete(); log_brk.delete();
    pulse_start();
    wait (eng_busy);
    @(posedge clk); break_req <= 1;
    wait (break_active);
    check(32'(log_src.size()), 1, "break taken after the running copy");
    check(32'(eng_busy), 0, "copy finished before break became active");
    repeat (60) @(posedge clk);
    n0 = log_src.size();
    check(32'(n0 >= 3), 1, "alternative schedule repeats during break");
    for (int i = 1; i < n0; i++) begin
      check(log_src[i], 32'h02_0000, "alt copy source");
      check(32'(log_brk[i]), 1, "alt copy during break");
    end
    break_req <= 0;
    wait (!break_active);
    wait_idle();
    check(log_src[log_src.size()-2], 32'h00_0004, "resumes with second copy");
    check(log_src[log_src.size()-1], 32'h01_0000, "then third copy");
    for (int i = 1; i < log_src.size() - 2; i++)
      check(log_src[i], 32'h02_0000, "only alt copies between copy0 and copy1");
    check(32'(brk_during_copy), 0, "subsystems never stopped mid copy");
    // 4: break from idle returns to idle
    log_src.delete(); log_brk.delete();
    repeat (5) @(posedge clk);
    break_req <= 1;
    repeat (30) @(posedge clk);
    check(32'(break_active), 1, "break active from idle");
    break_req <= 0;
    wait (!break_active);
    wait_idle();
    repeat (10) @(posedge clk);
    check(32'(busy), 0, "back to idle");
    for (int i = 0; i < log_src.size(); i++) check(log_src[i], 32'h02_0000, "only alt copies");
    // 5: injection stepping with three blocks of 0x10
    cfg[0] = line(1, 24'h02_0000); cfg[1] = line(1, 24'h01_1000); cfg[2] = SCHED_END;
    inj_blocks = 3;
    log_src.delete();
    for (int c = 0; c < 4; c++) begin pulse_start(); wait_idle(); end
    check(log_src[0], 32'h02_0000, "inj block 0");
    check(log_src[1], 32'h02_0010, "inj block 1");
    check(log_src[2], 32'h02_0020, "inj block 2");
    check(log_src[3], 32'h02_0000, "inj wraps");
    // 6: hold freezes
    inj_blocks = 0;
    hold <= 1;
    pulse_start();
    repeat (20) @(posedge clk);
    check(32'(log_src.size()), 4, "no copy while held");
    hold <= 0;
    pulse_start();
    repeat (40) @(posedge clk);
    check(32'(log_src.size()), 5, "runs after hold");
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
