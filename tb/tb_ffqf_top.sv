// End-to-end testbench of ffqf_top at its default parameters.
//
// Two small subsystem models stand for the communication interface (A) and
// the current controller (B). Both count cycles of the gated subsystem
// clock; A offers six read registers, B reports its cycle count and echoes
// what it received. A processor on the debug bus is played by
// axi_tb_master. The test
//   1 loads the case-study copy schedule (real-time word A->B, four
//     parameter words A->B, six status words B->A) and an alternative
//     schedule that copies from the injection unit, runs a schedule cycle
//     and checks the data, the real-time latency (at most 18 cycles) and the
//     length of the whole cycle (at most 62 cycles);
//   2 arms the AXI monitor on writes to B's real-time register and reads the
//     acquired write data back over the debug bus;
//   3 raises a soft break while the schedule runs freely: the subsystem
//     clock must stop only between copies, the alternative schedule must
//     deliver injected data, the state trace must end with the last cycle
//     before the stop, and everything must resume after release;
//   4 steps the schedule source through injection blocks 0x10 apart;
//   5 triggers a hard break from the parallel probe register with capture;
//   6 reads an unpopulated debug address and expects DECERR.
// Each mechanism is counted and a mechanism that never happened fails.
module tb_ffqf_top;
  import ffqf_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sched_start = 0, free_run = 0, ext_break = 0;
  logic [23:0] inj_step = 24'h10;
  logic [15:0] inj_blocks = 0;
  axi_req_t    dbg_req;
  axi_resp_t   dbg_resp;
  logic [7:0]  mon_ctrl = 0, mon_status;
  logic [31:0] par_probe = 0;
  logic [31:0] a_rd_regs [6], b_rd_regs [6];
  logic [31:0] a_wr_regs [7], b_wr_regs [7];
  logic [6:0]  a_wr_stb, b_wr_stb;
  logic [31:0] state_data [4];
  logic        sub_clk, sub_run, break_active, hard_break, cap, mon_trig, sched_busy, copy_err;
  logic [31:0] cycles_done, copies_done;
  logic [10:0] acq_words [4];

  ffqf_top dut (.*);
  axi_tb_master bfm (.clk, .req(dbg_req), .resp(dbg_resp));

  int checks = 0, failures = 0;
  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- subsystem models on the gated clock ----------------
  logic [31:0] a_cnt = 0, b_cnt = 0;
  logic [31:0] a_param [6];
  always @(posedge sub_clk) begin
    a_cnt <= a_cnt + 1;
    b_cnt <= b_cnt + 3;
  end
  always_comb begin
    for (int i = 0; i < 6; i++) a_rd_regs[i] = a_param[i];
    b_rd_regs[0] = b_cnt;
    for (int i = 1; i < 6; i++) b_rd_regs[i] = b_wr_regs[i] ^ 32'hFFFF_0000;
    state_data[0] = a_cnt;
    state_data[1] = b_cnt;
    state_data[2] = b_wr_regs[0];
    state_data[3] = a_wr_regs[0];
  end

  // ---------------- mechanism counters ----------------
  int n_rt_stb = 0, n_breaks = 0, n_hard = 0, n_cap = 0, n_trig = 0, n_stop_mid_copy = 0;
  int n_decerr = 0, n_alt_copies = 0, n_inj_steps = 0, n_wstall = 0;
  logic ba_q = 0;
  always @(posedge clk) begin
    ba_q <= break_active;
    if (b_wr_stb[0]) n_rt_stb++;
    if (break_active && !ba_q) n_breaks++;
    if (cap) n_cap++;
    if (mon_trig) n_trig++;
    // the subsystems may only stop when no functional transaction is open
    if (break_active && !ba_q && (dut.u_master.state != 0)) n_stop_mid_copy++;
    if (break_active && dut.cmd_done) n_alt_copies++;
    if (dut.fn_m_req.w_valid && !dut.fn_m_resp.w_ready) n_wstall++;
  end
  always @(posedge hard_break) n_hard++;

  // ---------------- helpers ----------------
  function automatic logic [31:0] line(input logic [7:0] len, input logic [23:0] a);
    return {len, a};
  endfunction

  task automatic pulse_start();
    @(posedge clk); sched_start <= 1; @(posedge clk); sched_start <= 0;
  endtask

  task automatic run_cycle(output int cycles, output int rt_lat);
    int c = 0;
    rt_lat = -1;
    @(posedge clk); sched_start <= 1;
    @(posedge clk); sched_start <= 0;
    do begin
      if (b_wr_stb[0] && rt_lat < 0) rt_lat = c;
      @(posedge clk); c++;
    end while (sched_busy || c < 2);
    cycles = c;
  endtask

  initial begin
    logic [31:0] d [16], q [16], v, cnt_stop;
    logic [1:0]  r;
    int cyc, lat, valid;
    for (int i = 0; i < 6; i++) a_param[i] = 32'hA0A0_0000 + 32'(i * 17);
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- 1: schedules
    $display("step 1 at checks=%0d t=%0t", checks, $time);
    d[0] = line(1, 24'h00_0000); d[1] = line(1, 24'h01_1000);
    d[2] = line(4, 24'h00_0004); d[3] = line(4, 24'h01_1004);
    d[4] = line(6, 24'h01_0000); d[5] = line(6, 24'h00_1000);
    d[6] = SCHED_END;
    bfm.write(32'h0000_0000, d, 7, 4'hF, r);
    check(32'(r), 0, "schedule written");
    d[0] = line(1, 24'h02_0000); d[1] = line(1, 24'h01_1000); d[2] = SCHED_END;
    bfm.write(32'h0000_0000 + 256 * 4, d, 3, 4'hF, r);
    bfm.read(32'h0000_0000, 7, q, r);
    check(q[6], SCHED_END, "schedule readback");
    run_cycle(cyc, lat);
    $display("schedule cycle: %0d cycles, real-time word after %0d cycles", cyc, lat);
    for (int i = 0; i < 5; i++) check(b_wr_regs[i], a_param[i], $sformatf("A->B word %0d", i));
    check(b_wr_regs[5], 0, "B write register outside the schedule untouched");
    check(32'(a_wr_regs[0] != 0 && a_wr_regs[0] % 3 == 0 && a_wr_regs[0] <= b_cnt), 1,
          "B->A status word is a sample of B's counter");
    for (int i = 1; i < 5; i++) check(a_wr_regs[i], a_param[i] ^ 32'hFFFF_0000, $sformatf("B->A word %0d", i));
    check(a_wr_regs[5], 32'hFFFF_0000, "B->A word 5");
    checks++; if (lat < 0 || lat > 18) begin failures++; $display("FAIL real-time latency %0d", lat); end
    checks++; if (cyc > 62) begin failures++; $display("FAIL schedule cycle %0d > 62", cyc); end
    check(copies_done, 3, "three copies");
    check(32'(copy_err), 0, "no copy error");

    // ---- 2: monitor on writes to B's real-time register
    $display("step 2 at checks=%0d t=%0t", checks, $time);
    d[0] = 32'h0001_1000; d[1] = 32'h00FF_FFFF;   // address ref / mask
    d[2] = 0; d[3] = 0;                          // any data
    d[4] = 0; d[5] = 0;
    d[6] = 32'h0000_0200;                        // watch writes, EQ compares
    d[7] = 8;
    bfm.write(32'h0001_0000, d, 8, 4'hF, r);
    mon_ctrl <= 8'(1 << CTRL_READCFG);
    repeat (30) @(posedge clk);
    check(32'(mon_status[1:0]), 32'(CFG_DONE), "monitor config loaded");
    mon_ctrl <= 8'((1 << CTRL_ENABLE) | 32'(MON_AXI));
    repeat (3) @(posedge clk);
    check(32'(mon_status[6:4]), 32'(AXM_WAIT_ADDRESS), "monitor armed");
    a_param[0] = 32'h1234_5678;
    run_cycle(cyc, lat);
    repeat (2) @(posedge clk);
    check(32'(mon_status[6:4]), 32'(AXM_DONE), "monitor acquisition done");
    bfm.read(32'h0001_3000, 2, q, r);            // W data buffer
    check(q[0], 32'h1234_5678, "acquired trigger data");
    check(q[1], a_param[1], "acquired next write data");
    bfm.read1(32'h0001_2000, v);                 // AW address buffer
    check(v, 32'h0001_1004, "acquired next write address");
    mon_ctrl <= 8'(1 << CTRL_RESET);
    @(posedge clk); @(posedge clk);
    mon_ctrl <= 0;

    // ---- 3: soft break while running freely
    $display("step 3 at checks=%0d t=%0t", checks, $time);
    d[0] = 32'hCAFE_0001;
    bfm.write(32'h0002_0000, d, 1, 4'hF, r);     // injection data
    free_run <= 1;
    repeat (37) @(posedge clk);
    ext_break <= 1;
    wait (break_active);
    @(posedge clk);
    cnt_stop = a_cnt;
    repeat (80) @(posedge clk);
    check(a_cnt, cnt_stop, "subsystem clock stopped");
    check(32'(sub_clk), 32'(clk | 1'b1), "gated clock held high");
    check(b_wr_regs[0], 32'hCAFE_0001, "alternative schedule delivered injected data");
    bfm.read1(32'h0003_4000, v);
    valid = int'(v);
    checks++; if (valid < 20) begin failures++; $display("FAIL only %0d trace records", valid); end
    bfm.read1(32'h0003_0000 + 32'((valid - 1) * 4), v);
    check(v, cnt_stop - 1, "newest trace record is the last cycle before the stop");
    bfm.read1(32'h0003_0000 + 32'((valid - 2) * 4), v);
    check(v, cnt_stop - 2, "trace record before it");
    ext_break <= 0;
    free_run <= 0;
    wait (!break_active);
    repeat (5) @(posedge clk);
    checks++; if (a_cnt == cnt_stop) begin failures++; $display("FAIL subsystem did not resume"); end
    wait (!sched_busy);
    run_cycle(cyc, lat);
    check(b_wr_regs[0], a_param[0], "normal data after release");

    // ---- 4: injection stepping through blocks 0x10 apart
    $display("step 4 at checks=%0d t=%0t", checks, $time);
    for (int b = 0; b < 3; b++) begin
      d[0] = 32'h1A1A_0000 + b;
      bfm.write(32'h0002_0000 + 32'(b * 16), d, 1, 4'hF, r);
    end
    d[0] = line(1, 24'h02_0000);
    bfm.write(32'h0000_0000, d, 1, 4'hF, r);
    inj_blocks <= 3;
    for (int b = 0; b < 4; b++) begin
      run_cycle(cyc, lat);
      check(b_wr_regs[0], 32'h1A1A_0000 + 32'(b % 3), $sformatf("injection block %0d", b));
      if (b_wr_regs[0] == 32'h1A1A_0000 + 32'(b % 3)) n_inj_steps++;
    end
    inj_blocks <= 0;

    // ---- 5: hard break from the parallel probe
    $display("step 5 at checks=%0d t=%0t", checks, $time);
    d[0] = 0; d[1] = 0; d[2] = 0; d[3] = 0;
    d[4] = 32'h0000_0055; d[5] = 32'h0000_00FF;
    d[6] = 0; d[7] = 4;
    bfm.write(32'h0001_0000, d, 8, 4'hF, r);
    mon_ctrl <= 8'(1 << CTRL_READCFG);
    repeat (30) @(posedge clk);
    mon_ctrl <= 8'((1 << CTRL_ENABLE) | (1 << CTRL_CAPTURE) | 32'(MON_PARALLEL));
    free_run <= 1;
    repeat (25) @(posedge clk);
    par_probe <= 32'h0000_1155;
    @(posedge clk); par_probe <= 0;
    repeat (3) @(posedge clk);
    check(32'(hard_break), 1, "hard break");
    cnt_stop = a_cnt;
    v = copies_done;
    repeat (40) @(posedge clk);
    check(a_cnt, cnt_stop, "hard break stops subsystems at once");
    check(copies_done, v, "arbiter frozen");
    bfm.read1(32'h0001_0000, q[0]);               // debug bus stays alive
    check(q[0], 32'h0000_1155, "probe value acquired");
    free_run <= 0;
    mon_ctrl <= 8'(1 << CTRL_RESET);
    @(posedge clk); @(posedge clk);
    mon_ctrl <= 0;
    wait (!sched_busy);

    // ---- 6: decode error
    $display("step 6 at checks=%0d t=%0t", checks, $time);
    bfm.read(32'h0009_0000, 1, q, r);
    check(32'(r), 32'(RESP_DECERR), "decerr");
    if (r == RESP_DECERR) n_decerr++;

    // ---- mechanisms
    $display("mechanisms: rt=%0d breaks=%0d alt_copies=%0d inj=%0d trig=%0d cap=%0d hard=%0d decerr=%0d wstall=%0d",
             n_rt_stb, n_breaks, n_alt_copies, n_inj_steps, n_trig, n_cap, n_hard, n_decerr, n_wstall);
    check(32'(n_rt_stb > 0), 1, "real-time copies happened");
    check(32'(n_breaks > 0), 1, "soft break happened");
    check(32'(n_alt_copies > 0), 1, "alternative copies happened");
    check(32'(n_inj_steps > 0), 1, "injection stepping happened");
    check(32'(n_trig >= 2), 1, "monitor triggers happened");
    check(32'(n_cap > 0), 1, "capture happened");
    check(32'(n_hard > 0), 1, "hard break happened");
    check(32'(n_decerr > 0), 1, "decode error happened");
    check(32'(n_stop_mid_copy), 0, "soft break never cut a copy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
