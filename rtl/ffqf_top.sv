// Firmware qualification template: two subsystems connected through an AXI
// copy bus, with a monitor, an injection unit, state trace buffers and a
// breakpoint clock gate, all configured over a separate debug AXI bus.
//
// Functional bus (data between subsystems):
//   comm_arbiter --> axi_master --> axi_interconnect --> slave 0 subsystem A
//   (schedule in                                      --> slave 1 subsystem B
//    blockram)                                        --> slave 2 injection unit
// Subsystem A and B are outside this module; each is attached through an
// axi_reg_slave register interface (read registers at 0x0000, write
// registers at 0x1000 of its 64 KB window). Slave s of the functional bus
// owns addresses s<<16.
//
// Debug bus (master: dbg_req/dbg_resp, normally a processor):
//   slave 0  0x0000_0000  arbiter schedule memory (port A read by the arbiter)
//   slave 1  0x0001_0000  monitor: writes fill its configuration memory,
//                         reads return acquisition buffer k (AR addresses,
//                         R data, AW addresses, W data) at +k*0x1000
//                         (+k*4*2**ACQ_AW in general)
//   slave 2  0x0002_0000  injection unit, debug side
//   slave 3  0x0003_0000  state acquisition ring buffers
//
// copy_err pulses when a copy ends with an error response; acq_words gives
// the fill level of the four acquisition buffers.
//
// The monitor spies the functional master's AXI port and the 32-bit probe
// register par_probe; it is steered by the 8-bit mon_ctrl register and
// reports mon_status. A break request (mon_ctrl Break, a trigger with break
// on trigger, or ext_break) is taken by the arbiter between copies; from
// that moment sub_clk stops (held high) until the break is released, while
// the buses stay alive so the processor can read everything. A hard break
// (trigger with TriggerCapture) stops sub_clk at once, freezes the arbiter
// and pulses cap for a configuration-capture primitive outside this module.
// state_data is recorded into the ring buffers in every cycle the
// subsystems run.
//
// Everything runs on clk; only sub_clk is gated. Reset is active low,
// asynchronous.
module ffqf_top
  import ffqf_pkg::*;
#(
  parameter int unsigned NUM_RD      = 6,
  parameter int unsigned NUM_WR      = 7,
  parameter int unsigned CFG_AW      = 9,
  parameter int unsigned ALT_BASE    = 256,
  parameter int unsigned ACQ_AW      = 10,
  parameter int unsigned INJ_AW      = 10,
  parameter int unsigned SA_CH       = 4,
  parameter int unsigned SA_DEPTH_AW = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // schedule control
  input  logic              sched_start,
  input  logic              free_run,
  input  logic              ext_break,
  input  logic [23:0]       inj_step,
  input  logic [15:0]       inj_blocks,
  // debug bus master port
  input  axi_req_t          dbg_req,
  output axi_resp_t         dbg_resp,
  // monitor control and status (8-bit GPIO style)
  input  logic [7:0]        mon_ctrl,
  output logic [7:0]        mon_status,
  input  logic [31:0]       par_probe,
  // subsystem A register interface
  input  logic [DATA_W-1:0] a_rd_regs [NUM_RD],
  output logic [DATA_W-1:0] a_wr_regs [NUM_WR],
  output logic [NUM_WR-1:0] a_wr_stb,
  // subsystem B register interface
  input  logic [DATA_W-1:0] b_rd_regs [NUM_RD],
  output logic [DATA_W-1:0] b_wr_regs [NUM_WR],
  output logic [NUM_WR-1:0] b_wr_stb,
  // subsystem state for the trace buffers
  input  logic [DATA_W-1:0] state_data [SA_CH],
  // clocking of the subsystems and break status
  output logic              sub_clk,
  output logic              sub_run,
  output logic              break_active,
  output logic              hard_break,
  output logic              cap,
  output logic              mon_trig,
  output logic              sched_busy,
  output logic [31:0]       cycles_done,
  output logic [31:0]       copies_done,
  output logic              copy_err,
  output logic [ACQ_AW:0]   acq_words [4]
);

  localparam int unsigned FN_SLAVES  = 3;
  localparam int unsigned DBG_SLAVES = 4;
  localparam logic [7:0]  INJ_SLAVE  = 8'd2;

  // ---------------- functional bus ----------------
  axi_req_t  fn_m_req;
  axi_resp_t fn_m_resp;
  axi_req_t  fn_s_req  [FN_SLAVES];
  axi_resp_t fn_s_resp [FN_SLAVES];

  logic              cmd_valid, cmd_ready, cmd_done, cmd_err;
  logic [ADDR_W-1:0] cmd_src, cmd_dst;
  logic [7:0]        cmd_len;
  logic              sched_en;
  logic [CFG_AW-1:0] sched_addr;
  logic [DATA_W-1:0] sched_rdata;
  logic              mon_break;

  comm_arbiter #(.CFG_AW(CFG_AW), .ALT_BASE(ALT_BASE)) u_arbiter (
    .clk, .rst_n,
    .start       (sched_start),
    .free_run    (free_run),
    .break_req   (mon_break || ext_break),
    .hold        (hard_break),
    .break_active(break_active),
    .busy        (sched_busy),
    .inj_slave   (INJ_SLAVE),
    .inj_step    (inj_step),
    .inj_blocks  (inj_blocks),
    .cfg_en      (sched_en),
    .cfg_addr    (sched_addr),
    .cfg_rdata   (sched_rdata),
    .cmd_valid, .cmd_ready, .cmd_src, .cmd_dst, .cmd_len,
    .cmd_done,
    .cycles_done, .copies_done
  );

  axi_master u_master (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_src, .cmd_dst, .cmd_len,
    .done   (cmd_done),
    .err    (cmd_err),
    .m_req  (fn_m_req),
    .m_resp (fn_m_resp)
  );

  axi_interconnect #(.NUM_SLAVES(FN_SLAVES)) u_fn_ic (
    .clk, .rst_n,
    .m_req (fn_m_req), .m_resp(fn_m_resp),
    .s_req (fn_s_req), .s_resp(fn_s_resp)
  );

  axi_reg_slave #(.NUM_RD(NUM_RD), .NUM_WR(NUM_WR)) u_slave_a (
    .clk, .rst_n,
    .axi_req (fn_s_req[0]), .axi_resp(fn_s_resp[0]),
    .rd_regs (a_rd_regs), .wr_regs(a_wr_regs), .wr_stb(a_wr_stb)
  );

  axi_reg_slave #(.NUM_RD(NUM_RD), .NUM_WR(NUM_WR)) u_slave_b (
    .clk, .rst_n,
    .axi_req (fn_s_req[1]), .axi_resp(fn_s_resp[1]),
    .rd_regs (b_rd_regs), .wr_regs(b_wr_regs), .wr_stb(b_wr_stb)
  );

  // ---------------- debug bus ----------------
  axi_req_t  dbg_s_req  [DBG_SLAVES];
  axi_resp_t dbg_s_resp [DBG_SLAVES];

  axi_interconnect #(.NUM_SLAVES(DBG_SLAVES)) u_dbg_ic (
    .clk, .rst_n,
    .m_req (dbg_req), .m_resp(dbg_resp),
    .s_req (dbg_s_req), .s_resp(dbg_s_resp)
  );

  axi_bram_slave #(.MEM_AW(CFG_AW)) u_sched_mem (
    .clk, .rst_n,
    .a_en(sched_en), .a_we(1'b0), .a_addr(sched_addr), .a_wdata('0),
    .a_rdata(sched_rdata),
    .axi_req(dbg_s_req[0]), .axi_resp(dbg_s_resp[0])
  );

  axi_inject_bram #(.MEM_AW(INJ_AW)) u_inject (
    .clk, .rst_n,
    .dbg_req(dbg_s_req[2]),  .dbg_resp(dbg_s_resp[2]),
    .fn_req (fn_s_req[2]),   .fn_resp (fn_s_resp[2])
  );

  // ---------------- monitor ----------------
  logic              mcfg_en;
  logic [CFG_AW-1:0] mcfg_addr;
  logic [DATA_W-1:0] mcfg_rdata;
  logic [3:0]        acq_we;
  logic [ACQ_AW-1:0] acq_addr  [4];
  logic [DATA_W-1:0] acq_wdata [4];
  logic [ACQ_AW:0]   acq_count [4];

  axi_monitor #(.CFG_AW(CFG_AW), .ACQ_AW(ACQ_AW)) u_monitor (
    .clk, .rst_n,
    .ctrl      (mon_ctrl),
    .status    (mon_status),
    .spy_req   (fn_m_req),
    .spy_resp  (fn_m_resp),
    .par_reg   (par_probe),
    .cfg_en    (mcfg_en),
    .cfg_addr  (mcfg_addr),
    .cfg_rdata (mcfg_rdata),
    .acq_we, .acq_addr, .acq_wdata, .acq_count,
    .trig      (mon_trig),
    .break_req (mon_break),
    .cap,
    .hard_break
  );

  axi_monitor_slave #(.CFG_AW(CFG_AW), .ACQ_AW(ACQ_AW)) u_mon_slave (
    .clk, .rst_n,
    .axi_req  (dbg_s_req[1]), .axi_resp(dbg_s_resp[1]),
    .cfg_en   (mcfg_en), .cfg_addr(mcfg_addr), .cfg_rdata(mcfg_rdata),
    .acq_we, .acq_addr, .acq_wdata
  );

  assign copy_err  = cmd_done && cmd_err;
  assign acq_words = acq_count;

  // ---------------- breakpoints and state trace ----------------
  assign sub_run = !break_active && !hard_break;

  clk_gate_bufr u_sub_gate (
    .clk_i (clk),
    .ce    (sub_run),
    .clk_o (sub_clk)
  );

  state_acq #(.N_CH(SA_CH), .DEPTH_AW(SA_DEPTH_AW)) u_state_acq (
    .clk, .rst_n,
    .capture (sub_run),
    .data    (state_data),
    .axi_req (dbg_s_req[3]), .axi_resp(dbg_s_resp[3])
  );

endmodule
