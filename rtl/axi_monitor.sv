// AXI monitor: a non-intrusive spy on the functional bus master with
// triggers, acquisition state machines, a parallel probe register and break
// and capture requests.
//
// The monitor only listens to the master's AXI signals. A beat counts when
// valid and ready are both high on its channel.
//
// Control (8-bit, ctrl) and status (8-bit, status) registers:
//   ctrl[1:0] MonitorType 00 none, 01 AXI, 10 parallel
//   ctrl[2]   ReadConfig  load the configuration record from the memory
//   ctrl[3]   Reset       reset the acquisition state machines and buffers
//   ctrl[4]   Enable      run the monitor selected by MonitorType
//   ctrl[5]   TriggerCapture  a trigger also fires the capture request
//   ctrl[6]   Break       request a break directly
//   status[1:0] configuration reader state, [3:2] parallel acquisition
//   state, [6:4] AXI acquisition state (encodings in ffqf_pkg).
//
// Configuration record, eight words read through a native blockram port
// (its layout is this design's choice):
//   0 address reference   1 address mask
//   2 data reference      3 data mask
//   4 parallel reference  5 parallel mask
//   6 mode: [1:0] address compare, [3:2] data compare, [5:4] parallel
//     compare, [8] watch reads, [9] watch writes, [12] break on trigger
//   7 number of words to acquire (0: until a buffer is full)
//
// AXI acquisition: WAIT_ADDRESS waits for an AR or AW beat whose address
// matches, WAIT_DATA then waits for a data beat of that transaction whose
// data matches (a burst that ends without a match returns to WAIT_ADDRESS).
// The matching beat is the trigger. From that cycle on, every beat is
// stored in one of four acquisition buffers: AR addresses, R data, AW
// addresses, W data, until the requested number of words is stored
// (TRIGGERED, then DONE).
// Parallel acquisition: WAIT_DATA compares the 32-bit probe register par_reg
// every cycle; on a match it stores par_reg every cycle into buffer 0.
//
// On a trigger: break_req is raised (and held until Reset) when "break on
// trigger" is set; with TriggerCapture set, cap pulses for one cycle and
// hard_break is raised and held until Reset.
module axi_monitor
  import ffqf_pkg::*;
#(
  parameter int unsigned CFG_AW = 9,
  parameter int unsigned ACQ_AW = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        ctrl,
  output logic [7:0]        status,
  // spied bus
  input  axi_req_t          spy_req,
  input  axi_resp_t         spy_resp,
  // parallel probe register
  input  logic [31:0]       par_reg,
  // configuration memory (native port)
  output logic              cfg_en,
  output logic [CFG_AW-1:0] cfg_addr,
  input  logic [DATA_W-1:0] cfg_rdata,
  // four acquisition buffers (native write ports)
  output logic [3:0]        acq_we,
  output logic [ACQ_AW-1:0] acq_addr  [4],
  output logic [DATA_W-1:0] acq_wdata [4],
  output logic [ACQ_AW:0]   acq_count [4],
  // requests
  output logic              trig,
  output logic              break_req,
  output logic              cap,
  output logic              hard_break
);

  localparam int unsigned DEPTH = 2**ACQ_AW;

  mon_type_t  mtype;
  logic       en, rst_acq;
  assign mtype   = mon_type_t'(ctrl[1:0]);
  assign en      = ctrl[CTRL_ENABLE];
  assign rst_acq = ctrl[CTRL_RESET];

  // ---------------- configuration reader ----------------
  cfg_state_t  cst;
  logic [2:0]  cidx;
  logic [31:0] cfg_q [MON_CFG_WORDS];

  assign cfg_en   = (cst == CFG_WAIT);
  assign cfg_addr = CFG_AW'(cidx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst  <= CFG_IDLE;
      cidx <= '0;
      for (int i = 0; i < MON_CFG_WORDS; i++) cfg_q[i] <= '0;
    end else begin
      unique case (cst)
        CFG_IDLE:  if (ctrl[CTRL_READCFG]) begin
          cidx <= '0;
          cst  <= CFG_WAIT;
        end
        CFG_WAIT:  cst <= CFG_STORE;
        CFG_STORE: begin
          cfg_q[cidx] <= cfg_rdata;
          if (cidx == 3'(MON_CFG_WORDS - 1)) cst <= CFG_DONE;
          else begin
            cidx <= cidx + 3'd1;
            cst  <= CFG_WAIT;
          end
        end
        CFG_DONE:  if (!ctrl[CTRL_READCFG]) cst <= CFG_IDLE;
        default:   cst <= CFG_IDLE;
      endcase
    end
  end

  cmp_t       addr_cmp, data_cmp, par_cmp;
  logic       watch_rd, watch_wr, brk_on_trig;
  logic [31:0] acq_len;
  assign addr_cmp    = cmp_t'(cfg_q[6][1:0]);
  assign data_cmp    = cmp_t'(cfg_q[6][3:2]);
  assign par_cmp     = cmp_t'(cfg_q[6][5:4]);
  assign watch_rd    = cfg_q[6][8];
  assign watch_wr    = cfg_q[6][9];
  assign brk_on_trig = cfg_q[6][12];
  assign acq_len     = cfg_q[7];

  // ---------------- beats on the spied bus ----------------
  logic ar_hs, r_hs, aw_hs, w_hs;
  assign ar_hs = spy_req.ar_valid && spy_resp.ar_ready;
  assign r_hs  = spy_resp.r_valid && spy_req.r_ready;
  assign aw_hs = spy_req.aw_valid && spy_resp.aw_ready;
  assign w_hs  = spy_req.w_valid  && spy_resp.w_ready;

  // ---------------- match units ----------------
  logic ar_hit, aw_hit, r_hit, w_hit, par_hit;
  match_unit u_m_ar (.value(spy_req.ar.addr), .ref_val(cfg_q[0]), .mask(cfg_q[1]), .cmp(addr_cmp), .hit(ar_hit));
  match_unit u_m_aw (.value(spy_req.aw.addr), .ref_val(cfg_q[0]), .mask(cfg_q[1]), .cmp(addr_cmp), .hit(aw_hit));
  match_unit u_m_r  (.value(spy_resp.r_data), .ref_val(cfg_q[2]), .mask(cfg_q[3]), .cmp(data_cmp), .hit(r_hit));
  match_unit u_m_w  (.value(spy_req.w_data),  .ref_val(cfg_q[2]), .mask(cfg_q[3]), .cmp(data_cmp), .hit(w_hit));
  match_unit u_m_p  (.value(par_reg),         .ref_val(cfg_q[4]), .mask(cfg_q[5]), .cmp(par_cmp),  .hit(par_hit));

  // ---------------- acquisition state machines ----------------
  axm_state_t ast;
  par_state_t pst;
  logic       watch_is_rd;
  logic [ACQ_AW:0] cnt [4];
  logic [31:0] total;
  logic        trig_q, hard_q;

  logic axi_trig_now, par_trig_now;
  assign axi_trig_now = (ast == AXM_WAIT_DATA) &&
                        (watch_is_rd ? (r_hs && r_hit) : (w_hs && w_hit));
  assign par_trig_now = (pst == PAR_WAIT_DATA) && par_hit;
  assign trig = axi_trig_now || par_trig_now;

  // what is written this cycle
  logic [3:0]  ev;
  logic [31:0] ev_data [4];
  logic        storing;
  always_comb begin
    storing    = (ast == AXM_TRIGGERED) || axi_trig_now ||
                 (pst == PAR_TRIGGERED) || par_trig_now;
    ev_data[0] = (mtype == MON_PARALLEL) ? par_reg : spy_req.ar.addr;
    ev_data[1] = spy_resp.r_data;
    ev_data[2] = spy_req.aw.addr;
    ev_data[3] = spy_req.w_data;
    if (mtype == MON_PARALLEL) ev = 4'b0001;
    else                       ev = {w_hs, aw_hs, r_hs, ar_hs};
    for (int k = 0; k < 4; k++) begin
      acq_we[k]    = storing && ev[k] && (cnt[k] < (ACQ_AW+1)'(DEPTH));
      acq_addr[k]  = cnt[k][ACQ_AW-1:0];
      acq_wdata[k] = ev_data[k];
      acq_count[k] = cnt[k];
    end
  end

  logic [2:0]  nstore;
  logic        any_full;
  logic        acq_end;
  always_comb begin
    nstore   = 3'(acq_we[0]) + 3'(acq_we[1]) + 3'(acq_we[2]) + 3'(acq_we[3]);
    any_full = 1'b0;
    for (int k = 0; k < 4; k++)
      if (cnt[k] + (ACQ_AW+1)'(acq_we[k]) >= (ACQ_AW+1)'(DEPTH)) any_full = 1'b1;
    acq_end  = any_full || ((acq_len != 32'd0) && (total + 32'(nstore) >= acq_len));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ast         <= AXM_IDLE;
      pst         <= PAR_IDLE;
      watch_is_rd <= 1'b0;
      total       <= '0;
      trig_q      <= 1'b0;
      hard_q      <= 1'b0;
      for (int k = 0; k < 4; k++) cnt[k] <= '0;
    end else if (rst_acq) begin
      ast    <= AXM_IDLE;
      pst    <= PAR_IDLE;
      total  <= '0;
      trig_q <= 1'b0;
      hard_q <= 1'b0;
      for (int k = 0; k < 4; k++) cnt[k] <= '0;
    end else begin
      for (int k = 0; k < 4; k++) if (acq_we[k]) cnt[k] <= cnt[k] + 1'b1;
      total <= total + 32'(nstore);
      if (trig) begin
        trig_q <= 1'b1;
        if (ctrl[CTRL_CAPTURE]) hard_q <= 1'b1;
      end
      // AXI acquisition
      unique case (ast)
        AXM_IDLE: if (en && mtype == MON_AXI) ast <= AXM_WAIT_ADDRESS;
        AXM_WAIT_ADDRESS: begin
          if (!en || mtype != MON_AXI) ast <= AXM_IDLE;
          else if (watch_rd && ar_hs && ar_hit) begin
            watch_is_rd <= 1'b1;
            ast         <= AXM_WAIT_DATA;
          end else if (watch_wr && aw_hs && aw_hit) begin
            watch_is_rd <= 1'b0;
            ast         <= AXM_WAIT_DATA;
          end
        end
        AXM_WAIT_DATA: begin
          if (axi_trig_now) ast <= acq_end ? AXM_DONE : AXM_TRIGGERED;
          else if (!en || mtype != MON_AXI) ast <= AXM_IDLE;
          else if (watch_is_rd ? (r_hs && spy_resp.r_last) : (w_hs && spy_req.w_last))
            ast <= AXM_WAIT_ADDRESS;
        end
        AXM_TRIGGERED: if (acq_end) ast <= AXM_DONE;
        AXM_DONE: ;
        default: ast <= AXM_IDLE;
      endcase
      // parallel acquisition
      unique case (pst)
        PAR_IDLE: if (en && mtype == MON_PARALLEL) pst <= PAR_WAIT_DATA;
        PAR_WAIT_DATA: begin
          if (par_trig_now) pst <= acq_end ? PAR_DONE : PAR_TRIGGERED;
          else if (!en || mtype != MON_PARALLEL) pst <= PAR_IDLE;
        end
        PAR_TRIGGERED: if (acq_end) pst <= PAR_DONE;
        PAR_DONE: ;
        default: pst <= PAR_IDLE;
      endcase
    end
  end

  assign status     = {1'b0, ast, pst, cst};
  assign break_req  = ctrl[CTRL_BREAK] || (trig_q && brk_on_trig);
  assign cap        = trig && ctrl[CTRL_CAPTURE];
  assign hard_break = hard_q;

endmodule
