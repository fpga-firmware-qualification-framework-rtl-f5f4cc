// Generic AXI master that copies a burst from one slave to another.
//
// The communication arbiter hands it one copy at a time: source address,
// destination address and length in words (1..MAX_BURST). The master reads
// the source with one INCR burst and writes the destination with one INCR
// burst of the same length. The copy is pipelined: the write address is
// raised as soon as the first read word has arrived, and each word read is
// passed on as write data while the rest of the read burst is still running.
// A MAX_BURST-deep buffer decouples the two sides, so the read side never
// waits for the write side.
//
// Interface: cmd_valid/cmd_ready accept a copy; done pulses for one cycle
// when the write response has been received, with err set if any read or
// write response was not OKAY. A length of 0 is treated as 1 and lengths
// above MAX_BURST are cut to MAX_BURST (choices of this design).
module axi_master
  import ffqf_pkg::*;
#(
  parameter int unsigned MAX_BEATS = MAX_BURST
) (
  input  logic              clk,
  input  logic              rst_n,
  // copy command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [ADDR_W-1:0] cmd_src,
  input  logic [ADDR_W-1:0] cmd_dst,
  input  logic [7:0]        cmd_len,
  output logic              done,
  output logic              err,
  // AXI master port
  output axi_req_t          m_req,
  input  axi_resp_t         m_resp
);

  localparam int unsigned PW = $clog2(MAX_BEATS);

  typedef enum logic [1:0] {M_IDLE, M_COPY, M_DONE} mstate_t;

  mstate_t           state;
  logic [ADDR_W-1:0] src_q, dst_q;
  logic [7:0]        len_q;          // AXI len (beats - 1)
  logic              ar_pend, aw_pend, aw_sent;
  logic [8:0]        rd_cnt, wr_cnt; // beats received / sent
  logic              err_q;
  logic [DATA_W-1:0] buf_q [MAX_BEATS];

  logic r_fire, w_fire, b_fire;
  assign r_fire = m_req.r_ready && m_resp.r_valid;
  assign w_fire = m_req.w_valid && m_resp.w_ready;
  assign b_fire = m_req.b_ready && m_resp.b_valid;

  logic [7:0] len_clip;
  always_comb begin
    if (cmd_len == 8'd0)                  len_clip = 8'd0;
    else if (cmd_len > 8'(MAX_BEATS))     len_clip = 8'(MAX_BEATS - 1);
    else                                  len_clip = cmd_len - 8'd1;
  end

  assign cmd_ready = (state == M_IDLE);

  always_comb begin
    m_req          = '0;
    m_req.ar_valid = ar_pend;
    m_req.ar.addr  = src_q;
    m_req.ar.len   = len_q;
    m_req.ar.size  = SIZE_4B;
    m_req.ar.burst = BURST_INCR;
    m_req.r_ready  = (state == M_COPY) && !ar_pend;
    m_req.aw_valid = aw_pend;
    m_req.aw.addr  = dst_q;
    m_req.aw.len   = len_q;
    m_req.aw.size  = SIZE_4B;
    m_req.aw.burst = BURST_INCR;
    m_req.w_valid  = (aw_pend || aw_sent) && (wr_cnt < rd_cnt);
    m_req.w_data   = buf_q[wr_cnt[PW-1:0]];
    m_req.w_strb   = '1;
    m_req.w_last   = (wr_cnt == {1'b0, len_q});
    m_req.b_ready  = (state == M_COPY) && aw_sent;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= M_IDLE;
      src_q   <= '0;
      dst_q   <= '0;
      len_q   <= '0;
      ar_pend <= 1'b0;
      aw_pend <= 1'b0;
      aw_sent <= 1'b0;
      rd_cnt  <= '0;
      wr_cnt  <= '0;
      err_q   <= 1'b0;
    end else begin
      unique case (state)
        M_IDLE: if (cmd_valid) begin
          src_q   <= cmd_src;
          dst_q   <= cmd_dst;
          len_q   <= len_clip;
          ar_pend <= 1'b1;
          aw_pend <= 1'b0;
          aw_sent <= 1'b0;
          rd_cnt  <= '0;
          wr_cnt  <= '0;
          err_q   <= 1'b0;
          state   <= M_COPY;
        end
        M_COPY: begin
          if (ar_pend && m_resp.ar_ready) ar_pend <= 1'b0;
          if (r_fire) begin
            buf_q[rd_cnt[PW-1:0]] <= m_resp.r_data;
            rd_cnt <= rd_cnt + 9'd1;
            if (m_resp.r_resp != RESP_OKAY) err_q <= 1'b1;
            // the write starts once the first word is in
            if (!aw_pend && !aw_sent) aw_pend <= 1'b1;
          end
          if (aw_pend && m_resp.aw_ready) begin
            aw_pend <= 1'b0;
            aw_sent <= 1'b1;
          end
          if (w_fire) wr_cnt <= wr_cnt + 9'd1;
          if (b_fire) begin
            if (m_resp.b_resp != RESP_OKAY) err_q <= 1'b1;
            state <= M_DONE;
          end
        end
        M_DONE: state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  assign done = (state == M_DONE);
  assign err  = err_q;

endmodule
