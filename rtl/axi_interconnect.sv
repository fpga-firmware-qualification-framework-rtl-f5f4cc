// AXI4 interconnect: one master, NUM_SLAVES slaves.
//
// The template's bus has a single master (the communication arbiter's master
// on the functional bus, the processor on the debug bus), so the
// interconnect is a demultiplexer rather than a full crossbar. Slave s owns
// the addresses whose bits [23:16] equal s, a 64 KB window each; an address
// outside the populated windows gets a DECERR answer from the interconnect
// itself (its write data is accepted and dropped, its read returns len+1
// zero beats).
//
// Read and write directions are independent, each with one transaction in
// flight, as the AXI channels are. Read: AR is routed combinationally to the
// decoded slave; after acceptance the R beats of that slave are returned
// until RLAST. Write: AW is routed to the decoded slave; after acceptance the
// W beats follow to the same slave (W is held off while AW is pending), then
// its B is returned. No cycles are added on any channel.
//
// Assertions check the master's side of the handshake rules: once valid is
// raised on AR, AW or W it stays raised, with stable payload, until ready.
module axi_interconnect
  import ffqf_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 2,
  parameter int unsigned SEL_LSB    = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axi_req_t  m_req,
  output axi_resp_t m_resp,
  output axi_req_t  s_req  [NUM_SLAVES],
  input  axi_resp_t s_resp [NUM_SLAVES]
);

  typedef enum logic [1:0] {WR_IDLE, WR_DATA, WR_RESP} wst_t;
  typedef enum logic {RD_IDLE, RD_BUSY} rst_t;

  wst_t       wst;
  rst_t       rst;
  logic [7:0] wsel, rsel;
  logic       werr, rerr;
  logic [8:0] rerr_left;

  logic [7:0] aw_idx, ar_idx;
  logic       aw_bad, ar_bad;
  assign aw_idx = m_req.aw.addr[SEL_LSB +: 8];
  assign ar_idx = m_req.ar.addr[SEL_LSB +: 8];
  assign aw_bad = aw_idx >= 8'(NUM_SLAVES);
  assign ar_bad = ar_idx >= 8'(NUM_SLAVES);

  always_comb begin
    m_resp = '0;
    for (int s = 0; s < NUM_SLAVES; s++) begin
      s_req[s]          = '0;
      s_req[s].aw       = m_req.aw;
      s_req[s].ar       = m_req.ar;
      s_req[s].w_data   = m_req.w_data;
      s_req[s].w_strb   = m_req.w_strb;
      s_req[s].w_last   = m_req.w_last;
    end
    // write direction
    unique case (wst)
      WR_IDLE: begin
        if (aw_bad) m_resp.aw_ready = 1'b1;
        else begin
          for (int s = 0; s < NUM_SLAVES; s++)
            if (aw_idx == 8'(s)) begin
              s_req[s].aw_valid = m_req.aw_valid;
              m_resp.aw_ready   = s_resp[s].aw_ready;
            end
        end
      end
      WR_DATA: begin
        if (werr) m_resp.w_ready = 1'b1;
        else begin
          for (int s = 0; s < NUM_SLAVES; s++)
            if (wsel == 8'(s)) begin
              s_req[s].w_valid = m_req.w_valid;
              m_resp.w_ready   = s_resp[s].w_ready;
            end
        end
      end
      WR_RESP: begin
        if (werr) begin
          m_resp.b_valid = 1'b1;
          m_resp.b_resp  = RESP_DECERR;
        end else begin
          for (int s = 0; s < NUM_SLAVES; s++)
            if (wsel == 8'(s)) begin
              s_req[s].b_ready = m_req.b_ready;
              m_resp.b_valid   = s_resp[s].b_valid;
              m_resp.b_resp    = s_resp[s].b_resp;
            end
        end
      end
      default: ;
    endcase
    // read direction
    unique case (rst)
      RD_IDLE: begin
        if (ar_bad) m_resp.ar_ready = 1'b1;
        else begin
          for (int s = 0; s < NUM_SLAVES; s++)
            if (ar_idx == 8'(s)) begin
              s_req[s].ar_valid = m_req.ar_valid;
              m_resp.ar_ready   = s_resp[s].ar_ready;
            end
        end
      end
      RD_BUSY: begin
        if (rerr) begin
          m_resp.r_valid = 1'b1;
          m_resp.r_resp  = RESP_DECERR;
          m_resp.r_last  = (rerr_left == 9'd1);
        end else begin
          for (int s = 0; s < NUM_SLAVES; s++)
            if (rsel == 8'(s)) begin
              s_req[s].r_ready = m_req.r_ready;
              m_resp.r_valid   = s_resp[s].r_valid;
              m_resp.r_data    = s_resp[s].r_data;
              m_resp.r_resp    = s_resp[s].r_resp;
              m_resp.r_last    = s_resp[s].r_last;
            end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst       <= WR_IDLE;
      rst       <= RD_IDLE;
      wsel      <= '0;
      rsel      <= '0;
      werr      <= 1'b0;
      rerr      <= 1'b0;
      rerr_left <= '0;
    end else begin
      unique case (wst)
        WR_IDLE: if (m_req.aw_valid && m_resp.aw_ready) begin
          wsel <= aw_idx;
          werr <= aw_bad;
          wst  <= WR_DATA;
        end
        WR_DATA: if (m_req.w_valid && m_resp.w_ready && m_req.w_last) wst <= WR_RESP;
        WR_RESP: if (m_resp.b_valid && m_req.b_ready) wst <= WR_IDLE;
        default: wst <= WR_IDLE;
      endcase
      unique case (rst)
        RD_IDLE: if (m_req.ar_valid && m_resp.ar_ready) begin
          rsel      <= ar_idx;
          rerr      <= ar_bad;
          rerr_left <= {1'b0, m_req.ar.len} + 9'd1;
          rst       <= RD_BUSY;
        end
        RD_BUSY: if (m_resp.r_valid && m_req.r_ready) begin
          rerr_left <= rerr_left - 9'd1;
          if (m_resp.r_last) rst <= RD_IDLE;
        end
        default: rst <= RD_IDLE;
      endcase
    end
  end

  // handshake rules on the master side
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (m_req.ar_valid && !m_resp.ar_ready) |=> (m_req.ar_valid && $stable(m_req.ar)));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (m_req.aw_valid && !m_resp.aw_ready) |=> (m_req.aw_valid && $stable(m_req.aw)));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (m_req.w_valid && !m_resp.w_ready) |=> (m_req.w_valid && $stable(m_req.w_data)));
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (m_resp.r_valid && !m_req.r_ready) |=> m_resp.r_valid);

endmodule
