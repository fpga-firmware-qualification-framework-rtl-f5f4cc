// AXI4 slave front end: turns AXI bursts into single-word accesses on one
// memory port.
//
// Every slave of the template (register interfaces, blockrams, the state
// acquisition buffer) sits behind this block. The write side accepts an AW,
// then one W beat per cycle, writing each beat to the memory port in the same
// cycle, and answers with one B. The read side accepts an AR and issues one
// memory read per cycle; the memory returns the data one cycle later, the
// latency of a blockram port. A two-entry read buffer absorbs R backpressure,
// so a burst streams at one beat per cycle when the master is ready.
//
// Reads and writes share the memory port, as they would on one blockram
// port; a write beat has priority and delays the next read issue by a cycle.
// Bursts are treated as INCR with 32-bit beats and the response is always
// OKAY. The byte address is reduced to a word address of MEM_AW bits;
// addresses above that wrap. Write strobes are passed to the memory.
//
// Timing: AW accepted in the idle cycle, first W beat accepted the next cycle,
// B one cycle after the last beat. AR accepted in the idle cycle, the first
// read is issued the cycle after, and R valid follows one cycle later.
module axi_slave_fe
  import ffqf_pkg::*;
#(
  parameter int unsigned MEM_AW = 10     // word address bits
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axi_req_t          req,
  output axi_resp_t         resp,
  // memory port, read data returned one cycle after an enabled read
  output logic              mem_en,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  output logic [STRB_W-1:0] mem_wstrb,
  input  logic [DATA_W-1:0] mem_rdata
);

  typedef enum logic [1:0] {W_IDLE, W_DATA, W_RESP} wstate_t;
  typedef enum logic {R_IDLE, R_DATA} rstate_t;

  wstate_t             wstate;
  logic [MEM_AW-1:0]   waddr;

  rstate_t             rstate;
  logic [MEM_AW-1:0]   raddr;
  logic [8:0]          rleft;       // reads still to issue
  logic                pend;        // read issued last cycle
  logic                pend_last;
  logic [DATA_W:0]     fifo_q [2];  // {last, data}
  logic [1:0]          fcnt;

  logic wr_fire, rd_issue, pop, push;

  assign wr_fire  = (wstate == W_DATA) && req.w_valid;
  assign pop      = (fcnt != 2'd0) && req.r_ready;
  assign push     = pend;
  assign rd_issue = (rstate == R_DATA) && (rleft != 9'd0) && !wr_fire &&
                    ({1'b0, fcnt} + {2'b00, pend} < 3'd2 + {2'b00, pop});

  // memory port
  always_comb begin
    mem_en    = wr_fire || rd_issue;
    mem_we    = wr_fire;
    mem_addr  = wr_fire ? waddr : raddr;
    mem_wdata = req.w_data;
    mem_wstrb = req.w_strb;
  end

  // AXI outputs
  always_comb begin
    resp          = '0;
    resp.aw_ready = (wstate == W_IDLE);
    resp.w_ready  = (wstate == W_DATA);
    resp.b_valid  = (wstate == W_RESP);
    resp.b_resp   = RESP_OKAY;
    resp.ar_ready = (rstate == R_IDLE);
    resp.r_valid  = (fcnt != 2'd0);
    resp.r_data   = fifo_q[0][DATA_W-1:0];
    resp.r_last   = fifo_q[0][DATA_W];
    resp.r_resp   = RESP_OKAY;
  end

  // write side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate <= W_IDLE;
      waddr  <= '0;
    end else begin
      unique case (wstate)
        W_IDLE: if (req.aw_valid) begin
          waddr  <= req.aw.addr[MEM_AW+1:2];
          wstate <= W_DATA;
        end
        W_DATA: if (req.w_valid) begin
          waddr <= waddr + 1'b1;
          if (req.w_last) wstate <= W_RESP;
        end
        W_RESP: if (req.b_ready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // read side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate    <= R_IDLE;
      raddr     <= '0;
      rleft     <= '0;
      pend      <= 1'b0;
      pend_last <= 1'b0;
      fcnt      <= '0;
      fifo_q[0] <= '0;
      fifo_q[1] <= '0;
    end else begin
      pend      <= rd_issue;
      pend_last <= rd_issue && (rleft == 9'd1);
      if (rd_issue) begin
        raddr <= raddr + 1'b1;
        rleft <= rleft - 1'b1;
      end
      unique case (rstate)
        R_IDLE: if (req.ar_valid) begin
          raddr  <= req.ar.addr[MEM_AW+1:2];
          rleft  <= {1'b0, req.ar.len} + 9'd1;
          rstate <= R_DATA;
        end
        R_DATA: if (pop && fifo_q[0][DATA_W]) rstate <= R_IDLE;
        default: rstate <= R_IDLE;
      endcase
      // two-entry read buffer
      unique case ({push, pop})
        2'b10: begin
          if (fcnt == 2'd0) fifo_q[0] <= {pend_last, mem_rdata};
          else              fifo_q[1] <= {pend_last, mem_rdata};
          fcnt <= fcnt + 2'd1;
        end
        2'b01: begin
          fifo_q[0] <= fifo_q[1];
          fcnt      <= fcnt - 2'd1;
        end
        2'b11: begin
          if (fcnt == 2'd1) fifo_q[0] <= {pend_last, mem_rdata};
          else begin
            fifo_q[0] <= fifo_q[1];
            fifo_q[1] <= {pend_last, mem_rdata};
          end
        end
        default: ;
      endcase
    end
  end

endmodule
