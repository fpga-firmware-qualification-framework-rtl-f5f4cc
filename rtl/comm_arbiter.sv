// Communication arbiter: runs the time-division copy schedule of the
// functional bus and implements soft breakpoints.
//
// The schedule lives in a configuration blockram (native port, one cycle
// read latency). It is a list of line pairs:
//   line 2k   : source      {len[7:0], addr[23:0]}
//   line 2k+1 : destination {len[7:0], addr[23:0]}
// terminated by the word 0xDEADBEEF. For each pair the arbiter reads the two
// lines ("Read x", "Write x") and hands one copy of len words to axi_master.
// The source length is used; the destination length is read but not used
// (a choice of this design, the two are meant to be equal). Placing the
// length in bits [31:24] is also this design's choice.
//
// A schedule cycle starts on a start pulse (for example the ready signal of
// a subsystem's real-time data) or, with free_run set, right after the
// previous one. A start pulse that arrives while a cycle runs is kept and
// starts the next cycle.
//
// Break mode. break_req is honoured only between copies: in idle, or at the
// point where the next source line would be read. A copy already under way
// is always completed, so a subsystem never sees half a transfer. On entry
// the arbiter saves its schedule position and raises break_active, which
// stops the subsystem clocks. While break_req stays high it executes the
// alternative schedule that starts at word ALT_BASE of the same memory,
// again and again, re-reading the memory each time so that a processor can
// change it during the break. When break_req drops, the arbiter finishes the
// alternative copy in progress and returns to the saved position.
//
// Injection stepping. Copies whose source falls in slave window inj_slave
// (address bits [23:16]) get the offset inj_idx * inj_step added to the
// source address. inj_idx counts completed normal schedule cycles and wraps
// at inj_blocks (0 disables stepping). This lets the injection blockram hold
// the test data of many cycles in consecutive blocks.
//
// hold freezes the arbiter in place (used during a hard breakpoint); a copy
// already handed to the copy engine still completes and is accounted for
// when hold is released. Start pulses that arrive while held are ignored.
module comm_arbiter
  import ffqf_pkg::*;
#(
  parameter int unsigned CFG_AW   = 9,     // config memory word address bits
  parameter int unsigned ALT_BASE = 256    // first word of the alternative schedule
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              free_run,
  input  logic              break_req,
  input  logic              hold,
  output logic              break_active,
  output logic              busy,
  // injection stepping
  input  logic [7:0]        inj_slave,
  input  logic [23:0]       inj_step,
  input  logic [15:0]       inj_blocks,
  // configuration memory (native blockram port)
  output logic              cfg_en,
  output logic [CFG_AW-1:0] cfg_addr,
  input  logic [DATA_W-1:0] cfg_rdata,
  // copy engine
  output logic              cmd_valid,
  input  logic              cmd_ready,
  output logic [ADDR_W-1:0] cmd_src,
  output logic [ADDR_W-1:0] cmd_dst,
  output logic [7:0]        cmd_len,
  input  logic              cmd_done,
  // statistics
  output logic [31:0]       cycles_done,
  output logic [31:0]       copies_done
);

  typedef enum logic [2:0] {
    A_IDLE, A_RD_SRC, A_WT_SRC, A_RD_DST, A_WT_DST, A_ISSUE, A_WAIT
  } astate_t;

  astate_t           state;
  logic [CFG_AW-1:0] ptr, saved_ptr;
  logic              alt;            // executing the alternative schedule
  logic              saved_idle;     // break was entered from idle
  logic              start_pend;
  logic [31:0]       src_line;
  logic [15:0]       inj_idx;
  logic              done_seen;      // copy finished while held

  assign break_active = alt;
  assign busy         = (state != A_IDLE);

  always_comb begin
    cfg_en   = !hold && ((state == A_RD_SRC) || (state == A_RD_DST));
    cfg_addr = ptr;
  end

  // source address with injection offset
  logic [23:0] src_addr;
  always_comb begin
    src_addr = src_line[23:0];
    if (inj_blocks != 16'd0 && src_line[23:16] == inj_slave)
      src_addr = src_line[23:0] + 24'(inj_step * inj_idx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= A_IDLE;
      ptr         <= '0;
      saved_ptr   <= '0;
      alt         <= 1'b0;
      saved_idle  <= 1'b0;
      start_pend  <= 1'b0;
      src_line    <= '0;
      inj_idx     <= '0;
      cmd_valid   <= 1'b0;
      cmd_src     <= '0;
      cmd_dst     <= '0;
      cmd_len     <= '0;
      cycles_done <= '0;
      copies_done <= '0;
      done_seen   <= 1'b0;
    end else if (hold) begin
      // the copy engine finishes its transaction even while the arbiter is
      // frozen; remember its completion
      if (cmd_done) done_seen <= 1'b1;
    end else begin
      if (start && state != A_IDLE) start_pend <= 1'b1;
      unique case (state)
        A_IDLE: begin
          if (break_req) begin
            saved_idle <= 1'b1;
            saved_ptr  <= '0;
            alt        <= 1'b1;
            ptr        <= CFG_AW'(ALT_BASE);
            state      <= A_RD_SRC;
          end else if (start || start_pend || free_run) begin
            start_pend <= 1'b0;
            ptr        <= '0;
            state      <= A_RD_SRC;
          end
        end
        A_RD_SRC: begin
          // decision point between copies
          if (!alt && break_req) begin
            saved_idle <= 1'b0;
            saved_ptr  <= ptr;
            alt        <= 1'b1;
            ptr        <= CFG_AW'(ALT_BASE);
          end else if (alt && !break_req) begin
            alt <= 1'b0;
            ptr <= saved_ptr;
            if (saved_idle) state <= A_IDLE;
          end else begin
            state <= A_WT_SRC;
          end
        end
        A_WT_SRC: begin
          if (cfg_rdata == SCHED_END) begin
            if (alt) begin
              ptr   <= CFG_AW'(ALT_BASE);          // repeat the break schedule
              state <= A_RD_SRC;
            end else begin
              cycles_done <= cycles_done + 32'd1;
              if (inj_blocks != 16'd0)
                inj_idx <= (inj_idx + 16'd1 >= inj_blocks) ? 16'd0 : inj_idx + 16'd1;
              state <= A_IDLE;
            end
          end else begin
            src_line <= cfg_rdata;
            ptr      <= ptr + 1'b1;
            state    <= A_RD_DST;
          end
        end
        A_RD_DST: state <= A_WT_DST;
        A_WT_DST: begin
          cmd_src   <= {8'h00, src_addr};
          cmd_dst   <= {8'h00, cfg_rdata[23:0]};
          cmd_len   <= src_line[31:24];
          cmd_valid <= 1'b1;
          ptr       <= ptr + 1'b1;
          state     <= A_ISSUE;
        end
        A_ISSUE: if (cmd_ready) begin
          cmd_valid <= 1'b0;
          state     <= A_WAIT;
        end
        A_WAIT: if (cmd_done || done_seen) begin
          done_seen   <= 1'b0;
          copies_done <= copies_done + 32'd1;
          state       <= A_RD_SRC;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

endmodule
