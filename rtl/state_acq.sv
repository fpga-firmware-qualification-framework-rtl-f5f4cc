// State acquisition buffer: ring buffers that record a subsystem's state
// registers every cycle, read back through a single AXI slave.
//
// Each of the N_CH 32-bit state registers (data[ch]) has a ring buffer of
// 2**DEPTH_AW words of its own, so all of them are recorded in the same
// cycle. While capture is high, every cycle writes one record (one word per
// channel) at the common write pointer, which wraps at the end of the
// buffer. Connected to the subsystem's clock enable, the buffer stops with
// the subsystem: after a break the newest record is the state of the last
// cycle the subsystem ran, and the buffer holds the trace that led there.
//
// The AXI side (read only; writes are accepted and ignored) presents each
// channel oldest record first. Word address ch*2**DEPTH_AW + i returns the
// i-th oldest record of channel ch: the address translator adds the write
// pointer once the buffer has wrapped. Past the channels, word address
// N_CH*2**DEPTH_AW returns the number of valid records and the next one the
// total number of records written since reset.
//
// Reads have the timing of axi_slave_fe.
module state_acq
  import ffqf_pkg::*;
#(
  parameter int unsigned N_CH     = 4,
  parameter int unsigned DEPTH_AW = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              capture,
  input  logic [DATA_W-1:0] data [N_CH],
  input  axi_req_t          axi_req,
  output axi_resp_t         axi_resp
);

  localparam int unsigned DEPTH  = 2**DEPTH_AW;
  localparam int unsigned CH_W   = (N_CH > 1) ? $clog2(N_CH) : 1;
  localparam int unsigned MEM_AW = DEPTH_AW + CH_W + 1;

  logic [DEPTH_AW-1:0] wptr;
  logic                wrapped;
  logic [31:0]         total;

  logic              en, we;
  logic [MEM_AW-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic [STRB_W-1:0] wstrb;

  axi_slave_fe #(.MEM_AW(MEM_AW)) u_fe (
    .clk, .rst_n, .req(axi_req), .resp(axi_resp),
    .mem_en(en), .mem_we(we), .mem_addr(addr),
    .mem_wdata(wdata), .mem_wstrb(wstrb), .mem_rdata(rdata)
  );

  // address translation
  logic [DEPTH_AW-1:0] idx, phys;
  logic [CH_W-1:0]     ch;
  logic                is_stat;
  assign idx     = addr[DEPTH_AW-1:0];
  assign ch      = addr[DEPTH_AW +: CH_W];
  assign is_stat = addr[MEM_AW-1] || (32'(ch) >= N_CH);
  assign phys    = wrapped ? (idx + wptr) : idx;

  // write side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      wrapped <= 1'b0;
      total   <= '0;
    end else if (capture) begin
      wptr  <= wptr + 1'b1;
      total <= total + 32'd1;
      if (wptr == DEPTH_AW'(DEPTH - 1)) wrapped <= 1'b1;
    end
  end

  // one blockram per channel: written at wptr, read at the translated
  // address
  logic [DATA_W-1:0] ch_rdata [N_CH];
  logic              rd_en;
  assign rd_en = en && !we && !is_stat;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic [DATA_W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (capture) mem[wptr] <= data[c];
      if (rd_en)   ch_rdata[c] <= mem[phys];
    end
  end

  logic [CH_W-1:0] ch_q;
  logic            stat_q;
  logic [DATA_W-1:0] stat_data;

  // read side, one cycle latency
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_q      <= '0;
      stat_q    <= 1'b0;
      stat_data <= '0;
    end else if (en && !we) begin
      ch_q   <= ch;
      stat_q <= is_stat;
      if (idx == '0)     stat_data <= wrapped ? 32'(DEPTH) : 32'(wptr);
      else if (idx == 1) stat_data <= total;
      else               stat_data <= '0;
    end
  end

  assign rdata = stat_q ? stat_data : ch_rdata[ch_q];

endmodule
