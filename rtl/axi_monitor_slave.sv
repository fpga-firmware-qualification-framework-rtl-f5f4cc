// AXI slave side of the monitor: configuration memory and acquisition
// buffers behind one AXI slave.
//
// The monitor appears to the processor as a single slave. Writes go to the
// configuration memory, which the monitor reads through its own port. Reads
// return acquisition data from four buffers, which the monitor fills through
// their own ports at one word per cycle:
//   write  word address i  (i < 2**CFG_AW)   configuration word i
//   read   word address k*2**ACQ_AW + i      word i of acquisition buffer k
//          (k = 0 AR addresses, 1 R data, 2 AW addresses, 3 W data)
// Writes above the configuration memory are ignored. The configuration
// memory cannot be read back over AXI; the processor keeps its own copy.
// With the defaults a 16 KB window: buffer k starts at byte offset
// k * 0x1000.
//
// Each memory is a separate simple dual-port blockram: the configuration
// memory is written by AXI and read by the monitor (read data one cycle
// after cfg_en), each acquisition buffer is written by the monitor and read
// by AXI. The AXI read data is taken from the buffer selected one cycle
// earlier, so reads have the timing of axi_slave_fe.
//
// The split of writes to configuration and reads to acquisition follows
// the template's monitor slave; the address layout is this design's own.
// Contents start at zero.
module axi_monitor_slave
  import ffqf_pkg::*;
#(
  parameter int unsigned CFG_AW = 9,
  parameter int unsigned ACQ_AW = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axi_req_t          axi_req,
  output axi_resp_t         axi_resp,
  // configuration memory, monitor side
  input  logic              cfg_en,
  input  logic [CFG_AW-1:0] cfg_addr,
  output logic [DATA_W-1:0] cfg_rdata,
  // acquisition buffers, monitor side
  input  logic [3:0]        acq_we,
  input  logic [ACQ_AW-1:0] acq_addr  [4],
  input  logic [DATA_W-1:0] acq_wdata [4]
);

  localparam int unsigned MEM_AW = ACQ_AW + 2;

  logic              en, we;
  logic [MEM_AW-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic [STRB_W-1:0] wstrb;

  axi_slave_fe #(.MEM_AW(MEM_AW)) u_fe (
    .clk, .rst_n, .req(axi_req), .resp(axi_resp),
    .mem_en(en), .mem_we(we), .mem_addr(addr),
    .mem_wdata(wdata), .mem_wstrb(wstrb), .mem_rdata(rdata)
  );

  // configuration memory: AXI writes, monitor reads
  logic [DATA_W-1:0] cfg_mem [2**CFG_AW];
  logic              cfg_wr;
  assign cfg_wr = en && we && (32'(addr) < 2**CFG_AW);

  initial begin
    for (int i = 0; i < 2**CFG_AW; i++) cfg_mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (cfg_wr)
      for (int b = 0; b < STRB_W; b++)
        if (wstrb[b]) cfg_mem[addr[CFG_AW-1:0]][8*b +: 8] <= wdata[8*b +: 8];
    if (cfg_en) cfg_rdata <= cfg_mem[cfg_addr];
  end

  // acquisition buffers: monitor writes, AXI reads
  logic [1:0]        bank, bank_q;
  logic [DATA_W-1:0] bank_rdata [4];
  assign bank = addr[ACQ_AW +: 2];

  for (genvar k = 0; k < 4; k++) begin : g_acq
    logic [DATA_W-1:0] mem [2**ACQ_AW];
    initial begin
      for (int i = 0; i < 2**ACQ_AW; i++) mem[i] = '0;
    end
    always_ff @(posedge clk) begin
      if (acq_we[k]) mem[acq_addr[k]] <= acq_wdata[k];
      if (en && !we && bank == 2'(k)) bank_rdata[k] <= mem[addr[ACQ_AW-1:0]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          bank_q <= '0;
    else if (en && !we)  bank_q <= bank;
  end

  assign rdata = bank_rdata[bank_q];

endmodule
