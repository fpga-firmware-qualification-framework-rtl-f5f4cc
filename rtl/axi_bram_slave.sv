// Dual-ported blockram with one native port and one AXI slave port.
//
// This is the memory building block of the template. Port A is the plain
// blockram interface: address, data and write enable every cycle, read data
// one cycle later. Port B is reached over AXI through axi_slave_fe. The same
// block serves as
//   - an acquisition buffer: the monitor fills it through port A at one word
//     per cycle, a processor reads it over AXI;
//   - a configuration memory: a processor writes it over AXI, the arbiter or
//     the monitor reads it through port A with one cycle latency.
// Both ports may write; if they write the same word in the same cycle the
// AXI port wins (a choice of this design). Contents start at zero.
//
// The default of 1024 x 32 bits is one 36 Kb blockram.
module axi_bram_slave
  import ffqf_pkg::*;
#(
  parameter int unsigned MEM_AW = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  // native port A
  input  logic              a_en,
  input  logic              a_we,
  input  logic [MEM_AW-1:0] a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // AXI port B
  input  axi_req_t          axi_req,
  output axi_resp_t         axi_resp
);

  logic              b_en, b_we;
  logic [MEM_AW-1:0] b_addr;
  logic [DATA_W-1:0] b_wdata, b_rdata;
  logic [STRB_W-1:0] b_wstrb;

  logic [DATA_W-1:0] mem [2**MEM_AW];

  axi_slave_fe #(.MEM_AW(MEM_AW)) u_fe (
    .clk, .rst_n,
    .req       (axi_req),
    .resp      (axi_resp),
    .mem_en    (b_en),
    .mem_we    (b_we),
    .mem_addr  (b_addr),
    .mem_wdata (b_wdata),
    .mem_wstrb (b_wstrb),
    .mem_rdata (b_rdata)
  );

  initial begin
    for (int i = 0; i < 2**MEM_AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) begin
        for (int i = 0; i < STRB_W; i++)
          if (b_wstrb[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
      end
      b_rdata <= mem[b_addr];
    end
  end

endmodule
