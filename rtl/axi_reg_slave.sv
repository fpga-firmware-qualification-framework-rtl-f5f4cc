// Generic AXI slave with a register interface for one subsystem.
//
// A subsystem joins the template by handing its parallel connections to this
// slave as 32-bit registers instead of wiring them straight to its
// neighbours. Two ranges are mapped:
//   0x0000 + 4*i  read registers, i < NUM_RD: the subsystem's outputs
//                 (rd_regs), read-only; writes to them are ignored.
//   0x1000 + 4*i  write registers, i < NUM_WR: the subsystem's inputs
//                 (wr_regs), written by the bus and readable back.
// Any other address reads as zero and ignores writes, so a slave whose
// register interface is left unconnected behaves like an empty one.
// wr_stb[i] pulses for one cycle when write register i is written, so the
// subsystem can tell that new data arrived.
//
// The defaults, six read and seven write registers, are the register map of
// the case-study current controller (0x0000-0x0014 and 0x1000-0x1018).
// Timing is that of axi_slave_fe; a read samples rd_regs in the cycle the
// read is issued. Write registers reset to zero.
module axi_reg_slave
  import ffqf_pkg::*;
#(
  parameter int unsigned NUM_RD = 6,
  parameter int unsigned NUM_WR = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axi_req_t          axi_req,
  output axi_resp_t         axi_resp,
  input  logic [DATA_W-1:0] rd_regs [NUM_RD],
  output logic [DATA_W-1:0] wr_regs [NUM_WR],
  output logic [NUM_WR-1:0] wr_stb
);

  localparam int unsigned MEM_AW   = 11;        // 8 KB window
  localparam int unsigned WR_BASE  = 'h400;     // word address of 0x1000

  logic              en, we;
  logic [MEM_AW-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic [STRB_W-1:0] wstrb;

  axi_slave_fe #(.MEM_AW(MEM_AW)) u_fe (
    .clk, .rst_n,
    .req(axi_req), .resp(axi_resp),
    .mem_en(en), .mem_we(we), .mem_addr(addr),
    .mem_wdata(wdata), .mem_wstrb(wstrb), .mem_rdata(rdata)
  );

  // decoded indices
  logic              is_wr;
  logic [MEM_AW-1:0] wr_off;
  assign wr_off = addr - MEM_AW'(WR_BASE);
  assign is_wr  = (addr >= MEM_AW'(WR_BASE)) && (wr_off < MEM_AW'(NUM_WR));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_WR; i++) wr_regs[i] <= '0;
      wr_stb <= '0;
      rdata  <= '0;
    end else begin
      wr_stb <= '0;
      if (en && we && is_wr) begin
        for (int i = 0; i < NUM_WR; i++)
          if (wr_off == MEM_AW'(i)) begin
            for (int b = 0; b < STRB_W; b++)
              if (wstrb[b]) wr_regs[i][8*b +: 8] <= wdata[8*b +: 8];
            wr_stb[i] <= 1'b1;
          end
      end
      if (en && !we) begin
        rdata <= '0;
        for (int i = 0; i < NUM_RD; i++)
          if (addr == MEM_AW'(i)) rdata <= rd_regs[i];
        for (int i = 0; i < NUM_WR; i++)
          if (is_wr && wr_off == MEM_AW'(i)) rdata <= wr_regs[i];
      end
    end
  end

endmodule
