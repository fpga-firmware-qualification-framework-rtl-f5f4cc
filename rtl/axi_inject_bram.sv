// Injection unit: a dual-ported blockram with an AXI slave on each port.
//
// Port A hangs on the debug bus, where a processor fills it with alternative
// input data for a subsystem under test. Port B hangs on the functional bus,
// where the communication arbiter copies from it instead of from the real
// producer when its schedule is pointed here. The data for successive
// schedule cycles is stored in consecutive blocks (for example 0x10 bytes
// apart) and the arbiter steps through them, so the unit never has to be
// refilled in real time.
//
// Both ports may read and write; on a same-cycle write to the same word the
// functional port wins (a choice of this design). Each port has the timing
// of axi_slave_fe. Contents start at zero.
module axi_inject_bram
  import ffqf_pkg::*;
#(
  parameter int unsigned MEM_AW = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axi_req_t  dbg_req,    // debug bus side
  output axi_resp_t dbg_resp,
  input  axi_req_t  fn_req,     // functional bus side
  output axi_resp_t fn_resp
);

  logic              en   [2];
  logic              we   [2];
  logic [MEM_AW-1:0] addr [2];
  logic [DATA_W-1:0] wdat [2];
  logic [DATA_W-1:0] rdat [2];
  logic [STRB_W-1:0] strb [2];

  logic [DATA_W-1:0] mem [2**MEM_AW];

  axi_slave_fe #(.MEM_AW(MEM_AW)) u_fe_dbg (
    .clk, .rst_n, .req(dbg_req), .resp(dbg_resp),
    .mem_en(en[0]), .mem_we(we[0]), .mem_addr(addr[0]),
    .mem_wdata(wdat[0]), .mem_wstrb(strb[0]), .mem_rdata(rdat[0])
  );

  axi_slave_fe #(.MEM_AW(MEM_AW)) u_fe_fn (
    .clk, .rst_n, .req(fn_req), .resp(fn_resp),
    .mem_en(en[1]), .mem_we(we[1]), .mem_addr(addr[1]),
    .mem_wdata(wdat[1]), .mem_wstrb(strb[1]), .mem_rdata(rdat[1])
  );

  initial begin
    for (int i = 0; i < 2**MEM_AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (en[p]) begin
        if (we[p]) begin
          for (int i = 0; i < STRB_W; i++)
            if (strb[p][i]) mem[addr[p]][8*i +: 8] <= wdat[p][8*i +: 8];
        end
        rdat[p] <= mem[addr[p]];
      end
    end
  end

endmodule
