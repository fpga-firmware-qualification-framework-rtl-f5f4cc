// Simulation-only AXI master used by the testbenches to play the part of
// the processor on a bus. It offers blocking tasks:
//   write(addr, data[16], n, strb, resp)   one INCR burst of n words
//   read (addr, n, data[16], resp)         one INCR burst of n words
//   write1 / read1                         single words
// AW and the first W beat are presented together; R and B are accepted as
// soon as they are valid. Handshakes are sampled on the falling edge, when
// the bus is settled, and outputs change with non-blocking assignments on
// the rising edge, so the tasks can be called at any time.
module axi_tb_master
  import ffqf_pkg::*;
(
  input  logic      clk,
  output axi_req_t  req,
  input  axi_resp_t resp
);

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data [16],
                       input int n, input logic [3:0] strb, output logic [1:0] bresp);
    int  i;
    bit  aw_hs, w_hs, b_hs;
    @(posedge clk);
    req.aw_valid <= 1'b1;
    req.aw.addr  <= addr;
    req.aw.len   <= 8'(n - 1);
    req.aw.size  <= SIZE_4B;
    req.aw.burst <= BURST_INCR;
    req.w_valid  <= 1'b1;
    req.w_data   <= data[0];
    req.w_strb   <= strb;
    req.w_last   <= (n == 1);
    req.b_ready  <= 1'b1;
    i = 0;
    forever begin
      @(negedge clk);
      aw_hs = req.aw_valid && resp.aw_ready;
      w_hs  = req.w_valid && resp.w_ready;
      b_hs  = req.b_ready && resp.b_valid;
      if (b_hs) bresp = resp.b_resp;
      @(posedge clk);
      if (aw_hs) req.aw_valid <= 1'b0;
      if (w_hs) begin
        i++;
        if (i == n) req.w_valid <= 1'b0;
        else begin
          req.w_data <= data[i];
          req.w_last <= (i == n - 1);
        end
      end
      if (b_hs) begin
        req.b_ready <= 1'b0;
        break;
      end
    end
  endtask

  task automatic read(input logic [31:0] addr, input int n,
                      output logic [31:0] data [16], output logic [1:0] rresp);
    int i;
    bit ar_hs, r_hs, last;
    for (int k = 0; k < 16; k++) data[k] = '0;
    rresp = RESP_OKAY;
    @(posedge clk);
    req.ar_valid <= 1'b1;
    req.ar.addr  <= addr;
    req.ar.len   <= 8'(n - 1);
    req.ar.size  <= SIZE_4B;
    req.ar.burst <= BURST_INCR;
    req.r_ready  <= 1'b1;
    i = 0;
    forever begin
      @(negedge clk);
      ar_hs = req.ar_valid && resp.ar_ready;
      r_hs  = req.r_ready && resp.r_valid;
      last  = resp.r_last;
      if (r_hs) begin
        if (i < 16) data[i] = resp.r_data;
        if (resp.r_resp != RESP_OKAY) rresp = resp.r_resp;
        i++;
      end
      @(posedge clk);
      if (ar_hs) req.ar_valid <= 1'b0;
      if (r_hs && last) begin
        req.r_ready <= 1'b0;
        break;
      end
    end
  endtask

  task automatic write1(input logic [31:0] addr, input logic [31:0] value);
    logic [31:0] d [16];
    logic [1:0]  r;
    for (int k = 0; k < 16; k++) d[k] = '0;
    d[0] = value;
    write(addr, d, 1, 4'hF, r);
  endtask

  task automatic read1(input logic [31:0] addr, output logic [31:0] value);
    logic [31:0] d [16];
    logic [1:0]  r;
    read(addr, 1, d, r);
    value = d[0];
  endtask

endmodule
