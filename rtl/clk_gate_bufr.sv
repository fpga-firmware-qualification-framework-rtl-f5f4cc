// Behavioural model of a regional clock buffer with clock enable, used to
// stop the clock of the subsystems at a breakpoint.
//
// On the FPGA this is a regional clock buffer (BUFR) with divide-by-one and
// its CE input; this model stands in for that primitive. The output follows
// the input clock while ce is high. When ce goes low the output is held
// HIGH: the edge on which ce was registered low still reaches the gated
// logic, and no further rising edge follows until ce returns, so every
// register of the stopped subsystem keeps its value. The enable is sampled
// by a latch that is transparent while the clock is high, so a change of ce
// (which comes from logic clocked on the same rising edge) can never cut a
// clock pulse short. The latch is intentional; it is the glitch-free gating
// element of this model.
//
// Ports: clk_i input clock, ce clock enable, clk_o gated clock.
module clk_gate_bufr (
  input  logic clk_i,
  input  logic ce,
  output logic clk_o
);

  logic stop_l;

  always_latch begin
    if (clk_i) stop_l = !ce;
  end

  assign clk_o = clk_i | stop_l;

endmodule
