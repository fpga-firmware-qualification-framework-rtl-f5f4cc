// Match unit: one masked comparison of a monitored value with a reference.
//
// Both the value and the reference are ANDed with the mask, then compared
// with the selected type: equal, not equal, smaller than or larger than
// (unsigned). A zero mask with type "equal" matches everything, which is how
// a condition is switched off. Purely combinational.
module match_unit
  import ffqf_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] value,
  input  logic [W-1:0] ref_val,
  input  logic [W-1:0] mask,
  input  cmp_t         cmp,
  output logic         hit
);

  logic [W-1:0] a, b;
  assign a = value & mask;
  assign b = ref_val & mask;

  always_comb begin
    unique case (cmp)
      CMP_EQ:  hit = (a == b);
      CMP_NE:  hit = (a != b);
      CMP_LT:  hit = (a <  b);
      CMP_GT:  hit = (a >  b);
      default: hit = 1'b0;
    endcase
  end

endmodule
