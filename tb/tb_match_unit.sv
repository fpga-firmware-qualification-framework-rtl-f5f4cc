// Testbench for match_unit: random values, references and masks for all
// four compare types against a reference computed here.
module tb_match_unit;
  import ffqf_pkg::*;

  logic [31:0] value, ref_val, mask;
  cmp_t        cmp;
  logic        hit;
  int checks = 0, failures = 0;

  match_unit dut (.value, .ref_val, .mask, .cmp, .hit);

  function automatic logic expect_hit(logic [31:0] v, logic [31:0] r, logic [31:0] m, cmp_t c);
    longint unsigned a = 64'(v & m), b = 64'(r & m);
    case (c)
      CMP_EQ:  return a == b;
      CMP_NE:  return a != b;
      CMP_LT:  return a < b;
      default: return a > b;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      value   = $urandom;
      ref_val = (i % 3 == 0) ? value ^ (32'h1 << (i % 32)) : ((i % 3 == 1) ? value : $urandom);
      mask    = (i % 5 == 0) ? 32'hFFFF_FFFF : $urandom;
      cmp     = cmp_t'(i % 4);
      #1;
      checks++;
      if (hit !== expect_hit(value, ref_val, mask, cmp)) begin
        failures++;
        if (failures < 10) $display("FAIL v=%h r=%h m=%h cmp=%0d hit=%b", value, ref_val, mask, cmp, hit);
      end
    end
    // mask zero with EQ matches everything
    value = 32'h1234; ref_val = 32'h9999; mask = 0; cmp = CMP_EQ; #1;
    checks++; if (hit !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
