// ddcc4: 4-pair dynamic dual-rail code checker.
//
// The cell is a dynamic 4-input dual-rail XOR. While cp is low it is
// precharged and both outputs are low. While cp is high it evaluates: the
// output pair is complementary when all four input pairs are, and carries
// the parity of the four true rails (Z high for odd parity, Z_N for even).
// A 00 input pair leaves both outputs low, and a 11 pair (with no 00 pair)
// drives both high, so a non-code word at any input shows up as the same
// non-code word at the output. Each rail is the OR of the eight products
// of one rail per input with the right parity, the pull-down network of
// the transistor-level cell. Combinational apart from the precharge gating.
module ddcc4
  import dcvsl_pkg::*;
(
  input  logic      cp,  // precharge (0) / evaluate (1)
  input  dr_t [3:0] q,   // input pairs
  output dr_t       z    // merged pair: z.t = Z, z.f = Z_N
);
  logic odd, even;

  always_comb begin
    odd  = 1'b0;
    even = 1'b0;
    for (int unsigned m = 0; m < 16; m++) begin
      logic prod;
      prod = 1'b1;
      for (int unsigned i = 0; i < 4; i++)
        prod = prod & (m[i] ? q[i].t : q[i].f);
      if (^m[3:0]) odd = odd | prod;
      else         even = even | prod;
    end
  end

  assign z = cp ? '{t: odd, f: even} : DR_SPACER;
endmodule
