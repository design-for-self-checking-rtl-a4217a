// qsel: quotient digit selection of a radix-2 carry-save divider.
//
// Inputs are the four top bits of the shifted carry and sum vectors of the
// residual, with weights -4, 2, 1 and 1/2 (index 3 down to 0). A 4-bit
// dual-rail ripple adder forms the estimate y of the shifted residual,
// truncated to one fractional bit, and the digit is
//   q = +1 if y >= 0,   q = 0 if y = -1/2,   q = -1 if y <= -1,
// the standard selection for a divisor in [1/2, 1) with a carry-save
// residual. The design names this block and its inputs (WC<-2:1>,
// WS<-2:1>) and its outputs q_s and q_m; the selection rule and the adder
// are this implementation's. Digit encoding: q_s is the sign (1 for -1),
// q_m the magnitude (1 for +1 and -1). Dual-rail, combinational.
module qsel
  import dcvsl_pkg::*;
(
  input  dr_t [3:0] wc_top,  // shifted carry vector, bits -2..1
  input  dr_t [3:0] ws_top,  // shifted sum vector, bits -2..1
  output dr_t       qs,      // digit sign
  output dr_t       qm       // digit magnitude
);
  dr_t [3:0] s;
  dr_t       low3, all1;

  always_comb begin
    dr_t cy;
    cy = DR_0;
    for (int i = 0; i < 4; i++) begin
      s[i] = dr_xor(dr_xor(wc_top[i], ws_top[i]), cy);
      cy   = dr_maj(wc_top[i], ws_top[i], cy);
    end
    low3 = dr_and(s[2], dr_and(s[1], s[0]));
    all1 = dr_and(s[3], low3);
    // y = -1/2 is the pattern 1111; any other negative y gives -1.
    qm   = dr_not(all1);
    qs   = dr_and(s[3], dr_not(low3));
  end
endmodule
