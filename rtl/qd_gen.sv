// qd_gen: divisor multiple generator.
//
// Forms the addend -q*d of the residual recurrence from the digit (q_s,
// q_m) and the divisor d, as a W-bit two's complement word aligned with
// the residual (d fills the low NBITS bits, the integer bits are 0):
//   q = +1: bitwise complement of d, with cin = 1 completing the negation;
//   q =  0: zero, cin = 0;
//   q = -1: d, cin = 0.
// The design names the block and its inputs q_s, q_m and d; the encoding
// is this implementation's. Dual-rail, combinational.
module qd_gen
  import dcvsl_pkg::*;
#(
  parameter int unsigned NBITS = DIV_NBITS,
  parameter int unsigned W     = NBITS + DIV_IBITS
) (
  input  dr_t              qs,   // digit sign
  input  dr_t              qm,   // digit magnitude
  input  dr_t [NBITS-1:0]  d,    // divisor
  output dr_t [W-1:0]      qd,   // -q*d without its carry-in
  output dr_t              cin   // carry-in of the negation
);
  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      dr_t di;
      di = (i < NBITS) ? d[i] : DR_0;
      qd[i] = dr_and(qm, dr_xor(di, dr_not(qs)));
    end
    cin = dr_and(qm, dr_not(qs));
  end
endmodule
