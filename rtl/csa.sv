// csa: carry-save adder of the residual recurrence.
//
// Adds three W-bit dual-rail words (shifted carry vector, shifted sum
// vector, divisor multiple) into a sum vector and a carry vector. The
// carry vector is shifted up one place and its free low bit takes cin, the
// carry-in that completes the negation of the divisor. Bits that carry out
// of the top are dropped: the residual is kept modulo 2^(W-f) where f is
// the number of fraction bits, which is exact because its value stays in
// range. The design labels this block "8b CSA"; here it spans the integer
// bits of the residual too (W = 11 for 8-bit operands). Dual-rail,
// combinational.
module csa
  import dcvsl_pkg::*;
#(
  parameter int unsigned W = DIV_NBITS + DIV_IBITS
) (
  input  dr_t [W-1:0] a,
  input  dr_t [W-1:0] b,
  input  dr_t [W-1:0] c,
  input  dr_t         cin,
  output dr_t [W-1:0] sum,
  output dr_t [W-1:0] carry
);
  always_comb begin
    carry[0] = cin;
    for (int unsigned i = 0; i < W; i++) begin
      sum[i] = dr_xor(dr_xor(a[i], b[i]), c[i]);
      if (i + 1 < W) carry[i+1] = dr_maj(a[i], b[i], c[i]);
    end
  end
endmodule
