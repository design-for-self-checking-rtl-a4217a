// otf_conv: on-the-fly quotient converter.
//
// Keeps the quotient Q and QM = Q - 1 unit in conventional binary while
// signed digits arrive, so that no carry-propagate addition is needed at
// the end. With the new digit q (sign q_s, magnitude q_m):
//   q = +1: Q <- 2Q + 1,      QM <- 2Q
//   q =  0: Q <- 2Q,          QM <- 2QM + 1
//   q = -1: Q <- 2QM + 1,     QM <- 2QM
// The words are NBITS wide and are shifted up one place per digit, so
// after NBITS digits the starting value has left the word. The design
// names the block and its outputs Q[j+1] and QM[j+1]; the update rule is
// the standard one for radix 2. Dual-rail, combinational.
module otf_conv
  import dcvsl_pkg::*;
#(
  parameter int unsigned NBITS = DIV_NBITS
) (
  input  dr_t              qs,     // digit sign
  input  dr_t              qm,     // digit magnitude
  input  dr_t [NBITS-1:0]  q_in,   // Q[j]
  input  dr_t [NBITS-1:0]  qm_in,  // QM[j]
  output dr_t [NBITS-1:0]  q_out,  // Q[j+1]
  output dr_t [NBITS-1:0]  qm_out  // QM[j+1]
);
  dr_t pos;  // q = +1

  always_comb begin
    pos = dr_and(qm, dr_not(qs));
    q_out[0]  = qm;
    qm_out[0] = dr_not(qm);
    for (int unsigned i = 1; i < NBITS; i++) begin
      q_out[i]  = dr_mux(qs, q_in[i-1], qm_in[i-1]);
      qm_out[i] = dr_mux(pos, qm_in[i-1], q_in[i-1]);
    end
  end
endmodule
