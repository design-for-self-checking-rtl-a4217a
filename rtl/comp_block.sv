// comp_block: computation block of one pipeline stage.
//
// DCVSL function block -> DDCC -> XOR, all controlled by the stage's
// precharge/evaluate signal cp:
//   * div_function computes the division step in dual-rail logic and
//     dcvsl_node holds the result on precharged dynamic nodes (OUT1);
//   * ddcc merges all output pairs into one pair (OUT2);
//   * cd_xor turns that pair into the completion signal C.
// In precharge OUT1 is all 00, OUT2 is 00 and C is 0; once the stage has
// evaluated valid inputs OUT1 is all 01/10, OUT2 is 01/10 and C is 1. A
// fault that destroys a pair's complementarity keeps C at 0 in evaluation
// or at 1 in precharge, which halts the handshake. This structure is the
// design's. flt_out and flt_z are error insertion points on the OUT1 rails
// and on the OUT2 pair (tie to 0 in use). Timing: OUT1 changes one model step after cp or the inputs;
// OUT2 and C follow in the same step. The checker is precharged together
// with the output nodes (one step after cp falls), not in the step cp
// falls: the handshake is timing-dependent, and with C dropping a step
// before the data nodes the ring of handshake cells deadlocks (see the
// README).
module comp_block
  import dcvsl_pkg::*;
#(
  parameter int unsigned NBITS  = DIV_NBITS,
  parameter int unsigned NPAIRS = div_npairs(NBITS)
) (
  input  logic               clk,      // model step
  input  logic               rst_n,    // initialisation
  input  logic               cp,       // precharge (0) / evaluate (1)
  input  dr_t [NPAIRS-1:0]   din,      // IN: data from the previous stage
  input  logic [2*NPAIRS-1:0] flt_out, // fault control on the OUT1 rails
  input  logic [1:0]         flt_z,   // fault control on the OUT2 pair
  output dr_t [NPAIRS-1:0]   dout,     // OUT1: held result
  output dr_t                z,        // OUT2: merged checker pair
  output logic               c         // completion
);
  dr_t [NPAIRS-1:0] f, node;
  dr_t              z_raw;
  logic             ev;

  div_function #(.NBITS(NBITS)) u_fn (.din(din), .dout(f));

  dcvsl_node #(.NPAIRS(NPAIRS)) u_node (.clk(clk), .rst_n(rst_n), .cp(cp), .f(f), .out(node), .ev(ev));

  fault_xor #(.WIDTH(2 * NPAIRS)) u_flt (.a(node), .fault(flt_out), .y(dout));

  ddcc #(.NPAIRS(NPAIRS)) u_ddcc (.cp(ev), .q(dout), .z(z_raw));

  fault_xor #(.WIDTH(2)) u_flt_z (.a(z_raw), .fault(flt_z), .y(z));

  cd_xor u_xor (.z(z), .c(c));
endmodule
