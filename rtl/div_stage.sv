// div_stage: one stage of the latch-free dynamic asynchronous divider.
//
// A computation block (division step, dual-rail checker, completion XOR)
// and the handshake cell that drives its precharge/evaluate control. The
// handshake cell sees the completion signals of the previous stage (as
// CN-1_N), of this stage, of the next stage, and of the stage after that
// (as CN+2_N); the inversions for the _N inputs are made here. The stage
// has no latch: the dynamic nodes of the function block hold its result
// until the handshake precharges it. This organisation is the design's.
//
// Error insertion points, each an XOR with a fault control that is tied to
// 0 in use, sit on the stage's completion line (after the XOR gate, so the
// stage's own handshake cell and its neighbours see the faulty value), on
// its local clock line cp (between handshake cell and computation block),
// on the data rails of its output and on its checker pair.
module div_stage
  import dcvsl_pkg::*;
#(
  parameter int unsigned NBITS  = DIV_NBITS,
  parameter int unsigned NPAIRS = div_npairs(NBITS)
) (
  input  logic                clk,       // model step
  input  logic                rst_n,     // initialisation
  input  dr_t [NPAIRS-1:0]    din,       // data from stage N-1
  output dr_t [NPAIRS-1:0]    dout,      // data to stage N+1
  input  logic                c_prev,    // CN-1
  input  logic                c_next,    // CN+1
  input  logic                c_next2,   // CN+2
  output logic                c,         // CN
  output logic                cp,        // CPN, the local clock
  output dr_t                 z,         // checker pair of this stage
  input  logic [2*NPAIRS-1:0] flt_data,  // fault control, output data rails
  input  logic [1:0]          flt_z,     // fault control, checker pair
  input  logic                flt_c,     // fault control, completion line
  input  logic                flt_cp     // fault control, local clock line
);
  logic c_raw, cp_raw;

  hs_cell u_hs (
    .clk      (clk),
    .rst_n    (rst_n),
    .c_prev_n (~c_prev),
    .c_cur    (c),
    .c_next   (c_next),
    .c_next2_n(~c_next2),
    .cp       (cp_raw)
  );

  fault_xor u_flt_cp (.a(cp_raw), .fault(flt_cp), .y(cp));

  comp_block #(.NBITS(NBITS)) u_comp (
    .clk    (clk),
    .rst_n  (rst_n),
    .cp     (cp),
    .din    (din),
    .flt_out(flt_data),
    .flt_z  (flt_z),
    .dout   (dout),
    .z      (z),
    .c      (c_raw)
  );

  fault_xor u_flt_c (.a(c_raw), .fault(flt_c), .y(c));
endmodule
