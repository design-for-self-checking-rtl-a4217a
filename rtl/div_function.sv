// div_function: the DCVSL function of one radix-2 division stage.
//
// One step of SRT division with a carry-save residual, d in [1/2, 1):
//   1. arithmetic shift left of the carry and sum vectors (2w[j]);
//   2. q SEL picks q[j+1] in {-1, 0, +1} from the top four bits of both;
//   3. the divisor multiple generator forms -q*d;
//   4. the CSA adds it, giving w[j+1] = 2w[j] - q*d in carry-save form;
//   5. the on-the-fly converter appends the digit to Q and QM.
// The divisor is passed on unchanged for the next stage. The block order
// and the signal names follow the design's stage diagram; the widths, the
// selection rule and the digit encoding are this implementation's.
//
// Data word (pairs, low to high): wc, ws (W = NBITS + 3 each), d, Q, QM
// (NBITS each); see dcvsl_pkg. Everything is dual-rail and combinational:
// these are the pull-down networks whose results the dynamic nodes of
// dcvsl_node hold.
module div_function
  import dcvsl_pkg::*;
#(
  parameter int unsigned NBITS  = DIV_NBITS,
  parameter int unsigned W      = NBITS + DIV_IBITS,
  parameter int unsigned NPAIRS = div_npairs(NBITS)
) (
  input  dr_t [NPAIRS-1:0] din,   // wc[j], ws[j], d, Q[j], QM[j]
  output dr_t [NPAIRS-1:0] dout   // wc[j+1], ws[j+1], d, Q[j+1], QM[j+1]
);
  dr_t [W-1:0]     wc_sh, ws_sh, qd, wc_nx, ws_nx;
  dr_t [NBITS-1:0] d, q_in, qm_in, q_nx, qm_nx;
  dr_t             qs, qm, cin;

  assign d     = din[2*W+NBITS-1:2*W];
  assign q_in  = din[2*W+2*NBITS-1:2*W+NBITS];
  assign qm_in = din[2*W+3*NBITS-1:2*W+2*NBITS];

  // Arithmetic shift left of wc (pairs W-1:0) and ws (pairs 2W-1:W): one
  // place up, a valid 0 into the low bit; the top bit leaves the word.
  assign wc_sh = {din[W-2:0], DR_0};
  assign ws_sh = {din[2*W-2:W], DR_0};

  qsel u_qsel (.wc_top(wc_sh[W-1:W-4]), .ws_top(ws_sh[W-1:W-4]), .qs(qs), .qm(qm));

  qd_gen #(.NBITS(NBITS), .W(W)) u_qd (.qs(qs), .qm(qm), .d(d), .qd(qd), .cin(cin));

  csa #(.W(W)) u_csa (.a(wc_sh), .b(ws_sh), .c(qd), .cin(cin), .sum(ws_nx), .carry(wc_nx));

  otf_conv #(.NBITS(NBITS)) u_otf (
    .qs(qs), .qm(qm), .q_in(q_in), .qm_in(qm_in), .q_out(q_nx), .qm_out(qm_nx)
  );

  assign dout = {qm_nx, q_nx, d, ws_nx, wc_nx};
endmodule
