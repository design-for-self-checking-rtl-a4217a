// sc_divider: self-checking latch-free dynamic asynchronous divider.
//
// NBITS radix-2 SRT division stages in a row, each producing one quotient
// digit, so an NBITS-bit quotient leaves the last stage after one pass.
// Each stage is a DCVSL computation block with its own handshake cell; no
// latches separate the stages. The stage's local clock cp alternates
// between evaluation (cp = 1), in which the stage computes and then holds
// its result, and precharge (cp = 0), in which all its outputs return to
// the spacer 00. The handshake of stage N uses the completion signals of
// stages N-1, N, N+1 and N+2. The ring of control follows the design: the
// last stage takes stages 1 and 2 as its N+1 and N+2, stage NBITS-1 takes
// stage 1 as its N+2, and stage 1 takes as its N-1 the completion of the
// operands, found by a dual-rail checker over the operand pairs (that
// checker is this implementation's choice of input environment).
//
// Self-checking: any single stuck-at fault on a data rail, a checker pair,
// a completion line or a local clock line keeps some completion signal at a constant
// value, which stops the handshake of the whole ring; the checker pair of
// the last stage (data_err, data_err_n) then stays constant, while in
// fault-free operation it alternates between 00 and a code word.
//
// Operands: x and d are NBITS-bit fractions with d >= 1/2 (top bit set)
// and x < d. The result satisfies x * 2^NBITS = Q * d + w, where w is the
// final residual wc + ws (two's complement, W = NBITS + 3 bits, same
// scale as x and d) and |w| <= d; the truncated quotient is Q when w >= 0
// and QM = Q - 1 when w < 0. That final selection is left to the user.
//
// Protocol (four-phase, dual-rail): the environment drives x_in and d_in
// with valid pairs, waits for in_ack (completion of stage 1) to rise,
// returns them to the spacer, waits for in_ack to fall, and may then
// present the next operands. Results are valid on q_out, qm_out, wc_out,
// ws_out while done (completion of the last stage) is high; done falls
// when the last stage precharges, so they must be taken at its rise.
// clk is the model step (see README); rst_n initialises every stage to
// evaluation with precharged outputs.
module sc_divider
  import dcvsl_pkg::*;
#(
  parameter int unsigned NBITS  = DIV_NBITS,
  parameter int unsigned W      = NBITS + DIV_IBITS,
  parameter int unsigned NPAIRS = div_npairs(NBITS)
) (
  input  logic                          clk,        // model step
  input  logic                          rst_n,      // initialisation
  input  dr_t  [NBITS-1:0]              x_in,       // dividend
  input  dr_t  [NBITS-1:0]              d_in,       // divisor
  output logic                          in_ack,     // stage 1 holds the operands
  output dr_t  [NBITS-1:0]              q_out,      // Q
  output dr_t  [NBITS-1:0]              qm_out,     // QM = Q - 1
  output dr_t  [W-1:0]                  wc_out,     // final residual, carry vector
  output dr_t  [W-1:0]                  ws_out,     // final residual, sum vector
  output logic                          done,       // completion of the last stage
  output logic                          data_err,   // checker pair of the last
  output logic                          data_err_n, //   stage: Z and Z_N
  output logic [NBITS-1:0]              c,          // completion of each stage
  output logic [NBITS-1:0]              cp,         // local clock of each stage
  input  logic [NBITS-1:0][2*NPAIRS-1:0] flt_data,  // fault controls, tie to 0
  input  logic [NBITS-1:0][1:0]         flt_z,      // fault controls, tie to 0
  input  logic [NBITS-1:0]              flt_c,      // fault controls, tie to 0
  input  logic [NBITS-1:0]              flt_cp      // fault controls, tie to 0
);
  dr_t [NBITS:0][NPAIRS-1:0] data;   // data[k] feeds stage k (0-based)
  dr_t [NBITS-1:0]           z;
  dr_t                       z_in;
  logic                      c0;

  // Completion of the operands: the first stage's N-1 signal.
  ddcc #(.NPAIRS(2 * NBITS)) u_in_chk (.cp(1'b1), .q({d_in, x_in}), .z(z_in));
  cd_xor u_in_xor (.z(z_in), .c(c0));

  // Initial word: wc = 0, ws = x, Q = QM = 0.
  assign data[0] = {{(2 * NBITS){DR_0}}, d_in, {DIV_IBITS{DR_0}}, x_in, {W{DR_0}}};

  for (genvar k = 0; k < NBITS; k++) begin : g_stage
    div_stage #(.NBITS(NBITS)) u_stage (
      .clk     (clk),
      .rst_n   (rst_n),
      .din     (data[k]),
      .dout    (data[k+1]),
      .c_prev  ((k == 0) ? c0 : c[(k + NBITS - 1) % NBITS]),
      .c_next  (c[(k + 1) % NBITS]),
      .c_next2 (c[(k + 2) % NBITS]),
      .c       (c[k]),
      .cp      (cp[k]),
      .z       (z[k]),
      .flt_data(flt_data[k]),
      .flt_z   (flt_z[k]),
      .flt_c   (flt_c[k]),
      .flt_cp  (flt_cp[k])
    );
  end

  assign in_ack     = c[0];
  assign done       = c[NBITS-1];
  assign wc_out     = data[NBITS][W-1:0];
  assign ws_out     = data[NBITS][2*W-1:W];
  assign q_out      = data[NBITS][2*W+2*NBITS-1:2*W+NBITS];
  assign qm_out     = data[NBITS][2*W+3*NBITS-1:2*W+2*NBITS];
  assign data_err   = z[NBITS-1].t;
  assign data_err_n = z[NBITS-1].f;
endmodule
