// dcvsl_pkg: types and gate functions shared by the dual-rail datapath.
//
// Every data bit of the datapath travels on two rails, t and f, as in
// differential cascode voltage switch logic (DCVSL). The pair 01 (t=0, f=1)
// is a valid 0, 10 a valid 1, 00 is the spacer that a precharged stage
// shows, and 11 is a non-code word that only a fault can produce.
//
// The gate functions below are the pull-down networks of DCVSL gates. Each
// rail is a monotone (AND/OR only) function of the input rails, so a gate
// whose inputs are all valid gives a valid output, a spacer on an input
// keeps the outputs it needs low, and a 11 on an input can make an output
// 11. This is the fault behaviour the self-checking argument rests on: a
// single stuck-at fault either leaves the value correct or destroys the
// complementarity of a pair.
//
// Division sizes: the residual keeps DIV_IBITS integer bits (weights -4, 2
// and 1) above the fraction bits of the operands, enough for the shifted
// residual and the selection estimate of a radix-2 carry-save divider.
package dcvsl_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // false rail
  } dr_t;

  localparam dr_t DR_SPACER = '{t: 1'b0, f: 1'b0};
  localparam dr_t DR_0      = '{t: 1'b0, f: 1'b1};
  localparam dr_t DR_1      = '{t: 1'b1, f: 1'b0};

  // Operand width of the divider and the number of integer bits of its
  // residual.
  localparam int unsigned DIV_NBITS = 8;
  localparam int unsigned DIV_IBITS = 3;

  // Encode a single-rail bit as a valid pair.
  function automatic dr_t dr_enc(input logic b);
    return '{t: b, f: ~b};
  endfunction

  // A pair is a code word when exactly one rail is high.
  function automatic logic dr_valid(input dr_t a);
    return a.t ^ a.f;
  endfunction

  // Inversion is a swap of the rails: no gate is needed.
  function automatic dr_t dr_not(input dr_t a);
    return '{t: a.f, f: a.t};
  endfunction

  function automatic dr_t dr_and(input dr_t a, input dr_t b);
    return '{t: a.t & b.t, f: a.f | b.f};
  endfunction

  function automatic dr_t dr_or(input dr_t a, input dr_t b);
    return '{t: a.t | b.t, f: a.f & b.f};
  endfunction

  function automatic dr_t dr_xor(input dr_t a, input dr_t b);
    return '{t: (a.t & b.f) | (a.f & b.t), f: (a.t & b.t) | (a.f & b.f)};
  endfunction

  // Majority (carry) of three pairs.
  function automatic dr_t dr_maj(input dr_t a, input dr_t b, input dr_t c);
    return '{t: (a.t & b.t) | (a.t & c.t) | (b.t & c.t),
             f: (a.f & b.f) | (a.f & c.f) | (b.f & c.f)};
  endfunction

  // Two-way selection: s=1 picks b, s=0 picks a.
  function automatic dr_t dr_mux(input dr_t s, input dr_t a, input dr_t b);
    return '{t: (s.t & b.t) | (s.f & a.t), f: (s.t & b.f) | (s.f & a.f)};
  endfunction

  // Layout of the data word that passes from stage to stage, as pair
  // offsets. W = NBITS + DIV_IBITS is the residual width.
  //   [W-1:0]            wc  residual, carry vector
  //   [2W-1:W]           ws  residual, sum vector
  //   [2W+N-1:2W]        d   divisor
  //   [2W+2N-1:2W+N]     Q   quotient so far
  //   [2W+3N-1:2W+2N]    QM  quotient so far minus one unit
  function automatic int unsigned div_npairs(input int unsigned n);
    return 2 * (n + DIV_IBITS) + 3 * n;
  endfunction

endpackage
