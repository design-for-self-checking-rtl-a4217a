// ddcc: N-pair dynamic dual-rail code checker.
//
// Merges NPAIRS dual-rail pairs into one pair with the same rule as the
// 4-pair cell: complementary output when every input pair is complementary,
// 00 when an input pair is 00, 11 when a pair is 11 and none is 00. It is
// a tree of ddcc4 cells, all precharged by the stage's cp; each level has
// a quarter of the pairs of the level below, and a group that is not full
// is padded with valid 0 pairs, which do not change the parity. The tree
// is this implementation's choice: the design gives the 4-pair cell and
// says that a stage's N output pairs go into an N-pair checker.
// Combinational apart from the precharge gating.
module ddcc
  import dcvsl_pkg::*;
#(
  parameter int unsigned NPAIRS = 46
) (
  input  logic             cp,  // precharge (0) / evaluate (1)
  input  dr_t [NPAIRS-1:0] q,   // pairs to check
  output dr_t              z    // merged pair
);
  // Number of pairs at level l of the tree (level 0 is the input).
  function automatic int unsigned width_at(input int unsigned l);
    int unsigned w;
    w = NPAIRS;
    for (int unsigned i = 0; i < l; i++) w = (w + 3) / 4;
    return w;
  endfunction

  function automatic int unsigned depth();
    int unsigned l;
    l = 0;
    while (width_at(l) > 1) l++;
    return (l == 0) ? 1 : l;
  endfunction

  localparam int unsigned LEVELS = depth();
  localparam int unsigned SPAN   = 4 * ((NPAIRS + 3) / 4);

  dr_t [LEVELS:0][SPAN-1:0] lv;

  always_comb begin
    lv[0] = {SPAN{DR_0}};
    lv[0][NPAIRS-1:0] = q;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NG = (width_at(l) + 3) / 4;
    for (genvar g = 0; g < NG; g++) begin : g_cell
      ddcc4 u_cell (.cp(cp), .q(lv[l][4*g+3:4*g]), .z(lv[l+1][g]));
    end
    if (NG < SPAN) begin : g_pad
      assign lv[l+1][SPAN-1:NG] = {(SPAN - NG){DR_0}};
    end
  end

  assign z = lv[LEVELS][0];
endmodule
