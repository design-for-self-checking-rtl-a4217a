// tb_ddcc: test of the N-pair dual-rail checker at its default width (46
// pairs, one stage's data word) and at 5 and 1 pairs. Random valid words
// must give their parity as a code word; one pair forced to 00 must give
// 00, one forced to 11 must give 11, a 00 and a 11 together give 00; in
// precharge the output is 00.
module tb_ddcc;
  import dcvsl_pkg::*;
  import tb_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int unsigned NA = 46, NB = 5, NC = 1;
  logic cp;
  dr_t [NA-1:0] qa;
  dr_t [NB-1:0] qb;
  dr_t [NC-1:0] qc;
  dr_t za, zb, zc;

  ddcc dut (.cp(cp), .q(qa), .z(za));
  ddcc #(.NPAIRS(NB)) dut_b (.cp(cp), .q(qb), .z(zb));
  ddcc #(.NPAIRS(NC)) dut_c (.cp(cp), .q(qc), .z(zc));

  initial begin
    for (int i = 0; i < 600; i++) begin
      logic [MAXP-1:0] v;
      logic [2*MAXP-1:0] pa;
      int k, j;
      for (int b = 0; b < MAXP; b += 32) v[b +: 32] = $urandom;
      pa = enc(v, NA);
      qa = pa[2*NA-1:0];
      qb = pa[2*NB-1:0];
      qc = pa[2*NC-1:0];
      cp = 1'b1;
      #1;
      check(za == dr_enc(^v[NA-1:0]), "46 pairs: parity");
      check(zb == dr_enc(^v[NB-1:0]), "5 pairs: parity");
      check(zc == dr_enc(v[0]), "1 pair: value");
      k = $urandom % NA;
      j = (k + 1 + $urandom % (NA - 1)) % NA;
      qa[k] = DR_SPACER;
      #1;
      check(za == DR_SPACER, "one 00 pair gives 00");
      qa[k] = '{t: 1'b1, f: 1'b1};
      #1;
      check(za == '{t: 1'b1, f: 1'b1}, "one 11 pair gives 11");
      qa[j] = DR_SPACER;
      #1;
      check(za == DR_SPACER, "00 and 11 give 00");
      cp = 1'b0;
      #1;
      check(za == DR_SPACER && zb == DR_SPACER && zc == DR_SPACER, "precharge gives 00");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
