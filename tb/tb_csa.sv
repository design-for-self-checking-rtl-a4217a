// tb_csa: random test of the carry-save adder. sum + carry must equal
// a + b + c + cin modulo 2^W, with every output pair a code word; spacer
// inputs must give spacer outputs.
module tb_csa;
  import dcvsl_pkg::*;
  import tb_pkg::*;

  localparam int unsigned W = DIV_NBITS + DIV_IBITS;

  dr_t [W-1:0] a, b, c, sum, carry;
  dr_t         cin;
  int checks = 0, failures = 0;

  csa dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    longint unsigned m;
    m = (64'd1 << W) - 1;
    for (int i = 0; i < 2000; i++) begin
      longint unsigned va, vb, vc, got;
      logic vi;
      logic [2*MAXP-1:0] ps, pc;
      va = $urandom & m;
      vb = $urandom & m;
      vc = $urandom & m;
      vi = $urandom % 2;
      a = enc(va, W); b = enc(vb, W); c = enc(vc, W); cin = dr_enc(vi);
      #1;
      ps = '0; ps[2*W-1:0] = sum;
      pc = '0; pc[2*W-1:0] = carry;
      check(all_valid(ps, W) && all_valid(pc, W), "outputs are code words");
      got = (dec(ps, W) + dec(pc, W)) & m;
      check(got == ((va + vb + vc + vi) & m), $sformatf("sum of %0d %0d %0d %0d", va, vb, vc, vi));
    end
    a = '0; b = '0; c = '0; cin = DR_SPACER;
    #1;
    check(sum == '0 && carry == '0, "spacer in, spacer out");
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
