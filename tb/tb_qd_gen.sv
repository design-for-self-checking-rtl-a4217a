// tb_qd_gen: exhaustive test of the divisor multiple generator. For every
// divisor with its top bit set and every digit, qd + cin must equal -q*d
// modulo 2^W.
module tb_qd_gen;
  import dcvsl_pkg::*;
  import tb_pkg::*;

  localparam int unsigned N = DIV_NBITS;
  localparam int unsigned W = N + DIV_IBITS;

  dr_t         qs, qm, cin;
  dr_t [N-1:0] d;
  dr_t [W-1:0] qd;
  int checks = 0, failures = 0;

  qd_gen dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int dv = 128; dv < 256; dv++)
      for (int q = -1; q <= 1; q++) begin
        logic [2*MAXP-1:0] p;
        longint unsigned got, exp;
        d  = enc(dv, N);
        qs = dr_enc(q < 0);
        qm = dr_enc(q != 0);
        #1;
        p = '0;
        p[2*W-1:0] = qd;
        check(all_valid(p, W) && dr_valid(cin), "outputs are code words");
        got = (dec(p, W) + cin.t) & ((64'd1 << W) - 1);
        exp = longint'(-q * dv) & ((64'd1 << W) - 1);
        check(got == exp, $sformatf("-q*d for q=%0d d=%0d", q, dv));
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
