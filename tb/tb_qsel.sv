// tb_qsel: exhaustive test of quotient digit selection. Every pair of
// 4-bit carry and sum tops is applied as valid dual-rail code; the digit
// must match the integer rule (estimate >= 0: +1, -1/2: 0, <= -1: -1).
// Spacer inputs must leave both digit pairs at 00.
module tb_qsel;
  import dcvsl_pkg::*;
  import tb_pkg::*;

  dr_t [3:0] wc_top, ws_top;
  dr_t       qs, qm;
  int checks = 0, failures = 0;

  qsel dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        int q;
        wc_top = enc(a, 4);
        ws_top = enc(b, 4);
        #1;
        q = ref_digit(a, b, 4);
        check(dr_valid(qs) && dr_valid(qm), "digit pairs are code words");
        check(qm.t == (q != 0) && qs.t == (q < 0), $sformatf("digit for %0d + %0d is %0d", a, b, q));
      end
    wc_top = '0;
    ws_top = '0;
    #1;
    check(qs == DR_SPACER && qm == DR_SPACER, "spacer in, spacer out");
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
