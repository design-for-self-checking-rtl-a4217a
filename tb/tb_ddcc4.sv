// tb_ddcc4: exhaustive test of the 4-pair dual-rail checker. All 256
// combinations of the four pairs (00, 01, 10, 11 each) are applied in
// evaluation: a 00 anywhere gives 00, otherwise a 11 anywhere gives 11,
// otherwise the output is the parity of the true rails as a code word.
// In precharge the output is 00 whatever the inputs.
module tb_ddcc4;
  import dcvsl_pkg::*;

  logic      cp;
  dr_t [3:0] q;
  dr_t       z;
  int checks = 0, failures = 0;

  ddcc4 dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int m = 0; m < 256; m++) begin
      logic has00, has11, par;
      dr_t  e;
      q = m[7:0];
      has00 = 1'b0; has11 = 1'b0; par = 1'b0;
      for (int i = 0; i < 4; i++) begin
        if (q[i] == DR_SPACER) has00 = 1'b1;
        if (q[i] == '{t: 1'b1, f: 1'b1}) has11 = 1'b1;
        par ^= q[i].t;
      end
      e = has00 ? DR_SPACER : has11 ? '{t: 1'b1, f: 1'b1} : dr_enc(par);
      cp = 1'b1;
      #1;
      check(z == e, $sformatf("evaluate, inputs %b", m[7:0]));
      cp = 1'b0;
      #1;
      check(z == DR_SPACER, "precharge gives 00");
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
