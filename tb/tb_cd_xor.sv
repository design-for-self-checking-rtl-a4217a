// tb_cd_xor: the completion gate over all four values of the checker pair:
// 1 for a code word, 0 for the spacer and for 11.
module tb_cd_xor;
  import dcvsl_pkg::*;

  dr_t  z;
  logic c;
  int checks = 0, failures = 0;

  cd_xor dut (.*);

  initial begin
    for (int r = 0; r < 4; r++) begin
      z = r[1:0];
      #1;
      checks++;
      if (c !== (r == 1 || r == 2)) begin
        failures++;
        $display("FAIL: pair %b gives %b", r[1:0], c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
