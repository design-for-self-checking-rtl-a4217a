// tb_dcvsl_node: the dynamic output nodes. After reset the outputs are the
// spacer and ev is 1. In evaluation a valid word at f appears one step
// later and is held when f returns to the spacer (Evaluation-Hold); one
// step after cp falls the outputs are the spacer again, and stay so in
// precharge whatever f shows. ev follows cp one step late.
module tb_dcvsl_node;
  import dcvsl_pkg::*;
  import tb_pkg::*;

  localparam int unsigned NP = 46;
  logic clk = 1'b0, rst_n = 1'b0, cp = 1'b1;
  dr_t [NP-1:0] f, out;
  logic ev;
  int checks = 0, failures = 0;

  dcvsl_node dut (.*);

  always #1 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    f = '0;
    @(negedge clk);
    check(out == '0 && ev == 1'b1, "reset: spacer, evaluating");
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      logic [MAXP-1:0] v;
      logic [2*MAXP-1:0] p;
      for (int b = 0; b < MAXP; b += 32) v[b +: 32] = $urandom;
      p = enc(v, NP);
      cp = 1'b1;
      f = p[2*NP-1:0];
      @(negedge clk);
      check(out == p[2*NP-1:0] && ev, "evaluate: word appears");
      f = '0;
      repeat (2) @(negedge clk);
      check(out == p[2*NP-1:0], "hold with spacer at the input");
      cp = 1'b0;
      f = p[2*NP-1:0];
      @(negedge clk);
      check(out == '0 && !ev, "precharge: spacer");
      @(negedge clk);
      check(out == '0, "precharge ignores the inputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
