// tb_div_stage: one stage with its neighbours' completion signals driven
// by the bench. It walks the stage through the phase sequence of the
// handshake and checks each transition and each non-transition:
//   evaluate (data valid and C = 1 one step after the input), no precharge
//   while CN+1 is 0 or CN-1 is 1, precharge once CN-1 = 0 and CN+1 = 1,
//   no new evaluation while CN+2 is 0, evaluation once CN-1 = 1, CN = 0,
//   CN+2 = 1.
// Then the completion line is made stuck at 1 and at 0 through its error
// insertion point, and the local clock must stop.
module tb_div_stage;
  import dcvsl_pkg::*;
  import tb_pkg::*;

  localparam int unsigned N  = DIV_NBITS;
  localparam int unsigned W  = N + DIV_IBITS;
  localparam int unsigned NP = div_npairs(N);

  logic clk = 1'b0, rst_n = 1'b0;
  dr_t [NP-1:0] din, dout;
  logic c_prev = 1'b0, c_next = 1'b0, c_next2 = 1'b0, c, cp;
  dr_t z;
  logic [2*NP-1:0] flt_data = '0;
  logic [1:0] flt_z = '0;
  logic flt_c, flt_cp = 1'b0;
  int   stuck = -1;  // -1: no fault, else the stuck value of CN
  int checks = 0, failures = 0;

  div_stage dut (.*);

  assign flt_c = (stuck < 0) ? 1'b0 : (dut.c_raw ^ stuck[0]);

  always #1 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL at %0t: %s", $time, what); end
  endtask

  task automatic step(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    din = '0;
    step();
    rst_n = 1'b1;
    check(cp == 1'b1 && c == 1'b0, "reset: evaluation, no data");
    for (int i = 0; i < 100; i++) begin
      int unsigned dv, x;
      logic [2*MAXP-1:0] p;
      dv = 128 + $urandom % 128;
      x  = $urandom % dv;
      // Stage N-1 delivers a token.
      din = div_word(N, 0, x, dv, 0, 0);
      c_prev = 1'b1;
      step();
      p = '0;
      p[2*NP-1:0] = dout;
      check(c == 1'b1 && all_valid(p, NP), "evaluated one step after valid input");
      check(dec(p >> (4 * W), N) == dv, "divisor passed on");
      // N-1 precharges; N+1 has not yet evaluated: stay in evaluation.
      din = '0;
      c_prev = 1'b0;
      step(3);
      check(cp == 1'b1 && c == 1'b1, "Evaluation-Hold until N+1 evaluates");
      // N+1 evaluates: precharge, output spacer one step after cp falls.
      c_next = 1'b1;
      step();
      check(cp == 1'b0, "cp falls when N-1 empty, N and N+1 full");
      step();
      check(c == 1'b0 && dout == '0, "precharged");
      // N-1 brings the next token, N+2 still empty: wait.
      c_next = 1'b0;
      c_prev = 1'b1;
      step(3);
      check(cp == 1'b0, "no evaluation before N+2 has evaluated");
      c_next2 = 1'b1;
      step();
      check(cp == 1'b1, "cp rises when N-1 full, N empty, N+2 full");
      c_next2 = 1'b0;
      c_prev  = 1'b0;
      step();
      // Empty the stage again for the next round (no valid data arrived).
      c_next = 1'b1;
      step(2);
      c_next = 1'b0;
      step();
      check(c == 1'b0, "round ends precharged");
      c_prev = 1'b1; c_next2 = 1'b1;
      step(2);
      c_prev = 1'b0; c_next2 = 1'b0;
      step();
      check(cp == 1'b1, "round ends in evaluation");
    end
    // CN stuck at 0 in evaluation: cp must never fall.
    stuck = 0;
    din = div_word(N, 0, 5, 200, 0, 0);
    c_prev = 1'b1;
    step(2);
    c_prev = 1'b0;
    c_next = 1'b1;
    step(10);
    check(cp == 1'b1, "CN stuck at 0 stops precharge");
    // CN stuck at 1: cp falls once, then must never rise.
    stuck = 1;
    step(3);
    check(cp == 1'b0, "precharge with CN at 1");
    c_next = 1'b0;
    c_prev = 1'b1;
    c_next2 = 1'b1;
    step(10);
    check(cp == 1'b0, "CN stuck at 1 stops evaluation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
