// tb_comp_block: the computation block of one stage, driven through its
// phases. Evaluation: one step after a valid word arrives, OUT1 holds the
// division step (checked against the integer reference), OUT2 is a code
// word carrying the parity of OUT1 and C is 1. Evaluation-Hold: with the
// input back at the spacer everything is kept. Precharge: C is still 1 in
// the step cp falls and 0, with OUT1 and OUT2 at the spacer, one step
// later. A flipped rail on OUT1 or on OUT2 (through the error insertion
// points) must drive C to 0 in evaluation.
module tb_comp_block;
  import dcvsl_pkg::*;
  import tb_pkg::*;

  localparam int unsigned N  = DIV_NBITS;
  localparam int unsigned W  = N + DIV_IBITS;
  localparam int unsigned NP = div_npairs(N);

  logic clk = 1'b0, rst_n = 1'b0, cp = 1'b1, c;
  dr_t [NP-1:0] din, dout;
  logic [2*NP-1:0] flt_out = '0;
  logic [1:0] flt_z = '0;
  dr_t z;
  int checks = 0, failures = 0;

  comp_block dut (.*);

  always #1 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL at %0t: %s", $time, what); end
  endtask

  initial begin
    longint unsigned m;
    m = (64'd1 << W) - 1;
    din = '0;
    @(negedge clk);
    rst_n = 1'b1;
    check(c == 1'b0 && dout == '0, "reset: precharged outputs");
    for (int i = 0; i < 300; i++) begin
      longint unsigned wc, ws, wc2, ws2, res;
      int unsigned dv, qv, e;
      int dig, k;
      logic [2*MAXP-1:0] p;
      wc = $urandom & m;
      ws = $urandom & m;
      dv = 128 + $urandom % 128;
      qv = $urandom % (1 << N);
      cp  = 1'b1;
      din = div_word(N, wc, ws, dv, qv, (qv + (1 << N) - 1) % (1 << N));
      @(negedge clk);
      p = '0;
      p[2*NP-1:0] = dout;
      wc2 = (wc << 1) & m;
      ws2 = (ws << 1) & m;
      dig = ref_digit(wc2, ws2, W);
      res = (wc2 + ws2 - longint'(dig * int'(dv))) & m;
      e   = (2 * qv + (1 << N) + dig) % (1 << N);
      check(all_valid(p, NP) && c == 1'b1, "evaluate: complete word, C = 1");
      check(((dec(p, W) + dec(p >> (2 * W), W)) & m) == res, "evaluate: residual");
      check(dec(p >> (4 * W + 2 * N), N) == e, "evaluate: Q");
      check(z == dr_enc(^dec(p, NP)), "OUT2 is the parity code word");
      din = '0;
      repeat (2) @(negedge clk);
      check(c == 1'b1 && dout == p[2*NP-1:0], "hold with spacer input");
      if (i % 2 == 1) begin
        // Flip one rail of one output pair: the pair becomes 00 or 11.
        k = $urandom % NP;
        flt_out[2*k + ($urandom % 2)] = 1'b1;
        #0.5;
        check(c == 1'b0 && !dr_valid(z), "flipped rail stops completion");
        flt_out = '0;
        @(negedge clk);
      end else begin
        // Flip one rail of the checker pair.
        flt_z[$urandom % 2] = 1'b1;
        #0.5;
        check(c == 1'b0, "flipped checker rail stops completion");
        flt_z = '0;
        @(negedge clk);
      end
      cp = 1'b0;
      #0.5;
      check(c == 1'b1, "C still 1 in the step cp falls");
      @(negedge clk);
      check(c == 1'b0 && dout == '0 && z == DR_SPACER, "precharge: spacer, C = 0");
    end
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
