// tb_div_function: random test of one division step against the integer
// reference: digit from the shifted residual tops, new residual
// wc' + ws' = 2(wc + ws) - q*d modulo 2^W, Q' = 2Q + q, QM' = Q' - 1, and
// the divisor passed on. A spacer word must give no complete word, and a
// single 11 pair at the input must give a non-code output.
module tb_div_function;
  import dcvsl_pkg::*;
  import tb_pkg::*;

  localparam int unsigned N  = DIV_NBITS;
  localparam int unsigned W  = N + DIV_IBITS;
  localparam int unsigned NP = div_npairs(N);

  dr_t [NP-1:0] din, dout;
  int checks = 0, failures = 0;

  div_function dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    longint unsigned m;
    logic [2*MAXP-1:0] p;
    m = (64'd1 << W) - 1;
    for (int i = 0; i < 2000; i++) begin
      longint unsigned wc, ws, wc2, ws2, res;
      int unsigned dv, qv, e;
      int dig;
      wc = $urandom & m;
      ws = $urandom & m;
      dv = 128 + $urandom % 128;
      qv = $urandom % (1 << N);
      din = div_word(N, wc, ws, dv, qv, (qv + (1 << N) - 1) % (1 << N));
      #1;
      p = '0;
      p[2*NP-1:0] = dout;
      check(all_valid(p, NP), "output word is all code words");
      wc2 = (wc << 1) & m;
      ws2 = (ws << 1) & m;
      dig = ref_digit(wc2, ws2, W);
      res = (wc2 + ws2 - longint'(dig * int'(dv))) & m;
      check(((dec(p, W) + (dec(p >> (2 * W), W))) & m) == res, "new residual");
      check(dec(p >> (4 * W), N) == dv, "divisor passed on");
      e = (2 * qv + (1 << N) + dig) % (1 << N);
      check(dec(p >> (4 * W + 2 * N), N) == e, "Q'");
      check(dec(p >> (4 * W + 4 * N), N) == (e + (1 << N) - 1) % (1 << N), "QM'");
    end
    din = '0;
    #1;
    // Spacer in: no output word completes and no pair is 11 (a pair whose
    // value is fixed by constant inputs, such as the second carry bit,
    // may already be valid).
    p = '0;
    p[2*NP-1:0] = dout;
    check(!all_valid(p, NP), "spacer in, no complete word out");
    check((dout & (dout >> 1) & {NP{2'b01}}) == '0, "spacer in, no 11 pair out");
    // A non-code word on a divisor bit spreads to a non-code output.
    din = div_word(N, 0, 0, 8'hc3, 0, 8'hff);
    din[2*W+3] = '{t: 1'b1, f: 1'b1};
    #1;
    p = '0;
    p[2*NP-1:0] = dout;
    check(!all_valid(p, NP), "11 at the input is not hidden");
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
