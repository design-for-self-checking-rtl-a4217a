// tb_div_exhaustive: every legal operand pair of the 8-bit divider
// (divisor 128..255, dividend 0..divisor-1, 24,512 divisions) streamed
// through the full-size design. Each result is checked against integer
// division: the truncated quotient must be Q when the final residual is
// non-negative and QM otherwise, and x * 256 = Q * d + w must hold.
module tb_div_exhaustive;
  import dcvsl_pkg::*;
  import tb_pkg::*;

  localparam int unsigned N  = DIV_NBITS;
  localparam int unsigned W  = N + DIV_IBITS;
  localparam int unsigned NP = div_npairs(N);

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  dr_t  [N-1:0]           x_in, d_in;
  logic                   in_ack, done, data_err, data_err_n;
  dr_t  [N-1:0]           q_out, qm_out;
  dr_t  [W-1:0]           wc_out, ws_out;
  logic [N-1:0]           c, cp;
  logic [N-1:0][2*NP-1:0] flt_data = '0;
  logic [N-1:0]           flt_c = '0, flt_cp = '0;
  logic [N-1:0][1:0]      flt_z = '0;

  sc_divider dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0, results = 0;
  int unsigned xq[$], dq[$];
  logic done_q = 1'b0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) begin
    done_q <= done;
    if (rst_n && done && !done_q && xq.size() > 0) begin
      int unsigned x, d, q, qmv;
      longint w;
      logic [2*MAXP-1:0] pq, pqm, pwc, pws;
      x = xq.pop_front();
      d = dq.pop_front();
      pq  = '0; pq[2*N-1:0]  = q_out;
      pqm = '0; pqm[2*N-1:0] = qm_out;
      pwc = '0; pwc[2*W-1:0] = wc_out;
      pws = '0; pws[2*W-1:0] = ws_out;
      q   = int'(dec(pq, N));
      qmv = int'(dec(pqm, N));
      w   = sval(dec(pwc, W) + dec(pws, W), W);
      check(all_valid(pq, N) && all_valid(pqm, N) && all_valid(pwc, W) && all_valid(pws, W),
            "result is code words");
      check(longint'(x) * 256 == longint'(q) * d + w && ((w < 0) ? qmv : q) == (x << N) / d,
            $sformatf("%0d / %0d: Q=%0d QM=%0d w=%0d", x, d, q, qmv, w));
      results++;
    end
  end

  task automatic send(input int unsigned x, input int unsigned d, input logic keep);
    if (keep) begin
      xq.push_back(x);
      dq.push_back(d);
    end
    x_in = enc(x, N);
    d_in = enc(d, N);
    do @(negedge clk); while (!in_ack);
    x_in = '0;
    d_in = '0;
    do @(negedge clk); while (in_ack);
  endtask

  initial begin
    x_in = '0;
    d_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int unsigned d = 128; d < 256; d++)
      for (int unsigned x = 0; x < d; x++)
        send(x, d, 1'b1);
    // Three more divisions push the last ones out of the ring.
    repeat (3) send(1, 200, 1'b0);
    repeat (40) @(negedge clk);
    check(results == 24512, $sformatf("all 24512 divisions returned (%0d)", results));
    $display("divisions checked: %0d", results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
