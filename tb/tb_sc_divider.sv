// tb_sc_divider: end-to-end test of the 8-stage self-checking divider at
// its default size.
//
// Part 1 runs a stream of divisions (corner operands, then random ones)
// through the four-phase dual-rail input protocol and checks every result
// against integer arithmetic: x * 2^N = Q * d + w with |w| <= d, QM = Q - 1,
// and the truncated quotient is Q or QM by the sign of w. It checks the
// step counts that follow from the handshake rules: N steps from the
// first operands to the first result, then one result every 8 steps
// while the operands follow each other without delay.
// It counts each mechanism of the design and fails if one never happened:
// precharge and Evaluation-Hold of every stage, each quotient digit value,
// both signs of the final residual.
//
// Part 2 repeats a short run once per fault, after a reset. Each fault is
// a stuck-at made through the error insertion points (a completion line,
// a local clock line or a data rail of some stage, at 0 and at 1). Every
// result delivered with valid code words before the pipeline stops must
// still be correct, the ring must stop (no local clock moves for a long
// window) and the last stage's checker pair must then be constant.
module tb_sc_divider;
  import dcvsl_pkg::*;
  import tb_pkg::*;

  localparam int unsigned N  = DIV_NBITS;
  localparam int unsigned W  = N + DIV_IBITS;
  localparam int unsigned NP = div_npairs(N);

  logic                      clk = 1'b0;
  logic                      rst_n = 1'b0;
  dr_t  [N-1:0]              x_in, d_in;
  logic                      in_ack, done, data_err, data_err_n;
  dr_t  [N-1:0]              q_out, qm_out;
  dr_t  [W-1:0]              wc_out, ws_out;
  logic [N-1:0]              c, cp;
  logic [N-1:0][2*NP-1:0]    flt_data;
  logic [N-1:0]              flt_c, flt_cp;
  logic [N-1:0][1:0]         flt_z = '0;

  sc_divider dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---- signals before the fault points and the digit of each stage ----
  logic [N-1:0]           c_raw, cp_raw;
  logic [N-1:0][2*NP-1:0] node;
  dr_t  [N-1:0]           dig_s, dig_m;
  for (genvar k = 0; k < N; k++) begin : g_probe
    assign c_raw[k]  = dut.g_stage[k].u_stage.c_raw;
    assign cp_raw[k] = dut.g_stage[k].u_stage.cp_raw;
    assign node[k]   = dut.g_stage[k].u_stage.u_comp.node;
    assign dig_s[k]  = dut.g_stage[k].u_stage.u_comp.u_fn.qs;
    assign dig_m[k]  = dut.g_stage[k].u_stage.u_comp.u_fn.qm;
  end

  // Fault kinds: 0 none, 1 completion line, 2 local clock, 3 data rail.
  int   fk = 0, fs = 0, fb = 0;
  logic fv = 1'b0;
  always_comb begin
    flt_c    = '0;
    flt_cp   = '0;
    flt_data = '0;
    for (int k = 0; k < N; k++) begin
      if (fk == 1 && fs == k) flt_c[k]  = c_raw[k] ^ fv;
      if (fk == 2 && fs == k) flt_cp[k] = cp_raw[k] ^ fv;
      if (fk == 3 && fs == k) flt_data[k][fb] = node[k][fb] ^ fv;
    end
  end

  // ---- operand stream ----
  int unsigned xq[$], dq[$];
  longint      t_start[$];
  int          n_res = 0;
  longint      step = 0;
  always @(posedge clk) step <= step + 1;

  task automatic send(input int unsigned x, input int unsigned d);
    xq.push_back(x);
    dq.push_back(d);
    t_start.push_back(step);
    x_in = enc(x, N);
    d_in = enc(d, N);
    do @(negedge clk); while (!in_ack);
    x_in = '0;
    d_in = '0;
    do @(negedge clk); while (in_ack);
  endtask

  task automatic send_random(input int n);
    for (int i = 0; i < n; i++) begin
      int unsigned d, x;
      d = 128 + ($urandom % 128);
      x = $urandom % d;
      send(x, d);
    end
  endtask

  // ---- mechanism counters ----
  int n_pre[N], n_hold[N], n_qpos = 0, n_qzero = 0, n_qneg = 0, n_wneg = 0, n_wpos = 0;
  logic [N-1:0] cp_q = '1, c_q = '0;
  logic         done_q = 1'b0;
  longint       last_done = -1;
  int           n_period_ok = 0, n_period_bad = 0;
  logic         measuring = 1'b0;

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) begin
      logic cprev;
      cprev = (k == 0) ? dut.c0 : c[k-1];
      if (cp_q[k] && !cp[k]) n_pre[k]++;
      if (c[k] && !c_q[k]) begin
        // The digit of stage k is formed from inputs that are still valid.
        if (dig_m[k] == DR_0)      n_qzero++;
        else if (dig_s[k] == DR_1) n_qneg++;
        else                       n_qpos++;
      end
      if (c[k] && !cprev) n_hold[k]++;
    end
    cp_q <= cp;
    c_q  <= c;
    done_q <= done;
    if (done && !done_q) check_result();
  end

  task automatic check_result();
    int unsigned x, d, q, qmv, fl;
    longint      w;
    logic [2*MAXP-1:0] pq, pqm, pwc, pws;
    pq  = '0; pq[2*N-1:0] = q_out;
    pqm = '0; pqm[2*N-1:0] = qm_out;
    pwc = '0; pwc[2*W-1:0] = wc_out;
    pws = '0; pws[2*W-1:0] = ws_out;
    if (xq.size() == 0) begin
      check(1'b0, "result with no operands outstanding");
      return;
    end
    x = xq.pop_front();
    d = dq.pop_front();
    check(all_valid(pq, N) && all_valid(pqm, N) && all_valid(pwc, W) && all_valid(pws, W),
          "result pairs are code words");
    check((data_err ^ data_err_n) == 1'b1, "checker pair is a code word with a result");
    q   = int'(dec(pq, N));
    qmv = int'(dec(pqm, N));
    w   = sval(dec(pwc, W) + dec(pws, W), W);
    check(longint'(x) * (64'd1 << N) == longint'(q) * d + w,
          $sformatf("x*2^N = Q*d + w for x=%0d d=%0d: Q=%0d w=%0d", x, d, q, w));
    check(w <= longint'(d) && w >= -longint'(d), "|w| <= d");
    check(qmv == ((q + (1 << N) - 1) % (1 << N)), "QM = Q - 1");
    fl = (x << N) / d;
    check(((w < 0) ? qmv : q) == fl, $sformatf("truncated quotient %0d", fl));
    if (w < 0) n_wneg++; else n_wpos++;
    // Step counts: first result N steps after the first operands; later
    // results one per 8 steps in steady state.
    if (n_res == 0) check(step - t_start[0] == N, $sformatf("first latency %0d", step - t_start[0]));
    if (measuring && last_done >= 0) begin
      if (step - last_done == 8) n_period_ok++;
      else n_period_bad++;
    end
    t_start.pop_front();
    last_done = step;
    n_res++;
  endtask

  // ---- fault run: stream until it stops, then check it stays stopped ----
  task automatic fault_run(input int kind, input int stage, input int bitn, input logic val);
    int   res0;
    logic [N-1:0] cp0;
    logic z0t, z0f;
    logic moved;
    rst_n = 1'b0;
    fk = 0;
    x_in = '0;
    d_in = '0;
    xq.delete(); dq.delete(); t_start.delete();
    repeat (3) @(negedge clk);
    done_q = 1'b0; c_q = '0; cp_q = '1;
    rst_n = 1'b1;
    n_res = 1;  // skip the first-latency check
    last_done = -1;
    fork
      begin
        send_random(6);
        fk = kind; fs = stage; fb = bitn; fv = val;
        send_random(40);
      end
      begin
        repeat (600) @(negedge clk);
      end
    join_any
    disable fork;
    fk = kind; fs = stage; fb = bitn; fv = val;
    x_in = '0;
    d_in = '0;
    repeat (100) @(negedge clk);
    res0 = n_res;
    cp0  = cp;
    z0t  = data_err;
    z0f  = data_err_n;
    moved = 1'b0;
    repeat (200) begin
      @(negedge clk);
      if (cp != cp0 || data_err != z0t || data_err_n != z0f) moved = 1'b1;
    end
    check(!moved, $sformatf("fault kind %0d stage %0d bit %0d at %0b stops the ring", kind, stage, bitn, val));
    check(n_res == res0, "no result after the stop");
    fk = 0;
  endtask

  initial begin
    int f_halts;
    x_in = '0;
    d_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Reset state: every stage in evaluation, every output precharged.
    check(cp == '1 && c == '0, "reset: all stages evaluate, all outputs spacer");
    // Part 1: corners, then random.
    send(0, 128);
    send(127, 128);
    send(254, 255);
    send(0, 255);
    send(128, 255);
    measuring = 1'b1;
    send_random(400);
    measuring = 1'b0;
    // A division leaves the last stage only once later operands follow it
    // (a stage re-evaluates only when the stage two places on holds data),
    // so three more divisions push the stream out.
    send_random(3);
    repeat (60) @(negedge clk);
    check(xq.size() <= 3, $sformatf("every division of the stream produced a result (%0d left)", xq.size()));
    check(n_period_ok > 300 && n_period_bad < 10,
          $sformatf("steady-state interval of 8 steps: %0d ok, %0d other", n_period_ok, n_period_bad));
    for (int k = 0; k < N; k++) begin
      check(n_pre[k] > 0, $sformatf("stage %0d precharged", k));
      check(n_hold[k] > 0, $sformatf("stage %0d held its result with a spacer at its input", k));
    end
    check(n_qpos > 0 && n_qzero > 0 && n_qneg > 0, "digits +1, 0 and -1 all occurred");
    check(n_wneg > 0 && n_wpos > 0, "final residual of both signs");
    $display("mechanisms: results=%0d digits +1:%0d 0:%0d -1:%0d residual<0:%0d >=0:%0d period8:%0d",
             n_res, n_qpos, n_qzero, n_qneg, n_wneg, n_wpos, n_period_ok);
    // Part 2: single stuck-at faults.
    f_halts = 0;
    for (int k = 0; k < N; k += 3) begin
      for (int v = 0; v < 2; v++) begin
        fault_run(1, k, 0, v[0]);
        fault_run(2, k, 0, v[0]);
        // A rail of a quotient bit that changes from one division to the next.
        fault_run(3, k, 2 * (2 * W + N + 0) + v, 1'b0);
        fault_run(3, k, 2 * (2 * W + N + 0) + v, 1'b1);
        f_halts += 4;
      end
    end
    $display("fault runs: %0d", f_halts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
