// tb_fault_campaign: single stuck-at faults at every insertion point of the
// full-size divider: the completion line, the local clock line and the two
// rails of the checker pair of each of the eight stages, and every rail of
// every stage's output word, each stuck at 0 and at 1 (1536 faults). For each fault the design is reset,
// three divisions run fault-free, the fault is applied, and twenty more
// divisions are offered.
//
//
// Self-checking means that no result delivered as valid code words is
// wrong. That is checked for every result of every run: a result that
// differs from integer arithmetic must contain a non-code pair. Such
// flagged results are counted. They occur when a checker rail of the last
// stage is stuck: the stuck rail turns the checker's 11 into a code word,
// so done rises on a word that the stage has merged from two operations. A fault on a
// completion or clock line must stop the ring: no local clock may move in
// a 150-step window, and the last stage's checker pair must stay constant.
// A fault on a checker rail must stop the ring in the same way.
// A fault on a data rail must either stop the ring in the same way or
// leave every result correct (the faulty rail was never needed).
module tb_fault_campaign;
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
  logic [N-1:0][2*NP-1:0] flt_data;
  logic [N-1:0]           flt_c, flt_cp;
  logic [N-1:0][1:0]      flt_z;

  sc_divider dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Signals ahead of the insertion points.
  logic [N-1:0]           c_raw, cp_raw;
  logic [N-1:0][2*NP-1:0] node;
  logic [N-1:0][1:0]      z_raw;
  for (genvar k = 0; k < N; k++) begin : g_probe
    assign c_raw[k]  = dut.g_stage[k].u_stage.c_raw;
    assign cp_raw[k] = dut.g_stage[k].u_stage.cp_raw;
    assign node[k]   = dut.g_stage[k].u_stage.u_comp.node;
    assign z_raw[k]  = dut.g_stage[k].u_stage.u_comp.z_raw;
  end

  // Fault kinds: 0 none, 1 completion line, 2 local clock, 3 data rail,
  // 4 checker rail.
  int   fk = 0, fs = 0, fb = 0;
  logic fv = 1'b0;
  always_comb begin
    flt_c    = '0;
    flt_cp   = '0;
    flt_data = '0;
    flt_z    = '0;
    for (int k = 0; k < N; k++) begin
      if (fk == 1 && fs == k) flt_c[k]  = c_raw[k] ^ fv;
      if (fk == 2 && fs == k) flt_cp[k] = cp_raw[k] ^ fv;
      if (fk == 3 && fs == k) flt_data[k][fb] = node[k][fb] ^ fv;
      if (fk == 4 && fs == k) flt_z[k][fb]    = z_raw[k][fb] ^ fv;
    end
  end

  int unsigned xq[$], dq[$];
  int   n_res = 0, n_wrong = 0, n_flag = 0;
  logic done_q = 1'b0;

  always @(negedge clk) begin
    done_q <= done;
    if (rst_n && done && !done_q) begin
      if (xq.size() == 0) n_wrong++;
      else begin
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
        if (!(all_valid(pq, N) && all_valid(pqm, N) && all_valid(pwc, W) && all_valid(pws, W)))
          n_flag++;
        else if (!(longint'(x) * 256 == longint'(q) * d + w && ((w < 0) ? qmv : q) == (x << N) / d))
          n_wrong++;
      end
      n_res++;
    end
  end

  // Offer one division; give up when the ring does not answer in time.
  task automatic send(output logic ok);
    int unsigned d, x;
    int t;
    d = 128 + $urandom % 128;
    x = $urandom % d;
    xq.push_back(x);
    dq.push_back(d);
    x_in = enc(x, N);
    d_in = enc(d, N);
    ok = 1'b0;
    t = 0;
    do begin @(negedge clk); t++; end while (!in_ack && t < 60);
    x_in = '0;
    d_in = '0;
    if (!in_ack) return;
    t = 0;
    do begin @(negedge clk); t++; end while (in_ack && t < 60);
    ok = !in_ack;
  endtask

  // Returns 1 when the ring stopped (nothing moved in the window).
  task automatic run(input int kind, input int stage, input int bitn, input logic val,
                     output logic halted);
    logic ok;
    logic [N-1:0] cp0;
    logic z0t, z0f, moved;
    int res0;
    rst_n = 1'b0;
    fk = 0;
    x_in = '0;
    d_in = '0;
    xq.delete();
    dq.delete();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    n_wrong = 0;
    for (int i = 0; i < 3; i++) send(ok);
    fk = kind; fs = stage; fb = bitn; fv = val;
    for (int i = 0; i < 20; i++) begin
      send(ok);
      if (!ok) break;
    end
    x_in = '0;
    d_in = '0;
    repeat (40) @(negedge clk);
    cp0 = cp; z0t = data_err; z0f = data_err_n; res0 = n_res;
    moved = 1'b0;
    repeat (150) begin
      @(negedge clk);
      if (cp != cp0 || data_err != z0t || data_err_n != z0f || n_res != res0) moved = 1'b1;
    end
    halted = !moved;
    check(n_wrong == 0, $sformatf("no wrong result: kind %0d stage %0d bit %0d at %0b", kind, stage, bitn, val));
    fk = 0;
  endtask

  initial begin
    int n_line = 0, n_line_halt = 0, n_data = 0, n_data_halt = 0, n_data_ok = 0;
    logic h;
    x_in = '0;
    d_in = '0;
    for (int k = 0; k < N; k++) begin
      for (int v = 0; v < 2; v++) begin
        for (int kind = 1; kind <= 4; kind++) begin
          if (kind == 3) continue;
          for (int b = 0; b < ((kind == 4) ? 2 : 1); b++) begin
            run(kind, k, b, v[0], h);
            n_line++;
            if (h) n_line_halt++;
            check(h, $sformatf("fault kind %0d stage %0d rail %0d at %0d stops the ring", kind, k, b, v));
          end
        end
        for (int b = 0; b < 2 * NP; b++) begin
          run(3, k, b, v[0], h);
          n_data++;
          if (h) n_data_halt++;
          else n_data_ok++;
        end
      end
    end
    $display("control and checker faults: %0d, stopped %0d; data-rail faults: %0d, stopped %0d, never activated %0d",
             n_line, n_line_halt, n_data, n_data_halt, n_data_ok);
    $display("results delivered with a non-code pair: %0d", n_flag);
    check(n_data_halt > n_data / 2, "most data-rail faults stop the ring");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
