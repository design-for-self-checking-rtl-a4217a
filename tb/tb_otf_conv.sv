// tb_otf_conv: random test of the on-the-fly converter. With QM = Q - 1 at
// the input, the outputs must be Q' = 2Q + q and QM' = Q' - 1 (modulo
// 2^N) for each digit q in {-1, 0, +1}.
module tb_otf_conv;
  import dcvsl_pkg::*;
  import tb_pkg::*;

  localparam int unsigned N = DIV_NBITS;

  dr_t         qs, qm;
  dr_t [N-1:0] q_in, qm_in, q_out, qm_out;
  int checks = 0, failures = 0;

  otf_conv dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 1500; i++) begin
      int unsigned qv, e;
      int dig;
      logic [2*MAXP-1:0] pq, pm;
      qv  = $urandom % (1 << N);
      dig = int'($urandom % 3) - 1;
      q_in  = enc(qv, N);
      qm_in = enc((qv + (1 << N) - 1) % (1 << N), N);
      qs = dr_enc(dig < 0);
      qm = dr_enc(dig != 0);
      #1;
      pq = '0; pq[2*N-1:0] = q_out;
      pm = '0; pm[2*N-1:0] = qm_out;
      e = (2 * qv + (1 << N) + dig) % (1 << N);
      check(all_valid(pq, N) && all_valid(pm, N), "outputs are code words");
      check(dec(pq, N) == e, $sformatf("Q' for Q=%0d q=%0d", qv, dig));
      check(dec(pm, N) == (e + (1 << N) - 1) % (1 << N), $sformatf("QM' for Q=%0d q=%0d", qv, dig));
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
