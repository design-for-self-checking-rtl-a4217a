// tb_hs_cell: random test of the handshake cell against its transition
// rules, kept as an independent model: cp rises one step after CN-1_N, CN
// and CN+2_N are all low, falls one step after CN-1_N, CN and CN+1 are
// all high, and holds otherwise. Reset gives cp = 1 (evaluation). Each
// rule must have fired at least once.
module tb_hs_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic c_prev_n, c_cur, c_next, c_next2_n, cp;
  logic model;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0, n_hold = 0;

  hs_cell dut (.*);

  always #1 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    {c_prev_n, c_cur, c_next, c_next2_n} = '0;
    @(negedge clk);
    check(cp == 1'b1, "reset puts the stage in evaluation");
    rst_n = 1'b1;
    model = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      {c_prev_n, c_cur, c_next, c_next2_n} = 4'($urandom);
      @(negedge clk);
      if (!c_prev_n && !c_cur && !c_next2_n) begin
        if (!model) n_rise++;
        model = 1'b1;
      end else if (c_prev_n && c_cur && c_next) begin
        if (model) n_fall++;
        model = 1'b0;
      end else n_hold++;
      check(cp == model, $sformatf("step %0d: cp", i));
    end
    check(n_rise > 0 && n_fall > 0 && n_hold > 0, "rise, fall and hold all occurred");
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
