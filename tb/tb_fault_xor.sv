// tb_fault_xor: the error insertion point passes the line with the control
// at 0, inverts it with the control at 1, and makes it stuck at v when
// the control is driven with line ^ v.
module tb_fault_xor;
  localparam int unsigned WD = 8;
  logic [WD-1:0] a, fault, y;
  int checks = 0, failures = 0;

  fault_xor #(.WIDTH(WD)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [WD-1:0] v;
      a = $urandom;
      v = $urandom;
      fault = '0;
      #1 check(y == a, "control 0 passes the line");
      fault = '1;
      #1 check(y == ~a, "control 1 inverts the line");
      fault = a ^ v;
      #1 check(y == v, "line ^ v makes it stuck at v");
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
