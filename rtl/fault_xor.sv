// fault_xor: error insertion point.
//
// A signal line is cut and passed through an XOR gate whose other input is
// a fault control. With the control at 0 the line is unchanged. A test
// bench makes a line stuck at v by driving the control with (line ^ v), or
// flips it by driving 1. The design ties every control to 0 in use. The
// XOR insertion follows the fault-simulation set-up of the design; the
// width parameter is this implementation's own, so that one instance covers
// a whole bus. Purely combinational.
module fault_xor #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,      // line before the fault point
  input  logic [WIDTH-1:0] fault,  // fault control, 0 in normal use
  output logic [WIDTH-1:0] y       // line after the fault point
);
  assign y = a ^ fault;
endmodule
