// dcvsl_node: the dynamic output nodes of a DCVSL function block.
//
// Each rail of each output pair is a precharged dynamic node. While cp is
// low (precharge) every node is pulled low, so the block shows the spacer
// 00 whatever its inputs. While cp is high (evaluate) a node goes high as
// soon as its pull-down network (the input f, computed combinationally by
// the function logic) conducts, and stays high until the next precharge
// even if the inputs return to the spacer: this is the Evaluation-Hold
// step in which the stage keeps its result for the next stage. Precharge
// low, monotone rise and hold follow the design; modelling each node as a
// state bit updated at each step of clk is this implementation's way of
// writing the dynamic circuit as synthesizable logic. Output changes one
// step after cp or f. ev is cp as the nodes saw it at the last step, i.e.
// 1 while the nodes evaluate or hold and 0 while they are precharged; the
// stage's checker is gated by it so that it precharges in the same step as
// the nodes it checks.
module dcvsl_node
  import dcvsl_pkg::*;
#(
  parameter int unsigned NPAIRS = 46
) (
  input  logic             clk,    // model step
  input  logic             rst_n,  // initialisation: all nodes low
  input  logic             cp,     // precharge (0) / evaluate (1)
  input  dr_t [NPAIRS-1:0] f,      // rails whose pull-down conducts
  output dr_t [NPAIRS-1:0] out,    // dynamic output pairs
  output logic             ev      // nodes in evaluation (1) or precharge (0)
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0;
      ev  <= 1'b1;
    end else begin
      ev <= cp;
      if (!cp) out <= '0;
      else     out <= out | f;
    end
  end
endmodule
