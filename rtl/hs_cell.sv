// hs_cell: handshake cell of pipeline stage N.
//
// Produces CPN, the precharge (0) / evaluate (1) control of stage N, from
// the completion signals of stages N-1, N, N+1 and N+2:
//   CPN falls when CN-1_N, CN and CN+1 are all high
//     (stage N-1 has precharged, stages N and N+1 hold valid data);
//   CPN rises when CN-1_N, CN and CN+2_N are all low
//     (stage N-1 holds valid data, stage N has precharged, stage N+2 holds
//     valid data);
//   otherwise it keeps its value.
// CN-1_N and CN+2_N are the complements of CN-1 and CN+2. These rules are
// the design's. The cell is a domino-style generalised C-element; here its
// output node is a state bit updated at each step of clk, the unit-delay
// step of the model (see the README), so a change of the inputs reaches
// cp one step later. Reset puts every stage into evaluation (cp = 1), the
// state the pipeline starts from after initialisation.
module hs_cell (
  input  logic clk,        // model step
  input  logic rst_n,      // asynchronous initialisation, active low
  input  logic c_prev_n,   // CN-1_N
  input  logic c_cur,      // CN
  input  logic c_next,     // CN+1
  input  logic c_next2_n,  // CN+2_N
  output logic cp          // CPN
);
  logic set_ev, set_pc;

  assign set_ev = ~c_prev_n & ~c_cur & ~c_next2_n;
  assign set_pc = c_prev_n & c_cur & c_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cp <= 1'b1;
    else if (set_ev) cp <= 1'b1;
    else if (set_pc) cp <= 1'b0;
  end

  // The two transitions need opposite values of CN, so they never compete.
  a_exclusive : assert property (@(posedge clk) !(set_ev && set_pc));
endmodule
