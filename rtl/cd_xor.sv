// cd_xor: completion gate of a pipeline stage.
//
// The dual-rail checker of a stage merges all its output pairs into one
// pair (Z, Z_N). This single-rail XOR of that pair is the stage's
// completion signal C: 1 when the pair is a code word (the stage holds
// valid data), 0 when it is the spacer 00 (the stage is precharged) or the
// non-code word 11 (a fault). In the circuit it is a dynamic gate; here it
// is modelled as combinational logic, which gives the same values because
// its inputs are 00 throughout precharge.
module cd_xor
  import dcvsl_pkg::*;
(
  input  dr_t  z,  // merged pair from the dual-rail checker
  output logic c   // completion
);
  assign c = z.t ^ z.f;
endmodule
