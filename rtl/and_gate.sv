// and_gate: two-input AND gate.
//
// In the MAC it forms the partial products of the array multiplier
// (a_j AND b_i) and it gates the inputs of a block with that block's enable:
// while the enable is 0 the block sees all-zero inputs and its internal nodes
// stop toggling. The original cell is a two-transistor transmission-gate AND;
// at the logic level it is a plain AND. Purely combinational, no timing.
module and_gate (
  input  logic a,
  input  logic b,
  output logic y
);

  assign y = a & b;

endmodule
