// full_adder: one-bit full adder with a block enable, built from 2:1 muxes.
//
// Each of the three inputs first passes an AND gate with the enable, so a
// disabled adder sees 0, 0, 0 and drives sum = 0, carry = 0. The adder itself
// is the multiplexer form (chosen over an AND-OR-INVERT form because it needs
// fewer transistors and less power):
//   p     = b ? ~a : a        (a XOR b)
//   sum   = p ? ~cin : cin    (p XOR cin)
//   carry = p ? cin : a       (carry propagates when a != b, else equals a)
// Combinational. Ports: a, b, cin, en in; sum, carry out.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic en,
  output logic sum,
  output logic carry
);

  logic ga, gb, gc, p;

  and_gate u_and_a (.a(a),   .b(en), .y(ga));
  and_gate u_and_b (.a(b),   .b(en), .y(gb));
  and_gate u_and_c (.a(cin), .b(en), .y(gc));

  always_comb begin
    p     = gb ? ~ga : ga;
    sum   = p ? ~gc : gc;
    carry = p ? gc : ga;
  end

endmodule
