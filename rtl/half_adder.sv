// half_adder: adds two bits into a sum and a carry.
//
// sum = a XOR b, carry = a AND b. The multiplier uses it at the two ends of
// its final ripple row, and the MAC uses one for the top bit of the
// accumulator. The original cell builds the XOR and the AND from
// transmission gates; here they are logic operators. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b;
  assign carry = a & b;

endmodule
