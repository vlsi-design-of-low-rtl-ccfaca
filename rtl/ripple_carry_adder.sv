// ripple_carry_adder: W-bit adder of W chained full adders, with block enable.
//
// Bit i adds a[i], b[i] and the carry of bit i-1; the carry of the top bit is
// cout. The enable goes to every full adder, so with en = 0 the whole adder
// outputs zero and does not toggle. In the MAC it is the accumulator's adder,
// one bit wider than the 2N-bit product (9 bits for 4-bit operands, 17 bits
// for 8-bit operands). Combinational; the delay is W full-adder carry steps.
module ripple_carry_adder #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic         en,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a(a[i]), .b(b[i]), .cin(c[i]), .en(en),
      .sum(sum[i]), .carry(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
