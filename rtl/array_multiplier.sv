// array_multiplier: unsigned NxN array multiplier with block enable.
//
// The operands first pass AND gates with the enable, so a disabled multiplier
// sees zero operands and its array stays still. Partial product bit
// pp[i][j] = a[j] AND b[i] has weight i+j. The array then works as on paper:
//   * row 0 is the partial-product row a AND b[0];
//   * rows 1..N-1 are carry-save rows of N full adders each: the full adder
//     in column j of row i adds pp[i][j], the sum of column j+1 of the row
//     above and the carry of column j of the row above (all weight i+j);
//     its sum goes down, its carry goes down-left;
//   * the column-0 sum of row i is product bit p[i];
//   * the final row is a ripple chain (half adder, N-2 full adders, half
//     adder) that adds the last row's sums and carries into p[2N-1:N].
// Only the final row has a carry chain; the other rows only reduce three bits
// to two. Combinational. The enable-gating and the structure follow the
// 4x4 design; the generalisation to any N >= 2 is this design's.
module array_multiplier #(
  parameter int unsigned N = mac_pkg::DEFAULT_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           en,
  output logic [2*N-1:0] p
);

  if (N < 2) begin : g_bad_n
    $error("array_multiplier needs N >= 2");
  end

  logic [N-1:0] ga, gb;
  logic [N-1:0] pp  [N];     // pp[i][j] = a[j] & b[i]
  logic [N:0]   s   [N];     // carry-save sums, s[i][N] is a constant 0
  logic [N-1:0] c   [N];     // carry-save carries
  logic [N:1]   rc;          // carries of the final ripple row

  // Block enable on the operands.
  for (genvar j = 0; j < N; j++) begin : g_en
    and_gate u_en_a (.a(a[j]), .b(en), .y(ga[j]));
    and_gate u_en_b (.a(b[j]), .b(en), .y(gb[j]));
  end

  // Partial products.
  for (genvar i = 0; i < N; i++) begin : g_pp_row
    for (genvar j = 0; j < N; j++) begin : g_pp_col
      and_gate u_pp (.a(ga[j]), .b(gb[i]), .y(pp[i][j]));
    end
  end

  // Row 0: the first partial-product row, no carries yet.
  assign s[0] = {1'b0, pp[0]};
  assign c[0] = '0;

  // Carry-save rows.
  for (genvar i = 1; i < N; i++) begin : g_row
    assign s[i][N] = 1'b0;
    for (genvar j = 0; j < N; j++) begin : g_col
      full_adder u_fa (
        .a(pp[i][j]), .b(s[i-1][j+1]), .cin(c[i-1][j]), .en(1'b1),
        .sum(s[i][j]), .carry(c[i][j])
      );
    end
  end

  // Low half of the product.
  for (genvar i = 0; i < N; i++) begin : g_low
    assign p[i] = s[i][0];
  end

  // Final ripple row: column j has weight N+j and adds s[N-1][j+1] and
  // c[N-1][j].
  half_adder u_ha_first (
    .a(s[N-1][1]), .b(c[N-1][0]), .sum(p[N]), .carry(rc[1])
  );
  for (genvar j = 1; j < N - 1; j++) begin : g_ripple
    full_adder u_fa (
      .a(s[N-1][j+1]), .b(c[N-1][j]), .cin(rc[j]), .en(1'b1),
      .sum(p[N+j]), .carry(rc[j+1])
    );
  end
  // Top column: s[N-1][N] is 0, so a half adder suffices; its carry would be
  // weight 2N, which an NxN product never reaches.
  half_adder u_ha_last (
    .a(c[N-1][N-1]), .b(rc[N-1]), .sum(p[2*N-1]), .carry(rc[N])
  );

endmodule
