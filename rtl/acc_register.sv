// acc_register: W-bit accumulator register made of register file cells.
//
// All W cells share one write select and one read select. q is the stored
// word, fed back to the accumulator's adder; dout is the read port, equal to
// q while rd_sel is 1 and 0 otherwise. In the MAC, W = 2N+2 (10 bits for
// 4-bit operands), wr_sel is the block enable en_5 and rd_sel is high for
// the one cycle in which the register holds a finished sum.
// Timing: q takes d at the rising clock edge where wr_sel is 1; dout follows
// q and rd_sel combinationally.
module acc_register #(
  parameter int unsigned W = mac_pkg::acc_width(mac_pkg::DEFAULT_N)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_sel,
  input  logic         rd_sel,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] dout
);

  for (genvar i = 0; i < W; i++) begin : g_cell
    reg_file_cell u_cell (
      .clk(clk), .rst(rst), .wr_sel(wr_sel), .rd_sel(rd_sel),
      .d(d[i]), .q(q[i]), .dout(dout[i])
    );
  end

endmodule
