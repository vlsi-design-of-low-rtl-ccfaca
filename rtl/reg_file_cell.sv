// reg_file_cell: one-bit register file cell with write select and read select.
//
// A D flip-flop stores d at the rising clock edge while wr_sel is 1. While
// rd_sel is 1 the stored bit is driven onto dout through what is, in the
// transistor-level cell, a tristate buffer. Two-state logic has no high
// impedance, so here an unselected read port drives 0; the read ports of
// several cells can then be ORed where a shared bus would have been wired.
// The flip-flop's own output q is also brought out: the MAC feeds it back to
// its adder. Reset (asynchronous, active high, clears the bit) is this
// design's addition; the cell as described has none.
module reg_file_cell (
  input  logic clk,
  input  logic rst,
  input  logic wr_sel,
  input  logic rd_sel,
  input  logic d,
  output logic q,
  output logic dout
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         q <= 1'b0;
    else if (wr_sel) q <= d;
  end

  and_gate u_read (.a(q), .b(rd_sel), .y(dout));

endmodule
