// enable_register: W-bit register that loads only while its enable is high.
//
// Used for the two operand registers (N bits, written by en_1) and for the
// product register (2N+1 bits, written by en_3). The register cell of the
// design is clock-gated so that a disabled register's clock does not toggle;
// in this RTL that is written as a load enable on a free-running clock, which
// a synthesis tool may turn back into a gated clock. Reset is asynchronous,
// active high, and clears the register (the reset value is this design's
// choice). Timing: q takes d at the rising clock edge where en is 1.
module enable_register #(
  parameter int unsigned W = mac_pkg::DEFAULT_N
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
