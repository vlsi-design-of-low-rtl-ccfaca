// mac_pkg: types and constants shared by the low-power MAC blocks.
//
// The MAC is a three-stage pipeline (input registers, multiplier plus
// product register, adder plus accumulator register). Each block has its own
// enable, en_1 to en_5, numbered in pipeline order as in the block diagram of
// the block-enabled MAC. They are bundled here in one packed struct so that
// the control logic and the datapath agree on their meaning.
package mac_pkg;

  // Operand width of the main configuration (4x4 multiplier).
  localparam int unsigned DEFAULT_N = 4;

  // Number of products the accumulator can add up before it must restart:
  // with an accumulator of 2N+2 bits, four full-scale NxN products always fit.
  localparam int unsigned DEFAULT_MAX_TERMS = 4;

  // Block enables of the pipeline, one per block.
  typedef struct packed {
    logic en_1;  // write both input (operand) registers
    logic en_2;  // multiplier inputs enabled
    logic en_3;  // write the product register
    logic en_4;  // adder inputs enabled
    logic en_5;  // write the accumulator register
  } stage_en_t;

  // Width of the product register and of the adder: one bit above the
  // 2N-bit product.
  function automatic int unsigned prod_reg_width(int unsigned n);
    return 2 * n + 1;
  endfunction

  // Width of the accumulator register.
  function automatic int unsigned acc_width(int unsigned n);
    return 2 * n + 2;
  endfunction

endpackage
