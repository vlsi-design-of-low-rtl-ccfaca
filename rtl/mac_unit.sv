// mac_unit: low-power pipelined multiply-accumulate unit with block enabling.
//
// Computes sum of a_k * b_k over a sum of one to MAX_TERMS (four) unsigned
// N-bit operand pairs. The datapath is a chain of blocks, each with its own
// enable from the control logic:
//   operand registers A, B (N bits, en_1)
//   -> NxN array multiplier (en_2)
//   -> product register (2N+1 bits, en_3)
//   -> (2N+1)-bit ripple-carry adder (en_4), plus a half adder for the top
//      bit, adding the product to the fed-back accumulator value
//   -> accumulator register (2N+2 bits, register file cells, en_5)
// A block is enabled only in the clock cycle in which its input data is
// present; otherwise its inputs are forced to zero (combinational blocks) or
// its clock is held (registers), so idle blocks do not switch.
//
// Interface: present a, b with in_valid for one cycle per term, with
// in_last on the last term of a sum (the fourth term closes a sum anyway).
// Terms may follow each other every cycle. Three clocks after the closing
// term, acc_valid is high for one cycle and acc_out carries the sum; at all
// other times acc_out reads 0. stage_en shows which blocks are enabled and
// term_cnt how many terms of the open sum have been accepted.
// With N = 4 the widths are 4, 8, 9 and 10 bits; with N = 8 they are 8, 16,
// 17 and 18 bits, the 8-bit variant of the design. Four full-scale products
// always fit in 2N+2 bits, so the accumulator cannot overflow.
//
// The block chain, widths, enables and four-term limit follow the design;
// the handshake, the three-clock pipeline timing and the reset (asynchronous,
// active high) are this design's choices.
module mac_unit
  import mac_pkg::*;
#(
  parameter int unsigned N         = DEFAULT_N,
  parameter int unsigned MAX_TERMS = DEFAULT_MAX_TERMS
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic                    in_last,
  input  logic [N-1:0]            a,
  input  logic [N-1:0]            b,
  output logic [acc_width(N)-1:0] acc_out,
  output logic                    acc_valid,
  output stage_en_t               stage_en,
  output logic [$clog2(MAX_TERMS+1)-1:0] term_cnt
);

  localparam int unsigned PW = prod_reg_width(N);  // product register, adder
  localparam int unsigned AW = acc_width(N);       // accumulator

  if (MAX_TERMS > 4) begin : g_bad_terms
    $error("mac_unit: the 2N+2-bit accumulator holds at most four products");
  end

  logic [N-1:0]   a_q, b_q;
  logic [2*N-1:0] prod;
  logic [PW-1:0]  prod_q;
  logic [AW-1:0]  acc_q, fb, acc_d;
  logic           fb_en, rd_sel, add_cout, top_carry;

  control_logic #(.MAX_TERMS(MAX_TERMS)) u_ctrl (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_last(in_last),
    .stage_en(stage_en), .fb_en(fb_en), .rd_sel(rd_sel), .term_cnt(term_cnt)
  );

  // Stage 1: operand registers.
  enable_register #(.W(N)) u_reg_a (
    .clk(clk), .rst(rst), .en(stage_en.en_1), .d(a), .q(a_q)
  );
  enable_register #(.W(N)) u_reg_b (
    .clk(clk), .rst(rst), .en(stage_en.en_1), .d(b), .q(b_q)
  );

  // Stage 2: multiplier and product register.
  array_multiplier #(.N(N)) u_mult (
    .a(a_q), .b(b_q), .en(stage_en.en_2), .p(prod)
  );
  enable_register #(.W(PW)) u_reg_p (
    .clk(clk), .rst(rst), .en(stage_en.en_3), .d({1'b0, prod}), .q(prod_q)
  );

  // Stage 3: adder and accumulator register. The fed-back value is ANDed
  // with fb_en so that the first term of a sum starts from zero.
  for (genvar i = 0; i < AW; i++) begin : g_fb
    and_gate u_fb (.a(acc_q[i]), .b(fb_en), .y(fb[i]));
  end

  ripple_carry_adder #(.W(PW)) u_add (
    .a(prod_q), .b(fb[PW-1:0]), .cin(1'b0), .en(stage_en.en_4),
    .sum(acc_d[PW-1:0]), .cout(add_cout)
  );
  half_adder u_add_top (
    .a(fb[AW-1]), .b(add_cout), .sum(acc_d[AW-1]), .carry(top_carry)
  );

  acc_register #(.W(AW)) u_acc (
    .clk(clk), .rst(rst), .wr_sel(stage_en.en_5), .rd_sel(rd_sel),
    .d(acc_d), .q(acc_q), .dout(acc_out)
  );

  assign acc_valid = rd_sel;

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    stage_en.en_4 |-> !top_carry);

endmodule
