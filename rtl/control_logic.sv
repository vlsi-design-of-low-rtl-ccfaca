// control_logic: block-enable sequencer of the pipelined MAC.
//
// Each datapath block is enabled only once its input data has arrived from
// the previous stage, one clock period (the stage delay) after that stage was
// enabled, and is disabled otherwise. A term (one operand pair) travels as a
// valid bit through two pipeline flags:
//   cycle t   in_valid  -> en_1   (operand registers written)
//   cycle t+1 v1        -> en_2, en_3 (multiplier enabled, product register
//                                  written)
//   cycle t+2 v2        -> en_4, en_5 (adder enabled, accumulator written)
//   cycle t+3 rd_sel = 1 if that term closed a sum (accumulator read out)
// New terms may enter every cycle, so the throughput is one product per
// clock and the latency from operands to a finished sum is three clocks.
//
// Accumulation: a sum has one to MAX_TERMS terms. The term that carries
// in_last closes it, and the MAX_TERMS-th term closes it in any case, since
// the accumulator is only sized for four full-scale products. The first
// term of a sum is added to zero: fb_en, which gates the accumulator
// feedback into the adder, is low for it. term_cnt is the number of terms of
// the open sum already accepted.
//
// The three-stage enable chain and the four-term limit follow the design;
// the valid/last handshake, the forced close after MAX_TERMS terms, the read
// select timing and the asynchronous active-high reset are this design's
// choices.
module control_logic
  import mac_pkg::*;
#(
  parameter int unsigned MAX_TERMS = DEFAULT_MAX_TERMS
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid,   // an operand pair is presented this cycle
  input  logic      in_last,    // ... and it is the last term of its sum
  output stage_en_t stage_en,   // block enables en_1..en_5
  output logic      fb_en,      // add the accumulator's value (not first term)
  output logic      rd_sel,     // accumulator holds a finished sum
  output logic [$clog2(MAX_TERMS+1)-1:0] term_cnt
);

  if (MAX_TERMS < 1) begin : g_bad_terms
    $error("control_logic needs MAX_TERMS >= 1");
  end

  logic term_first, term_last;
  logic v1, first1, last1;
  logic v2, first2, last2;

  assign term_first = (term_cnt == '0);
  assign term_last  = in_last || (term_cnt == $bits(term_cnt)'(MAX_TERMS - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      term_cnt <= '0;
      v1       <= 1'b0;
      first1   <= 1'b0;
      last1    <= 1'b0;
      v2       <= 1'b0;
      first2   <= 1'b0;
      last2    <= 1'b0;
      rd_sel   <= 1'b0;
    end else begin
      if (in_valid) term_cnt <= term_last ? '0 : term_cnt + 1'b1;
      v1     <= in_valid;
      first1 <= in_valid & term_first;
      last1  <= in_valid & term_last;
      v2     <= v1;
      first2 <= first1;
      last2  <= last1;
      rd_sel <= v2 & last2;
    end
  end

  always_comb begin
    stage_en.en_1 = in_valid;
    stage_en.en_2 = v1;
    stage_en.en_3 = v1;
    stage_en.en_4 = v2;
    stage_en.en_5 = v2;
    fb_en         = v2 & ~first2;
  end

  // A block is never enabled without data behind it.
  a_en_order: assert property (@(posedge clk) disable iff (rst)
    stage_en.en_4 |-> $past(stage_en.en_2));
  a_cnt_range: assert property (@(posedge clk) disable iff (rst)
    term_cnt < $bits(term_cnt)'(MAX_TERMS));

endmodule
