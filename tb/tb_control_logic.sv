// tb_control_logic: random term stream (valid, last) against a cycle model of
// the enable chain: en_1 in the cycle a term is presented, en_2/en_3 one
// cycle later, en_4/en_5 and fb_en (not for a first term) two cycles later,
// rd_sel three cycles later for the closing term. A sum closes on in_last or
// on its fourth term. Also counts how often each case occurred.
module tb_control_logic;
  import mac_pkg::*;
  localparam int MT = 4;
  logic clk = 0, rst, in_valid, in_last, fb_en, rd_sel;
  stage_en_t stage_en;
  logic [2:0] term_cnt;
  int checks = 0, failures = 0;
  int n_forced = 0, n_early = 0, n_idle = 0;

  always #5 clk = ~clk;

  control_logic dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_last(in_last),
                     .stage_en(stage_en), .fb_en(fb_en), .rd_sel(rd_sel),
                     .term_cnt(term_cnt));

  task automatic check(string what, int got, int exp, int cyc);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // history of presented terms: [0] = this cycle, [k] = k cycles ago
    bit hv [4], hf [4], hl [4];
    int cnt;
    bit first, last;
    rst = 1; in_valid = 0; in_last = 0;
    for (int k = 0; k < 4; k++) begin hv[k] = 0; hf[k] = 0; hl[k] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0; cnt = 0;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      in_valid = ($urandom % 4) != 0;
      in_last  = ($urandom % 5) == 0;
      first = (cnt == 0);
      last  = in_last || (cnt == MT - 1);
      for (int k = 3; k > 0; k--) begin
        hv[k] = hv[k-1]; hf[k] = hf[k-1]; hl[k] = hl[k-1];
      end
      hv[0] = in_valid; hf[0] = in_valid && first; hl[0] = in_valid && last;
      if (!in_valid) n_idle++;
      else if (!in_last && cnt == MT - 1) n_forced++;
      else if (in_last && cnt < MT - 1) n_early++;
      #1;
      check("term_cnt", int'(term_cnt), cnt, cyc);
      check("en_1", int'(stage_en.en_1), int'(hv[0]), cyc);
      check("en_2", int'(stage_en.en_2), int'(hv[1]), cyc);
      check("en_3", int'(stage_en.en_3), int'(hv[1]), cyc);
      check("en_4", int'(stage_en.en_4), int'(hv[2]), cyc);
      check("en_5", int'(stage_en.en_5), int'(hv[2]), cyc);
      check("fb_en", int'(fb_en), int'(hv[2] && !hf[2]), cyc);
      check("rd_sel", int'(rd_sel), int'(hv[3] && hl[3]), cyc);
      if (in_valid) cnt = last ? 0 : cnt + 1;
      @(negedge clk);
    end
    $display("forced closes=%0d early closes=%0d idle cycles=%0d", n_forced, n_early, n_idle);
    checks++;
    if (n_forced == 0 || n_early == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
