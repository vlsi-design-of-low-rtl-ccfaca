// tb_mac_unit_8bit: end-to-end test of the MAC in its 8-bit variant (N = 8:
// 16-bit product, 17-bit adder, 18-bit accumulator, up to four products).
//
// A stream of terms (random operands, random gaps, random in_last) runs
// through the unit. A reference model forms each sum as the integer sum of
// a*b and expects it on acc_out with acc_valid exactly three clocks after the
// closing term, and acc_out = 0 at every other time. The block enables are
// checked every cycle against the term history: en_1 with the term, en_2 and
// en_3 one clock later, en_4 and en_5 two clocks later, all zero when no term
// is in flight. The run ends with full-scale sums (255*255 four times = 260100).
// Each mechanism is counted and must occur at least once: sums closed by the
// four-term limit, sums closed early by in_last, one-term sums, back-to-back
// terms (one product per clock), idle cycles with every block disabled and
// full-scale sums.
module tb_mac_unit_8bit;
  import mac_pkg::*;
  localparam int N  = 8;
  localparam int MT = DEFAULT_MAX_TERMS;
  localparam int AW = 2 * N + 2;
  localparam int NCYC = 3000;

  logic clk = 0, rst, in_valid, in_last;
  logic [N-1:0] a, b;
  logic [AW-1:0] acc_out;
  logic acc_valid;
  stage_en_t stage_en;
  logic [2:0] term_cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mac_unit #(.N(N)) dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_last(in_last),
                .a(a), .b(b), .acc_out(acc_out), .acc_valid(acc_valid),
                .stage_en(stage_en), .term_cnt(term_cnt));

  task automatic check(string what, longint got, longint exp, int cyc);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_valid [NCYC + 8];
    longint exp_sum [NCYC + 8];
    bit hv [3];
    longint run_sum;
    int cnt, n_sums;
    bit last, prev_valid;
    int n_forced = 0, n_early = 0, n_single = 0, n_b2b = 0, n_idle = 0, n_full = 0;
    longint full_scale;
    full_scale = longint'(MT) * ((longint'(1) << N) - 1) * ((longint'(1) << N) - 1);

    for (int c = 0; c < NCYC + 8; c++) begin exp_valid[c] = 0; exp_sum[c] = 0; end
    for (int k = 0; k < 3; k++) hv[k] = 0;
    rst = 1; in_valid = 0; in_last = 0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    cnt = 0; run_sum = 0; prev_valid = 0; n_sums = 0;

    for (int cyc = 0; cyc < NCYC; cyc++) begin
      // stimulus
      if (cyc < NCYC - 40) begin
        in_valid = ($urandom % 3) != 0;
        in_last  = ($urandom % 4) == 0;
        a = N'($urandom); b = N'($urandom);
      end else if (cyc < NCYC - 8) begin
        in_valid = 1; in_last = 0; a = '1; b = '1;   // full-scale sums
      end else begin
        in_valid = 0; in_last = 0;                   // drain
      end

      // reference model
      last = in_last || (cnt == MT - 1);
      for (int k = 2; k > 0; k--) hv[k] = hv[k-1];
      hv[0] = in_valid;
      if (in_valid) begin
        if (prev_valid) n_b2b++;
        if (cnt == 0) run_sum = 0;
        run_sum += longint'(a) * longint'(b);
        if (last) begin
          exp_valid[cyc + 3] = 1;
          exp_sum[cyc + 3]   = run_sum;
          n_sums++;
          if (!in_last) n_forced++;
          else if (cnt == 0) n_single++;
          else if (cnt < MT - 1) n_early++;
          if (run_sum == full_scale) n_full++;
        end
      end
      prev_valid = in_valid;

      #1;
      if (!hv[0] && !hv[1] && !hv[2] && stage_en == '0) n_idle++;
      check("term_cnt", term_cnt, cnt, cyc);
      check("en_1", stage_en.en_1, hv[0], cyc);
      check("en_2", stage_en.en_2, hv[1], cyc);
      check("en_3", stage_en.en_3, hv[1], cyc);
      check("en_4", stage_en.en_4, hv[2], cyc);
      check("en_5", stage_en.en_5, hv[2], cyc);
      check("acc_valid", acc_valid, exp_valid[cyc], cyc);
      check("acc_out", acc_out, exp_valid[cyc] ? exp_sum[cyc] : 0, cyc);
      if (in_valid) cnt = last ? 0 : cnt + 1;
      @(negedge clk);
    end

    $display("sums=%0d forced=%0d early=%0d single=%0d back_to_back=%0d idle=%0d full_scale=%0d",
             n_sums, n_forced, n_early, n_single, n_b2b, n_idle, n_full);
    checks++;
    if (n_forced == 0 || n_early == 0 || n_single == 0 || n_b2b == 0 ||
        n_idle == 0 || n_full == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
