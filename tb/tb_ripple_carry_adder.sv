// tb_ripple_carry_adder: exhaustive check of a 5-bit adder and random check
// of the 9-bit default against integer addition, with the enable both on and
// off (off must give zero sum and carry).
module tb_ripple_carry_adder;
  localparam int unsigned WS = 5;
  localparam int unsigned WD = 9;
  logic [WS-1:0] as, bs, ss;
  logic [WD-1:0] ad, bd, sd;
  logic cins, ens, couts, cind, end_, coutd;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(WS)) dut_s (.a(as), .b(bs), .cin(cins), .en(ens),
                                      .sum(ss), .cout(couts));
  ripple_carry_adder dut_d (.a(ad), .b(bd), .cin(cind), .en(end_),
                            .sum(sd), .cout(coutd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_s, exp_d;
    ad = '0; bd = '0; cind = 0; end_ = 0;
    for (int i = 0; i < (1 << (2 * WS + 2)); i++) begin
      {ens, cins, as, bs} = (2 * WS + 2)'(i);
      #1;
      exp_s = ens ? int'(as) + int'(bs) + int'(cins) : 0;
      checks++;
      if ({couts, ss} !== (WS + 1)'(exp_s)) begin
        failures++;
        $display("FAIL W=%0d en=%0b %0d+%0d+%0d -> %0d", WS, ens, as, bs, cins,
                 {couts, ss});
      end
    end
    for (int i = 0; i < 2000; i++) begin
      ad = WD'($urandom); bd = WD'($urandom);
      cind = 1'($urandom); end_ = (i % 8 != 0);
      #1;
      exp_d = end_ ? int'(ad) + int'(bd) + int'(cind) : 0;
      checks++;
      if ({coutd, sd} !== (WD + 1)'(exp_d)) begin
        failures++;
        $display("FAIL W=%0d en=%0b %0d+%0d+%0d -> %0d", WD, end_, ad, bd, cind,
                 {coutd, sd});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
