// tb_array_multiplier: exhaustive check of the 4x4 default and of a 2x2 and
// 5x5 multiplier, random check of an 8x8 one, against integer products;
// with the enable low the product must be zero.
module tb_array_multiplier;
  logic [3:0] a4, b4; logic [7:0]  p4; logic en4;
  logic [1:0] a2, b2; logic [3:0]  p2;
  logic [4:0] a5, b5; logic [9:0]  p5;
  logic [7:0] a8, b8; logic [15:0] p8;
  int checks = 0, failures = 0;

  array_multiplier            dut4 (.a(a4), .b(b4), .en(en4),  .p(p4));
  array_multiplier #(.N(2))   dut2 (.a(a2), .b(b2), .en(1'b1), .p(p2));
  array_multiplier #(.N(5))   dut5 (.a(a5), .b(b5), .en(1'b1), .p(p5));
  array_multiplier #(.N(8))   dut8 (.a(a8), .b(b8), .en(1'b1), .p(p8));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a2 = 0; b2 = 0; a5 = 0; b5 = 0; a8 = 0; b8 = 0;
    for (int i = 0; i < 512; i++) begin
      {en4, a4, b4} = 9'(i);
      #1;
      check($sformatf("4x4 en=%0b %0d*%0d", en4, a4, b4), int'(p4),
            en4 ? int'(a4) * int'(b4) : 0);
    end
    for (int i = 0; i < 16; i++) begin
      {a2, b2} = 4'(i);
      #1;
      check($sformatf("2x2 %0d*%0d", a2, b2), int'(p2), int'(a2) * int'(b2));
    end
    for (int i = 0; i < 1024; i++) begin
      {a5, b5} = 10'(i);
      #1;
      check($sformatf("5x5 %0d*%0d", a5, b5), int'(p5), int'(a5) * int'(b5));
    end
    for (int i = 0; i < 3000; i++) begin
      a8 = (i < 4) ? 8'(i * 85) : 8'($urandom);
      b8 = (i < 4) ? 8'hff : 8'($urandom);
      #1;
      check($sformatf("8x8 %0d*%0d", a8, b8), int'(p8), int'(a8) * int'(b8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
