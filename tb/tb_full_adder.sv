// tb_full_adder: exhaustive check of the enabled full adder. With en = 1 the
// outputs must equal a + b + cin; with en = 0 both must be 0.
module tb_full_adder;
  logic a, b, cin, en, sum, carry;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .en(en), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expected;
    for (int i = 0; i < 16; i++) begin
      {en, a, b, cin} = 4'(i);
      #1;
      expected = en ? 2'(int'(a) + int'(b) + int'(cin)) : 2'b00;
      checks++;
      if ({carry, sum} !== expected) begin
        failures++;
        $display("FAIL en=%0b a=%0b b=%0b cin=%0b -> carry=%0b sum=%0b",
                 en, a, b, cin, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
