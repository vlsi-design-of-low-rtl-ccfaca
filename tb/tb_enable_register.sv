// tb_enable_register: random enable/data sequence on a 4-bit and a 9-bit
// register, compared each cycle with a reference model; also checks that
// reset clears both.
module tb_enable_register;
  logic clk = 0, rst, en;
  logic [3:0] d4, q4, m4;
  logic [8:0] d9, q9, m9;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  enable_register          dut4 (.clk(clk), .rst(rst), .en(en), .d(d4), .q(q4));
  enable_register #(.W(9)) dut9 (.clk(clk), .rst(rst), .en(en), .d(d9), .q(q9));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d4 = 0; d9 = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q4 !== 0 || q9 !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0; m4 = 0; m9 = 0;
    for (int i = 0; i < 500; i++) begin
      en = 1'($urandom); d4 = 4'($urandom); d9 = 9'($urandom);
      @(posedge clk);
      if (en) begin m4 = d4; m9 = d9; end
      #1;
      checks++;
      if (q4 !== m4 || q9 !== m9) begin
        failures++;
        $display("FAIL cycle %0d en=%0b q4=%h/%h q9=%h/%h", i, en, q4, m4, q9, m9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
