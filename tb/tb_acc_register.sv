// tb_acc_register: random writes and reads of the 10-bit accumulator register
// against a reference model of the stored word and of the read port.
module tb_acc_register;
  localparam int W = 10;
  logic clk = 0, rst, wr_sel, rd_sel;
  logic [W-1:0] d, q, dout, m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  acc_register dut (.clk(clk), .rst(rst), .wr_sel(wr_sel), .rd_sel(rd_sel),
                    .d(d), .q(q), .dout(dout));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wr_sel = 0; rd_sel = 1; d = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 0 || dout !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0; m = 0;
    for (int i = 0; i < 500; i++) begin
      wr_sel = 1'($urandom); rd_sel = 1'($urandom); d = W'($urandom);
      @(posedge clk);
      if (wr_sel) m = d;
      #1;
      checks++;
      if (q !== m || dout !== (rd_sel ? m : '0)) begin
        failures++;
        $display("FAIL cycle %0d wr=%0b rd=%0b q=%h dout=%h model=%h",
                 i, wr_sel, rd_sel, q, dout, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
