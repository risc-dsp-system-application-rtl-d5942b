// tb_dsp_addition: sums of random and extreme products, no overflow.
module tb_dsp_addition;
  logic signed [15:0] p [4];
  logic signed [17:0] y;
  int checks = 0, failures = 0;
  logic clk = 0;

  dsp_addition dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int e;
      e = 0;
      for (int k = 0; k < 4; k++) begin
        p[k] = (i == 0) ? 16'sh7fff : (i == 1) ? -16'sh8000 : 16'($urandom);
        e += int'(p[k]);
      end
      #1;
      checks++;
      if (int'(y) != e) begin failures++; $display("sum=%0d want %0d", y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
