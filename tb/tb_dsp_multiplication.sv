// tb_dsp_multiplication: signed products of random and extreme operands.
module tb_dsp_multiplication;
  logic signed [7:0] x [4];
  logic signed [7:0] c [4];
  logic signed [15:0] p [4];
  int checks = 0, failures = 0;
  logic clk = 0;

  dsp_multiplication dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      for (int k = 0; k < 4; k++) begin
        x[k] = (i == 0) ? -8'sd128 : 8'($urandom);
        c[k] = (i == 0) ? -8'sd128 : 8'($urandom);
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        int e;
        e = int'(x[k]) * int'(c[k]);
        checks++;
        if (int'(p[k]) != e) begin failures++; $display("%0d*%0d=%0d want %0d", x[k], c[k], p[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
