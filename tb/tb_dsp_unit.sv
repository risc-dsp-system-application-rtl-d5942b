// tb_dsp_unit: loads random Q1.7 coefficients, streams random samples with
// gaps, and compares y(n) = sum c_k x(n-k) (full and saturated) with a
// reference FIR kept in the bench. Also checks y(n) appears in the same
// cycle as x(n) (zero latency) and that saturation happens.
module tb_dsp_unit;
  logic clk = 0, rst, coef_we, x_valid;
  logic [1:0] coef_addr;
  logic signed [7:0] coef_data, x, y;
  logic signed [17:0] y_full;
  int c [4];
  int h [4];
  int checks = 0, failures = 0, sat = 0;

  dsp_unit dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; coef_we = 0; coef_addr = 0; coef_data = 0; x_valid = 0; x = 0;
    @(posedge clk); #1; rst = 0;
    for (int k = 0; k < 4; k++) h[k] = 0;
    for (int round = 0; round < 10; round++) begin
      x_valid = 0;
      for (int k = 0; k < 4; k++) begin
        coef_we = 1; coef_addr = 2'(k); coef_data = 8'($urandom);
        c[k] = int'(coef_data);
        @(posedge clk); #1;
      end
      coef_we = 0;
      for (int i = 0; i < 200; i++) begin
        int e, s, es;
        x = 8'($urandom); x_valid = ($urandom % 4) != 0;
        #1;
        e = c[0] * int'(x);
        for (int k = 1; k < 4; k++) e += c[k] * h[k];
        s = e >>> 7;
        es = (s > 127) ? 127 : (s < -128) ? -128 : s;
        if (s != es) sat++;
        checks += 2;
        if (int'(y_full) != e) begin failures++; $display("y_full=%0d want %0d", y_full, e); end
        if (int'(y) != es) begin failures++; $display("y=%0d want %0d", y, es); end
        @(posedge clk); #1;
        if (x_valid) begin
          for (int k = 3; k > 1; k--) h[k] = h[k-1];
          h[1] = int'(x);
        end
      end
    end
    checks++;
    if (sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturated outputs: %0d", sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
