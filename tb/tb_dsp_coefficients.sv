// tb_dsp_coefficients: random coefficient writes against a reference bank.
module tb_dsp_coefficients;
  logic clk = 0, rst, we;
  logic [1:0] waddr;
  logic signed [7:0] wdata;
  logic signed [7:0] coef [4];
  logic signed [7:0] model [4];
  int checks = 0, failures = 0;

  dsp_coefficients dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; waddr = 0; wdata = 0;
    @(posedge clk); #1; rst = 0;
    for (int k = 0; k < 4; k++) model[k] = 0;
    for (int i = 0; i < 500; i++) begin
      we = $urandom % 2; waddr = 2'($urandom); wdata = 8'($urandom);
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (coef[k] !== model[k]) begin failures++; $display("c%0d=%0d want %0d", k, coef[k], model[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
