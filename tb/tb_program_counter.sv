// tb_program_counter: checks reset, increment, hold, jump load and the
// priority of load over hold against a reference model kept in the bench.
module tb_program_counter;
  logic clk = 0, rst, hold, load;
  logic [7:0] target, pc, model;
  int checks = 0, failures = 0;

  program_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; hold = 0; load = 0; target = 0;
    @(posedge clk); #1;
    rst = 0; model = 0;
    checks++; if (pc !== 8'd0) begin failures++; $display("reset: pc=%0d", pc); end
    for (int i = 0; i < 500; i++) begin
      hold = ($urandom % 4) == 0;
      load = ($urandom % 5) == 0;
      target = 8'($urandom);
      @(posedge clk); #1;
      if (load) model = target;
      else if (!hold) model = model + 1;
      checks++;
      if (pc !== model) begin failures++; $display("step %0d: pc=%0d want %0d", i, pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
