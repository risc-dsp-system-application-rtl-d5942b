// tb_instruction_memory: writes every word, then reads all back through
// the fetch port and compares with the written values.
module tb_instruction_memory;
  logic clk = 0, we;
  logic [7:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] ref_mem [256];
  int checks = 0, failures = 0;

  instruction_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int a = 0; a < 256; a++) begin
      ref_mem[a] = 16'($urandom);
      we = 1; waddr = 8'(a); wdata = ref_mem[a];
      @(posedge clk); #1;
    end
    we = 0;
    for (int a = 255; a >= 0; a--) begin
      raddr = 8'(a); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("addr %0d: %h want %h", a, rdata, ref_mem[a]); end
    end
    // a write with we low must not change anything
    waddr = 8'd7; wdata = ~ref_mem[7]; @(posedge clk); #1;
    raddr = 8'd7; #1; checks++;
    if (rdata !== ref_mem[7]) begin failures++; $display("write with we=0 changed memory"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
