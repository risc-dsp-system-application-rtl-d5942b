// tb_data_memory: random writes and reads against a reference array; a
// read happens whenever we is 0, a write only on a clock edge with we = 1.
module tb_data_memory;
  logic clk = 0, we;
  logic [7:0] addr, wdata, rdata, dbg_addr, dbg_data;
  logic [7:0] ref_mem [256];
  int checks = 0, failures = 0;

  data_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0; dbg_addr = 0;
    for (int a = 0; a < 256; a++) begin
      ref_mem[a] = 8'($urandom);
      we = 1; addr = 8'(a); wdata = ref_mem[a];
      @(posedge clk); #1;
    end
    for (int i = 0; i < 1000; i++) begin
      we = ($urandom % 3) == 0; addr = 8'($urandom); wdata = 8'($urandom);
      dbg_addr = 8'($urandom);
      #1;
      if (!we) begin
        checks++;
        if (rdata !== ref_mem[addr]) begin failures++; $display("read %0d: %h want %h", addr, rdata, ref_mem[addr]); end
      end
      checks++;
      if (dbg_data !== ref_mem[dbg_addr]) begin failures++; $display("dbg %0d: %h want %h", dbg_addr, dbg_data, ref_mem[dbg_addr]); end
      @(posedge clk); #1;
      if (we) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
