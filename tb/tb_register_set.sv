// tb_register_set: random reads and writes on the three ports against a
// reference model, including the same-cycle write-through and reset.
module tb_register_set;
  logic clk = 0, rst, rc_we;
  logic [2:0] ra_addr, rb_addr, rc_addr, dbg_addr;
  logic [7:0] ra_data, rb_data, rc_data, dbg_data;
  logic [7:0] model [8];
  logic [7:0] ea, eb;
  int checks = 0, failures = 0;

  register_set dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; rc_we = 0; ra_addr = 0; rb_addr = 0; rc_addr = 0; rc_data = 0; dbg_addr = 0;
    @(posedge clk); #1; rst = 0;
    for (int r = 0; r < 8; r++) begin
      model[r] = 0; dbg_addr = 3'(r); #1; checks++;
      if (dbg_data !== 8'd0) begin failures++; $display("reset r%0d=%h", r, dbg_data); end
    end
    for (int i = 0; i < 1000; i++) begin
      rc_we = $urandom % 2; rc_addr = 3'($urandom); rc_data = 8'($urandom);
      ra_addr = 3'($urandom); rb_addr = 3'($urandom); dbg_addr = 3'($urandom);
      #1;
      ea = (rc_we && rc_addr == ra_addr) ? rc_data : model[ra_addr];
      eb = (rc_we && rc_addr == rb_addr) ? rc_data : model[rb_addr];
      checks += 3;
      if (ra_data !== ea) begin failures++; $display("A r%0d=%h want %h", ra_addr, ra_data, ea); end
      if (rb_data !== eb) begin failures++; $display("B r%0d=%h want %h", rb_addr, rb_data, eb); end
      if (dbg_data !== model[dbg_addr]) begin failures++; $display("dbg mismatch"); end
      @(posedge clk); #1;
      if (rc_we) model[rc_addr] = rc_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
