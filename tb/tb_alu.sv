// tb_alu: every function on random and corner operands, compared with
// results computed in the bench, including the zero and carry flags.
module tb_alu;
  import risc_pkg::*;
  alu_op_t op;
  logic [7:0] a, b, y, ey;
  logic zero, carry, ec;
  int checks = 0, failures = 0;
  logic clk = 0;

  alu dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [8:0] w;
    logic [15:0] p;
    logic [15:0] s;
    ec = 0;
    case (op)
      ALU_ADD: begin w = a + b; ey = w[7:0]; ec = w[8]; end
      ALU_SUB: begin ey = a - b; ec = (b > a); end
      ALU_AND: ey = a & b;
      ALU_OR:  ey = a | b;
      ALU_XOR: ey = a ^ b;
      ALU_NOT: ey = ~a;
      ALU_SLL: begin s = {8'd0, a} << b[2:0]; ey = s[7:0]; ec = s[8]; end
      ALU_MUL: begin p = a * b; ey = p[7:0]; ec = (p[15:8] != 0); end
      ALU_PASSA: ey = a;
      default: ey = b;
    endcase
    checks++;
    if (y !== ey || carry !== ec || zero !== (ey == 0)) begin
      failures++;
      $display("op=%s a=%h b=%h: y=%h c=%b z=%b want y=%h c=%b", op.name(), a, b, y, carry, zero, ey, ec);
    end
  endtask

  initial begin
    for (int f = 0; f <= 9; f++) begin
      op = alu_op_t'(f);
      for (int i = 0; i < 400; i++) begin
        a = (i < 4) ? 8'(i * 85) : 8'($urandom);
        b = (i < 8) ? 8'((i % 4) * 85) : 8'($urandom);
        #1; check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
