// tb_decoder: decodes every opcode with random register fields and checks
// the control bundle against a table written out in the bench.
module tb_decoder;
  import risc_pkg::*;
  logic [15:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  logic clk = 0;

  decoder dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {alu_op, use_imm, rd_read, rs_read, reg_write, dest_is_rs, wb_sel, mrd, mwr, flags, jump, halt, coef, fir}
  task automatic expect_ctrl(string nm, alu_op_t aop, bit imm, bit rdr, bit rsr, bit rw, bit dest_rs,
                             wb_sel_t wb, bit mr, bit mw, bit fl, jump_t j, bit h, bit cw, bit fr);
    logic [2:0] ed;
    ed = dest_rs ? instr[7:5] : instr[10:8];
    checks++;
    if (ctrl.use_imm !== imm || ctrl.rd_read !== rdr || ctrl.rs_read !== rsr ||
        ctrl.reg_write !== rw || (rw && ctrl.dest !== ed) || ctrl.wb_sel !== wb ||
        ctrl.mem_read !== mr || ctrl.mem_write !== mw || ctrl.set_flags !== fl ||
        ctrl.jump !== j || ctrl.halt !== h || ctrl.coef_we !== cw || ctrl.fir !== fr ||
        ctrl.valid !== 1'b1 || ((rw || mw) && !fr && !mr && ctrl.alu_op !== aop) ||
        (mr && ctrl.alu_op !== aop)) begin
      failures++;
      $display("%s: decoded %p", nm, ctrl);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [10:0] fields;
      fields = 11'($urandom);
      for (int o = 0; o < 32; o++) begin
        instr = {5'(o), fields}; #1;
        case (o)
          0:  expect_ctrl("nop",  ALU_PASSA, 0,0,0,0,0, WB_ALU,0,0,0, JMP_NONE,0,0,0);
          1:  expect_ctrl("add",  ALU_ADD,  0,1,1,1,0, WB_ALU,0,0,1, JMP_NONE,0,0,0);
          2:  expect_ctrl("sub",  ALU_SUB,  0,1,1,1,0, WB_ALU,0,0,1, JMP_NONE,0,0,0);
          3:  expect_ctrl("addi", ALU_ADD,  1,1,0,1,0, WB_ALU,0,0,1, JMP_NONE,0,0,0);
          4:  expect_ctrl("subi", ALU_SUB,  1,1,0,1,0, WB_ALU,0,0,1, JMP_NONE,0,0,0);
          5:  expect_ctrl("and",  ALU_AND,  0,1,1,1,0, WB_ALU,0,0,1, JMP_NONE,0,0,0);
          6:  expect_ctrl("or",   ALU_OR,   0,1,1,1,0, WB_ALU,0,0,1, JMP_NONE,0,0,0);
          7:  expect_ctrl("xor",  ALU_XOR,  0,1,1,1,0, WB_ALU,0,0,1, JMP_NONE,0,0,0);
          8:  expect_ctrl("not",  ALU_NOT,  0,1,0,1,0, WB_ALU,0,0,1, JMP_NONE,0,0,0);
          9:  expect_ctrl("sll",  ALU_SLL,  0,1,1,1,0, WB_ALU,0,0,1, JMP_NONE,0,0,0);
          10: expect_ctrl("slli", ALU_SLL,  1,1,0,1,0, WB_ALU,0,0,1, JMP_NONE,0,0,0);
          11: expect_ctrl("mult", ALU_MUL,  0,1,1,1,0, WB_ALU,0,0,1, JMP_NONE,0,0,0);
          12: expect_ctrl("mov",  ALU_PASSB,0,0,1,1,0, WB_ALU,0,0,0, JMP_NONE,0,0,0);
          13: expect_ctrl("movr", ALU_PASSA,0,1,0,1,1, WB_ALU,0,0,0, JMP_NONE,0,0,0);
          14: expect_ctrl("lb",   ALU_PASSB,0,0,1,1,0, WB_MEM,1,0,0, JMP_NONE,0,0,0);
          15: expect_ctrl("sb",   ALU_PASSA,0,1,1,0,0, WB_ALU,0,1,0, JMP_NONE,0,0,0);
          16: expect_ctrl("j",    ALU_PASSA,0,0,0,0,0, WB_ALU,0,0,0, JMP_ALWAYS,0,0,0);
          17: expect_ctrl("jal",  ALU_PASSA,0,0,0,0,0, WB_ALU,0,0,0, JMP_ZERO,0,0,0);
          18: expect_ctrl("wait", ALU_PASSA,0,0,0,0,0, WB_ALU,0,0,0, JMP_NONE,1,0,0);
          19: expect_ctrl("coef", ALU_PASSA,0,0,1,0,0, WB_ALU,0,0,0, JMP_NONE,0,1,0);
          20: expect_ctrl("fir",  ALU_PASSA,0,0,1,1,0, WB_DSP,0,0,0, JMP_NONE,0,0,1);
          default: begin
            checks++;
            if (ctrl.valid !== 1'b0 || ctrl.reg_write || ctrl.mem_write || ctrl.jump != JMP_NONE) begin
              failures++; $display("opcode %0d should be invalid no-op", o);
            end
          end
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
