// decoder: instruction decoder of the RISC core (ID stage).
//
// Purely combinational: maps the 16-bit instruction word to a ctrl_t bundle
// (see risc_pkg): ALU function, whether operand B is the 8-bit immediate,
// which registers are read and which is written, the write-back source,
// MemRead / Memory Write, flag update, jump kind, halt and the two DSP
// operations. Undefined opcodes decode as a no-op with `valid` low. The
// instruction set follows the original table; the encodings are this
// design's own.
module decoder
  import risc_pkg::*;
(
  input  logic [IW-1:0] instr,
  output ctrl_t         ctrl
);

  opcode_t       op;
  logic [RW-1:0] rd, rs;

  assign op = opcode_t'(instr[15:11]);
  assign rd = instr[10:8];
  assign rs = instr[7:5];

  always_comb begin
    ctrl      = CTRL_NOP;
    ctrl.dest = rd;
    unique case (op)
      OP_NOP: ;
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_MULT: begin
        ctrl.rd_read   = 1'b1;
        ctrl.rs_read   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.set_flags = 1'b1;
        case (op)
          OP_ADD:  ctrl.alu_op = ALU_ADD;
          OP_SUB:  ctrl.alu_op = ALU_SUB;
          OP_AND:  ctrl.alu_op = ALU_AND;
          OP_OR:   ctrl.alu_op = ALU_OR;
          OP_XOR:  ctrl.alu_op = ALU_XOR;
          OP_SLL:  ctrl.alu_op = ALU_SLL;
          default: ctrl.alu_op = ALU_MUL;
        endcase
      end
      OP_ADDI, OP_SUBI, OP_SLLI: begin
        ctrl.rd_read   = 1'b1;
        ctrl.use_imm   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.set_flags = 1'b1;
        ctrl.alu_op    = (op == OP_ADDI) ? ALU_ADD :
                         (op == OP_SUBI) ? ALU_SUB : ALU_SLL;
      end
      OP_NOT: begin
        ctrl.rd_read   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.set_flags = 1'b1;
        ctrl.alu_op    = ALU_NOT;
      end
      OP_MOV: begin
        ctrl.rs_read   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALU_PASSB;
      end
      OP_MOVR: begin
        ctrl.rd_read   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.dest      = rs;
        ctrl.alu_op    = ALU_PASSA;
      end
      OP_LB: begin
        ctrl.rs_read   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALU_PASSB;
        ctrl.mem_read  = 1'b1;
        ctrl.wb_sel    = WB_MEM;
      end
      OP_SB: begin
        ctrl.rd_read   = 1'b1;
        ctrl.rs_read   = 1'b1;
        ctrl.alu_op    = ALU_PASSA;
        ctrl.mem_write = 1'b1;
      end
      OP_J:    ctrl.jump = JMP_ALWAYS;
      OP_JAL:  ctrl.jump = JMP_ZERO;
      OP_WAIT: ctrl.halt = 1'b1;
      OP_COEF: begin
        ctrl.rs_read = 1'b1;
        ctrl.coef_we = 1'b1;
      end
      OP_FIR: begin
        ctrl.rs_read   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.fir       = 1'b1;
        ctrl.wb_sel    = WB_DSP;
      end
      default: ctrl.valid = 1'b0;
    endcase
  end

endmodule
