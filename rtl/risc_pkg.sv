// risc_pkg: types and constants shared by the 8-bit pipelined RISC core.
//
// Instruction word (16 bits, this design's own encoding):
//   [15:11] opcode   [10:8] rd   [7:5] rs   [4:0] unused   (register forms)
//   [15:11] opcode   [10:8] rd   [7:0] imm8                (addi, subi, slli)
//   [15:11] opcode   [10:8] -    [7:0] disp8 (signed)      (j, jal)
// Register forms are two-operand, rd <= rd op rs, as in the instruction
// table of the original description; immediate forms are rd <= rd op imm8.
// jal is a conditional jump taken when the zero flag is set. COEF and FIR
// drive the attached FIR/MAC unit: COEF writes coefficient rd[1:0] from rs,
// FIR feeds x(n)=rs and writes y(n) to rd.
package risc_pkg;

  localparam int unsigned IW = 16;  // instruction width
  localparam int unsigned RW = 3;   // register index width

  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_ADD  = 5'd1,
    OP_SUB  = 5'd2,
    OP_ADDI = 5'd3,
    OP_SUBI = 5'd4,
    OP_AND  = 5'd5,
    OP_OR   = 5'd6,
    OP_XOR  = 5'd7,
    OP_NOT  = 5'd8,
    OP_SLL  = 5'd9,
    OP_SLLI = 5'd10,
    OP_MULT = 5'd11,
    OP_MOV  = 5'd12,  // rd <= rs
    OP_MOVR = 5'd13,  // rs <= rd
    OP_LB   = 5'd14,  // rd <= M[rs]
    OP_SB   = 5'd15,  // M[rd] <= rs
    OP_J    = 5'd16,  // pc <= pc + disp
    OP_JAL  = 5'd17,  // if Z: pc <= pc + disp
    OP_WAIT = 5'd18,  // stop fetching until reset
    OP_COEF = 5'd19,  // coefficient[rd[1:0]] <= rs
    OP_FIR  = 5'd20   // rd <= y(n), x(n) = rs
  } opcode_t;

  typedef enum logic [3:0] {
    ALU_ADD,
    ALU_SUB,
    ALU_AND,
    ALU_OR,
    ALU_XOR,
    ALU_NOT,
    ALU_SLL,
    ALU_MUL,
    ALU_PASSA,
    ALU_PASSB
  } alu_op_t;

  typedef enum logic [1:0] {
    JMP_NONE,
    JMP_ALWAYS,
    JMP_ZERO
  } jump_t;

  // Which value goes back to the register file in WB.
  typedef enum logic [1:0] {
    WB_ALU,
    WB_MEM,
    WB_DSP
  } wb_sel_t;

  typedef struct packed {
    alu_op_t      alu_op;
    logic         use_imm;    // operand B is imm8 instead of register rs
    logic         rd_read;    // instruction reads register rd (port A)
    logic         rs_read;    // instruction reads register rs (port B)
    logic         reg_write;  // instruction writes a register
    logic [RW-1:0] dest;      // which register it writes
    wb_sel_t      wb_sel;
    logic         mem_read;   // MemRead
    logic         mem_write;  // Memory Write ("we")
    logic         set_flags;  // updates Z and C
    jump_t        jump;
    logic         halt;       // wait
    logic         coef_we;    // load a DSP coefficient
    logic         fir;        // push a sample through the DSP unit
    logic         valid;      // opcode is defined
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    alu_op: ALU_PASSA, use_imm: 1'b0, rd_read: 1'b0, rs_read: 1'b0,
    reg_write: 1'b0, dest: '0, wb_sel: WB_ALU, mem_read: 1'b0,
    mem_write: 1'b0, set_flags: 1'b0, jump: JMP_NONE, halt: 1'b0,
    coef_we: 1'b0, fir: 1'b0, valid: 1'b1
  };

  // Assembler helpers, used by testbenches to build programs.
  function automatic logic [IW-1:0] enc_rr(opcode_t op, logic [RW-1:0] rd, logic [RW-1:0] rs);
    return {op, rd, rs, 5'b0};
  endfunction

  function automatic logic [IW-1:0] enc_ri(opcode_t op, logic [RW-1:0] rd, logic [7:0] imm);
    return {op, rd, imm};
  endfunction

endpackage
