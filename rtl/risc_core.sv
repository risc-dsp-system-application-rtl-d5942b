// risc_core: five-stage pipelined 8-bit RISC processor, Harvard organisation,
// with a FIR / multiply-accumulate unit attached to its execute stage.
//
// Stages: IF (fetch at the PC from the program memory), ID (decode, read the
// operands Ra = register rd and Rb = register rs, resolve jumps), EX (ALU,
// flags, DSP unit), MEM (lb / sb on the data memory, address = ALU result),
// WB (write Rc). One instruction enters per clock; a program counter, a
// program memory and a data memory on separate buses, a register set, a
// decoder and an ALU are its parts.
//
// Pipeline behaviour:
//  * Jumps (j, and jal when the zero flag is set) are resolved in ID. The
//    instruction fetched behind a taken jump is squashed, so a taken jump
//    costs two cycles. The zero flag seen by jal includes the result of the
//    instruction just ahead of it in EX.
//  * Operands are forwarded to EX from the EX/MEM and MEM/WB registers; the
//    register set itself passes a value being written through to ID.
//  * A load followed directly by an instruction reading its destination
//    stalls that instruction in ID for one cycle (load-use stall).
//  * wait stops fetching; instructions already in the pipeline complete and
//    `halted` goes high. Only reset restarts the core.
// Side effects (flags, DSP coefficient and sample writes, stores) happen in
// EX or MEM, past the point where anything can be squashed.
//
// Interface: prog_* loads the program memory; dbg_reg_* and dbg_mem_* read a
// register and a data-memory byte for inspection; stat_* are per-cycle event
// strobes (stall, forward, taken jump, instruction retired); flag_z and
// flag_c show the status flags. Synchronous,
// active-high reset. The five stages, Harvard buses, instruction set and
// two-cycle jumps follow the original description; encodings, forwarding,
// the stall, flag rules and the DSP instructions are this design's choices.
module risc_core
  import risc_pkg::*;
#(
  parameter int unsigned DW    = 8,
  parameter int unsigned NREGS = 8,
  parameter int unsigned IAW   = 8,
  parameter int unsigned DAW   = 8,
  parameter int unsigned NTAPS = 4
) (
  input  logic           clk,
  input  logic           rst,
  // program loading
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [IW-1:0]  prog_data,
  // status
  output logic           halted,
  output logic           flag_z,   // zero flag
  output logic           flag_c,   // carry / borrow flag
  // inspection
  input  logic [RW-1:0]  dbg_reg_addr,
  output logic [DW-1:0]  dbg_reg_data,
  input  logic [DAW-1:0] dbg_mem_addr,
  output logic [DW-1:0]  dbg_mem_data,
  // event strobes
  output logic           stat_stall,
  output logic           stat_fwd,
  output logic           stat_jump,
  output logic           stat_retire
);

  localparam int unsigned TAW = (NTAPS > 1) ? $clog2(NTAPS) : 1;

  // ---------------------------------------------------------------- types
  typedef struct packed {
    logic           valid;
    logic [IAW-1:0] pc;
    logic [IW-1:0]  instr;
  } if_id_t;

  typedef struct packed {
    logic          valid;
    ctrl_t         ctrl;
    logic [RW-1:0] ra_idx;   // register rd field
    logic [RW-1:0] rb_idx;   // register rs field
    logic [DW-1:0] a;        // value of register rd
    logic [DW-1:0] b;        // value of register rs
    logic [DW-1:0] imm;
  } id_ex_t;

  typedef struct packed {
    logic          valid;
    ctrl_t         ctrl;
    logic [DW-1:0] result;   // ALU or DSP result; memory address for lb/sb
    logic [DW-1:0] store;    // store data
  } ex_mem_t;

  typedef struct packed {
    logic          valid;
    logic          reg_write;
    logic [RW-1:0] dest;
    logic [DW-1:0] value;
  } mem_wb_t;

  if_id_t  ifid;
  id_ex_t  idex;
  ex_mem_t exmem;
  mem_wb_t memwb;

  // ------------------------------------------------------------------- IF
  logic [IAW-1:0] pc;
  logic [IW-1:0]  fetched;
  logic           pc_hold, pc_load;
  logic [IAW-1:0] pc_target;

  program_counter #(.AW(IAW)) u_pc (
    .clk, .rst, .hold(pc_hold), .load(pc_load), .target(pc_target), .pc
  );

  instruction_memory #(.AW(IAW), .IW(IW)) u_imem (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .raddr(pc), .rdata(fetched)
  );

  // ------------------------------------------------------------------- ID
  ctrl_t          id_ctrl;
  logic [RW-1:0]  id_ra, id_rb;
  logic [DW-1:0]  id_a, id_b;
  logic           load_use, jump_taken, halt_now;
  logic           z_eff;
  logic [DW-1:0]  wb_value;

  decoder u_dec (.instr(ifid.instr), .ctrl(id_ctrl));

  assign id_ra = ifid.instr[10:8];
  assign id_rb = ifid.instr[7:5];

  register_set #(.DW(DW), .NREGS(NREGS)) u_regs (
    .clk, .rst,
    .ra_addr(id_ra), .ra_data(id_a),
    .rb_addr(id_rb), .rb_data(id_b),
    .rc_we(memwb.valid && memwb.reg_write), .rc_addr(memwb.dest), .rc_data(memwb.value),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data)
  );

  // EX-stage results needed by ID (zero flag for jal).
  logic          ex_zero, ex_carry;
  logic [DW-1:0] alu_y;

  assign z_eff = (idex.valid && idex.ctrl.set_flags) ? ex_zero : flag_z;

  assign load_use = ifid.valid && idex.valid && idex.ctrl.mem_read &&
                    idex.ctrl.reg_write &&
                    ((id_ctrl.rd_read && id_ra == idex.ctrl.dest) ||
                     (id_ctrl.rs_read && id_rb == idex.ctrl.dest));

  assign jump_taken = ifid.valid && !halted &&
                      (id_ctrl.jump == JMP_ALWAYS ||
                       (id_ctrl.jump == JMP_ZERO && z_eff));

  assign halt_now  = ifid.valid && id_ctrl.halt;
  assign pc_target = ifid.pc + IAW'(signed'(ifid.instr[7:0]));
  assign pc_load   = jump_taken;
  assign pc_hold   = load_use || halted || halt_now;

  always_ff @(posedge clk) begin
    if (rst) begin
      halted <= 1'b0;
      ifid   <= '0;
    end else begin
      if (halt_now) halted <= 1'b1;
      if (jump_taken || halted || halt_now) begin
        ifid <= '0;                         // squash / stop fetching
      end else if (!load_use) begin
        ifid <= '{valid: 1'b1, pc: pc, instr: fetched};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || load_use || !ifid.valid) begin
      idex      <= '0;
      idex.ctrl <= CTRL_NOP;
    end else begin
      idex <= '{valid: 1'b1, ctrl: id_ctrl, ra_idx: id_ra, rb_idx: id_rb,
                a: id_a, b: id_b, imm: ifid.instr[7:0]};
    end
  end

  // ------------------------------------------------------------------- EX
  logic [DW-1:0] op_a, op_b, alu_b;
  logic          fwd_a, fwd_b;
  logic          exmem_fwd_ok;
  logic signed [DW-1:0] dsp_y;

  assign exmem_fwd_ok = exmem.valid && exmem.ctrl.reg_write && !exmem.ctrl.mem_read;

  always_comb begin
    op_a  = idex.a;
    fwd_a = 1'b0;
    if (idex.ctrl.rd_read) begin
      if (exmem_fwd_ok && exmem.ctrl.dest == idex.ra_idx) begin
        op_a = exmem.result; fwd_a = 1'b1;
      end else if (memwb.valid && memwb.reg_write && memwb.dest == idex.ra_idx) begin
        op_a = memwb.value;  fwd_a = 1'b1;
      end
    end
    op_b  = idex.b;
    fwd_b = 1'b0;
    if (idex.ctrl.rs_read) begin
      if (exmem_fwd_ok && exmem.ctrl.dest == idex.rb_idx) begin
        op_b = exmem.result; fwd_b = 1'b1;
      end else if (memwb.valid && memwb.reg_write && memwb.dest == idex.rb_idx) begin
        op_b = memwb.value;  fwd_b = 1'b1;
      end
    end
  end

  assign alu_b = idex.ctrl.use_imm ? idex.imm : op_b;

  alu #(.DW(DW)) u_alu (
    .op(idex.ctrl.alu_op), .a(op_a), .b(alu_b),
    .y(alu_y), .zero(ex_zero), .carry(ex_carry)
  );

  dsp_unit #(.NTAPS(NTAPS), .DW(DW), .CW(DW)) u_dsp (
    .clk, .rst,
    .coef_we(idex.valid && idex.ctrl.coef_we),
    .coef_addr(idex.ra_idx[TAW-1:0]),
    .coef_data(op_b),
    .x_valid(idex.valid && idex.ctrl.fir),
    .x(op_b),
    .y_full(),
    .y(dsp_y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      flag_z <= 1'b0;
      flag_c <= 1'b0;
    end else if (idex.valid && idex.ctrl.set_flags) begin
      flag_z <= ex_zero;
      flag_c <= ex_carry;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      exmem      <= '0;
      exmem.ctrl <= CTRL_NOP;
    end else begin
      exmem.valid  <= idex.valid;
      exmem.ctrl   <= idex.ctrl;
      exmem.result <= (idex.ctrl.wb_sel == WB_DSP) ? dsp_y : alu_y;
      exmem.store  <= op_b;
    end
  end

  // ------------------------------------------------------------------ MEM
  logic [DW-1:0] mem_rdata;

  data_memory #(.AW(DAW), .DW(DW)) u_dmem (
    .clk,
    .we(exmem.valid && exmem.ctrl.mem_write),
    .addr(DAW'(exmem.result)),
    .wdata(exmem.store),
    .rdata(mem_rdata),
    .dbg_addr(dbg_mem_addr),
    .dbg_data(dbg_mem_data)
  );

  assign wb_value = exmem.ctrl.mem_read ? mem_rdata : exmem.result;

  always_ff @(posedge clk) begin
    if (rst) begin
      memwb <= '0;
    end else begin
      memwb <= '{valid: exmem.valid, reg_write: exmem.ctrl.reg_write,
                 dest: exmem.ctrl.dest, value: wb_value};
    end
  end

  // ------------------------------------------------------------ strobes
  assign stat_stall  = load_use;
  assign stat_fwd    = idex.valid && (fwd_a || fwd_b);
  assign stat_jump   = jump_taken;
  assign stat_retire = memwb.valid;

  // A jump never needs a stall: it reads no register.
  assert property (@(posedge clk) disable iff (rst) !(jump_taken && load_use));

endmodule
