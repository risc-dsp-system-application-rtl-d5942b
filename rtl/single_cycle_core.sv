// single_cycle_core: single-cycle version of the 8-bit RISC processor.
//
// Same instruction set, encodings, Harvard memories, register set, decoder,
// ALU and FIR / MAC unit as the pipelined core (risc_core), but every
// instruction is fetched, decoded, executed, given its memory access and
// written back within one clock cycle: the instruction at the PC is read
// combinationally, and the register write, store, flag update, DSP update
// and PC update all happen at the next rising edge. Jumps therefore also
// take one cycle, and there are no hazards, stalls or forwarding. jal tests
// the zero flag left by the instructions before it. wait stops the PC and
// raises `halted` until reset. The existence of a single-cycle variant
// follows the original description; its details mirror the pipelined core
// and are this design's choices. Ports as in risc_core, without the
// pipeline event strobes.
module single_cycle_core
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
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [IW-1:0]  prog_data,
  output logic           halted,
  output logic           flag_z,
  output logic           flag_c,
  input  logic [RW-1:0]  dbg_reg_addr,
  output logic [DW-1:0]  dbg_reg_data,
  input  logic [DAW-1:0] dbg_mem_addr,
  output logic [DW-1:0]  dbg_mem_data,
  output logic           stat_retire   // an instruction completes this cycle
);

  localparam int unsigned TAW = (NTAPS > 1) ? $clog2(NTAPS) : 1;

  logic [IAW-1:0] pc, pc_target;
  logic [IW-1:0]  instr;
  ctrl_t          ctrl;
  logic [RW-1:0]  ra_idx, rb_idx;
  logic [DW-1:0]  a, b, alu_b, alu_y, mem_rdata, wb_value;
  logic signed [DW-1:0] dsp_y;
  logic           zero, carry, jump_taken, run;

  assign run = !halted && !rst;

  program_counter #(.AW(IAW)) u_pc (
    .clk, .rst, .hold(halted || ctrl.halt), .load(run && jump_taken),
    .target(pc_target), .pc
  );

  instruction_memory #(.AW(IAW), .IW(IW)) u_imem (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .raddr(pc), .rdata(instr)
  );

  decoder u_dec (.instr, .ctrl);

  assign ra_idx = instr[10:8];
  assign rb_idx = instr[7:5];

  register_set #(.DW(DW), .NREGS(NREGS), .BYPASS(1'b0)) u_regs (
    .clk, .rst,
    .ra_addr(ra_idx), .ra_data(a),
    .rb_addr(rb_idx), .rb_data(b),
    .rc_we(run && ctrl.reg_write), .rc_addr(ctrl.dest), .rc_data(wb_value),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data)
  );

  assign alu_b = ctrl.use_imm ? instr[7:0] : b;

  alu #(.DW(DW)) u_alu (
    .op(ctrl.alu_op), .a, .b(alu_b), .y(alu_y), .zero, .carry
  );

  dsp_unit #(.NTAPS(NTAPS), .DW(DW), .CW(DW)) u_dsp (
    .clk, .rst,
    .coef_we(run && ctrl.coef_we),
    .coef_addr(ra_idx[TAW-1:0]),
    .coef_data(b),
    .x_valid(run && ctrl.fir),
    .x(b),
    .y_full(),
    .y(dsp_y)
  );

  data_memory #(.AW(DAW), .DW(DW)) u_dmem (
    .clk,
    .we(run && ctrl.mem_write),
    .addr(DAW'(alu_y)),
    .wdata(b),
    .rdata(mem_rdata),
    .dbg_addr(dbg_mem_addr),
    .dbg_data(dbg_mem_data)
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_value = mem_rdata;
      WB_DSP:  wb_value = dsp_y;
      default: wb_value = alu_y;
    endcase
  end

  assign jump_taken = ctrl.jump == JMP_ALWAYS || (ctrl.jump == JMP_ZERO && flag_z);
  assign pc_target  = pc + IAW'(signed'(instr[7:0]));

  always_ff @(posedge clk) begin
    if (rst) begin
      halted <= 1'b0;
      flag_z <= 1'b0;
      flag_c <= 1'b0;
    end else if (!halted) begin
      if (ctrl.halt) halted <= 1'b1;
      if (ctrl.set_flags) begin
        flag_z <= zero;
        flag_c <= carry;
      end
    end
  end

  assign stat_retire = run;

endmodule
