// risc_dsp_top: the RISC & DSP system.
//
// Three parts side by side. The pipelined 8-bit RISC core (risc_core)
// carries the FIR / multiply-accumulate DSP unit in its execute stage, so
// filter operations are instructions of the processor. The single-cycle
// version of the same processor (single_cycle_core, ports prefixed sc_) runs
// the same programs from its own memories. The 8-point radix-2 DIT FFT
// engine (fft8) has its own start / done handshake and sample ports, since
// no link between it and the processors is defined. All ports of the three
// parts are brought out unchanged; see the modules for timing.
module risc_dsp_top
  import risc_pkg::*;
#(
  parameter int unsigned DW    = 8,
  parameter int unsigned NREGS = 8,
  parameter int unsigned IAW   = 8,
  parameter int unsigned DAW   = 8,
  parameter int unsigned NTAPS = 4,
  parameter int unsigned FW    = 16
) (
  input  logic           clk,
  input  logic           rst,
  // RISC core
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
  output logic           stat_stall,
  output logic           stat_fwd,
  output logic           stat_jump,
  output logic           stat_retire,
  // single-cycle RISC core
  input  logic           sc_prog_we,
  input  logic [IAW-1:0] sc_prog_addr,
  input  logic [IW-1:0]  sc_prog_data,
  output logic           sc_halted,
  output logic           sc_flag_z,
  output logic           sc_flag_c,
  input  logic [RW-1:0]  sc_dbg_reg_addr,
  output logic [DW-1:0]  sc_dbg_reg_data,
  input  logic [DAW-1:0] sc_dbg_mem_addr,
  output logic [DW-1:0]  sc_dbg_mem_data,
  output logic           sc_stat_retire,
  // FFT engine
  input  logic           fft_start,
  input  logic signed [FW-1:0] fft_x_re [8],
  input  logic signed [FW-1:0] fft_x_im [8],
  output logic           fft_busy,
  output logic           fft_done,
  output logic signed [FW-1:0] fft_X_re [8],
  output logic signed [FW-1:0] fft_X_im [8]
);

  risc_core #(.DW(DW), .NREGS(NREGS), .IAW(IAW), .DAW(DAW), .NTAPS(NTAPS)) u_core (
    .clk, .rst, .prog_we, .prog_addr, .prog_data, .halted, .flag_z, .flag_c,
    .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data,
    .stat_stall, .stat_fwd, .stat_jump, .stat_retire
  );

  single_cycle_core #(.DW(DW), .NREGS(NREGS), .IAW(IAW), .DAW(DAW), .NTAPS(NTAPS)) u_sc_core (
    .clk, .rst,
    .prog_we(sc_prog_we), .prog_addr(sc_prog_addr), .prog_data(sc_prog_data),
    .halted(sc_halted), .flag_z(sc_flag_z), .flag_c(sc_flag_c),
    .dbg_reg_addr(sc_dbg_reg_addr), .dbg_reg_data(sc_dbg_reg_data),
    .dbg_mem_addr(sc_dbg_mem_addr), .dbg_mem_data(sc_dbg_mem_data),
    .stat_retire(sc_stat_retire)
  );

  fft8 #(.W(FW)) u_fft (
    .clk, .rst, .start(fft_start), .x_re(fft_x_re), .x_im(fft_x_im),
    .busy(fft_busy), .done(fft_done), .X_re(fft_X_re), .X_im(fft_X_im)
  );

endmodule
