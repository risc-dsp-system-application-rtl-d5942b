// register_set: general-purpose register file of the RISC core.
//
// NREGS registers of DW bits. Two asynchronous read ports, A (the Ra operand,
// register rd of the two-operand instructions) and B (Rb, register rs), and
// one synchronous write port C (Rc) driven from the write-back stage. A read
// of the register being written in the same cycle returns the value being
// written (when BYPASS = 1), so write-back and decode can share a cycle; a
// single-cycle processor, whose write data depends on its read data, sets
// BYPASS = 0 to avoid a combinational loop. A third read port is
// for inspection only. Synchronous reset clears all registers. The register
// count, the write-through read and the reset are this design's choices.
module register_set #(
  parameter int unsigned DW    = 8,
  parameter int unsigned NREGS = 8,
  parameter bit          BYPASS = 1'b1,
  localparam int unsigned RW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [RW-1:0] ra_addr,
  output logic [DW-1:0] ra_data,
  input  logic [RW-1:0] rb_addr,
  output logic [DW-1:0] rb_data,
  input  logic          rc_we,
  input  logic [RW-1:0] rc_addr,
  input  logic [DW-1:0] rc_data,
  input  logic [RW-1:0] dbg_addr,
  output logic [DW-1:0] dbg_data
);

  logic [DW-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (rc_we) begin
      regs[rc_addr] <= rc_data;
    end
  end

  assign ra_data  = (BYPASS && rc_we && rc_addr == ra_addr) ? rc_data : regs[ra_addr];
  assign rb_data  = (BYPASS && rc_we && rc_addr == rb_addr) ? rc_data : regs[rb_addr];
  assign dbg_data = regs[dbg_addr];

endmodule
