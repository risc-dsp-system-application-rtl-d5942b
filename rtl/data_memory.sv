// data_memory: data memory of the RISC core, reached only by lb and sb.
//
// 2**AW bytes. When `we` is 1 the byte on `wdata` is written at `addr` on the
// rising clock edge; otherwise the memory is read, asynchronously, so a load
// completes within the MEM stage. The address is the ALU result of the
// load or store. A second read port is for inspection only. Contents are not
// reset. The write-on-we rule follows the original description; the size,
// the asynchronous read and the inspection port are this design's choices.
module data_memory #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  input  logic [AW-1:0] dbg_addr,
  output logic [DW-1:0] dbg_data
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata    = mem[addr];
  assign dbg_data = mem[dbg_addr];

endmodule
