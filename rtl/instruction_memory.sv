// instruction_memory: program memory on its own bus (Harvard organisation).
//
// DEPTH = 2**AW words of IW bits. The fetch port reads asynchronously, so an
// instruction is available in the same cycle its address is presented (the
// IF stage). A synchronous write port loads programs; the core never writes
// it. Contents are not reset. Size and the load port are this design's
// choices.
module instruction_memory #(
  parameter int unsigned AW = 8,
  parameter int unsigned IW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] rdata
);

  logic [IW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
