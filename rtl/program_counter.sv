// program_counter: fetch address register of the RISC core.
//
// Each clock edge the PC moves to the next instruction word (pc + 1), takes
// a jump target when `load` is high, or keeps its value when `hold` is high
// (load-use stall or halt). `load` wins over `hold`. Synchronous active-high
// reset to address 0. The PC counts instruction words, so the increment is 1
// where a byte-addressed 32-bit machine adds 4; the increment and the
// priority of load over hold are this design's choices.
module program_counter #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          hold,
  input  logic          load,
  input  logic [AW-1:0] target,
  output logic [AW-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst)       pc <= '0;
    else if (load) pc <= target;
    else if (!hold) pc <= pc + AW'(1);
  end

endmodule
