// alu: arithmetic and logic unit of the RISC core (EX stage).
//
// Purely combinational. Functions: add, subtract, and, or, xor, not (of A),
// shift A left by B[2:0], unsigned multiply (low byte of A*B), pass A, pass
// B. Flags: `zero` when the result is 0; `carry` is the carry out of add,
// the borrow of subtract, the last bit shifted out of a shift, and "high
// byte non-zero" for multiply (0 for the other functions). The function list
// follows the original description; the flag definitions are this design's.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  alu_op_t       op,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] y,
  output logic          zero,
  output logic          carry
);

  localparam int unsigned SW = $clog2(DW);

  logic [DW:0]     sum;
  logic [2*DW-1:0] prod;
  logic [2*DW-1:0] shl;

  always_comb begin
    sum   = '0;
    prod  = a * b;
    shl   = {{DW{1'b0}}, a} << b[SW-1:0];
    carry = 1'b0;
    unique case (op)
      ALU_ADD: begin
        sum   = {1'b0, a} + {1'b0, b};
        y     = sum[DW-1:0];
        carry = sum[DW];
      end
      ALU_SUB: begin
        sum   = {1'b0, a} - {1'b0, b};
        y     = sum[DW-1:0];
        carry = sum[DW];
      end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOT:   y = ~a;
      ALU_SLL: begin
        y     = shl[DW-1:0];
        carry = shl[DW];
      end
      ALU_MUL: begin
        y     = prod[DW-1:0];
        carry = |prod[2*DW-1:DW];
      end
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
    zero = (y == '0);
  end

endmodule
