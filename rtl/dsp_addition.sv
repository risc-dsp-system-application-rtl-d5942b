// dsp_addition: the accumulate half of the FIR / MAC unit.
//
// Combinational: y = sum of the NTAPS signed products, with log2(NTAPS)
// guard bits so the sum never overflows. The width rule is this design's
// choice.
module dsp_addition #(
  parameter int unsigned NTAPS = 4,
  parameter int unsigned PW    = 16,
  localparam int unsigned YW   = PW + ((NTAPS > 1) ? $clog2(NTAPS) : 0)
) (
  input  logic signed [PW-1:0] p [NTAPS],
  output logic signed [YW-1:0] y
);

  always_comb begin
    y = '0;
    for (int k = 0; k < NTAPS; k++) y = y + YW'(p[k]);
  end

endmodule
