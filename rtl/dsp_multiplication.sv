// dsp_multiplication: the multiply half of the FIR / MAC unit.
//
// Combinational: p[k] = x[k] * c[k] for every tap at once, signed, full
// precision (XW + CW bits). One multiplier per tap, all in parallel; the
// parallel arrangement is this design's choice.
module dsp_multiplication #(
  parameter int unsigned NTAPS = 4,
  parameter int unsigned XW    = 8,
  parameter int unsigned CW    = 8
) (
  input  logic signed [XW-1:0]    x [NTAPS],
  input  logic signed [CW-1:0]    c [NTAPS],
  output logic signed [XW+CW-1:0] p [NTAPS]
);

  always_comb begin
    for (int k = 0; k < NTAPS; k++) p[k] = x[k] * c[k];
  end

endmodule
