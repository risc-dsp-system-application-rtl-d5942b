// dsp_coefficients: coefficient bank of the FIR / multiply-accumulate unit.
//
// NTAPS signed coefficients of CW bits (Q1.7 when CW = 8: value / 128). One
// coefficient is written per clock edge through we/waddr/wdata; all are read
// in parallel by the multiplication stage. Synchronous reset clears them.
// The bank itself is one of the three DSP modules of the original block
// diagram; its size, format and write port are this design's choices.
module dsp_coefficients #(
  parameter int unsigned NTAPS = 4,
  parameter int unsigned CW    = 8,
  localparam int unsigned TAW  = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 we,
  input  logic [TAW-1:0]       waddr,
  input  logic signed [CW-1:0] wdata,
  output logic signed [CW-1:0] coef [NTAPS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) coef[k] <= '0;
    end else if (we) begin
      coef[waddr] <= wdata;
    end
  end

endmodule
