// dsp_unit: FIR filter / multiply-accumulate unit attached to the ALU stage.
//
// Computes y(n) = sum_{k=0}^{NTAPS-1} c_k * x(n-k). The current sample x is
// tap 0 and is used combinationally; the delay line holds x(n-1) ..
// x(n-NTAPS+1) and shifts when `x_valid` is high at the clock edge, so
// presenting a sample with x_valid gives y(n) in the same cycle and makes it
// history for the next one. Coefficients (signed Q1.7) are loaded through
// the coef_* port. Outputs: the full-precision sum `y_full` (Q.7) and `y`,
// the sum shifted right by CW-1 bits and saturated to DW signed bits, which
// is what the core writes to a register. The chain coefficients ->
// multiplication -> addition follows the original block diagram; the delay
// line, tap count, number format and saturation are this design's choices.
module dsp_unit #(
  parameter int unsigned NTAPS = 4,
  parameter int unsigned DW    = 8,
  parameter int unsigned CW    = 8,
  localparam int unsigned TAW  = (NTAPS > 1) ? $clog2(NTAPS) : 1,
  localparam int unsigned PW   = DW + CW,
  localparam int unsigned YW   = PW + ((NTAPS > 1) ? $clog2(NTAPS) : 0)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 coef_we,
  input  logic [TAW-1:0]       coef_addr,
  input  logic signed [CW-1:0] coef_data,
  input  logic                 x_valid,
  input  logic signed [DW-1:0] x,
  output logic signed [YW-1:0] y_full,
  output logic signed [DW-1:0] y
);

  logic signed [CW-1:0] coef [NTAPS];
  logic signed [DW-1:0] taps [NTAPS];
  logic signed [DW-1:0] hist [NTAPS];  // hist[0] unused; hist[k] = x(n-k)
  logic signed [PW-1:0] prod [NTAPS];
  logic signed [YW-1:0] scaled;

  dsp_coefficients #(.NTAPS(NTAPS), .CW(CW)) u_coef (
    .clk, .rst, .we(coef_we), .waddr(coef_addr), .wdata(coef_data), .coef
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) hist[k] <= '0;
    end else if (x_valid) begin
      hist[0] <= '0;
      for (int k = 1; k < NTAPS; k++) hist[k] <= taps[k-1];
    end
  end

  always_comb begin
    taps[0] = x;
    for (int k = 1; k < NTAPS; k++) taps[k] = hist[k];
  end

  dsp_multiplication #(.NTAPS(NTAPS), .XW(DW), .CW(CW)) u_mul (
    .x(taps), .c(coef), .p(prod)
  );

  dsp_addition #(.NTAPS(NTAPS), .PW(PW)) u_add (
    .p(prod), .y(y_full)
  );

  localparam logic signed [YW-1:0] YMAX = YW'(2**(DW-1) - 1);
  localparam logic signed [YW-1:0] YMIN = -YW'(2**(DW-1));

  always_comb begin
    scaled = y_full >>> (CW - 1);
    if (scaled > YMAX)      y = DW'(YMAX);
    else if (scaled < YMIN) y = DW'(YMIN);
    else                    y = DW'(scaled);
  end

endmodule
