// fft8: 8-point radix-2 decimation-in-time FFT engine.
//
// Computes X(k) = sum_n x(n) e^{-j 2 pi n k / 8}, scaled by 1/8, on signed
// W-bit complex samples. A `start` pulse (while idle) captures x_re/x_im
// into an 8-entry working store in bit-reversed order. Then one butterfly
// unit runs the 3 stages of 4 butterflies each, one butterfly per clock, in
// place: in stage s (span h = 2**s), butterfly b pairs i = (b >> s)*2h +
// (b mod h) with i + h, using twiddle W8^((b mod h) * 4/h). After the 12th
// butterfly `done` pulses for one cycle and X_re/X_im hold the result until
// the next start. Latency: 13 clock edges from the start edge to `done`.
// The twiddle table is W8^k = cos(2 pi k/8) - j sin(2 pi k/8), k = 0..3, in
// signed Q1.14 (1.0 = 16384, 0.70711 = 11585). The radix-2 DIT algorithm and
// N = 8 follow the original description; the sequential single-butterfly
// schedule, word widths and scaling are this design's choices.
module fft8 #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0] x_re [8],
  input  logic signed [W-1:0] x_im [8],
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] X_re [8],
  output logic signed [W-1:0] X_im [8]
);

  localparam int unsigned N  = 8;
  localparam int unsigned TW = 16;

  // Twiddle ROM, Q1.14.
  localparam logic signed [TW-1:0] TWR [4] = '{16'sd16384, 16'sd11585, 16'sd0,      -16'sd11585};
  localparam logic signed [TW-1:0] TWI [4] = '{16'sd0,     -16'sd11585, -16'sd16384, -16'sd11585};

  function automatic logic [2:0] bitrev3(logic [2:0] v);
    return {v[0], v[1], v[2]};
  endfunction

  logic [1:0] stage;   // 0..2
  logic [1:0] bfly;    // 0..3
  logic [2:0] i_idx, j_idx;
  logic [1:0] k_idx;
  logic signed [W-1:0] bx_re, bx_im, by_re, by_im;

  always_comb begin
    unique case (stage)
      2'd0: begin
        i_idx = {bfly, 1'b0};
        k_idx = 2'd0;
      end
      2'd1: begin
        i_idx = {bfly[1], 1'b0, bfly[0]};
        k_idx = {bfly[0], 1'b0};
      end
      default: begin
        i_idx = {1'b0, bfly};
        k_idx = bfly;
      end
    endcase
    j_idx = i_idx + (3'd1 << stage);
  end

  fft_butterfly #(.W(W), .TW(TW)) u_bfly (
    .a_re(X_re[i_idx]), .a_im(X_im[i_idx]),
    .b_re(X_re[j_idx]), .b_im(X_im[j_idx]),
    .w_re(TWR[k_idx]),  .w_im(TWI[k_idx]),
    .x_re(bx_re), .x_im(bx_im), .y_re(by_re), .y_im(by_im)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= '0;
      bfly  <= '0;
      for (int n = 0; n < N; n++) begin
        X_re[n] <= '0;
        X_im[n] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          for (int n = 0; n < N; n++) begin
            X_re[bitrev3(3'(n))] <= x_re[n];
            X_im[bitrev3(3'(n))] <= x_im[n];
          end
          busy  <= 1'b1;
          stage <= '0;
          bfly  <= '0;
        end
      end else begin
        X_re[i_idx] <= bx_re;
        X_im[i_idx] <= bx_im;
        X_re[j_idx] <= by_re;
        X_im[j_idx] <= by_im;
        bfly <= bfly + 2'd1;
        if (bfly == 2'd3) begin
          stage <= stage + 2'd1;
          if (stage == 2'd2) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
