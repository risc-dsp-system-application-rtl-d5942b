// tb_fft8: random 8-point complex inputs (and an impulse and a constant);
// the result is compared with the direct DFT X(k)/8 evaluated in real
// arithmetic, within a few LSB. Also checks the latency: done must come
// 13 clock edges after the start edge, with busy high in between.
module tb_fft8;
  localparam int LAT = 13;
  localparam real PI = 3.14159265358979;
  localparam real TOL = 4.0;
  logic clk = 0, rst, start, busy, done;
  logic signed [15:0] x_re [8], x_im [8], X_re [8], X_im [8];
  int checks = 0, failures = 0;

  fft8 dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(int kind);
    int cyc;
    for (int n = 0; n < 8; n++) begin
      case (kind)
        0: begin x_re[n] = (n == 0) ? 16'sd8000 : 16'sd0; x_im[n] = 0; end
        1: begin x_re[n] = 16'sd4000; x_im[n] = -16'sd1000; end
        default: begin
          x_re[n] = 16'($urandom_range(0, 32000)) - 16'sd16000;
          x_im[n] = 16'($urandom_range(0, 32000)) - 16'sd16000;
        end
      endcase
    end
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 1;
    while (!done && cyc < 100) begin
      checks++;
      if (!busy) begin failures++; $display("busy low while computing"); end
      @(posedge clk); #1; cyc++;
    end
    checks++;
    if (cyc != LAT) begin failures++; $display("latency %0d want %0d", cyc, LAT); end
    for (int k = 0; k < 8; k++) begin
      real er, ei;
      er = 0; ei = 0;
      for (int n = 0; n < 8; n++) begin
        real c, s;
        c = $cos(2.0 * PI * n * k / 8.0);
        s = $sin(2.0 * PI * n * k / 8.0);
        er += real'(x_re[n]) * c + real'(x_im[n]) * s;
        ei += real'(x_im[n]) * c - real'(x_re[n]) * s;
      end
      er /= 8.0; ei /= 8.0;
      checks += 2;
      if (real'(X_re[k]) - er > TOL || er - real'(X_re[k]) > TOL) begin failures++; $display("X_re[%0d]=%0d want %f", k, X_re[k], er); end
      if (real'(X_im[k]) - ei > TOL || ei - real'(X_im[k]) > TOL) begin failures++; $display("X_im[%0d]=%0d want %f", k, X_im[k], ei); end
    end
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("done longer than one cycle"); end
  endtask

  initial begin
    rst = 1; start = 0;
    for (int n = 0; n < 8; n++) begin x_re[n] = 0; x_im[n] = 0; end
    @(posedge clk); #1; rst = 0;
    @(posedge clk); #1;
    for (int t = 0; t < 50; t++) run_one(t < 2 ? t : 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
