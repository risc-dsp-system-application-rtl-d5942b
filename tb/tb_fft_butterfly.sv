// tb_fft_butterfly: random inputs and all eight-point twiddles; outputs are
// compared with (a +/- W b)/2 computed in real arithmetic, within 1 LSB.
module tb_fft_butterfly;
  logic signed [15:0] a_re, a_im, b_re, b_im, w_re, w_im, x_re, x_im, y_re, y_im;
  int checks = 0, failures = 0;
  logic clk = 0;

  fft_butterfly dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit close(real got, real want);
    return (got - want) <= 1.01 && (want - got) <= 1.01;
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      real wr, wi, tr, ti;
      int k;
      k = i % 8;
      wr = $cos(2.0 * 3.14159265358979 * k / 8.0);
      wi = -$sin(2.0 * 3.14159265358979 * k / 8.0);
      w_re = 16'($rtoi(wr * 16384.0 + (wr >= 0 ? 0.5 : -0.5)));
      w_im = 16'($rtoi(wi * 16384.0 + (wi >= 0 ? 0.5 : -0.5)));
      // |inputs| < 2**15 / sqrt(2) keeps (a +/- W b)/2 inside 16 bits
      a_re = 16'($urandom_range(0, 32000)) - 16'sd16000; a_im = 16'($urandom_range(0, 32000)) - 16'sd16000;
      b_re = 16'($urandom_range(0, 32000)) - 16'sd16000; b_im = 16'($urandom_range(0, 32000)) - 16'sd16000;
      #1;
      tr = (real'(b_re) * real'(w_re) - real'(b_im) * real'(w_im)) / 16384.0;
      ti = (real'(b_re) * real'(w_im) + real'(b_im) * real'(w_re)) / 16384.0;
      checks += 4;
      if (!close(real'(x_re), (real'(a_re) + tr) / 2.0)) begin failures++; $display("x_re %0d want %f", x_re, (real'(a_re) + tr) / 2.0); end
      if (!close(real'(x_im), (real'(a_im) + ti) / 2.0)) begin failures++; $display("x_im %0d", x_im); end
      if (!close(real'(y_re), (real'(a_re) - tr) / 2.0)) begin failures++; $display("y_re %0d", y_re); end
      if (!close(real'(y_im), (real'(a_im) - ti) / 2.0)) begin failures++; $display("y_im %0d", y_im); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
