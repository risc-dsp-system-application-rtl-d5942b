// tb_risc_dsp_top: end-to-end test of the whole system at its default
// parameters.
//
// The core runs a filtering program: it loads four Q1.7 coefficients with
// COEF, generates 16 samples (x <- 5x + 3 mod 256), passes each through the
// FIR unit, stores y(n) to the data memory at 0x80.., reads it back and
// accumulates a checksum (a load-use stall every iteration), counts down
// with subi / jal / j, stores the checksum at 0x7F and executes wait. The
// bench computes the samples, the filter outputs (with saturation) and the
// checksum itself and compares them with the data memory, and checks the
// cycle count (one per instruction, plus one per taken jump and per
// load-use stall). Meanwhile the FFT engine transforms four sets of
// samples, compared with the direct DFT / 8. Each mechanism is counted and
// must occur: stall, forwarding, taken jump, untaken conditional jump,
// FIR operation, saturation, halt, FFT completion. The single-cycle core
// runs the same program at the same time and must produce the same memory
// contents in exactly one cycle per instruction.
module tb_risc_dsp_top;
  import risc_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int NSAMP = 16;

  logic clk = 0, rst;
  logic prog_we;
  logic [7:0] prog_addr, dbg_mem_addr, dbg_mem_data, dbg_reg_data;
  logic [15:0] prog_data;
  logic [2:0] dbg_reg_addr;
  logic halted, flag_z, flag_c, stat_stall, stat_fwd, stat_jump, stat_retire;
  logic sc_prog_we, sc_halted, sc_flag_z, sc_flag_c, sc_stat_retire;
  logic [7:0] sc_prog_addr, sc_dbg_mem_addr, sc_dbg_mem_data, sc_dbg_reg_data;
  logic [15:0] sc_prog_data;
  logic [2:0] sc_dbg_reg_addr;
  int sc_cycles = 0, sc_retire = 0;
  logic fft_start, fft_busy, fft_done;
  logic signed [15:0] fft_x_re [8], fft_x_im [8], fft_X_re [8], fft_X_im [8];

  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd = 0, n_jump = 0, n_retire = 0, n_fft = 0, n_sat = 0, n_halt = 0;
  int cycles = 0;
  bit core_running = 0;

  risc_dsp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    n_stall  += int'(stat_stall);
    n_fwd    += int'(stat_fwd);
    n_jump   += int'(stat_jump);
    n_retire += int'(stat_retire);
    sc_retire += int'(sc_stat_retire);
  end

  logic [15:0] prog [256];

  task automatic fft_run(int t);
    for (int n = 0; n < 8; n++) begin
      fft_x_re[n] = 16'($urandom_range(0, 32000)) - 16'sd16000;
      fft_x_im[n] = (t == 0) ? 16'sd0 : 16'($urandom_range(0, 32000)) - 16'sd16000;
    end
    fft_start = 1;
    @(posedge clk); #1;
    fft_start = 0;
    while (!fft_done) begin @(posedge clk); #1; end
    n_fft++;
    for (int k = 0; k < 8; k++) begin
      real er, ei;
      er = 0; ei = 0;
      for (int n = 0; n < 8; n++) begin
        er += (real'(fft_x_re[n]) * $cos(2.0*PI*n*k/8.0) + real'(fft_x_im[n]) * $sin(2.0*PI*n*k/8.0)) / 8.0;
        ei += (real'(fft_x_im[n]) * $cos(2.0*PI*n*k/8.0) - real'(fft_x_re[n]) * $sin(2.0*PI*n*k/8.0)) / 8.0;
      end
      checks += 2;
      if (real'(fft_X_re[k]) - er > 4.0 || er - real'(fft_X_re[k]) > 4.0) begin failures++; $display("FFT X_re[%0d]=%0d want %f", k, fft_X_re[k], er); end
      if (real'(fft_X_im[k]) - ei > 4.0 || ei - real'(fft_X_im[k]) > 4.0) begin failures++; $display("FFT X_im[%0d]=%0d want %f", k, fft_X_im[k], ei); end
    end
  endtask

  initial begin
    int c [4];
    int h [4];
    logic [7:0] x, ysat, sum;
    int e, s;
    int exp_cycles;

    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0; dbg_reg_addr = 0; dbg_mem_addr = 0;
    sc_prog_we = 0; sc_prog_addr = 0; sc_prog_data = 0; sc_dbg_reg_addr = 0; sc_dbg_mem_addr = 0;
    fft_start = 0;
    for (int n = 0; n < 8; n++) begin fft_x_re[n] = 0; fft_x_im[n] = 0; end

    // ------------------------------------------------------ the program
    for (int a = 0; a < 256; a++) prog[a] = enc_ri(OP_WAIT, 0, 0);
    prog[0]  = enc_ri(OP_ADDI, 1, 8'h40);   // c0 = 0.5
    prog[1]  = enc_rr(OP_COEF, 0, 1);
    prog[2]  = enc_ri(OP_ADDI, 2, 8'h20);   // c1 = 0.25
    prog[3]  = enc_rr(OP_COEF, 1, 2);
    prog[4]  = enc_ri(OP_SUBI, 3, 8'h30);   // c2 = -0.375
    prog[5]  = enc_rr(OP_COEF, 2, 3);
    prog[6]  = enc_ri(OP_ADDI, 4, 8'h7F);   // c3 = 0.992
    prog[7]  = enc_rr(OP_COEF, 3, 4);
    prog[8]  = enc_ri(OP_ADDI, 0, 8'(NSAMP)); // r0 = sample count
    prog[9]  = enc_ri(OP_ADDI, 7, 8'h80);   // r7 = output pointer
    prog[10] = enc_ri(OP_ADDI, 5, 8'd7);    // r5 = x seed
    prog[11] = enc_rr(OP_XOR, 1, 1);        // r1 = 0
    prog[12] = enc_ri(OP_ADDI, 1, 8'd5);    // r1 = 5
    prog[13] = enc_rr(OP_XOR, 3, 3);        // r3 = checksum = 0
    prog[14] = enc_rr(OP_MULT, 5, 1);       // loop: x = 5x
    prog[15] = enc_ri(OP_ADDI, 5, 8'd3);    //       x += 3
    prog[16] = enc_rr(OP_FIR, 6, 5);        //       r6 = y(n), x(n) = r5
    prog[17] = enc_rr(OP_SB, 7, 6);         //       M[r7] = r6
    prog[18] = enc_rr(OP_LB, 4, 7);         //       r4 = M[r7]
    prog[19] = enc_rr(OP_ADD, 3, 4);        //       r3 += r4 (load-use)
    prog[20] = enc_ri(OP_ADDI, 7, 8'd1);    //       r7++
    prog[21] = enc_ri(OP_SUBI, 0, 8'd1);    //       r0--
    prog[22] = enc_ri(OP_JAL, 0, 8'd2);     //       if Z goto 24
    prog[23] = enc_ri(OP_J, 0, 8'(-9));     //       goto 14
    prog[24] = enc_rr(OP_XOR, 2, 2);
    prog[25] = enc_ri(OP_ADDI, 2, 8'h7F);
    prog[26] = enc_rr(OP_SB, 2, 3);         // M[0x7F] = checksum
    prog[27] = enc_ri(OP_WAIT, 0, 0);
    // 14 + 15*10 + 9 + 4 instructions up to and including wait, 16 taken
    // jumps, 16 load-use stalls, one cycle to decode wait
    exp_cycles = 1 + (14 + 15 * 10 + 9 + 4) + NSAMP + NSAMP;

    for (int a = 0; a < 256; a++) begin
      prog_we = 1; prog_addr = 8'(a); prog_data = prog[a];
      sc_prog_we = 1; sc_prog_addr = 8'(a); sc_prog_data = prog[a];
      @(posedge clk); #1;
    end
    prog_we = 0; sc_prog_we = 0;
    @(posedge clk); #1;
    rst = 0;

    fork
      begin
        while (!halted) begin @(posedge clk); #1; cycles++; end
        n_halt++;
        repeat (4) @(posedge clk);
        #1;
      end
      begin
        while (!sc_halted) begin @(posedge clk); #1; sc_cycles++; end
      end
      begin
        for (int t = 0; t < 4; t++) fft_run(t);
      end
    join

    // ------------------------------------------- reference computation
    c[0] = 64; c[1] = 32; c[2] = -48; c[3] = 127;
    for (int k = 0; k < 4; k++) h[k] = 0;
    x = 8'd7; sum = 0;
    for (int i = 0; i < NSAMP; i++) begin
      x = 8'(x * 5 + 3);
      e = c[0] * int'(signed'(x));
      for (int k = 1; k < 4; k++) e += c[k] * h[k];
      for (int k = 3; k > 1; k--) h[k] = h[k-1];
      h[1] = int'(signed'(x));
      s = e >>> 7;
      if (s > 127)  begin s = 127;  n_sat++; end
      if (s < -128) begin s = -128; n_sat++; end
      ysat = 8'(s);
      sum = sum + ysat;
      dbg_mem_addr = 8'(8'h80 + i); #1;
      checks++;
      if (dbg_mem_data !== ysat) begin failures++; $display("y(%0d)=%0d want %0d", i, signed'(dbg_mem_data), signed'(ysat)); end
      sc_dbg_mem_addr = 8'(8'h80 + i); #1;
      checks++;
      if (sc_dbg_mem_data !== ysat) begin failures++; $display("single-cycle y(%0d)=%0d want %0d", i, signed'(sc_dbg_mem_data), signed'(ysat)); end
    end
    sc_dbg_mem_addr = 8'h7F; #1;
    checks++;
    if (sc_dbg_mem_data !== sum) begin failures++; $display("single-cycle checksum %h want %h", sc_dbg_mem_data, sum); end
    checks++;
    if (sc_cycles != 14 + 15 * 10 + 9 + 4) begin failures++; $display("single-cycle program took %0d cycles", sc_cycles); end
    dbg_mem_addr = 8'h7F; #1;
    checks++;
    if (dbg_mem_data !== sum) begin failures++; $display("checksum %h want %h", dbg_mem_data, sum); end
    dbg_reg_addr = 3'd0; #1;
    checks++;
    if (dbg_reg_data !== 8'd0) begin failures++; $display("r0=%0d want 0", dbg_reg_data); end
    checks++;
    if (cycles != exp_cycles) begin failures++; $display("program took %0d cycles, expected %0d", cycles, exp_cycles); end
    checks++;
    if (n_jump != NSAMP) begin failures++; $display("taken jumps %0d want %0d", n_jump, NSAMP); end

    $display("events: stalls=%0d forwards=%0d taken_jumps=%0d untaken_jal=%0d fir_ops=%0d saturations=%0d halts=%0d ffts=%0d retired=%0d cycles=%0d single_cycle_cycles=%0d",
             n_stall, n_fwd, n_jump, NSAMP - 1, NSAMP, n_sat, n_halt, n_fft, n_retire, cycles, sc_cycles);
    checks += 6;
    if (n_stall != NSAMP) begin failures++; $display("stalls %0d want %0d", n_stall, NSAMP); end
    if (n_fwd == 0)   begin failures++; $display("no forwarding"); end
    if (n_sat == 0)   begin failures++; $display("no saturation"); end
    if (n_halt == 0)  begin failures++; $display("no halt"); end
    if (n_fft == 0)   begin failures++; $display("no FFT"); end
    if (n_retire == 0) begin failures++; $display("nothing retired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
