// tb_risc_core: self-checking test of the pipelined core.
//
// An instruction-level reference model in this bench executes each program
// one instruction at a time (no pipeline) and predicts the final registers,
// the data memory, the flags and the cycle count. The cycle prediction is
// one instruction per clock, plus one bubble for every taken jump and one
// for every load directly followed by a reader of its destination, plus one
// cycle for the wait instruction to be decoded and stop the core.
// Programs: a directed counting loop using jal / j, and many random
// straight-line programs with forward jumps, loads, stores, FIR and COEF
// operations, ending in wait.
module tb_risc_core;
  import risc_pkg::*;

  logic clk = 0, rst;
  logic prog_we;
  logic [7:0] prog_addr, dbg_mem_addr, dbg_mem_data, dbg_reg_data;
  logic [15:0] prog_data;
  logic [2:0] dbg_reg_addr;
  logic halted, flag_z, flag_c, stat_stall, stat_fwd, stat_jump, stat_retire;
  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd = 0, n_jump = 0;

  risc_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    n_stall += int'(stat_stall);
    n_fwd   += int'(stat_fwd);
    n_jump  += int'(stat_jump);
  end

  // ---------------------------------------------------- reference model
  logic [15:0] prog [256];
  logic [7:0]  m_reg [8];
  logic [7:0]  m_mem [256];
  logic        m_z, m_c;
  int          m_coef [4];
  int          m_hist [4];
  int          m_cycles;

  function automatic logic [7:0] fir_step(int x);
    int e, s;
    e = m_coef[0] * x;
    for (int k = 1; k < 4; k++) e += m_coef[k] * m_hist[k];
    for (int k = 3; k > 1; k--) m_hist[k] = m_hist[k-1];
    m_hist[1] = x;
    s = e >>> 7;
    if (s > 127) s = 127;
    if (s < -128) s = -128;
    return 8'(s);
  endfunction

  task automatic model_run();
    int pc, steps;
    logic [15:0] ins;
    opcode_t op;
    logic [2:0] rd, rs;
    logic [7:0] a, b, imm, y;
    logic [8:0] w;
    logic [15:0] p;
    bit prev_load, flagop;
    logic [2:0] prev_dest;
    pc = 0; steps = 0; prev_load = 0; prev_dest = 0;
    m_cycles = 1;
    forever begin
      ins = prog[pc];
      op = opcode_t'(ins[15:11]); rd = ins[10:8]; rs = ins[7:5]; imm = ins[7:0];
      a = m_reg[rd]; b = m_reg[rs];
      m_cycles++;
      // load-use bubble
      if (prev_load) begin
        bit reads_rd, reads_rs;
        reads_rd = op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_MULT,
                              OP_ADDI, OP_SUBI, OP_SLLI, OP_NOT, OP_MOVR, OP_SB};
        reads_rs = op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_MULT,
                              OP_MOV, OP_LB, OP_SB, OP_COEF, OP_FIR};
        if ((reads_rd && rd == prev_dest) || (reads_rs && rs == prev_dest)) m_cycles++;
      end
      prev_load = (op == OP_LB);
      prev_dest = rd;
      if (op == OP_WAIT) break;
      flagop = 1; y = 0; m_c = m_c;
      case (op)
        OP_ADD, OP_ADDI: begin w = {1'b0, a} + {1'b0, (op == OP_ADD) ? b : imm}; y = w[7:0]; m_c = w[8]; end
        OP_SUB, OP_SUBI: begin w = {1'b0, a} - {1'b0, (op == OP_SUB) ? b : imm}; y = w[7:0]; m_c = w[8]; end
        OP_AND: begin y = a & b; m_c = 0; end
        OP_OR:  begin y = a | b; m_c = 0; end
        OP_XOR: begin y = a ^ b; m_c = 0; end
        OP_NOT: begin y = ~a; m_c = 0; end
        OP_SLL, OP_SLLI: begin
          p = {8'd0, a} << ((op == OP_SLL) ? b[2:0] : imm[2:0]);
          y = p[7:0]; m_c = p[8];
        end
        OP_MULT: begin p = a * b; y = p[7:0]; m_c = (p[15:8] != 0); end
        default: flagop = 0;
      endcase
      if (flagop) begin m_reg[rd] = y; m_z = (y == 0); end
      case (op)
        OP_MOV:  m_reg[rd] = b;
        OP_MOVR: m_reg[rs] = a;
        OP_LB:   m_reg[rd] = m_mem[b];
        OP_SB:   m_mem[a] = b;
        OP_COEF: m_coef[rd[1:0]] = int'(signed'(b));
        OP_FIR:  m_reg[rd] = fir_step(int'(signed'(b)));
        default: ;
      endcase
      if (op == OP_J || (op == OP_JAL && m_z)) begin
        pc = (pc + int'(signed'(imm))) & 255;
        m_cycles++;
      end else begin
        pc = (pc + 1) & 255;
      end
      steps++;
      if (steps > 5000) begin $display("model: program does not end"); break; end
    end
  endtask

  // ------------------------------------------------------------- driver
  task automatic load_and_run(string name);
    int cyc;
    rst = 1;
    for (int a = 0; a < 256; a++) begin
      prog_we = 1; prog_addr = 8'(a); prog_data = prog[a];
      @(posedge clk); #1;
    end
    prog_we = 0;
    @(posedge clk); #1;
    // registers, flags and DSP state reset; memory keeps its contents
    for (int r = 0; r < 8; r++) m_reg[r] = 0;
    for (int a = 0; a < 256; a++) begin
      dbg_mem_addr = 8'(a); #1; m_mem[a] = dbg_mem_data;
    end
    for (int k = 0; k < 4; k++) begin m_coef[k] = 0; m_hist[k] = 0; end
    m_z = 0; m_c = 0;
    model_run();
    rst = 0;
    cyc = 0;
    while (!halted && cyc < 20000) begin
      @(posedge clk); #1; cyc++;
    end
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (cyc != m_cycles) begin failures++; $display("%s: %0d cycles to wait, expected %0d", name, cyc, m_cycles); end
    for (int r = 0; r < 8; r++) begin
      dbg_reg_addr = 3'(r); #1; checks++;
      if (dbg_reg_data !== m_reg[r]) begin failures++; $display("%s: r%0d=%h want %h", name, r, dbg_reg_data, m_reg[r]); end
    end
    for (int a = 0; a < 256; a++) begin
      dbg_mem_addr = 8'(a); #1; checks++;
      if (dbg_mem_data !== m_mem[a]) begin failures++; $display("%s: M[%0d]=%h want %h", name, a, dbg_mem_data, m_mem[a]); end
    end
    checks++;
    if (flag_z !== m_z || flag_c !== m_c) begin failures++; $display("%s: flags z=%b c=%b want %b %b", name, flag_z, flag_c, m_z, m_c); end
  endtask

  function automatic logic [15:0] rand_instr(int pos, int len);
    int sel;
    logic [2:0] rd, rs;
    sel = $urandom % 22;
    rd = 3'($urandom); rs = 3'($urandom);
    case (sel)
      0:  return enc_rr(OP_ADD, rd, rs);
      1:  return enc_rr(OP_SUB, rd, rs);
      2:  return enc_ri(OP_ADDI, rd, 8'($urandom));
      3:  return enc_ri(OP_SUBI, rd, 8'($urandom));
      4:  return enc_rr(OP_AND, rd, rs);
      5:  return enc_rr(OP_OR, rd, rs);
      6:  return enc_rr(OP_XOR, rd, rs);
      7:  return enc_rr(OP_NOT, rd, rs);
      8:  return enc_rr(OP_SLL, rd, rs);
      9:  return enc_ri(OP_SLLI, rd, 8'($urandom % 8));
      10: return enc_rr(OP_MULT, rd, rs);
      11: return enc_rr(OP_MOV, rd, rs);
      12: return enc_rr(OP_MOVR, rd, rs);
      13, 14: return enc_rr(OP_LB, rd, rs);
      15, 16: return enc_rr(OP_SB, rd, rs);
      17: return enc_rr(OP_COEF, rd, rs);
      18: return enc_rr(OP_FIR, rd, rs);
      19: return enc_ri(OP_J, 0, 8'(1 + $urandom % 4));
      20: return enc_ri(OP_JAL, 0, 8'(1 + $urandom % 4));
      default: return enc_rr(OP_NOP, 0, 0);
    endcase
  endfunction

  initial begin
    int len;
    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0; dbg_reg_addr = 0; dbg_mem_addr = 0;
    // ---- directed: r1 counts 5 down to 0, r2 accumulates r1, stores sum
    for (int a = 0; a < 256; a++) prog[a] = enc_ri(OP_WAIT, 0, 0);
    prog[0] = enc_ri(OP_ADDI, 1, 5);        // r1 = 5
    prog[1] = enc_ri(OP_ADDI, 3, 8'h40);    // r3 = 0x40 (address)
    prog[2] = enc_rr(OP_ADD, 2, 1);         // loop: r2 += r1
    prog[3] = enc_ri(OP_SUBI, 1, 1);        // r1 -= 1, sets Z at 0
    prog[4] = enc_ri(OP_JAL, 0, 2);         // if Z goto 6
    prog[5] = enc_ri(OP_J, 0, 8'hFD);       // goto 2
    prog[6] = enc_rr(OP_SB, 3, 2);          // M[r3] = r2
    prog[7] = enc_rr(OP_LB, 4, 3);          // r4 = M[r3]
    prog[8] = enc_rr(OP_ADD, 4, 4);         // r4 += r4 (load-use)
    prog[9] = enc_rr(OP_WAIT, 0, 0);
    load_and_run("loop");
    checks++;
    dbg_reg_addr = 3'd4; #1;
    if (dbg_reg_data !== 8'd30) begin failures++; $display("loop: r4=%0d want 30", dbg_reg_data); end
    // ---- directed: one instruction per cycle, no hazards
    for (int a = 0; a < 256; a++) prog[a] = enc_ri(OP_WAIT, 0, 0);
    for (int a = 0; a < 8; a++) prog[a] = enc_ri(OP_ADDI, 3'(a), 8'(a + 1));
    load_and_run("straight");
    checks++;
    if (m_cycles != 8 + 2) begin failures++; $display("straight-line timing model wrong"); end
    // ---- random programs
    for (int t = 0; t < 150; t++) begin
      len = 10 + $urandom % 60;
      for (int a = 0; a < 256; a++) prog[a] = enc_ri(OP_WAIT, 0, 0);
      for (int a = 0; a < len; a++) prog[a] = rand_instr(a, len);
      load_and_run($sformatf("random%0d", t));
    end
    $display("events: stalls=%0d forwards=%0d taken_jumps=%0d", n_stall, n_fwd, n_jump);
    checks += 3;
    if (n_stall == 0) begin failures++; $display("no load-use stall seen"); end
    if (n_fwd == 0)   begin failures++; $display("no forwarding seen"); end
    if (n_jump == 0)  begin failures++; $display("no taken jump seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
