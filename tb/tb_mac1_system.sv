// tb_mac1_system: end-to-end test of the MAC-1 computer at its default size
// (4096-word memory, 256-word control store).
//
// A reference model of the MAC-1 instruction set, written here from the
// instruction table, runs in lock step with the design: each time the
// microengine returns to the fetch microinstruction (mpc = 0), the model
// executes one instruction and pc, ac and sp are compared, together with the
// number of clock periods the instruction took (4 per microinstruction, with
// the microinstruction count of each instruction's path through the
// microprogram).  At a HALT the whole memory is compared.
//
// Phase 1 runs a directed program that uses every instruction and takes and
// skips every conditional jump.  Phase 2 resets the machine and runs random
// memory contents (random instructions and data, including unassigned
// encodings in the 1111 group, which the decoder maps onto neighbouring
// instructions) for a fixed number of instructions.  At the end every
// mechanism (each instruction, both outcomes of each conditional jump,
// memory reads and writes, a halt, stack wrap-around) must have occurred.
module tb_mac1_system;
  import mic1_pkg::*;

  logic    clk = 0, rst_n = 0;
  maddr_t  bus_addr;
  word_t   bus_wdata;
  logic    bus_rd, bus_wr, bus_strobe;
  csaddr_t mpc;

  mac1_system dut (.clk, .rst_n, .bus_addr, .bus_wdata, .bus_rd, .bus_wr, .bus_strobe, .mpc);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- reference model ----------------
  word_t       m_mem [4096];
  logic [11:0] m_pc, m_sp;
  word_t       m_ac;

  typedef enum int {
    I_LODD, I_STOD, I_ADDD, I_SUBD, I_JPOS, I_JZER, I_JUMP, I_LOCO,
    I_LODL, I_STOL, I_ADDL, I_SUBL, I_JNEG, I_JNZE, I_CALL,
    I_PSHI, I_POPI, I_PUSH, I_POP, I_RETN, I_SWAP, I_INSP, I_DESP, I_HALT,
    I_COUNT
  } instr_e;

  int n_instr [I_COUNT];
  int n_taken [4], n_skipped [4];   // JPOS, JZER, JNEG, JNZE
  int n_mem_rd = 0, n_mem_wr = 0, n_sp_wrap = 0;

  function automatic instr_e decode(word_t w);
    if (w[15:12] != 4'hF) return instr_e'(int'(w[15:12]));
    case (w[11:9])
      3'b000: return I_PSHI;
      3'b001: return I_POPI;
      3'b010: return I_PUSH;
      3'b011: return I_POP;
      3'b100: return I_RETN;
      3'b101: return I_SWAP;
      3'b110: return I_INSP;
      default: return w[8] ? I_HALT : I_DESP;
    endcase
  endfunction

  // Microinstructions on each instruction's path, fetch included
  function automatic int micro_count(instr_e i, word_t ac);
    case (i)
      I_LODD: return 9;   I_STOD: return 8;   I_ADDD: return 9;   I_SUBD: return 10;
      I_JPOS: return ac[15] ? 7 : 8;
      I_JZER: return 8;   I_JUMP: return 7;   I_LOCO: return 7;
      I_LODL: return 10;  I_STOL: return 9;   I_ADDL: return 10;  I_SUBL: return 11;
      I_JNEG: return 8;
      I_JNZE: return (ac == 0) ? 7 : 8;
      I_CALL: return 9;
      I_PSHI: return 13;  I_POPI: return 13;  I_PUSH: return 12;  I_POP: return 12;
      I_RETN: return 12;  I_SWAP: return 12;  I_INSP: return 11;  I_DESP: return 14;
      default: return 0;
    endcase
  endfunction

  // Execute one instruction in the model; returns its decoded kind
  function automatic instr_e model_step(output int micro);
    word_t       ir = m_mem[m_pc];
    logic [11:0] x  = ir[11:0];
    logic [11:0] la = 12'(m_sp + x);
    logic [7:0]  y  = ir[7:0];
    instr_e      i  = decode(ir);
    micro = micro_count(i, m_ac);
    if (i == I_HALT) return i;
    m_pc = m_pc + 12'd1;
    case (i)
      I_LODD: m_ac = m_mem[x];
      I_STOD: m_mem[x] = m_ac;
      I_ADDD: m_ac = m_ac + m_mem[x];
      I_SUBD: m_ac = m_ac - m_mem[x];
      I_JPOS: begin if (!m_ac[15]) begin m_pc = x; n_taken[0]++; end else n_skipped[0]++; end
      I_JZER: begin if (m_ac == 0) begin m_pc = x; n_taken[1]++; end else n_skipped[1]++; end
      I_JUMP: m_pc = x;
      I_LOCO: m_ac = {4'h0, x};
      I_LODL: m_ac = m_mem[la];
      I_STOL: m_mem[la] = m_ac;
      I_ADDL: m_ac = m_ac + m_mem[la];
      I_SUBL: m_ac = m_ac - m_mem[la];
      I_JNEG: begin if (m_ac[15]) begin m_pc = x; n_taken[2]++; end else n_skipped[2]++; end
      I_JNZE: begin if (m_ac != 0) begin m_pc = x; n_taken[3]++; end else n_skipped[3]++; end
      I_CALL: begin m_sp = m_sp - 12'd1; m_mem[m_sp] = {4'h0, m_pc}; m_pc = x; end
      I_PSHI: begin m_sp = m_sp - 12'd1; m_mem[m_sp] = m_mem[m_ac[11:0]]; end
      I_POPI: begin m_mem[m_ac[11:0]] = m_mem[m_sp]; m_sp = m_sp + 12'd1; end
      I_PUSH: begin m_sp = m_sp - 12'd1; m_mem[m_sp] = m_ac; end
      I_POP:  begin m_ac = m_mem[m_sp]; m_sp = m_sp + 12'd1; end
      I_RETN: begin m_pc = m_mem[m_sp][11:0]; m_sp = m_sp + 12'd1; end
      I_SWAP: begin word_t t = m_ac; m_ac = {4'h0, m_sp}; m_sp = t[11:0]; end
      I_INSP: begin if (int'(m_sp) + int'(y) > 4095) n_sp_wrap++; m_sp = m_sp + 12'(y); end
      I_DESP: begin if (int'(m_sp) < int'(y)) n_sp_wrap++; m_sp = m_sp - 12'(y); end
      default: ;
    endcase
    return i;
  endfunction

  // ---------------- program images ----------------
  function automatic word_t op(int opc, int arg);
    return word_t'((opc << 12) | (arg & 12'hFFF));
  endfunction
  localparam word_t W_PSHI = 16'hF000, W_POPI = 16'hF200, W_PUSH = 16'hF400,
                    W_POP = 16'hF600, W_RETN = 16'hF800, W_SWAP = 16'hFA00,
                    W_HALT = 16'hFF00;
  function automatic word_t insp(int y); return 16'hFC00 | word_t'(y & 8'hFF); endfunction
  function automatic word_t desp(int y); return 16'hFE00 | word_t'(y & 8'hFF); endfunction

  task automatic load_directed();
    word_t p [64];
    for (int a = 0; a < 4096; a++) m_mem[a] = 16'h0000;
    p[0]  = op(7, 12'h123);   // LOCO 0x123
    p[1]  = op(1, 12'h100);   // STOD 0x100
    p[2]  = op(0, 12'h101);   // LODD 0x101
    p[3]  = op(2, 12'h100);   // ADDD 0x100
    p[4]  = op(3, 12'h102);   // SUBD 0x102
    p[5]  = op(4, 7);         // JPOS 7      (taken)
    p[6]  = op(7, 12'hBAD);
    p[7]  = op(5, 6);         // JZER 6      (not taken)
    p[8]  = op(13, 10);       // JNZE 10     (taken)
    p[9]  = op(7, 12'hBAD);
    p[10] = op(12, 9);        // JNEG 9      (not taken)
    p[11] = op(7, 0);         // LOCO 0
    p[12] = op(13, 9);        // JNZE 9      (not taken)
    p[13] = op(5, 15);        // JZER 15     (taken)
    p[14] = op(7, 12'hBAD);
    p[15] = op(0, 12'h103);   // LODD 0x103  (0x8000)
    p[16] = op(4, 9);         // JPOS 9      (not taken)
    p[17] = op(12, 19);       // JNEG 19     (taken)
    p[18] = op(7, 12'hBAD);
    p[19] = op(6, 21);        // JUMP 21
    p[20] = op(7, 12'hBAD);
    p[21] = desp(3);          // DESP 3      sp: 0 -> 0xFFD (wraps)
    p[22] = op(7, 12'h055);   // LOCO 0x55
    p[23] = op(9, 1);         // STOL 1
    p[24] = op(7, 12'h011);   // LOCO 0x11
    p[25] = op(10, 1);        // ADDL 1
    p[26] = op(11, 1);        // SUBL 1
    p[27] = op(8, 1);         // LODL 1
    p[28] = W_PUSH;
    p[29] = op(7, 12'h104);   // LOCO 0x104
    p[30] = W_PSHI;
    p[31] = op(7, 12'h105);   // LOCO 0x105
    p[32] = W_POPI;
    p[33] = W_POP;
    p[34] = op(14, 40);       // CALL 40
    p[35] = W_SWAP;
    p[36] = insp(2);          // INSP 2
    p[37] = op(1, 12'h106);   // STOD 0x106
    p[38] = W_HALT;
    p[39] = op(7, 12'hBAD);
    p[40] = op(7, 12'h077);   // LOCO 0x77
    p[41] = op(1, 12'h107);   // STOD 0x107
    p[42] = W_RETN;
    for (int a = 0; a < 43; a++) m_mem[a] = p[a];
    m_mem[12'h101] = 16'h0F00;
    m_mem[12'h102] = 16'h0023;
    m_mem[12'h103] = 16'h8000;
    m_mem[12'h104] = 16'h4242;
  endtask

  task automatic load_random();
    for (int a = 0; a < 4096; a++) begin
      word_t w = word_t'($urandom);
      if (w[15:8] == 8'hFF) w[8] = 1'b0;        // keep HALT out of the random image
      m_mem[a] = w;
    end
  endtask

  // ---------------- run the machine against the model ----------------
  int clk_count = 0;
  always @(posedge clk) clk_count++;

  task automatic run(int max_instr, bit expect_halt);
    int last_clk, micro, done;
    instr_e kind;
    for (int a = 0; a < 4096; a++) dut.u_mem.mem[a] = m_mem[a];
    m_pc = 0; m_sp = 0; m_ac = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    last_clk = clk_count;
    done = 0;
    while (done < max_instr) begin
      @(posedge clk);
      if (!bus_strobe) continue;
      if (bus_rd && dut.mem_ready) n_mem_rd++;
      if (bus_wr && dut.mem_ready) n_mem_wr++;
      #1;
      if (mpc == 8'd0 || mpc == 8'd80) begin
        if (mpc == 8'd80) begin
          kind = model_step(micro);
          checks++;
          if (kind != I_HALT) begin failures++; $display("halted at pc %h, model runs %0d", m_pc, kind); end
          n_instr[I_HALT]++;
          break;
        end
        kind = model_step(micro);
        n_instr[kind]++;
        done++;
        checks++;
        if (dut.u_cpu.u_regs.regs[R_PC] !== {4'h0, m_pc} ||
            dut.u_cpu.u_regs.regs[R_AC] !== m_ac ||
            dut.u_cpu.u_regs.regs[R_SP] !== {4'h0, m_sp}) begin
          failures++;
          $display("instr %0d (%s): pc=%h ac=%h sp=%h, model pc=%h ac=%h sp=%h", done, kind.name(),
                   dut.u_cpu.u_regs.regs[R_PC], dut.u_cpu.u_regs.regs[R_AC],
                   dut.u_cpu.u_regs.regs[R_SP], m_pc, m_ac, m_sp);
        end
        checks++;
        if (clk_count - last_clk != 4 * micro) begin
          failures++;
          $display("instr %0d (%s): %0d clocks, expected %0d", done, kind.name(),
                   clk_count - last_clk, 4 * micro);
        end
        last_clk = clk_count;
      end
    end
    checks++;
    if (expect_halt != (mpc == 8'd80)) begin failures++; $display("halt expected=%0b mpc=%0d", expect_halt, mpc); end
    for (int a = 0; a < 4096; a++) begin
      if (dut.u_mem.mem[a] !== m_mem[a]) begin
        checks++; failures++;
        $display("mem[%h] = %h, model %h", a, dut.u_mem.mem[a], m_mem[a]);
      end
    end
    checks++;
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < I_COUNT; i++) n_instr[i] = 0;
    for (int i = 0; i < 4; i++) begin n_taken[i] = 0; n_skipped[i] = 0; end
    load_directed();
    run(1000, 1'b1);
    checks++;
    if (m_mem[12'h106] !== 16'h0FFD || m_mem[12'h105] !== 16'h4242 || m_ac !== 16'h0FFD) begin
      failures++; $display("directed program: wrong results");
    end
    for (int r = 0; r < 8; r++) begin
      load_random();
      run(2000, 1'b0);
    end
    for (int i = 0; i < I_COUNT; i++) begin
      checks++;
      if (n_instr[i] == 0) begin failures++; $display("%s never executed", instr_e'(i)); end
    end
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (n_taken[j] == 0 || n_skipped[j] == 0) begin
        failures++; $display("conditional jump %0d: taken %0d skipped %0d", j, n_taken[j], n_skipped[j]);
      end
    end
    checks++;
    if (n_mem_rd == 0 || n_mem_wr == 0 || n_sp_wrap == 0) begin
      failures++; $display("reads %0d writes %0d sp wraps %0d", n_mem_rd, n_mem_wr, n_sp_wrap);
    end
    $display("instructions:");
    for (int i = 0; i < I_COUNT; i++) $display("  %-5s %0d", instr_e'(i), n_instr[i]);
    $display("jumps taken/skipped: JPOS %0d/%0d JZER %0d/%0d JNEG %0d/%0d JNZE %0d/%0d",
             n_taken[0], n_skipped[0], n_taken[1], n_skipped[1], n_taken[2], n_skipped[2],
             n_taken[3], n_skipped[3]);
    $display("memory reads %0d writes %0d, sp wrap-arounds %0d", n_mem_rd, n_mem_wr, n_sp_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
