// tb_mic1_cpu: the MIC-1 chip on its own, with a memory modelled here from
// the bus rules (an access completes at the end of the second consecutive
// microinstruction asserting the same request; read data is the word at the
// address pins).  A short MAC-1 program (LOCO, ADDD, STOD, SUBD, JNZE, CALL,
// PUSH, POP, RETN, HALT, with sp wrapping from 0xFFF to 0) is run and checked: the memory contents it leaves,
// the accumulator, the total number of clock periods (4 per microinstruction)
// and that every read and write request lasted exactly two microinstructions.
module tb_mic1_cpu;
  import mic1_pkg::*;
  logic    clk = 0, rst_n = 0;
  maddr_t  mem_addr;
  word_t   mem_wdata, mem_rdata;
  logic    mem_rd, mem_wr, mem_strobe, mem_ready;
  csaddr_t mpc;

  mic1_cpu dut (.clk, .rst_n, .mem_addr, .mem_wdata, .mem_rd, .mem_wr, .mem_strobe,
                .mem_rdata, .mem_ready, .mpc);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t mem [4096];
  int run_len = 0;     // consecutive microinstructions with the same request
  logic last_rd = 0, last_wr = 0;
  int bad_runs = 0, n_reads = 0, n_writes = 0;

  assign mem_rdata = mem[mem_addr];
  assign mem_ready = (run_len == 1) && ((mem_rd && last_rd) || (mem_wr && last_wr));

  always @(posedge clk) begin
    if (rst_n && mem_strobe) begin
      if (mem_ready) begin
        if (mem_wr) begin mem[mem_addr] <= mem_wdata; n_writes++; end
        else n_reads++;
        run_len <= 0;
      end else if (mem_rd || mem_wr) begin
        run_len <= 1;
      end else begin
        if (run_len == 1) bad_runs++;   // a request that was not held for two
        run_len <= 0;
      end
      last_rd <= mem_rd; last_wr <= mem_wr;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int clocks, expected;
    for (int a = 0; a < 4096; a++) mem[a] = 0;
    mem[0]  = 16'h7007;   // LOCO 7          7 micro
    mem[1]  = 16'h2020;   // ADDD 0x20       9
    mem[2]  = 16'h1021;   // STOD 0x21       8
    mem[3]  = 16'h3022;   // SUBD 0x22      10   ac = 12 - 12 = 0
    mem[4]  = 16'hD000;   // JNZE 0          7   (not taken)
    mem[5]  = 16'hE00A;   // CALL 10         9
    mem[6]  = 16'hF600;   // POP            12
    mem[7]  = 16'h1023;   // STOD 0x23       8
    mem[8]  = 16'hFF00;   // HALT           (reaches address 80 after 9 micro)
    mem[10] = 16'h7099;   // LOCO 0x99       7
    mem[11] = 16'hF400;   // PUSH           12
    mem[12] = 16'hF600;   // POP            12
    mem[13] = 16'hF400;   // PUSH           12
    mem[14] = 16'hF600;   // POP            12
    mem[15] = 16'hF800;   // RETN           12
    mem[16'h20] = 16'd5;
    mem[16'h22] = 16'd12;
    // after RETN sp wraps to 0, so the POP reads word 0 (the LOCO 7 opcode);
    // HALT costs 10 microinstructions until mpc reaches 80
    expected = 4 * (7 + 9 + 8 + 10 + 7 + 9 + 7 + 12 + 12 + 12 + 12 + 12 + 12 + 8 + 10);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    clocks = 0;
    while (mpc != 8'd80) begin @(posedge clk); #1; clocks++; end
    checks++;
    if (clocks != expected) begin failures++; $display("program took %0d clocks, expected %0d", clocks, expected); end
    checks++;
    if (mem[16'h21] !== 16'd12) begin failures++; $display("m[0x21] = %h", mem[16'h21]); end
    checks++;
    if (mem[16'h23] !== 16'h7007) begin failures++; $display("m[0x23] = %h", mem[16'h23]); end
    checks++;
    if (mem[12'hFFF] !== 16'd6) begin failures++; $display("return address = %h", mem[12'hFFF]); end
    checks++;
    if (dut.u_regs.regs[R_AC] !== 16'h7007 || dut.u_regs.regs[R_SP] !== 16'h0001) begin
      failures++; $display("ac=%h sp=%h", dut.u_regs.regs[R_AC], dut.u_regs.regs[R_SP]);
    end
    checks++;
    if (bad_runs != 0 || n_reads == 0 || n_writes == 0) begin
      failures++; $display("bad runs %0d reads %0d writes %0d", bad_runs, n_reads, n_writes);
    end
    // halted: mpc stays at 80
    repeat (40) @(posedge clk);
    checks++;
    if (mpc != 8'd80) begin failures++; $display("left HALT"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
