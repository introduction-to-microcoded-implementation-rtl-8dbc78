// tb_mic1_control_store: compares control-store words with encodings worked
// out by hand from the MAC-1 microprogram and the microinstruction format
// (amux 31, cond 30-29, alu 28-27, sh 26-25, mbr 24, mar 23, rd 22, wr 21,
// enc 20, c 19-16, b 15-12, a 11-8, addr 7-0), including the reference
// encoding 0x71A0210A of "mar:=sp; mbr:=ac; wr; goto 10".  Also checks rules
// every word must keep: enc never targets a hardwired register, mbr and rd
// are never set together, every branch target lies inside the program, and
// every unused word branches to 0.
module tb_mic1_control_store;
  import mic1_pkg::*;
  csaddr_t addr;
  microinstr_t data;
  int checks = 0, failures = 0;

  mic1_control_store dut (.addr, .data);

  task automatic expect_word(int a, logic [31:0] w);
    addr = 8'(a); #1;
    checks++;
    if (data !== w) begin failures++; $display("word %0d = %h, expected %h", a, data, w); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_word(0,  32'h10C0_0000);  // mar:=pc; rd
    expect_word(1,  32'h0050_6000);  // pc:=pc+1; rd
    expect_word(2,  32'hB013_001C);  // ir:=mbr; if n then goto 28
    expect_word(3,  32'h2414_3313);  // tir:=lshift(ir+ir); if n then goto 19
    expect_word(17, 32'h981A_0000);  // a:=inv(mbr)
    expect_word(56, 32'h00D2_2600);  // mar:=sp; sp:=sp+1; rd
    expect_word(61, 32'h71A0_210A);  // mar:=sp; mbr:=ac; wr; goto 10
    expect_word(79, 32'h601A_6A4B);  // a:=a+1; goto 75
    expect_word(80, 32'h7000_0050);  // HALT: goto 80
    expect_word(22, 32'h6810_8300);  // pc:=band(ir,amask); goto 0
    expect_word(14, 32'hE011_1000);  // ac:=mbr+ac; goto 0
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1;
      checks++;
      if ((data.enc && data.c >= R_ZERO && data.c <= R_SMASK) ||
          (data.mbr && data.rd) || (data.rd && data.wr) ||
          (data.cond != COND_NONE && data.addr > 8'd80) ||
          (a > 80 && data !== 32'h7000_0000)) begin
        failures++; $display("word %0d = %h breaks a rule", a, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
