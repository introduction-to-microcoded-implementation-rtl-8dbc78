// mic1_control_store: read-only control store holding the MAC-1 microprogram.
//
// DEPTH words of 32 bits (256 by default, the reach of the 8-bit addr field),
// read combinationally at addr = mpc; the mir captures the word in
// subcycle 1.  The contents implement the MAC-1 instruction set on the
// MIC-1: addresses 0-1 fetch the instruction at pc into mbr and advance pc,
// 2 copies it to ir, and a binary tree of tests (2-5, 11, 19-20, 25, 28-30,
// 35, 40-41, 46, 50-52, 59, 65-66, 73, 76) shifts the opcode left one bit per
// step through tir and branches on n until one of the 23 instruction
// routines is reached.  Each routine ends with "goto 0".
//
// Microinstructions are written with the constructor mi() below, one field
// per argument, in bit order.  Fields a microinstruction does not use are 0,
// and its alu field is "pass a".  Where one microinstruction both loads mar
// from sp and increments sp (addresses 56, 62, 67), sp travels on the b bus
// (mar's only source) and +1 on the a bus.  Opcode 1111 1111 xxxx xxxx,
// which the decode tree sends to address 80, halts the machine: word 80
// branches to itself.  Unused words 81 and up branch to 0.  The HALT
// address and the filler are choices of this design.
module mic1_control_store
  import mic1_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  csaddr_t     addr,
  output microinstr_t data
);
  localparam regnum_t X = 4'd0;           // unused register field
  localparam csaddr_t BEGIN_A   = 8'd0;   // instruction fetch
  localparam csaddr_t CONTLODL  = 8'd7;
  localparam csaddr_t STOD_A    = 8'd9;
  localparam csaddr_t CONTWR    = 8'd10;
  localparam csaddr_t CONTADDL  = 8'd13;
  localparam csaddr_t SUBD_A    = 8'd15;
  localparam csaddr_t CONTSUBL  = 8'd16;
  localparam csaddr_t CONTJUMPS = 8'd22;
  localparam csaddr_t CONTDESP  = 8'd75;
  localparam csaddr_t HALT_A    = 8'd80;

  function automatic microinstr_t mi(
      logic amux, cond_e cond, alu_op_e alu, sh_e sh,
      logic mbr, logic mar, logic rd, logic wr, logic enc,
      regnum_t c, regnum_t b, regnum_t a, csaddr_t target);
    return '{amux: amux, cond: cond, alu: alu, sh: sh, mbr: mbr, mar: mar,
             rd: rd, wr: wr, enc: enc, c: c, b: b, a: a, addr: target};
  endfunction

  // tir := lshift(tir); if n then goto target
  function automatic microinstr_t tir_shift(csaddr_t target);
    return mi(0, COND_N, ALU_PASS, SH_LEFT, 0, 0, 0, 0, 1, R_TIR, X, R_TIR, target);
  endfunction
  // tir := lshift(ir + ir); if n then goto target
  function automatic microinstr_t ir_shift2(csaddr_t target);
    return mi(0, COND_N, ALU_ADD, SH_LEFT, 0, 0, 0, 0, 1, R_TIR, R_IR, R_IR, target);
  endfunction
  // alu := tir; if n then goto target
  function automatic microinstr_t tir_test(csaddr_t target);
    return mi(0, COND_N, ALU_PASS, SH_NONE, 0, 0, 0, 0, 0, X, X, R_TIR, target);
  endfunction
  // alu := ac; if <cond> then goto target
  function automatic microinstr_t ac_test(cond_e cond, csaddr_t target);
    return mi(0, cond, ALU_PASS, SH_NONE, 0, 0, 0, 0, 0, X, X, R_AC, target);
  endfunction
  // mar := r; rd; [goto target]
  function automatic microinstr_t mar_rd(regnum_t r, cond_e cond, csaddr_t target);
    return mi(0, cond, ALU_PASS, SH_NONE, 0, 1, 1, 0, 0, X, r, X, target);
  endfunction
  // rd (second half of a read)
  function automatic microinstr_t rd_only();
    return mi(0, COND_NONE, ALU_PASS, SH_NONE, 0, 0, 1, 0, 0, X, X, X, 8'd0);
  endfunction
  // goto target
  function automatic microinstr_t jump(csaddr_t target);
    return mi(0, COND_ALWAYS, ALU_PASS, SH_NONE, 0, 0, 0, 0, 0, X, X, X, target);
  endfunction
  // dst := mbr; goto 0
  function automatic microinstr_t from_mbr(regnum_t dst);
    return mi(1, COND_ALWAYS, ALU_PASS, SH_NONE, 0, 0, 0, 0, 1, dst, X, X, BEGIN_A);
  endfunction
  // dst := band(ir, amask); goto 0
  function automatic microinstr_t ir_addr(regnum_t dst);
    return mi(0, COND_ALWAYS, ALU_AND, SH_NONE, 0, 0, 0, 0, 1, dst, R_AMASK, R_IR, BEGIN_A);
  endfunction
  // a := ir + sp
  function automatic microinstr_t local_addr();
    return mi(0, COND_NONE, ALU_ADD, SH_NONE, 0, 0, 0, 0, 1, R_A, R_SP, R_IR, 8'd0);
  endfunction
  // mar := sp; sp := sp + 1; rd
  function automatic microinstr_t pop_rd();
    return mi(0, COND_NONE, ALU_ADD, SH_NONE, 0, 1, 1, 0, 1, R_SP, R_SP, R_PLUS1, 8'd0);
  endfunction
  // sp := sp + (-1)
  function automatic microinstr_t dec_sp(logic rd);
    return mi(0, COND_NONE, ALU_ADD, SH_NONE, 0, 0, rd, 0, 1, R_SP, R_MINUS1, R_SP, 8'd0);
  endfunction
  // a := band(ir, smask)
  function automatic microinstr_t ir_byte();
    return mi(0, COND_NONE, ALU_AND, SH_NONE, 0, 0, 0, 0, 1, R_A, R_SMASK, R_IR, 8'd0);
  endfunction

  function automatic microinstr_t rom(csaddr_t a);
    unique case (a)
      // fetch: mar := pc; rd / pc := pc + 1; rd / ir := mbr; if n ...
      8'd0:  return mar_rd(R_PC, COND_NONE, 8'd0);
      8'd1:  return mi(0, COND_NONE, ALU_ADD, SH_NONE, 0, 0, 1, 0, 1, R_PC, R_PLUS1, R_PC, 8'd0);
      8'd2:  return mi(1, COND_N, ALU_PASS, SH_NONE, 0, 0, 0, 0, 1, R_IR, X, X, 8'd28);
      // opcodes 0xxx
      8'd3:  return ir_shift2(8'd19);
      8'd4:  return tir_shift(8'd11);
      8'd5:  return tir_test(STOD_A);
      8'd6:  return mar_rd(R_IR, COND_NONE, 8'd0);                    // LODD
      8'd7:  return rd_only();
      8'd8:  return from_mbr(R_AC);
      8'd9:  return mi(0, COND_NONE, ALU_PASS, SH_NONE, 1, 1, 0, 1, 0, X, R_IR, R_AC, 8'd0); // STOD
      8'd10: return mi(0, COND_ALWAYS, ALU_PASS, SH_NONE, 0, 0, 0, 1, 0, X, X, X, BEGIN_A);
      8'd11: return tir_test(SUBD_A);
      8'd12: return mar_rd(R_IR, COND_NONE, 8'd0);                    // ADDD
      8'd13: return rd_only();
      8'd14: return mi(1, COND_ALWAYS, ALU_ADD, SH_NONE, 0, 0, 0, 0, 1, R_AC, R_AC, X, BEGIN_A);
      8'd15: return mar_rd(R_IR, COND_NONE, 8'd0);                    // SUBD
      8'd16: return mi(0, COND_NONE, ALU_ADD, SH_NONE, 0, 0, 1, 0, 1, R_AC, R_PLUS1, R_AC, 8'd0);
      8'd17: return mi(1, COND_NONE, ALU_INV, SH_NONE, 0, 0, 0, 0, 1, R_A, X, X, 8'd0);
      8'd18: return mi(0, COND_ALWAYS, ALU_ADD, SH_NONE, 0, 0, 0, 0, 1, R_AC, R_A, R_AC, BEGIN_A);
      8'd19: return tir_shift(8'd25);
      8'd20: return tir_test(8'd23);
      8'd21: return ac_test(COND_N, BEGIN_A);                          // JPOS
      8'd22: return ir_addr(R_PC);
      8'd23: return ac_test(COND_Z, CONTJUMPS);                        // JZER
      8'd24: return jump(BEGIN_A);
      8'd25: return tir_test(8'd27);
      8'd26: return ir_addr(R_PC);                                     // JUMP
      8'd27: return ir_addr(R_AC);                                     // LOCO
      // opcodes 1xxx
      8'd28: return ir_shift2(8'd40);
      8'd29: return tir_shift(8'd35);
      8'd30: return tir_test(8'd33);
      8'd31: return local_addr();                                      // LODL
      8'd32: return mar_rd(R_A, COND_ALWAYS, CONTLODL);
      8'd33: return local_addr();                                      // STOL
      8'd34: return mi(0, COND_ALWAYS, ALU_PASS, SH_NONE, 1, 1, 0, 1, 0, X, R_A, R_AC, CONTWR);
      8'd35: return tir_test(8'd38);
      8'd36: return local_addr();                                      // ADDL
      8'd37: return mar_rd(R_A, COND_ALWAYS, CONTADDL);
      8'd38: return local_addr();                                      // SUBL
      8'd39: return mar_rd(R_A, COND_ALWAYS, CONTSUBL);
      8'd40: return tir_shift(8'd46);
      8'd41: return tir_test(8'd44);
      8'd42: return ac_test(COND_N, CONTJUMPS);                        // JNEG
      8'd43: return jump(BEGIN_A);
      8'd44: return ac_test(COND_Z, BEGIN_A);                          // JNZE
      8'd45: return ir_addr(R_PC);
      8'd46: return tir_shift(8'd50);
      8'd47: return dec_sp(1'b0);                                      // CALL
      8'd48: return mi(0, COND_NONE, ALU_PASS, SH_NONE, 1, 1, 0, 1, 0, X, R_SP, R_PC, 8'd0);
      8'd49: return mi(0, COND_ALWAYS, ALU_AND, SH_NONE, 0, 0, 0, 1, 1, R_PC, R_AMASK, R_IR, BEGIN_A);
      // opcodes 1111 xxxx
      8'd50: return tir_shift(8'd65);
      8'd51: return tir_shift(8'd59);
      8'd52: return tir_test(8'd56);
      8'd53: return mar_rd(R_AC, COND_NONE, 8'd0);                    // PSHI
      8'd54: return dec_sp(1'b1);
      8'd55: return mi(0, COND_ALWAYS, ALU_PASS, SH_NONE, 0, 1, 0, 1, 0, X, R_SP, X, CONTWR);
      8'd56: return pop_rd();                                          // POPI
      8'd57: return rd_only();
      8'd58: return mi(0, COND_ALWAYS, ALU_PASS, SH_NONE, 0, 1, 0, 1, 0, X, R_AC, X, CONTWR);
      8'd59: return tir_test(8'd62);
      8'd60: return dec_sp(1'b0);                                      // PUSH
      8'd61: return mi(0, COND_ALWAYS, ALU_PASS, SH_NONE, 1, 1, 0, 1, 0, X, R_SP, R_AC, CONTWR);
      8'd62: return pop_rd();                                          // POP
      8'd63: return rd_only();
      8'd64: return from_mbr(R_AC);
      8'd65: return tir_shift(8'd73);
      8'd66: return tir_test(8'd70);
      8'd67: return pop_rd();                                          // RETN
      8'd68: return rd_only();
      8'd69: return from_mbr(R_PC);
      8'd70: return mi(0, COND_NONE, ALU_PASS, SH_NONE, 0, 0, 0, 0, 1, R_A, X, R_AC, 8'd0);   // SWAP
      8'd71: return mi(0, COND_NONE, ALU_PASS, SH_NONE, 0, 0, 0, 0, 1, R_AC, X, R_SP, 8'd0);
      8'd72: return mi(0, COND_ALWAYS, ALU_PASS, SH_NONE, 0, 0, 0, 0, 1, R_SP, X, R_A, BEGIN_A);
      8'd73: return tir_shift(8'd76);
      8'd74: return ir_byte();                                         // INSP
      8'd75: return mi(0, COND_ALWAYS, ALU_ADD, SH_NONE, 0, 0, 0, 0, 1, R_SP, R_A, R_SP, BEGIN_A);
      8'd76: return tir_test(HALT_A);
      8'd77: return ir_byte();                                         // DESP
      8'd78: return mi(0, COND_NONE, ALU_INV, SH_NONE, 0, 0, 0, 0, 1, R_A, X, R_A, 8'd0);
      8'd79: return mi(0, COND_ALWAYS, ALU_ADD, SH_NONE, 0, 0, 0, 0, 1, R_A, R_PLUS1, R_A, CONTDESP);
      8'd80: return jump(HALT_A);                                      // HALT
      default: return jump(BEGIN_A);
    endcase
  endfunction

  always_comb data = (int'(addr) < int'(DEPTH)) ? rom(addr) : jump(BEGIN_A);
endmodule
