// mic1_regfile: the sixteen registers of the MIC-1.
//
// Registers 0-4 and 10-15 are writable; 5-9 are hardwired to 0x0000,
// 0x0001, 0xFFFF, 0x0FFF (amask) and 0x00FF (smask) and ignore writes.
// Registers 0 (pc) and 2 (sp) are only 12 bits wide, like MAC-1 addresses:
// a write keeps the low 12 bits and a read returns them zero-extended.
//
// Interface: a_sel and b_sel are one-hot selects from the a and b decoders;
// the selected registers appear on a_bus and b_bus (combinational; a
// multiplexer stands in for the tri-state drivers of a bus).  c_sel is the
// one-hot output of the c decoder, already gated by enc and subcycle 4: the
// selected register loads c_bus at that clock edge.  Reset clears the
// writable registers (a choice of this design).
module mic1_regfile
  import mic1_pkg::*;
#(
  parameter int unsigned NREGS = NREG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NREGS-1:0] a_sel,
  input  logic [NREGS-1:0] b_sel,
  input  logic [NREGS-1:0] c_sel,
  input  word_t            c_bus,
  output word_t            a_bus,
  output word_t            b_bus
);
  word_t regs  [NREGS];   // storage; constants and narrow registers below
  word_t rdval [NREGS];   // value each register shows on a bus

  function automatic logic is_const(int unsigned i);
    return i >= int'(R_ZERO) && i <= int'(R_SMASK);
  endfunction

  function automatic logic is_narrow(int unsigned i);
    return i == int'(R_PC) || i == int'(R_SP);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < NREGS; i++) begin
        if (c_sel[i] && !is_const(i))
          regs[i] <= is_narrow(i) ? word_t'(c_bus[MADDR_W-1:0]) : c_bus;
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NREGS; i++) begin
      unique case (regnum_t'(i))
        R_ZERO:   rdval[i] = K_ZERO;
        R_PLUS1:  rdval[i] = K_PLUS1;
        R_MINUS1: rdval[i] = K_MINUS1;
        R_AMASK:  rdval[i] = K_AMASK;
        R_SMASK:  rdval[i] = K_SMASK;
        default:  rdval[i] = regs[i];
      endcase
    end
    a_bus = '0;
    b_bus = '0;
    for (int unsigned i = 0; i < NREGS; i++) begin
      if (a_sel[i]) a_bus |= rdval[i];
      if (b_sel[i]) b_bus |= rdval[i];
    end
  end
endmodule
