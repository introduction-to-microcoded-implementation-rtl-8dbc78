// mic1_pkg: types and constants shared by the MIC-1 microengine and the
// MAC-1 system built on it.
//
// The MIC-1 is a horizontal-ish microengine: 16-bit data words, sixteen
// registers, three internal buses (a and b into the ALU, c back out) and a
// 32-bit microinstruction whose fields drive the datapath directly.  The
// microinstruction layout below (amux, cond, alu, sh, mbr, mar, rd, wr, enc,
// c, b, a, addr from bit 31 down to bit 0) is the classic MIC-1 format; it
// reproduces the documented encoding 0x71A0210A of
// "mar:=sp; mbr:=ac; wr; goto 10".  Register numbers follow the usual MIC-1
// naming (pc, ac, sp, ir, tir, constants, a..f).
package mic1_pkg;

  localparam int unsigned WORD_W    = 16;  // data word and register width
  localparam int unsigned MADDR_W   = 12;  // MAC-1 address width (mar, pc, sp)
  localparam int unsigned NREG      = 16;  // register file size
  localparam int unsigned CS_ADDR_W = 8;   // control store address (addr field)

  typedef logic [WORD_W-1:0]    word_t;
  typedef logic [MADDR_W-1:0]   maddr_t;
  typedef logic [CS_ADDR_W-1:0] csaddr_t;
  typedef logic [3:0]           regnum_t;

  // cond field: when the branch to addr is taken
  typedef enum logic [1:0] {
    COND_NONE   = 2'b00,
    COND_N      = 2'b01,
    COND_Z      = 2'b10,
    COND_ALWAYS = 2'b11
  } cond_e;

  // alu field
  typedef enum logic [1:0] {
    ALU_ADD  = 2'b00,  // a + b
    ALU_AND  = 2'b01,  // a and b
    ALU_PASS = 2'b10,  // a
    ALU_INV  = 2'b11   // not a
  } alu_op_e;

  // sh field
  typedef enum logic [1:0] {
    SH_NONE   = 2'b00,
    SH_RIGHT  = 2'b01,
    SH_LEFT   = 2'b10,
    SH_UNUSED = 2'b11
  } sh_e;

  // One microinstruction, bit 31 first.
  typedef struct packed {
    logic    amux;  // 31     0: A latch, 1: mbr
    cond_e   cond;  // 30-29
    alu_op_e alu;   // 28-27
    sh_e     sh;    // 26-25
    logic    mbr;   // 24     load mbr from shifter
    logic    mar;   // 23     load mar from B latch
    logic    rd;    // 22     memory read
    logic    wr;    // 21     memory write
    logic    enc;   // 20     enable c bus into the register file
    regnum_t c;     // 19-16  destination register
    regnum_t b;     // 15-12  b bus source
    regnum_t a;     // 11-8   a bus source
    csaddr_t addr;  // 7-0    branch target
  } microinstr_t;

  // Register numbers
  localparam regnum_t R_PC    = 4'd0;
  localparam regnum_t R_AC    = 4'd1;
  localparam regnum_t R_SP    = 4'd2;
  localparam regnum_t R_IR    = 4'd3;
  localparam regnum_t R_TIR   = 4'd4;
  localparam regnum_t R_ZERO  = 4'd5;
  localparam regnum_t R_PLUS1 = 4'd6;
  localparam regnum_t R_MINUS1= 4'd7;
  localparam regnum_t R_AMASK = 4'd8;
  localparam regnum_t R_SMASK = 4'd9;
  localparam regnum_t R_A     = 4'd10;
  localparam regnum_t R_B     = 4'd11;
  localparam regnum_t R_C     = 4'd12;
  localparam regnum_t R_D     = 4'd13;
  localparam regnum_t R_E     = 4'd14;
  localparam regnum_t R_F     = 4'd15;

  // Values of the hardwired registers
  localparam word_t K_ZERO   = 16'h0000;
  localparam word_t K_PLUS1  = 16'h0001;
  localparam word_t K_MINUS1 = 16'hFFFF;
  localparam word_t K_AMASK  = 16'h0FFF;
  localparam word_t K_SMASK  = 16'h00FF;

  // Subcycle indices into the one-hot subcycle vector (subcycle 1 is bit 0)
  localparam int unsigned SUB1 = 0;
  localparam int unsigned SUB2 = 1;
  localparam int unsigned SUB3 = 2;
  localparam int unsigned SUB4 = 3;

endpackage
