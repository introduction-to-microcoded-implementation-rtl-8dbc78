// mic1_shifter: one-bit shifter after the ALU.
//
// sh 00: pass, 01: shift right one bit, 10: shift left one bit.  Both
// shifts bring in a 0 and code 11, which the format leaves unused, passes the
// word unchanged (both choices of this design).  Its output is the c bus,
// which goes to the register file and to mbr.  The ALU status bits are taken
// before the shifter and do not see the shift.  Combinational.
module mic1_shifter
  import mic1_pkg::*;
(
  input  word_t in,
  input  sh_e   sh,
  output word_t out
);
  always_comb begin
    unique case (sh)
      SH_RIGHT: out = {1'b0, in[WORD_W-1:1]};
      SH_LEFT:  out = {in[WORD_W-2:0], 1'b0};
      default:  out = in;
    endcase
  end
endmodule
