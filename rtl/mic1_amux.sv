// mic1_amux: left-input multiplexer of the ALU.
//
// The amux bit of the microinstruction chooses between the A latch (0) and
// the memory buffer register mbr (1); mbr can reach the ALU only this way.
// Combinational.
module mic1_amux
  import mic1_pkg::*;
(
  input  logic  sel,
  input  word_t a_latch,
  input  word_t mbr,
  output word_t out
);
  always_comb out = sel ? mbr : a_latch;
endmodule
