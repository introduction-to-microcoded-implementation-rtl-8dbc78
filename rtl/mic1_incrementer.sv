// mic1_incrementer: adds one to the microprogram counter.
//
// Purely combinational; its output feeds the mmux as the "next sequential
// microinstruction" address.  It wraps from the last control-store address
// to 0 (a choice of this design; the microcode never relies on it).
module mic1_incrementer #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  always_comb out = in + W'(1);
endmodule
