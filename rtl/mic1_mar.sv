// mic1_mar: memory address register.
//
// 12 bits wide, like MAC-1 addresses, and connected only to the low 12
// lines of the B latch.  It loads when `load` (mir.mar AND subcycle 4) is
// high at a clock edge and drives the chip's address pins continuously.
// Reset clears it (a choice of this design).
module mic1_mar
  import mic1_pkg::*;
#(
  parameter int unsigned AW = MADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  word_t         b_latch,
  output logic [AW-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= b_latch[AW-1:0];
  end
endmodule
