// mic1_mpc: the microprogram counter.
//
// Holds the control-store address of the current microinstruction.  It
// loads the address chosen by the mmux when `load` is high at a clock edge;
// the microengine drives `load` with subcycle 4, so the next microinstruction
// address is settled well before subcycle 1 fetches it.  Reset sets it to 0,
// the start of the instruction-fetch microcode (both choices of this design).
module mic1_mpc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
