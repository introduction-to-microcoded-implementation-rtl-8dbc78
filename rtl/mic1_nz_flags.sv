// mic1_nz_flags: the n and z flip-flops.
//
// Record the ALU status of the current microinstruction.  `load` is driven
// with subcycle 3, when the ALU output has settled, so the branch decision
// taken in subcycle 4 of the same microinstruction sees this
// microinstruction's result; the MAC-1 decode microcode relies on that
// ("ir:=mbr; if n ..." tests bit 15 of the fetched instruction).  Every
// microinstruction updates both bits.  Reset clears them (a choice of this
// design).
module mic1_nz_flags (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic n_in,
  input  logic z_in,
  output logic n,
  output logic z
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n <= 1'b0;
      z <= 1'b0;
    end else if (load) begin
      n <= n_in;
      z <= z_in;
    end
  end
endmodule
