// mic1_mmux: micro-sequencing logic of the MIC-1.
//
// Every microinstruction carries a branch: a condition (cond) and a target
// (addr).  This block decodes cond against the recorded n and z bits and
// picks either the incremented mpc or addr:
//   00 never, 01 if n, 10 if z, 11 always.
// Combinational; `taken` reports the choice.
module mic1_mmux
  import mic1_pkg::*;
(
  input  cond_e   cond,
  input  logic    n,
  input  logic    z,
  input  csaddr_t inc,
  input  csaddr_t addr,
  output csaddr_t next,
  output logic    taken
);
  always_comb begin
    unique case (cond)
      COND_NONE:   taken = 1'b0;
      COND_N:      taken = n;
      COND_Z:      taken = z;
      COND_ALWAYS: taken = 1'b1;
    endcase
    next = taken ? addr : inc;
  end
endmodule
