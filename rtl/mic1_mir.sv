// mic1_mir: microinstruction register.
//
// Captures the control-store word addressed by mpc when `load` (subcycle 1)
// is high at a clock edge, and holds it for the rest of the microinstruction
// so that later changes of mpc cannot disturb the datapath controls.  Its
// fields (see mic1_pkg::microinstr_t) drive the datapath directly.  Reset
// clears it to an all-zero word, which writes nothing and never branches
// (a choice of this design).
module mic1_mir
  import mic1_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  microinstr_t d,
  output microinstr_t q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
