// mic1_bus_latches: the A and B bus latches.
//
// Capture the a and b buses from the register file at the end of subcycle 2
// (`load`) and hold them through subcycles 3 and 4.  Because the ALU works
// from these copies, the register written in subcycle 4 cannot feed back
// into the same microinstruction's ALU operation.  Built as edge-triggered
// registers rather than level-sensitive latches; reset clears them (choices
// of this design).
module mic1_bus_latches
  import mic1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  word_t a_bus,
  input  word_t b_bus,
  output word_t a_latch,
  output word_t b_latch
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_latch <= '0;
      b_latch <= '0;
    end else if (load) begin
      a_latch <= a_bus;
      b_latch <= b_bus;
    end
  end
endmodule
