// mic1_mbr: memory buffer (data) register.
//
// The chip's gateway to the data pins.  At the clock edge ending subcycle 4
// (`strobe`) it loads the shifter output when the microinstruction's mbr bit
// is set; otherwise, when the microinstruction asserts rd and the memory
// reports that the two-microinstruction read completes (`mem_ready`), it
// loads the read data.  Its value drives the data pins for writes and the
// amux for the ALU.  Reset clears it (a choice of this design).
module mic1_mbr
  import mic1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  strobe,
  input  logic  load_sh,
  input  word_t sh_in,
  input  logic  rd,
  input  logic  mem_ready,
  input  word_t mem_rdata,
  output word_t q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (strobe) begin
      if (load_sh)              q <= sh_in;
      else if (rd && mem_ready) q <= mem_rdata;
    end
  end
endmodule
