// mic1_decoder: 4-to-16 register-select decoder with enable.
//
// Turns a 4-bit register number from the a, b or c field of the
// microinstruction into a one-hot select for the register file.  The a and
// b decoders run with en tied high.  The c decoder gets en = enc AND
// subcycle 4, so a register is only written when the microinstruction asks
// for it and only once the shifter output is valid.  With en low all
// outputs are 0.  Combinational.
module mic1_decoder (
  input  logic [3:0]  sel,
  input  logic        en,
  output logic [15:0] out
);
  always_comb begin
    out = '0;
    if (en) out[sel] = 1'b1;
  end
endmodule
