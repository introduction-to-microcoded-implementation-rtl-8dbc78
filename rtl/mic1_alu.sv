// mic1_alu: the four-function ALU of the MIC-1.
//
// op 00: a + b (carry discarded), 01: a AND b, 10: a, 11: NOT a.
// Status: n is bit 15 of the result (set whether or not the word is meant
// as a number), z is 1 exactly when the result is all zeros.  The status is
// recorded by the n/z flip-flops (mic1_nz_flags).  Combinational; in the
// microengine it has all of subcycle 3 to settle.
module mic1_alu
  import mic1_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  output word_t   f,
  output logic    n,
  output logic    z
);
  always_comb begin
    unique case (op)
      ALU_ADD:  f = a + b;
      ALU_AND:  f = a & b;
      ALU_PASS: f = a;
      ALU_INV:  f = ~a;
    endcase
    n = f[WORD_W-1];
    z = (f == '0);
  end
endmodule
