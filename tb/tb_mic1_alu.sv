// tb_mic1_alu: the four ALU functions and the n/z status on random and
// corner operands (carry out of the adder, a zero result, bit 15 set),
// against results computed here.
module tb_mic1_alu;
  import mic1_pkg::*;
  word_t   a, b, f;
  alu_op_e op;
  logic    n, z;
  int checks = 0, failures = 0;

  mic1_alu dut (.a, .b, .op, .f, .n, .z);

  task automatic check(word_t ta, word_t tb_, int top);
    logic [16:0] wide;
    word_t expf;
    a = ta; b = tb_; op = alu_op_e'(top); #1;
    case (top)
      0: begin wide = {1'b0, ta} + {1'b0, tb_}; expf = wide[15:0]; end
      1: expf = ta & tb_;
      2: expf = ta;
      default: expf = ta ^ 16'hFFFF;
    endcase
    checks++;
    if (f !== expf || n !== expf[15] || z !== (expf == 0)) begin
      failures++;
      $display("op=%0d a=%h b=%h: f=%h n=%b z=%b exp %h", top, ta, tb_, f, n, z, expf);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'hFFFF, 16'h0001, 0);   // carry out, zero result
    check(16'h7FFF, 16'h0001, 0);   // into the sign bit
    check(16'h0000, 16'h1234, 2);   // pass zero
    check(16'hFFFF, 16'h0000, 3);   // not -> zero
    check(16'hF0F0, 16'h0F0F, 1);   // and -> zero
    for (int i = 0; i < 400; i++) check(16'($urandom), 16'($urandom), i % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
