// tb_mic1_shifter: no shift, right shift and left shift by one with zero
// fill, and the unused code passing the word, on random words.
module tb_mic1_shifter;
  import mic1_pkg::*;
  word_t in, out, exp_out;
  sh_e   sh;
  int checks = 0, failures = 0;

  mic1_shifter dut (.in, .sh, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      in = 16'($urandom); sh = sh_e'(i % 4); #1;
      case (i % 4)
        1:       exp_out = 16'(in / 2);
        2:       exp_out = 16'(in * 2);
        default: exp_out = in;
      endcase
      checks++;
      if (out !== exp_out) begin failures++; $display("sh=%0d in=%h out=%h", i % 4, in, out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
