// tb_mic1_amux: random words on both inputs; the output follows the A latch
// when sel is 0 and mbr when sel is 1.
module tb_mic1_amux;
  import mic1_pkg::*;
  logic  sel;
  word_t a_latch, mbr, out;
  int checks = 0, failures = 0;

  mic1_amux dut (.sel, .a_latch, .mbr, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = 1'(i); a_latch = 16'($urandom); mbr = 16'($urandom); #1;
      checks++;
      if (out !== (sel ? mbr : a_latch)) begin failures++; $display("sel=%b out=%h", sel, out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
