// tb_mic1_incrementer: exhaustive check of the 8-bit microprogram-counter
// incrementer, including the wrap from 255 to 0.
module tb_mic1_incrementer;
  logic [7:0] in, out;
  int checks = 0, failures = 0;

  mic1_incrementer #(.W(8)) dut (.in, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      in = 8'(i); #1;
      checks++;
      if (out !== 8'((i + 1) % 256)) begin failures++; $display("%0d -> %0d", i, out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
