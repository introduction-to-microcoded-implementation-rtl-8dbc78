// tb_mic1_decoder: all 16 register numbers with the enable high give the
// matching one-hot select; with the enable low no line is set.
module tb_mic1_decoder;
  logic [3:0]  sel;
  logic        en;
  logic [15:0] out;
  int checks = 0, failures = 0;

  mic1_decoder dut (.sel, .en, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s); en = e[0]; #1;
        checks++;
        if (out !== (e[0] ? (16'd1 << s) : 16'd0)) begin
          failures++; $display("sel=%0d en=%0d out=%h", s, e, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
