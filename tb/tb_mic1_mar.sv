// tb_mic1_mar: the 12-bit memory address register clears on reset and loads
// the low 12 bits of the B latch only on a clock edge with `load` high.
module tb_mic1_mar;
  import mic1_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  word_t b_latch;
  logic [11:0] q, model;
  int checks = 0, failures = 0;

  mic1_mar dut (.clk, .rst_n, .load, .b_latch, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b_latch = 16'hFFFF;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q !== 0) begin failures++; $display("reset %h", q); end
    rst_n = 1; model = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load = 1'($urandom); b_latch = 16'($urandom);
      @(posedge clk);
      if (load) model = 12'(b_latch % 4096);
      #1 checks++;
      if (q !== model) begin failures++; $display("step %0d q=%h exp %h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
