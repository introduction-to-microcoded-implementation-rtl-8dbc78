// tb_mic1_mir: the microinstruction register clears on reset, captures the
// control-store word only on a clock edge with `load` high and keeps it
// while the word on its input changes.
module tb_mic1_mir;
  import mic1_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  microinstr_t d, q;
  logic [31:0] model;
  int checks = 0, failures = 0;

  mic1_mir dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = microinstr_t'(32'hFFFF_FFFF);
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q !== '0) begin failures++; $display("reset value %h", q); end
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load = (i % 4 == 0);
      d = microinstr_t'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1 checks++;
      if (q !== model) begin failures++; $display("step %0d: q=%h exp %h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
