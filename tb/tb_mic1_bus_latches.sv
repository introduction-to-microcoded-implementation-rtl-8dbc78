// tb_mic1_bus_latches: both latches clear on reset, capture the a and b
// buses only on a clock edge with `load` high, and hold while the buses
// change (no feedback from a register written later in the microinstruction).
module tb_mic1_bus_latches;
  import mic1_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  word_t a_bus, b_bus, a_latch, b_latch, ma, mb;
  int checks = 0, failures = 0;

  mic1_bus_latches dut (.clk, .rst_n, .load, .a_bus, .b_bus, .a_latch, .b_latch);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_bus = 16'h1111; b_bus = 16'h2222;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (a_latch !== 0 || b_latch !== 0) begin failures++; $display("reset"); end
    rst_n = 1; ma = 0; mb = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load = (i % 4 == 1); a_bus = 16'($urandom); b_bus = 16'($urandom);
      @(posedge clk);
      if (load) begin ma = a_bus; mb = b_bus; end
      #1 checks++;
      if (a_latch !== ma || b_latch !== mb) begin
        failures++; $display("step %0d: %h %h exp %h %h", i, a_latch, b_latch, ma, mb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
