// tb_mic1_subcycle_gen: checks that the four subcycle lines come one at a
// time in the order 1,2,3,4,1,... starting with subcycle 1 after reset, one
// clock period each, so that a microinstruction lasts four clocks.
module tb_mic1_subcycle_gen;
  logic clk = 0, rst_n = 0;
  logic [3:0] sub;
  int checks = 0, failures = 0;

  mic1_subcycle_gen dut (.clk, .rst_n, .sub);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (sub !== 4'b0001) begin failures++; $display("reset state %b", sub); end
    rst_n = 1;
    for (k = 1; k <= 40; k++) begin
      @(posedge clk); #1;
      checks++;
      if (sub !== (4'b0001 << (k % 4))) begin
        failures++; $display("cycle %0d: sub=%b", k, sub);
      end
    end
    // reset mid-sequence goes back to subcycle 1
    @(negedge clk); rst_n = 0; #1;
    checks++;
    if (sub !== 4'b0001) begin failures++; $display("async reset: %b", sub); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
