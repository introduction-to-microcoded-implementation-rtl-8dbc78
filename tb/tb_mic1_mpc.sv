// tb_mic1_mpc: the microprogram counter resets to 0, loads only when
// `load` is high at a clock edge and holds otherwise.
module tb_mic1_mpc;
  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  mic1_mpc #(.W(8)) dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'hA5;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q !== 8'd0) begin failures++; $display("reset value %h", q); end
    model = 0;
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load = 1'($urandom);
      d    = 8'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1 checks++;
      if (q !== model) begin failures++; $display("step %0d: q=%h exp %h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
