// tb_mic1_nz_flags: n and z clear on reset, take the ALU status on a clock
// edge with `load` high and hold it otherwise.
module tb_mic1_nz_flags;
  logic clk = 0, rst_n = 0, load = 0, n_in = 1, z_in = 1, n, z;
  logic mn, mz;
  int checks = 0, failures = 0;

  mic1_nz_flags dut (.clk, .rst_n, .load, .n_in, .z_in, .n, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++;
    if (n !== 0 || z !== 0) begin failures++; $display("reset n=%b z=%b", n, z); end
    rst_n = 1; mn = 0; mz = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load = (i % 4 == 2); n_in = 1'($urandom); z_in = 1'($urandom);
      @(posedge clk);
      if (load) begin mn = n_in; mz = z_in; end
      #1 checks++;
      if (n !== mn || z !== mz) begin failures++; $display("step %0d n=%b z=%b", i, n, z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
