// tb_mic1_mbr: the memory buffer register clears on reset; at a strobe it
// loads the shifter output when load_sh is set, else the memory data when a
// read completes (rd and mem_ready), else holds; without a strobe it holds.
module tb_mic1_mbr;
  import mic1_pkg::*;
  logic clk = 0, rst_n = 0, strobe = 0, load_sh = 0, rd = 0, mem_ready = 0;
  word_t sh_in, mem_rdata, q, model;
  int checks = 0, failures = 0;
  int n_sh = 0, n_mem = 0;

  mic1_mbr dut (.clk, .rst_n, .strobe, .load_sh, .sh_in, .rd, .mem_ready, .mem_rdata, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sh_in = 16'hFFFF; mem_rdata = 16'hFFFF;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q !== 0) begin failures++; $display("reset %h", q); end
    rst_n = 1; model = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      strobe = 1'($urandom); load_sh = ($urandom % 4 == 0);
      rd = 1'($urandom); mem_ready = 1'($urandom);
      sh_in = 16'($urandom); mem_rdata = 16'($urandom);
      @(posedge clk);
      if (strobe && load_sh) begin model = sh_in; n_sh++; end
      else if (strobe && rd && mem_ready) begin model = mem_rdata; n_mem++; end
      #1 checks++;
      if (q !== model) begin failures++; $display("step %0d q=%h exp %h", i, q, model); end
    end
    checks++;
    if (n_sh == 0 || n_mem == 0) begin failures++; $display("a load path was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
