// tb_mic1_regfile: random write/read traffic against a model of the sixteen
// registers: constants 5-9 read as 0, 1, -1, 0x0FFF, 0x00FF and ignore
// writes; pc and sp keep 12 bits; the others keep 16.  A write happens at
// the clock edge with its c select line high; both buses read
// combinationally.
module tb_mic1_regfile;
  import mic1_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] a_sel, b_sel, c_sel;
  word_t c_bus, a_bus, b_bus;
  word_t model [16];
  int checks = 0, failures = 0;

  mic1_regfile dut (.clk, .rst_n, .a_sel, .b_sel, .c_sel, .c_bus, .a_bus, .b_bus);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int r = 0; r < 16; r++) begin
      a_sel = 16'd1 << r; b_sel = 16'd1 << (15 - r); #1;
      checks++;
      if (a_bus !== model[r] || b_bus !== model[15 - r]) begin
        failures++;
        $display("reg %0d: a=%h (exp %h) b=%h (exp %h)", r, a_bus, model[r], b_bus, model[15-r]);
      end
    end
  endtask

  initial begin
    c_sel = 0; c_bus = 0; a_sel = 0; b_sel = 0;
    for (int r = 0; r < 16; r++) model[r] = 0;
    model[5] = 16'h0000; model[6] = 16'h0001; model[7] = 16'hFFFF;
    model[8] = 16'h0FFF; model[9] = 16'h00FF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check_reads();
    for (int i = 0; i < 600; i++) begin
      int r;
      @(negedge clk);
      r = $urandom % 16;
      c_sel = ($urandom % 8 == 0) ? 16'd0 : (16'd1 << r);
      c_bus = 16'($urandom);
      @(posedge clk);
      if (c_sel != 0 && !(r >= 5 && r <= 9))
        model[r] = (r == 0 || r == 2) ? (c_bus & 16'h0FFF) : c_bus;
      #1;
      @(negedge clk);
      c_sel = 0;
      a_sel = 16'd1 << ($urandom % 16); b_sel = 16'd1 << ($urandom % 16); #1;
      checks++;
      if (a_bus !== model[$clog2(a_sel)] || b_bus !== model[$clog2(b_sel)]) begin
        failures++; $display("step %0d: a=%h b=%h", i, a_bus, b_bus);
      end
    end
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
