// tb_mac1_memory: the two-microinstruction access protocol.  A read or write
// completes (ready high) only in the second of two consecutive
// microinstructions with the same request; a lone request, a read followed by
// a write, or a third consecutive request does not complete.  Writes store
// at that strobe; reads return the stored word.  Random traffic is compared
// with a model of the memory and of the protocol.
module tb_mac1_memory;
  logic clk = 0, rst_n = 0, strobe = 0, rd = 0, wr = 0, ready;
  logic [11:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [4096];
  logic [4095:0] known;
  logic pend, pend_rd;
  int checks = 0, failures = 0, n_rd = 0, n_wr = 0;

  mac1_memory dut (.clk, .rst_n, .strobe, .rd, .wr, .addr, .wdata, .rdata, .ready);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One microinstruction: 3 clocks without strobe, then the strobe clock.
  task automatic micro(logic r, logic w, logic [11:0] a, logic [15:0] d);
    logic exp_ready;
    @(negedge clk);
    rd = r; wr = w; addr = a; wdata = d; strobe = 0;
    repeat (3) @(negedge clk);
    strobe = 1;
    exp_ready = pend && ((r && pend_rd) || (w && !pend_rd));
    #1 checks++;
    if (ready !== exp_ready) begin
      failures++; $display("rd=%b wr=%b: ready=%b expected %b", r, w, ready, exp_ready);
    end
    if (exp_ready && r) begin
      n_rd++;
      checks++;
      if (known[a] && rdata !== model[a]) begin
        failures++; $display("read %h = %h, expected %h", a, rdata, model[a]);
      end
    end
    @(posedge clk);
    if (exp_ready) begin
      pend = 0;
      if (w) begin model[a] = d; known[a] = 1; n_wr++; end
    end else begin
      pend = r || w; pend_rd = r;
    end
    @(negedge clk) strobe = 0;
  endtask

  initial begin
    logic [11:0] a;
    logic [15:0] d;
    known = '0; pend = 0; pend_rd = 0;
    addr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: write then read back
    micro(0, 1, 12'h123, 16'hBEEF); micro(0, 1, 12'h123, 16'hBEEF);
    micro(1, 0, 12'h123, 0);       micro(1, 0, 12'h123, 0);
    // lone read, then idle
    micro(1, 0, 12'h123, 0);       micro(0, 0, 0, 0);
    // three reads in a row: second completes, third starts anew
    micro(1, 0, 12'h123, 0); micro(1, 0, 12'h123, 0); micro(1, 0, 12'h123, 0);
    micro(0, 0, 0, 0);
    // read then write does not complete either
    micro(1, 0, 12'h456, 0); micro(0, 1, 12'h456, 16'h1111); micro(0, 0, 0, 0);
    // top address
    micro(0, 1, 12'hFFF, 16'h5A5A); micro(0, 1, 12'hFFF, 16'h5A5A);
    micro(1, 0, 12'hFFF, 0);        micro(1, 0, 12'hFFF, 0);
    // random traffic in pairs, sometimes broken
    for (int i = 0; i < 400; i++) begin
      a = 12'($urandom % 16); d = 16'($urandom);
      case ($urandom % 4)
        0: begin micro(0, 1, a, d); micro(0, 1, a, d); end
        1: begin micro(1, 0, a, 0); micro(1, 0, a, 0); end
        2: micro(1, 0, a, 0);
        default: micro(0, 0, 0, 0);
      endcase
    end
    checks++;
    if (n_rd < 10 || n_wr < 10) begin failures++; $display("too few accesses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
