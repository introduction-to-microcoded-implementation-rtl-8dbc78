// tb_mic1_mmux: every combination of cond, n and z with random addresses;
// the next address must be addr when the branch is taken (01 and n, 10 and
// z, 11) and mpc+1 otherwise.
module tb_mic1_mmux;
  import mic1_pkg::*;
  cond_e   cond;
  logic    n, z, taken;
  csaddr_t inc, addr, next;
  int checks = 0, failures = 0;

  mic1_mmux dut (.cond, .n, .z, .inc, .addr, .next, .taken);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_taken;
    for (int rep = 0; rep < 20; rep++) begin
      for (int c = 0; c < 4; c++) begin
        for (int nz = 0; nz < 4; nz++) begin
          cond = cond_e'(c);
          n = nz[0]; z = nz[1];
          inc = 8'($urandom); addr = 8'($urandom);
          #1;
          exp_taken = (c == 3) || (c == 1 && n) || (c == 2 && z);
          checks++;
          if (taken !== exp_taken || next !== (exp_taken ? addr : inc)) begin
            failures++;
            $display("cond=%0d n=%b z=%b: taken=%b next=%h", c, n, z, taken, next);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
