// mac1_system: a complete MAC-1 computer.
//
// The MIC-1 chip (mic1_cpu), whose control store holds the MAC-1
// microprogram, connected over the system bus to the MAC-1 main memory
// (mac1_memory, MEM_WORDS x 16 bits, 4096 by default).  MAC-1 is an
// accumulator machine with 12-bit addresses and 16-bit instructions
// (LODD .. DESP); programs and data are placed in the memory before reset is
// released, and execution starts at address 0 with ac = sp = 0.
//
// The system bus is also brought out (bus_*) so that memory-mapped I/O
// devices can watch it; no device is part of this design.  mpc is brought
// out for observation: a MAC-1 HALT (opcode 0xFFxx) parks it at 80.
// Timing: one MAC-1 instruction takes (number of microinstructions) x 4
// clock periods, e.g. 36 clocks for LODD.
module mac1_system
  import mic1_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 4096
) (
  input  logic    clk,
  input  logic    rst_n,
  output maddr_t  bus_addr,
  output word_t   bus_wdata,
  output logic    bus_rd,
  output logic    bus_wr,
  output logic    bus_strobe,
  output csaddr_t mpc
);
  word_t mem_rdata;
  logic  mem_ready;

  mic1_cpu u_cpu (
    .clk, .rst_n,
    .mem_addr(bus_addr), .mem_wdata(bus_wdata), .mem_rd(bus_rd), .mem_wr(bus_wr),
    .mem_strobe(bus_strobe), .mem_rdata, .mem_ready, .mpc
  );

  mac1_memory #(.WORDS(MEM_WORDS), .AW(MADDR_W), .DW(WORD_W)) u_mem (
    .clk, .rst_n, .strobe(bus_strobe), .rd(bus_rd), .wr(bus_wr),
    .addr(bus_addr), .wdata(bus_wdata), .rdata(mem_rdata), .ready(mem_ready)
  );
endmodule
