// mac1_memory: MAC-1 main memory, WORDS x 16 bits (4096 words by default).
//
// Sits on the system bus next to the MIC-1 chip.  An access takes two
// consecutive microinstructions that assert the same request: the first
// starts it, and at the end of the second (the clock edge where `strobe`,
// subcycle 4, is high) a write stores wdata at addr, or a read completes
// with rdata valid.  `ready` is high during that second microinstruction;
// the CPU's mbr takes rdata at the same strobe.  A third consecutive request
// starts a new access.  Read data is m[addr], the address held in mar.
// The two-microinstruction access time follows the classic MAC-1
// description; the start/complete bookkeeping and the combinational read
// port are choices of this design.  Contents are not reset.
module mac1_memory #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned AW    = 12,
  parameter int unsigned DW    = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          strobe,
  input  logic          rd,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  output logic          ready
);
  logic [DW-1:0] mem [WORDS];

  logic pending;     // an access was started by the previous microinstruction
  logic pending_rd;  // ... and it was a read

  always_comb begin
    ready = pending && ((rd && pending_rd) || (wr && !pending_rd));
    rdata = mem[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending    <= 1'b0;
      pending_rd <= 1'b0;
    end else if (strobe) begin
      if (ready) begin
        pending <= 1'b0;           // access completes
      end else begin
        pending    <= rd || wr;    // start one (or stay idle)
        pending_rd <= rd;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (strobe && ready && wr) mem[addr] <= wdata;
  end

  // The microcode never reads and writes in one microinstruction
  assert property (@(posedge clk) disable iff (!rst_n) strobe |-> !(rd && wr));
endmodule
