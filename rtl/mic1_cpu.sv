// mic1_cpu: the MIC-1 microengine, i.e. the MAC-1 processor chip.
//
// A microprogrammed CPU.  Each microinstruction takes four clock periods,
// the four subcycles from mic1_subcycle_gen:
//   1. mir <= control_store[mpc]
//   2. the a and b fields select registers onto the a and b buses; the A and
//      B latches capture them
//   3. amux/ALU/shifter settle; the n and z flip-flops record the ALU status
//   4. the shifter output (c bus) is written to the register named by c when
//      enc is set, to mbr when mbr is set; mar loads from the B latch when
//      mar is set; mbr takes memory data when a read completes; mpc loads
//      the address chosen by mmux from cond, n, z, addr and mpc+1.
// The control store holds the MAC-1 microprogram, so the chip executes
// MAC-1 machine code from the memory on its system bus.
//
// System bus: mem_addr is mar, mem_wdata is mbr, mem_rd/mem_wr are the rd
// and wr bits of the current microinstruction, and mem_strobe (subcycle 4)
// marks the clock edge at which the memory acts.  The memory answers with
// mem_rdata and mem_ready (access completes at this strobe).  The data pins
// are split into an input and an output bus, and multiplexers stand in for
// the tri-state bus drivers; both are choices of this design.
module mic1_cpu
  import mic1_pkg::*;
#(
  parameter int unsigned CS_DEPTH = 256
) (
  input  logic    clk,
  input  logic    rst_n,
  output maddr_t  mem_addr,
  output word_t   mem_wdata,
  output logic    mem_rd,
  output logic    mem_wr,
  output logic    mem_strobe,
  input  word_t   mem_rdata,
  input  logic    mem_ready,
  output csaddr_t mpc
);
  logic [3:0]  sub;
  microinstr_t cs_word, mir;
  logic [15:0] a_sel, b_sel, c_sel;
  word_t       a_bus, b_bus, a_latch, b_latch, amux_out, alu_f, c_bus, mbr;
  logic        alu_n, alu_z, n, z;
  csaddr_t     mpc_inc, mpc_next;

  mic1_subcycle_gen u_subcycle (.clk, .rst_n, .sub);

  mic1_control_store #(.DEPTH(CS_DEPTH)) u_cs (.addr(mpc), .data(cs_word));

  mic1_mir u_mir (.clk, .rst_n, .load(sub[SUB1]), .d(cs_word), .q(mir));

  mic1_decoder u_adec (.sel(mir.a), .en(1'b1), .out(a_sel));
  mic1_decoder u_bdec (.sel(mir.b), .en(1'b1), .out(b_sel));
  mic1_decoder u_cdec (.sel(mir.c), .en(mir.enc && sub[SUB4]), .out(c_sel));

  mic1_regfile u_regs (.clk, .rst_n, .a_sel, .b_sel, .c_sel, .c_bus, .a_bus, .b_bus);

  mic1_bus_latches u_latches (.clk, .rst_n, .load(sub[SUB2]), .a_bus, .b_bus,
                              .a_latch, .b_latch);

  mic1_amux u_amux (.sel(mir.amux), .a_latch, .mbr, .out(amux_out));

  mic1_alu u_alu (.a(amux_out), .b(b_latch), .op(mir.alu), .f(alu_f), .n(alu_n), .z(alu_z));

  mic1_nz_flags u_nz (.clk, .rst_n, .load(sub[SUB3]), .n_in(alu_n), .z_in(alu_z), .n, .z);

  mic1_shifter u_shift (.in(alu_f), .sh(mir.sh), .out(c_bus));

  mic1_mbr u_mbr (.clk, .rst_n, .strobe(sub[SUB4]), .load_sh(mir.mbr), .sh_in(c_bus),
                  .rd(mir.rd), .mem_ready, .mem_rdata, .q(mbr));

  mic1_mar u_mar (.clk, .rst_n, .load(mir.mar && sub[SUB4]), .b_latch, .q(mem_addr));

  mic1_incrementer #(.W(CS_ADDR_W)) u_inc (.in(mpc), .out(mpc_inc));

  mic1_mmux u_mmux (.cond(mir.cond), .n, .z, .inc(mpc_inc), .addr(mir.addr),
                    .next(mpc_next), .taken());

  mic1_mpc #(.W(CS_ADDR_W)) u_mpc (.clk, .rst_n, .load(sub[SUB4]), .d(mpc_next), .q(mpc));

  assign mem_wdata  = mbr;
  assign mem_rd     = mir.rd;
  assign mem_wr     = mir.wr;
  assign mem_strobe = sub[SUB4];

  // A microinstruction never both reads memory into mbr and loads mbr
  assert property (@(posedge clk) disable iff (!rst_n)
                   sub[SUB4] |-> !(mir.mbr && mir.rd));
endmodule
