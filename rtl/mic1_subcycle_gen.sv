// mic1_subcycle_gen: four-phase clock of the MIC-1.
//
// Drives the subcycle lines 1, 2, 3, 4 in turn, one oscillator period each,
// so that one microinstruction takes four clock periods.  The lines come out
// one-hot in sub[3:0], sub[0] being subcycle 1.  Every register of the
// microengine is clocked by the same oscillator and uses a subcycle line as
// its enable: a register enabled by sub[k] loads at the clock edge that ends
// subcycle k+1.
//
// The classic description builds this box from a chain of delay elements;
// here it is a synchronous 4-bit ring counter, which gives the same sequence
// without analog delays.  Reset puts the ring in subcycle 1.
module mic1_subcycle_gen (
  input  logic       clk,
  input  logic       rst_n,
  output logic [3:0] sub
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sub <= 4'b0001;
    else        sub <= {sub[2:0], sub[3]};
  end

  // The ring must stay one-hot
  assert property (@(posedge clk) disable iff (!rst_n) $onehot(sub));
endmodule
