// four_phase_clock: four-phase control clock of the microcode engine.
//
// The original engine uses four non-overlapping clock phases CLK1..CLK4
// derived from the master clock; one microinstruction takes one full
// four-phase cycle. In this synchronous design the phases are one-hot
// clock enables, `ph[0]`..`ph[3]` for CLK1..CLK4, each high for one master
// clock in turn. While `rst` is high the generator holds CLK1 active, as the
// original pulses CLK1 for the duration of a reset; after reset the
// sequence restarts at CLK1. `ph[3]` (CLK4) is also the clock filter of the
// NEQ component and of the status register: those advance once per four
// master clocks.
module four_phase_clock (
  input  logic       clk,
  input  logic       rst,
  output logic [3:0] ph
);
  logic [1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) cnt <= 2'd0;
    else     cnt <= cnt + 2'd1;
  end
  always_comb begin
    ph = 4'b0001 << cnt;
    if (rst) ph = 4'b0001;
  end
endmodule
