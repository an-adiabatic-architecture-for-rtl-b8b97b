// adi_phase_gen: functional model of the four-phase adiabatic power clock.
//
// Adiabatic logic is powered by four trapezoidal clocks, each a quarter
// period apart, so that in every phase one clock is low, one rising, one
// high and one falling. For functional simulation only the phase matters:
// one clock edge of the single global clock net marks the start of each
// phase, and this counter names the current phase (0..3). A gate aligned
// with phase p evaluates at the start of p and is recovered at the start of
// p+2. Timing: phase advances by one every clock after reset; it is 0 in
// the first clock after reset.
// The four-phase scheme and the single global clock net follow the
// document; the encoding as a 2-bit counter is this design's.
module adi_phase_gen (
  input  logic       clk,
  input  logic       rst_n,
  output logic [1:0] phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 2'd0;
    else        phase <= phase + 2'd1;
  end

endmodule
