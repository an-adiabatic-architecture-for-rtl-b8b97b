// adi_inv: functional model of an adiabatic inverter aligned to one phase.
//
// An adiabatic gate samples its input while its power clock rises and holds
// its output while the clock is high; in the falling phase the charge is
// recovered and the output is no longer valid. Here, at the clock edge that
// starts phase PHASE the gate stores the inverted input and raises o_valid;
// at the edge that starts phase PHASE+2 it drops o_valid (the recovery). The
// output is therefore valid for two phases, so a gate aligned with phase
// PHASE+1 samples it safely. Two such gates in series form a pipeline with a
// delay of one phase per gate.
// Interface: phase from adi_phase_gen; i must be valid at the start of
// PHASE. Dual-rail signals are not modelled, as in the document's model; the
// explicit valid flag stands in for the undefined value of the recovery
// phases, since the simulator has only two states.
module adi_inv #(
  parameter logic [1:0] PHASE = 2'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] phase,
  input  logic       i,
  output logic       o,
  output logic       o_valid
);

  // The edge that starts phase p is the last edge of phase p-1.
  localparam logic [1:0] EVAL_EDGE = PHASE - 2'd1;
  localparam logic [1:0] RECO_EDGE = PHASE + 2'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o       <= 1'b0;
      o_valid <= 1'b0;
    end else if (phase == EVAL_EDGE) begin
      o       <= ~i;
      o_valid <= 1'b1;
    end else if (phase == RECO_EDGE) begin
      o_valid <= 1'b0;
    end
  end

endmodule
