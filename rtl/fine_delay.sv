// fine_delay: behavioural model of the fine adjustment of the sample clock.
//
// This is a behavioural model, not synthesizable logic: in the tester the
// fine delay is a chain of logic gates inside the controller array, and its
// delay is a property of the silicon. Here the chain has TAPS stages of
// TAP_NS nanoseconds each; sel picks the tap, so pulse_out is pulse_in
// delayed by sel*TAP_NS. Tap 0 passes the pulse without delay. The whole
// chain must stay shorter than one 100 ns state-machine clock. The chain of
// gate delays comes from the design; eight taps of 10 ns are choices of
// this model.
`timescale 1ns / 1ps
module fine_delay #(
  parameter int unsigned TAPS   = 8,
  parameter int unsigned TAP_NS = 10
) (
  input  logic                    pulse_in,
  input  logic [$clog2(TAPS)-1:0] sel,
  output logic                    pulse_out
);
  logic [TAPS-1:0] stage;

  assign stage[0] = pulse_in;
  for (genvar i = 1; i < TAPS; i++) begin : g_gate
    assign #(TAP_NS) stage[i] = stage[i-1];
  end

  assign pulse_out = stage[sel];

endmodule
