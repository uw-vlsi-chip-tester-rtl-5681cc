// datapath_lca: one data path logic cell array of a bank.
//
// It holds N_MACROS copies of the two-pin macro (pin_macro), so it controls
// 2*N_MACROS pins of the chip under test; macro i uses bit i of its slice
// of the bank bus and pins 2i and 2i+1. The default of eleven macros
// (22 pins) is the number that fits one XC3020 in the design. All macros
// share the select lines, the clock and the sample clock; with Xoe high the
// array drives its bus slice with readback results.
// Timing is that of pin_macro.
`timescale 1ns / 1ps
module datapath_lca #(
  parameter int unsigned N_MACROS = 11
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  xbank,
  input  logic [5:0]            xsel,
  input  logic                  xoe,
  input  logic                  sample_clk,
  input  logic [N_MACROS-1:0]   ram_in,
  output logic [N_MACROS-1:0]   ram_out,
  output logic [2*N_MACROS-1:0] dut_out,
  output logic [2*N_MACROS-1:0] dut_oe,
  input  logic [2*N_MACROS-1:0] dut_in
);
  for (genvar i = 0; i < N_MACROS; i++) begin : g_macro
    pin_macro u_macro (
      .clk       (clk),
      .rst_n     (rst_n),
      .xbank     (xbank),
      .xsel      (xsel),
      .xoe       (xoe),
      .sample_clk(sample_clk),
      .ram_in    (ram_in[i]),
      .ram_out   (ram_out[i]),
      .dut_out   (dut_out[2*i +: 2]),
      .dut_oe    (dut_oe[2*i +: 2]),
      .dut_in    (dut_in[2*i +: 2])
    );
  end

endmodule
