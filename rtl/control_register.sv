// control_register: the 7-bit control register of the host interface card.
//
// The host writes it through the memory-mapped interface (we, wdata) and
// can read it back (q). Its fields select the bank the host addresses,
// start an offline test (run), choose infinite-loop execution (loop) and
// drive the three configuration lines of the logic cell arrays (data,
// clock and reset of the serial slave-mode load). A 7-bit register that
// carries bank select and LCA initialisation is part of the design; the bit
// layout (tester_pkg::ctrl_reg_t) is a choice of this RTL. It clears to
// zero on reset, which holds the LCAs in configuration reset
// (cfg_prog_n = 0). Writes take effect at the rising clock edge.
`timescale 1ns / 1ps
module control_register
  import tester_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [CTRL_W-1:0] wdata,
  output ctrl_reg_t         q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (we) q <= ctrl_reg_t'(wdata);
  end

endmodule
