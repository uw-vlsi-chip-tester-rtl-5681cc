// sram_chip: one static RAM chip of a bank's local memory.
//
// An 8-bit wide array of 2**ADDR_W words. Reading is asynchronous, as in a
// static RAM: rdata follows addr within the same clock cycle, so one
// controller clock is one memory cycle. A write stores wdata at the rising
// clock edge while we is high (the write pulse of a real chip is modelled as
// a clocked write). The design allows any size from 2Kx8 (ADDR_W = 11) to
// 32Kx8 (ADDR_W = 15); the default is the largest. The contents are not
// cleared at power-up, as in the real part.
`timescale 1ns / 1ps
module sram_chip #(
  parameter int unsigned ADDR_W = 15,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
