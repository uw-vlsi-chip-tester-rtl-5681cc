// pin_macro: data path for two pins of the chip under test.
//
// Each pin has two double-buffered state bits: its data and its drive
// enable. A first-rank register loads one bit from the bank's local bus
// (RAM bus bit) when its select line Xselect<k> and the bank enable are
// high. When Xselect<4> (the enable vector) is high, all second-rank
// registers load together, so every pin of the tester changes on the same
// clock edge. The second rank drives the 3-state pin driver. The pin level
// is captured by a readback register on the rising edge of the sample
// clock; Xselect<5> chooses which of the two results is put back on the bus
// bit, gated by the output enable Xoe (ram_out is 0 while Xoe is low).
//
// Select lines: 0 pin-0 data, 1 pin-0 drive enable, 2 pin-1 data,
// 3 pin-1 drive enable, 4 transfer, 5 result select (0 pin 0, 1 pin 1).
// This follows the two-pin macro of the design (five CLBs, three IOBs) and
// its six-word memory layout. Own choices: the pad is split into out/oe/in
// signals instead of a bidirectional net, a drive-enable bit of 1 means the
// tester drives the pin, the bank enable gates only the first rank, and all
// registers clear on an asynchronous reset.
//
// Timing: first and second rank change on the rising edge of clk; the
// readback registers on the rising edge of sample_clk; ram_out is
// combinational from the readback registers, Xoe and Xselect<5>.
`timescale 1ns / 1ps
module pin_macro (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       xbank,       // this bank is addressed
  input  logic [5:0] xsel,        // Xselect<5:0>
  input  logic       xoe,         // drive the RAM bus bit
  input  logic       sample_clk,  // readback register clock
  input  logic       ram_in,      // RAM bus bit, as seen by the macro
  output logic       ram_out,     // selected result, 0 while Xoe is low
  output logic [1:0] dut_out,     // value driven on each DUT pin
  output logic [1:0] dut_oe,      // 1: tester drives the DUT pin
  input  logic [1:0] dut_in       // level at each DUT pin
);
  logic [3:0] rank1;   // buf0..buf3 first stage
  logic [3:0] rank2;   // buf0..buf3 second stage
  logic [1:0] rb;      // readback registers

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rank1 <= '0;
      rank2 <= '0;
    end else begin
      for (int k = 0; k < 4; k++)
        if (xsel[k] && xbank) rank1[k] <= ram_in;
      if (xsel[tester_pkg::XSEL_XFER]) rank2 <= rank1;
    end
  end

  always_ff @(posedge sample_clk or negedge rst_n) begin
    if (!rst_n) rb <= '0;
    else        rb <= dut_in;
  end

  assign dut_out = {rank2[2], rank2[0]};
  assign dut_oe  = {rank2[3], rank2[1]};
  // The 3-state bus driver of the macro: without Xoe the bit is not driven,
  // which this two-state model shows as 0.
  assign ram_out = xoe && (xsel[tester_pkg::XSEL_OUTSEL] ? rb[1] : rb[0]);

endmodule
