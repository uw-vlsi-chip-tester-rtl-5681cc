// uw_chip_tester: top level of a low-cost functional chip tester.
//
// The tester applies test vectors to up to N_BANKS*64 pins of a chip under
// test and samples its outputs. Every pin can be an input or an output of
// the chip, chosen per vector. A host computer reaches the tester through a
// 32-bit memory-mapped bus (host_*). It either steps the chip one vector at
// a time, writing the four first-rank words of the selected bank and then
// a Step, or it loads a block of vectors into local memory and lets the
// controller run them offline, once or in an endless loop, while all banks
// work in parallel. The sample point of each vector is set by a coarse delay
// in 100 ns clock periods plus a fine delay of gate delays, which allows a
// simple speed test.
//
// Parts: control_register (bank select, run, loop, LCA configuration lines),
// controller (handshake and sequencing), fine_delay (behavioural model of the
// gate chain that shifts the sample clock), and NUM_BANKS tester_bank
// instances. The DUT pins are split pads: dut_out/dut_oe leave the tester,
// dut_in is the level at the pin. cfg_* are the serial configuration lines
// of the programmable arrays; loading a configuration is outside this RTL.
// clk is the state-machine clock (100 ns in the design); rst_n is an
// asynchronous, active-low reset.
`timescale 1ns / 1ps
module uw_chip_tester
  import tester_pkg::*;
#(
  parameter int unsigned N_BANKS     = tester_pkg::NUM_BANKS,
  parameter int unsigned ADDR_W      = tester_pkg::RAM_ADDR_W,
  parameter int unsigned FINE_TAP_NS = 10,
  localparam int unsigned NPINS      = N_BANKS * PINS_PER_BANK
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host bus
  input  logic                  host_req,
  input  logic                  host_we,
  input  logic [ADDR_W:0]   host_addr,
  input  logic [BUS_W-1:0]      host_wdata,
  output logic [BUS_W-1:0]      host_rdata,
  output logic                  host_ack,
  // pins of the chip under test
  output logic [NPINS-1:0]      dut_out,
  output logic [NPINS-1:0]      dut_oe,
  input  logic [NPINS-1:0]      dut_in,
  // configuration lines of the programmable arrays
  output logic                  cfg_din,
  output logic                  cfg_cclk,
  output logic                  cfg_prog_n,
  // status: a Step or an offline block is running / an offline block ended
  output logic                  busy,
  output logic                  done
);
  ctrl_reg_t                ctrl;
  logic                     ctrl_we;
  logic [BUS_W-1:0]         bank_bus [N_BANKS];
  logic [N_BANKS-1:0]     xbank;
  logic [5:0]               xsel;
  logic                     xoe;
  bus_src_e                 bus_src;
  logic [ADDR_W-1:0]    mem_addr;
  logic                     mem_we;
  logic                     sample_pulse, sample_clk;
  logic [FINE_SEL_W-1:0]    fine_sel;

  control_register u_ctrl_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (ctrl_we),
    .wdata(host_wdata[CTRL_W-1:0]),
    .q    (ctrl)
  );

  controller #(.N_BANKS(N_BANKS), .ADDR_W(ADDR_W)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .host_req    (host_req),
    .host_we     (host_we),
    .host_addr   (host_addr),
    .host_wdata  (host_wdata),
    .host_rdata  (host_rdata),
    .host_ack    (host_ack),
    .ctrl        (ctrl),
    .ctrl_we     (ctrl_we),
    .bank_bus    (bank_bus),
    .xbank       (xbank),
    .xsel        (xsel),
    .xoe         (xoe),
    .bus_src     (bus_src),
    .mem_addr    (mem_addr),
    .mem_we      (mem_we),
    .sample_pulse(sample_pulse),
    .fine_sel    (fine_sel),
    .busy        (busy),
    .done        (done)
  );

  fine_delay #(.TAPS(2**FINE_SEL_W), .TAP_NS(FINE_TAP_NS)) u_fine (
    .pulse_in (sample_pulse),
    .sel      (fine_sel),
    .pulse_out(sample_clk)
  );

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    tester_bank #(.ADDR_W(ADDR_W)) u_bank (
      .clk       (clk),
      .rst_n     (rst_n),
      .xbank     (xbank[b]),
      .xsel      (xsel),
      .xoe       (xoe),
      .bus_src   (bus_src),
      .sample_clk(sample_clk),
      .mem_addr  (mem_addr),
      .mem_we    (mem_we),
      .host_wdata(host_wdata),
      .bus_out   (bank_bus[b]),
      .dut_out   (dut_out[b*PINS_PER_BANK +: PINS_PER_BANK]),
      .dut_oe    (dut_oe[b*PINS_PER_BANK +: PINS_PER_BANK]),
      .dut_in    (dut_in[b*PINS_PER_BANK +: PINS_PER_BANK])
    );
  end

  assign cfg_din    = ctrl.cfg_din;
  assign cfg_cclk   = ctrl.cfg_cclk;
  assign cfg_prog_n = ctrl.cfg_prog_n;

endmodule
