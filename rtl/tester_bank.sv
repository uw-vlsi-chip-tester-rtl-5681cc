// tester_bank: one bank of the tester, controlling 64 pins of the chip under
// test.
//
// A bank holds three data path arrays (datapath_lca) with eleven, eleven and
// ten two-pin macros, four 8-bit static RAM chips that together form a
// 32-bit local memory, and the transceiver that joins the bank's local bus
// to the host data bus. Macro i of the bank uses local bus bit i and DUT
// pins 2i and 2i+1, so one 32-bit memory word holds one of the six words of
// a vector for all 64 pins.
//
// The local bus is one shared set of wires; here it is a multiplexer chosen
// by bus_src: host write data (through the transceiver), memory read data or
// the readback results of the arrays. The host always sees the bus through
// bus_out. Memory writes take their data from the bus, so the controller
// can move results from the arrays straight into memory. mem_we and the
// first-rank loads only act while xbank is high.
//
// Following the design: three arrays per bank, 64 pins, four RAM chips of
// 8 bits, one bus bit per macro. The split of macros over the arrays
// (11/11/10) and the multiplexer in place of 3-state bus drivers are choices
// of this RTL. Timing is that of pin_macro and sram_chip.
`timescale 1ns / 1ps
module tester_bank
  import tester_pkg::*;
#(
  parameter int unsigned PINS           = tester_pkg::PINS_PER_BANK,
  parameter int unsigned MACROS_PER_ARR = tester_pkg::MACROS_PER_LCA,
  parameter int unsigned ADDR_W         = tester_pkg::RAM_ADDR_W,
  localparam int unsigned W             = PINS / 2,    // bus bits = macros
  localparam int unsigned N_ARR         = (W + MACROS_PER_ARR - 1) / MACROS_PER_ARR,
  localparam int unsigned N_RAM         = W / RAM_CHIP_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              xbank,
  input  logic [5:0]        xsel,
  input  logic              xoe,
  input  bus_src_e          bus_src,
  input  logic              sample_clk,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic              mem_we,
  input  logic [W-1:0]      host_wdata,
  output logic [W-1:0]      bus_out,
  output logic [PINS-1:0]   dut_out,
  output logic [PINS-1:0]   dut_oe,
  input  logic [PINS-1:0]   dut_in
);
  logic [W-1:0]     bus;
  logic [W-1:0]     mem_rdata;
  logic [W-1:0]     lca_out;

  // ---- data path arrays ------------------------------------------------------
  for (genvar j = 0; j < N_ARR; j++) begin : g_lca
    localparam int unsigned LO = j * MACROS_PER_ARR;
    localparam int unsigned N  = (W - LO < MACROS_PER_ARR) ? W - LO : MACROS_PER_ARR;
    datapath_lca #(.N_MACROS(N)) u_lca (
      .clk       (clk),
      .rst_n     (rst_n),
      .xbank     (xbank),
      .xsel      (xsel),
      .xoe       (xoe),
      .sample_clk(sample_clk),
      .ram_in    (bus[LO +: N]),
      .ram_out   (lca_out[LO +: N]),
      .dut_out   (dut_out[2*LO +: 2*N]),
      .dut_oe    (dut_oe[2*LO +: 2*N]),
      .dut_in    (dut_in[2*LO +: 2*N])
    );
  end

  // ---- local memory: four byte-wide static RAMs ------------------------------
  for (genvar c = 0; c < N_RAM; c++) begin : g_ram
    sram_chip #(.ADDR_W(ADDR_W), .DATA_W(RAM_CHIP_W)) u_ram (
      .clk  (clk),
      .addr (mem_addr),
      .we   (mem_we && xbank),
      .wdata(bus[c*RAM_CHIP_W +: RAM_CHIP_W]),
      .rdata(mem_rdata[c*RAM_CHIP_W +: RAM_CHIP_W])
    );
  end

  // ---- local bus and host transceiver ------------------------------------------
  always_comb begin
    unique case (bus_src)
      BUS_MEM: bus = mem_rdata;
      BUS_LCA: bus = lca_out;
      default: bus = host_wdata;
    endcase
  end

  assign bus_out = bus;

  a_lca_drives: assert property (@(posedge clk) disable iff (!rst_n)
    bus_src == BUS_LCA |-> xoe)
    else $error("bank bus read from the arrays while they do not drive it");

endmodule
