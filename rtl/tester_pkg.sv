// tester_pkg: constants and types shared by the chip tester RTL.
//
// The tester drives and samples the pins of a chip under test (DUT) from a
// host computer. Pins are grouped in banks of 64; each bank holds three data
// path LCAs (eleven two-pin macros each, 32 macros used) and a 32-bit local
// memory built from four 8-bit static RAMs. Every test vector occupies six
// consecutive memory words (see word_e). The bank count, pins per bank,
// macros per LCA, word layout, bus width and the 100 ns coarse delay step
// follow the design description; the host register map, the control
// register bit layout and the counter widths are choices of this RTL.
`timescale 1ns / 1ps
package tester_pkg;

  // ---- sizes -----------------------------------------------------------
  localparam int unsigned NUM_BANKS        = 2;   // 2 banks -> 128 pins
  localparam int unsigned PINS_PER_BANK    = 64;
  localparam int unsigned MACROS_PER_BANK  = PINS_PER_BANK / 2;   // 32
  localparam int unsigned MACROS_PER_LCA   = 11;  // 22 DUT pins per LCA
  localparam int unsigned LCAS_PER_BANK    = 3;
  localparam int unsigned RAM_CHIPS        = 4;   // per bank
  localparam int unsigned RAM_CHIP_W       = 8;   // data pins per RAM chip
  localparam int unsigned BUS_W            = RAM_CHIPS * RAM_CHIP_W; // 32
  localparam int unsigned RAM_ADDR_W       = 15;  // 32K x 8, largest RAM
  localparam int unsigned WORDS_PER_VECTOR = 6;
  localparam int unsigned COARSE_W         = 8;   // coarse delay, clocks
  localparam int unsigned FINE_SEL_W       = 3;   // fine delay tap select
  localparam int unsigned BANK_SEL_W       = 2;   // up to four banks
  localparam int unsigned CTRL_W           = 7;   // control register bits
  localparam int unsigned HOST_ADDR_W      = RAM_ADDR_W + 1;

  // ---- interleaved local-memory layout of one test vector ----------------
  // The same index selects the data path register (Xselect<k>).
  typedef enum logic [2:0] {
    W_PIN1_DATA = 3'd0,   // data driven on the first pin of a macro
    W_PIN1_EN   = 3'd1,   // 1: tester drives the first pin
    W_PIN2_DATA = 3'd2,
    W_PIN2_EN   = 3'd3,
    W_PIN1_RES  = 3'd4,   // sampled value of the first pin
    W_PIN2_RES  = 3'd5
  } word_e;

  // Xselect<4> transfers the first rank to the second rank (enable vector);
  // Xselect<5> picks which readback register reaches the RAM bus.
  localparam int unsigned XSEL_XFER   = 4;
  localparam int unsigned XSEL_OUTSEL = 5;

  // ---- control register (on the host interface card) --------------------
  typedef struct packed {
    logic                  cfg_prog_n;  // bit 6: LCA configuration reset
    logic                  cfg_cclk;    // bit 5: LCA slave-mode clock
    logic                  cfg_din;     // bit 4: LCA slave-mode data
    logic                  loop;        // bit 3: repeat the block forever
    logic                  run;         // bit 2: 0->1 starts an offline test
    logic [BANK_SEL_W-1:0] bank_sel;    // bits 1:0: bank seen by the host
  } ctrl_reg_t;

  // ---- host register map (host_addr[15] = 0) ------------------------------
  // host_addr[15] = 1 addresses local memory word host_addr[14:0] of the
  // selected bank.
  localparam logic [3:0] REG_WORD0  = 4'd0;  // write: first-rank word 0..3
  localparam logic [3:0] REG_RES0   = 4'd4;  // read: result words 4,5
  localparam logic [3:0] REG_RES1   = 4'd5;
  localparam logic [3:0] REG_STEP   = 4'd6;  // write: one interactive Step
  localparam logic [3:0] REG_CTRL   = 4'd7;  // control register
  localparam logic [3:0] REG_COARSE = 4'd8;  // coarse delay, clocks
  localparam logic [3:0] REG_FINE   = 4'd9;  // fine delay tap
  localparam logic [3:0] REG_START  = 4'd10; // first word address of block
  localparam logic [3:0] REG_LENGTH = 4'd11; // block length in words
  localparam logic [3:0] REG_STATUS = 4'd12; // {looped, done, busy}

  // ---- source of a bank's local bus --------------------------------------
  typedef enum logic [1:0] {
    BUS_HOST = 2'd0,   // host data through the bank transceiver
    BUS_MEM  = 2'd1,   // local memory read data
    BUS_LCA  = 2'd2    // readback results from the data path LCAs
  } bus_src_e;

endpackage
