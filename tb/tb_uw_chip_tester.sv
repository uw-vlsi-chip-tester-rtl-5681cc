// tb_uw_chip_tester: end-to-end test of the tester at its default size
// (two banks, 128 pins, 32K-word local memory per bank).
//
// The chip under test is modelled here: for every pin pair (2j, 2j+1) the
// chip drives pin 2j+1 with the inverse of pin 2j after TPD = 250 ns; an
// undriven even pin is pulled high. Where the tester drives a pin, its value
// wins. The testbench plays the host on the 32-bit bus and exercises:
//  * the configuration lines of the control register;
//  * interactive Steps in both banks (bank select), with result reads;
//  * pseudo speed testing: with the sample point before TPD the old outputs
//    are seen, after it the new ones, set by coarse and fine delay;
//  * a direction change of odd pins from chip output to tester-driven;
//  * an offline block of vectors in both banks at once, with the clock
//    count per vector checked (8 + coarse) and all results verified;
//  * loop mode, a host access that waits while the test runs, and stop.
// Every mechanism is counted; one that never happened counts a failure.
`timescale 1ns / 1ps
module tb_uw_chip_tester;
  import tester_pkg::*;
  localparam int AW   = RAM_ADDR_W;
  localparam int NP   = NUM_BANKS * PINS_PER_BANK;
  localparam int TPD  = 250;
  localparam int NV   = 8;       // vectors in the offline block
  localparam int BASE = 30;      // first word of the block

  logic clk = 1'b0, rst_n = 1'b1;
  logic host_req = 0, host_we = 0, host_ack;
  logic [AW:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic [NP-1:0] dut_out, dut_oe, dut_in;
  logic cfg_din, cfg_cclk, cfg_prog_n, busy, done;
  int checks = 0, failures = 0;

  uw_chip_tester dut (.*);

  always #50 clk = ~clk;

  // power-on reset: a falling edge clears every register, also those whose
  // own clock has not ticked yet
  initial #1 rst_n = 1'b0;     // 100 ns state-machine clock

  // ---- chip under test ---------------------------------------------------
  wire [NP-1:0] chip_drv;
  wire [NP-1:0] pin;
  for (genvar j = 0; j < NP / 2; j++) begin : g_chip
    assign chip_drv[2*j] = 1'b1;
    assign #(TPD) chip_drv[2*j+1] = ~pin[2*j];
  end
  for (genvar i = 0; i < NP; i++) begin : g_pin
    assign pin[i] = dut_oe[i] ? dut_out[i] : chip_drv[i];
  end
  assign dut_in = pin;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host side ---------------------------------------------------------
  ctrl_reg_t ctrl_v = '0;
  int cyc = 0, busy_run = 0, last_busy_run = 0;
  always @(negedge clk) begin
    cyc++;
    if (busy) busy_run++;
    else if (busy_run != 0) begin last_busy_run = busy_run; busy_run = 0; end
  end

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  task automatic check_eq(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) fail($sformatf("%s: %h expected %h", what, got, exp));
  endtask

  task automatic host_write(input logic [AW:0] a, input logic [31:0] d);
    @(negedge clk); host_req = 1; host_we = 1; host_addr = a; host_wdata = d;
    do @(negedge clk); while (!host_ack);
    host_req = 0;
    do @(negedge clk); while (host_ack);
  endtask

  task automatic host_read(input logic [AW:0] a, output logic [31:0] d);
    @(negedge clk); host_req = 1; host_we = 0; host_addr = a;
    do @(negedge clk); while (!host_ack);
    d = host_rdata;
    host_req = 0;
    do @(negedge clk); while (host_ack);
  endtask

  function automatic logic [AW:0] ra(input logic [3:0] r);
    return (AW+1)'(r);
  endfunction
  function automatic logic [AW:0] ma(input int a);
    return (AW+1)'(1 << AW) | (AW+1)'(a);
  endfunction

  task automatic set_ctrl();
    host_write(ra(REG_CTRL), 32'(ctrl_v));
  endtask

  task automatic select_bank(input int b);
    ctrl_v.bank_sel = BANK_SEL_W'(b);
    set_ctrl();
  endtask

  task automatic step_and_wait();
    host_write(ra(REG_STEP), 0);
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  // mechanism counters
  int n_cfg, n_bank, n_step, n_early, n_late, n_dir, n_offline, n_loop, n_wait;

  logic [31:0] d, r0, r1, dat [NUM_BANKS], old_dat [NUM_BANKS];
  logic [31:0] vd [NUM_BANKS][NV], ve [NUM_BANKS][NV];
  int ack_cyc, stop_cyc;

  task automatic load_bank(input int b, input logic [31:0] w0, w1, w2, w3);
    select_bank(b);
    host_write(ra(4'd0), w0);
    host_write(ra(4'd1), w1);
    host_write(ra(4'd2), w2);
    host_write(ra(4'd3), w3);
    n_bank++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // configuration lines
    ctrl_v.cfg_prog_n = 1; ctrl_v.cfg_cclk = 1; ctrl_v.cfg_din = 1;
    set_ctrl();
    checks++;
    if ({cfg_prog_n, cfg_cclk, cfg_din} !== 3'b111) fail("configuration lines high");
    ctrl_v.cfg_cclk = 0; ctrl_v.cfg_din = 0;
    set_ctrl();
    checks++;
    if ({cfg_prog_n, cfg_cclk, cfg_din} !== 3'b100) fail("configuration lines low");
    n_cfg++;

    // interactive Step, both banks, sample well after TPD
    host_write(ra(REG_COARSE), 4);
    host_write(ra(REG_FINE), 0);
    for (int b = 0; b < NUM_BANKS; b++) begin
      dat[b] = $urandom;
      load_bank(b, dat[b], '1, $urandom, '0);
    end
    step_and_wait();
    n_step++;
    check_eq(last_busy_run, 4 + 2, "Step clocks with coarse 4");
    for (int b = 0; b < NUM_BANKS; b++) begin
      select_bank(b);
      host_read(ra(REG_RES0), r0);
      host_read(ra(REG_RES1), r1);
      check_eq(r0, dat[b], $sformatf("bank %0d driven pins read back", b));
      check_eq(r1, ~dat[b], $sformatf("bank %0d chip outputs", b));
    end

    // pseudo speed test: sample before and after the chip's delay
    // {coarse, fine, sample after transfer in ns, expect new outputs}
    foreach (dat[b]) old_dat[b] = dat[b];
    for (int t = 0; t < 3; t++) begin
      int coarse, fine;
      bit late;
      coarse = 2; fine = (t == 0) ? 0 : (t == 1) ? 4 : 7;
      late = (coarse * 100 + fine * 10) > TPD;
      host_write(ra(REG_COARSE), coarse);
      host_write(ra(REG_FINE), fine);
      for (int b = 0; b < NUM_BANKS; b++) begin
        dat[b] = $urandom;
        load_bank(b, dat[b], '1, '0, '0);
      end
      step_and_wait();
      n_step++;
      for (int b = 0; b < NUM_BANKS; b++) begin
        select_bank(b);
        host_read(ra(REG_RES1), r1);
        check_eq(r1, late ? ~dat[b] : ~old_dat[b],
                 $sformatf("bank %0d sample at %0d ns", b, coarse * 100 + fine * 10));
      end
      if (late) n_late++; else n_early++;
      foreach (dat[b]) old_dat[b] = dat[b];
      // let the chip settle before the next vector
      repeat (5) @(negedge clk);
    end

    // direction change: some odd pins become tester-driven
    host_write(ra(REG_COARSE), 4);
    host_write(ra(REG_FINE), 0);
    for (int b = 0; b < NUM_BANKS; b++) begin
      logic [31:0] m, w2;
      m = $urandom; w2 = $urandom; dat[b] = $urandom;
      load_bank(b, dat[b], '1, w2, m);
      step_and_wait();
      select_bank(b);
      host_read(ra(REG_RES1), r1);
      check_eq(r1, (w2 & m) | (~dat[b] & ~m), $sformatf("bank %0d mixed directions", b));
      n_dir++;
    end

    // offline block in both banks
    for (int b = 0; b < NUM_BANKS; b++) begin
      select_bank(b);
      for (int v = 0; v < NV; v++) begin
        vd[b][v] = $urandom; ve[b][v] = $urandom;
        host_write(ma(BASE + 6*v + 0), vd[b][v]);
        host_write(ma(BASE + 6*v + 1), ve[b][v]);
        host_write(ma(BASE + 6*v + 2), $urandom);
        host_write(ma(BASE + 6*v + 3), '0);
        host_write(ma(BASE + 6*v + 4), 32'hDEAD_BEEF);
        host_write(ma(BASE + 6*v + 5), 32'hDEAD_BEEF);
      end
    end
    host_write(ra(REG_COARSE), 3);
    host_write(ra(REG_START), BASE);
    host_write(ra(REG_LENGTH), 6 * NV);
    ctrl_v.run = 1; set_ctrl();
    while (!busy) @(negedge clk);
    while (busy) @(negedge clk);
    @(negedge clk);
    check_eq(last_busy_run, NV * (8 + 3), "offline clocks for the block");
    host_read(ra(REG_STATUS), d);
    check_eq(d, 32'b010, "status after block");
    ctrl_v.run = 0; set_ctrl();
    for (int b = 0; b < NUM_BANKS; b++) begin
      select_bank(b);
      for (int v = 0; v < NV; v++) begin
        logic [31:0] even;
        even = (vd[b][v] & ve[b][v]) | ~ve[b][v];   // undriven pins pulled high
        host_read(ma(BASE + 6*v + 4), r0);
        host_read(ma(BASE + 6*v + 5), r1);
        check_eq(r0, even, $sformatf("bank %0d vector %0d word 4", b, v));
        check_eq(r1, ~even, $sformatf("bank %0d vector %0d word 5", b, v));
      end
    end
    n_offline++;

    // a memory access issued while a block runs waits for its end
    ctrl_v.run = 1; set_ctrl();
    while (!busy) @(negedge clk);
    host_read(ma(BASE + 5), r1);
    ack_cyc = cyc;
    checks++;
    if (busy || last_busy_run != NV * (8 + 3)) fail("memory access served during the test");
    else n_wait++;
    check_eq(r1, ~((vd[1][0] & ve[1][0]) | ~ve[1][0]), "memory read after the block");
    ctrl_v.run = 0; set_ctrl();

    // loop mode: runs until the host clears run, stops at a vector end
    ctrl_v.loop = 1; ctrl_v.run = 1; set_ctrl();
    do host_read(ra(REG_STATUS), d); while (!d[2]);
    n_loop++;
    repeat (2 * NV * 11) @(negedge clk);
    ctrl_v.run = 0; ctrl_v.loop = 0; set_ctrl();
    stop_cyc = cyc;
    while (busy) @(negedge clk);
    checks++;
    if (cyc - stop_cyc > 11) fail("loop did not stop within one vector");
    host_read(ma(BASE + 4), r0);
    check_eq(r0, (vd[1][0] & ve[1][0]) | ~ve[1][0], "result after looping");

    // every mechanism must have happened
    begin
      int n [9];
      string s [9];
      n = '{n_cfg, n_bank, n_step, n_early, n_late, n_dir, n_offline, n_loop, n_wait};
      s = '{"config lines", "bank select", "step", "early sample", "late sample",
                       "direction change", "offline block", "loop restart", "host wait"};
      for (int i = 0; i < 9; i++) begin
        $display("mechanism %-16s : %0d", s[i], n[i]);
        checks++;
        if (n[i] == 0) fail($sformatf("mechanism %s never happened", s[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
