// tb_workload_dynamic_chip: dynamic-chip workload at full memory size.
//
// The chip under test holds an 8-stage two-phase dynamic shift register on
// bank 0: pin 0 is the data input, pin 2 phi1, pin 4 phi2 and pin 1 the
// output. Its storage nodes lose their charge (read 0) when not rewritten
// within T_RET = 10 us. All other pin pairs (2j, 2j+1) of both banks are
// inverters with 250 ns delay. Four vectors move one bit (phi1 high, phi1
// low, phi2 high, phi2 low).
//
// Part 1, offline: both banks' local memories are filled with the largest
// block that fits 32K words, 5461 vectors (32766 words), with random data on
// the inverter pins. The block runs offline at coarse delay 3 (1.1 us per
// vector); every result word is compared with a reference model of the
// shift register and the inverters. The run must take 5461 * 11 clocks.
//
// Part 2, host-driven: the same chip is stepped one vector at a time with
// 12 us between Steps, as a host may be when another task takes the CPU.
// The stored bits decay, so the output must disagree with the model at
// least once. This shows why dynamic chips are tested offline.
`timescale 1ns / 1ps
module tb_workload_dynamic_chip;
  import tester_pkg::*;
  localparam int AW    = RAM_ADDR_W;
  localparam int NP    = NUM_BANKS * PINS_PER_BANK;
  localparam int TPD   = 250;
  localparam realtime T_RET = 10000.0;
  localparam int NV    = (2 ** AW) / WORDS_PER_VECTOR;   // 5461
  localparam int NVI   = 64;                              // host-driven vectors

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
  initial #1 rst_n = 1'b0;

  // ---- chip under test -----------------------------------------------------
  wire [NP-1:0] chip_drv;
  wire [NP-1:0] pin;
  logic [7:0] master = '0, slave = '0;
  realtime t_master [8], t_slave [8];

  assign chip_drv[0] = 1'b1;
  assign chip_drv[1] = slave[7];
  assign chip_drv[2] = 1'b1;
  assign chip_drv[3] = 1'b0;
  assign chip_drv[4] = 1'b1;
  assign chip_drv[5] = 1'b0;
  for (genvar j = 3; j < NP / 2; j++) begin : g_inv
    assign chip_drv[2*j] = 1'b1;
    assign #(TPD) chip_drv[2*j+1] = ~pin[2*j];
  end
  for (genvar i = 0; i < NP; i++) begin : g_pin
    assign pin[i] = dut_oe[i] ? dut_out[i] : chip_drv[i];
  end
  assign dut_in = pin;

  initial foreach (t_master[k]) begin t_master[k] = 0; t_slave[k] = 0; end

  always @(posedge pin[2]) begin
    master = {slave[6:0], pin[0]};
    foreach (t_master[k]) t_master[k] = $realtime;
  end
  always @(posedge pin[4]) begin
    slave = master;
    foreach (t_slave[k]) t_slave[k] = $realtime;
  end
  // charge leakage
  always begin
    #100;
    for (int k = 0; k < 8; k++) begin
      if ($realtime - t_master[k] > T_RET) master[k] = 1'b0;
      if ($realtime - t_slave[k] > T_RET)  slave[k] = 1'b0;
    end
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int busy_run = 0, last_busy_run = 0;
  always @(negedge clk) begin
    if (busy) busy_run++;
    else if (busy_run != 0) begin last_busy_run = busy_run; busy_run = 0; end
  end

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

  // ---- stimulus and reference model ----------------------------------------
  logic [31:0] w0 [NUM_BANKS][NV];    // even-pin data of every vector
  logic [NV-1:0] exp_q;               // expected shift register output
  logic [7:0] rm, rs;                 // reference master / slave
  ctrl_reg_t ctrl_v = '0;
  int mism_offline = 0, mism_host = 0;

  // bank-0 control bits of vector v: {phi2, phi1, d}
  function automatic logic [2:0] ctl_bits(input int v, input logic d);
    case (v % 4)
      0: return {2'b01, d};
      1: return {2'b00, d};
      2: return {2'b10, d};
      default: return {2'b00, d};
    endcase
  endfunction

  task automatic ref_step(input logic [2:0] c, output logic q);
    if (c[1]) rm = {rs[6:0], c[0]};
    if (c[2]) rs = rm;
    q = rs[7];
  endtask

  logic [31:0] r0, r1, e0, e1;
  logic q, dbit;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ctrl_v.cfg_prog_n = 1;

    // build the block; the data bit changes once per four vectors
    rm = '0; rs = '0;
    for (int v = 0; v < NV; v++) begin
      if (v % 4 == 0) dbit = 1'($urandom);
      for (int b = 0; b < NUM_BANKS; b++) w0[b][v] = $urandom;
      w0[0][v][2:0] = ctl_bits(v, dbit);
      ref_step(w0[0][v][2:0], q);
      exp_q[v] = q;
    end
    for (int b = 0; b < NUM_BANKS; b++) begin
      ctrl_v.bank_sel = BANK_SEL_W'(b);
      host_write(ra(REG_CTRL), 32'(ctrl_v));
      for (int v = 0; v < NV; v++) begin
        host_write(ma(6*v + 0), w0[b][v]);
        host_write(ma(6*v + 1), '1);
        host_write(ma(6*v + 2), '0);
        host_write(ma(6*v + 3), '0);
      end
    end
    host_write(ra(REG_COARSE), 3);
    host_write(ra(REG_FINE), 0);
    host_write(ra(REG_START), 0);
    host_write(ra(REG_LENGTH), WORDS_PER_VECTOR * NV);
    ctrl_v.run = 1;
    host_write(ra(REG_CTRL), 32'(ctrl_v));
    while (!busy) @(negedge clk);
    while (busy) @(negedge clk);
    @(negedge clk);
    checks++;
    if (last_busy_run != NV * 11) begin
      failures++;
      $display("FAIL offline block took %0d clocks, expected %0d", last_busy_run, NV * 11);
    end
    ctrl_v.run = 0;
    for (int b = 0; b < NUM_BANKS; b++) begin
      ctrl_v.bank_sel = BANK_SEL_W'(b);
      host_write(ra(REG_CTRL), 32'(ctrl_v));
      for (int v = 0; v < NV; v++) begin
        host_read(ma(6*v + 4), r0);
        host_read(ma(6*v + 5), r1);
        e0 = w0[b][v];
        e1 = ~w0[b][v];
        if (b == 0) e1[2:0] = {2'b00, exp_q[v]};
        checks += 2;
        if (r0 !== e0 || r1 !== e1) begin
          mism_offline++;
          if (mism_offline < 10)
            $display("FAIL bank %0d vector %0d: %h %h expected %h %h", b, v, r0, r1, e0, e1);
        end
      end
    end
    failures += mism_offline;
    $display("offline: %0d vectors, %0d mismatches", NV, mism_offline);

    // host-driven stepping with long gaps
    ctrl_v.bank_sel = 0;
    host_write(ra(REG_CTRL), 32'(ctrl_v));
    rm = master; rs = slave;
    for (int v = 0; v < NVI; v++) begin
      logic [31:0] w;
      if (v % 4 == 0) dbit = 1'($urandom);
      w = $urandom;
      w[2:0] = ctl_bits(v, dbit);
      ref_step(w[2:0], q);
      host_write(ra(4'd0), w);
      host_write(ra(4'd1), '1);
      host_write(ra(4'd2), '0);
      host_write(ra(4'd3), '0);
      host_write(ra(REG_STEP), 0);
      host_read(ra(REG_RES1), r1);
      checks++;
      if (r1[0] !== q) mism_host++;
      #12000;
    end
    $display("host-driven with 12 us gaps: %0d of %0d outputs lost", mism_host, NVI);
    checks++;
    if (mism_host == 0) begin
      failures++;
      $display("FAIL the dynamic chip never lost its state when stepped slowly");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
