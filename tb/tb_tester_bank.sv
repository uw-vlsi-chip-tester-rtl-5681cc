// tb_tester_bank: self-checking test of one 64-pin bank at full size.
//
// Drives the bank's control lines the way the controller does:
//  * host path: four words written from the host bus into the first rank,
//    transfer, all 64 pins checked; a deselected bank must ignore a load;
//  * readback: random pin levels sampled and read as result words;
//  * local memory: host writes and reads of random words, and the offline
//    path that loads the first rank from memory and writes results from the
//    arrays straight into memory.
`timescale 1ns / 1ps
module tb_tester_bank;
  import tester_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, xbank, xoe, sample_clk = 1'b0, mem_we;
  logic [5:0] xsel;
  bus_src_e bus_src;
  logic [RAM_ADDR_W-1:0] mem_addr;
  logic [31:0] host_wdata, bus_out;
  logic [63:0] dut_out, dut_oe, dut_in;
  int checks = 0, failures = 0;

  tester_bank dut (.*);

  always #50 clk = ~clk;

  // power-on reset: a falling edge clears every register, also those whose
  // own clock has not ticked yet
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    xsel = '0; xoe = 0; mem_we = 0; bus_src = BUS_HOST;
  endtask

  task automatic expect_pins(input logic [31:0] w [4], input string what);
    logic [63:0] eo, eoe;
    for (int i = 0; i < 32; i++) begin
      eo[2*i] = w[0][i]; eoe[2*i] = w[1][i]; eo[2*i+1] = w[2][i]; eoe[2*i+1] = w[3][i];
    end
    checks++;
    if (dut_out !== eo || dut_oe !== eoe) begin
      failures++;
      $display("FAIL %s: pins %h/%h oe %h/%h", what, dut_out, eo, dut_oe, eoe);
    end
  endtask

  task automatic sample_and_read(input logic [63:0] pins, input string what);
    logic [31:0] r0, r1;
    dut_in = pins;
    #5 sample_clk = 1; #10 sample_clk = 0;
    dut_in = ~pins;
    for (int i = 0; i < 32; i++) begin r0[i] = pins[2*i]; r1[i] = pins[2*i+1]; end
    bus_src = BUS_LCA; xoe = 1; xsel = 6'b000000; #1;
    checks++;
    if (bus_out !== r0) begin failures++; $display("FAIL %s word 4: %h/%h", what, bus_out, r0); end
    xsel = 6'b100000; #1;
    checks++;
    if (bus_out !== r1) begin failures++; $display("FAIL %s word 5: %h/%h", what, bus_out, r1); end
    idle();
  endtask

  logic [31:0] w [4], w2 [4];
  logic [31:0] shadow [logic [RAM_ADDR_W-1:0]];
  logic [63:0] pins;

  initial begin
    idle(); xbank = 1; mem_addr = '0; host_wdata = '0; dut_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // host path
    repeat (20) begin
      for (int k = 0; k < 4; k++) begin
        w[k] = $urandom;
        @(negedge clk); bus_src = BUS_HOST; host_wdata = w[k]; xsel = 6'(1 << k);
      end
      @(negedge clk); idle(); xsel = 6'b010000;
      @(negedge clk); idle();
      expect_pins(w, "host vector");
      pins = {$urandom, $urandom};
      sample_and_read(pins, "host readback");
    end
    // deselected bank
    xbank = 0;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); bus_src = BUS_HOST; host_wdata = ~w[k]; xsel = 6'(1 << k);
    end
    @(negedge clk); idle(); xsel = 6'b010000;
    @(negedge clk); idle();
    expect_pins(w, "deselected bank");
    xbank = 1;
    // memory, host side
    repeat (200) begin
      logic [RAM_ADDR_W-1:0] a;
      a = RAM_ADDR_W'($urandom);
      @(negedge clk); bus_src = BUS_HOST; mem_addr = a; host_wdata = $urandom; mem_we = 1;
      shadow[a] = host_wdata;
      @(negedge clk); idle();
    end
    foreach (shadow[a]) begin
      mem_addr = a; bus_src = BUS_MEM; #1;
      checks++;
      if (bus_out !== shadow[a]) begin failures++; $display("FAIL mem %h", a); end
    end
    // offline path: four reads into the arrays, transfer, sample, two writes
    for (int k = 0; k < 4; k++) begin
      w2[k] = $urandom;
      @(negedge clk); bus_src = BUS_HOST; mem_addr = RAM_ADDR_W'(100 + k); host_wdata = w2[k]; mem_we = 1;
    end
    @(negedge clk); idle();
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); bus_src = BUS_MEM; mem_addr = RAM_ADDR_W'(100 + k); xsel = 6'(1 << k);
    end
    @(negedge clk); idle(); xsel = 6'b010000;
    @(negedge clk); idle();
    expect_pins(w2, "vector from memory");
    pins = {$urandom, $urandom};
    dut_in = pins;
    #5 sample_clk = 1; #10 sample_clk = 0;
    @(negedge clk); bus_src = BUS_LCA; xoe = 1; xsel = 6'b000000; mem_addr = 104; mem_we = 1;
    @(negedge clk); bus_src = BUS_LCA; xoe = 1; xsel = 6'b100000; mem_addr = 105; mem_we = 1;
    @(negedge clk); idle();
    for (int r = 0; r < 2; r++) begin
      logic [31:0] e;
      for (int i = 0; i < 32; i++) e[i] = pins[2*i+r];
      mem_addr = RAM_ADDR_W'(104 + r); bus_src = BUS_MEM; #1;
      checks++;
      if (bus_out !== e) begin failures++; $display("FAIL result in memory word %0d", 4 + r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
