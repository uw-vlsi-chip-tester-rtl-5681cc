// tb_pin_macro: self-checking test of the two-pin macro.
//
// Random select lines, bank enable, bus bits, pin levels and sample pulses
// are applied for many cycles. A reference model kept in the testbench
// (first rank, second rank, readback registers) predicts the pin drivers
// and the bus bit, which are compared after every clock and every sample
// pulse. Directed checks make sure that the pins only change on the
// transfer select, that a deselected bank ignores loads and that the result
// multiplexer follows Xselect<5>.
`timescale 1ns / 1ps
module tb_pin_macro;
  logic       clk = 1'b0, rst_n = 1'b1, xbank, xoe, sample_clk = 1'b0, ram_in;
  logic [5:0] xsel;
  logic       ram_out;
  logic [1:0] dut_out, dut_oe, dut_in;
  int checks = 0, failures = 0;

  pin_macro dut (.*);

  always #50 clk = ~clk;

  // power-on reset: a falling edge clears every register, also those whose
  // own clock has not ticked yet
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] m1, m2;
  logic [1:0] mrb;

  task automatic check(input logic [1:0] eo, eoe, input logic er, input string what);
    checks++;
    if (dut_out !== eo || dut_oe !== eoe || ram_out !== (er && xoe)) begin
      failures++;
      $display("FAIL %s: out=%b/%b oe=%b/%b ram=%b/%b", what, dut_out, eo, dut_oe, eoe, ram_out, er);
    end
  endtask

  function automatic logic exp_ram();
    return xsel[5] ? mrb[1] : mrb[0];
  endfunction

  initial begin
    xbank = 0; xoe = 0; xsel = '0; ram_in = 0; dut_in = '0;
    m1 = '0; m2 = '0; mrb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // directed: load pin-0 data and enable, nothing moves before transfer
    @(negedge clk); xbank = 1; xsel = 6'b000001; ram_in = 1;
    @(negedge clk); xsel = 6'b000010; ram_in = 1;
    @(negedge clk); xsel = 6'b000000;
    check(2'b00, 2'b00, 1'b0, "no transfer yet");
    @(negedge clk); xsel = 6'b010000;
    @(negedge clk); xsel = 6'b000000;
    check(2'b01, 2'b01, 1'b0, "after transfer");
    m1 = 4'b0011; m2 = 4'b0011;
    // deselected bank ignores a load
    xbank = 0; xsel = 6'b000100; ram_in = 1;
    @(negedge clk); xsel = 6'b010000;
    @(negedge clk); xsel = 6'b000000;
    check(2'b01, 2'b01, 1'b0, "deselected bank");
    // readback and output select
    dut_in = 2'b10; #5 sample_clk = 1; #5 sample_clk = 0; mrb = 2'b10;
    xoe = 1; xsel = 6'b100000; #1 check(2'b01, 2'b01, 1'b1, "result of pin 1");
    xsel = 6'b000000;          #1 check(2'b01, 2'b01, 1'b0, "result of pin 0");
    xoe = 0;
    // random traffic against the reference model
    repeat (2000) begin
      @(negedge clk);
      xbank  = $urandom_range(0, 3) != 0;
      xsel   = 6'($urandom);
      ram_in = 1'($urandom);
      xoe    = 1'($urandom);
      dut_in = 2'($urandom);
      #1 check({m2[2], m2[0]}, {m2[3], m2[1]}, exp_ram(), "random, before edge");
      @(posedge clk);
      if (xsel[4]) m2 = m1;
      for (int k = 0; k < 4; k++) if (xsel[k] && xbank) m1[k] = ram_in;
      #10;
      if ($urandom_range(0, 2) == 0) begin
        sample_clk = 1; mrb = dut_in; #10 sample_clk = 0;
      end
      #1 check({m2[2], m2[0]}, {m2[3], m2[1]}, exp_ram(), "random, after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
