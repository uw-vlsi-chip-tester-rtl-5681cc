// tb_control_register: self-checking test of the 7-bit control register.
//
// Checks the reset value, that random writes land in the right fields of
// the register structure and that the register holds its value while the
// write enable is low.
`timescale 1ns / 1ps
module tb_control_register;
  import tester_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, we;
  logic [CTRL_W-1:0] wdata, last;
  ctrl_reg_t q;
  int checks = 0, failures = 0;

  control_register dut (.*);

  always #50 clk = ~clk;

  // power-on reset: a falling edge clears every register, also those whose
  // own clock has not ticked yet
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wdata = '0; last = '0;
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %b", q); end
    rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      we = 1'($urandom); wdata = CTRL_W'($urandom);
      @(negedge clk);
      if (we) last = wdata;
      we = 0;
      checks++;
      if (q.bank_sel !== last[1:0] || q.run !== last[2] || q.loop !== last[3] ||
          q.cfg_din !== last[4] || q.cfg_cclk !== last[5] || q.cfg_prog_n !== last[6]) begin
        failures++;
        $display("FAIL fields %b expected %b", q, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
