// tb_reload_counter: self-checking test of the counter with buried default.
//
// An up counter and a down counter are driven with random default writes,
// reloads and count enables; a reference model predicts count, default and
// the zero flag after every clock. Directed steps check reload priority
// over counting and the wrap of a 4-bit down counter at zero.
`timescale 1ns / 1ps
module tb_reload_counter;
  localparam int W = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  logic def_we, reload, en;
  logic [W-1:0] def_in;
  logic [W-1:0] up_def, up_cnt, dn_def, dn_cnt;
  logic up_zero, dn_zero;
  int checks = 0, failures = 0;

  reload_counter #(.WIDTH(W), .UP(1'b1)) u_up (
    .clk, .rst_n, .def_we, .def_in, .reload, .en,
    .def_q(up_def), .count(up_cnt), .zero(up_zero));
  reload_counter #(.WIDTH(W), .UP(1'b0)) u_dn (
    .clk, .rst_n, .def_we, .def_in, .reload, .en,
    .def_q(dn_def), .count(dn_cnt), .zero(dn_zero));

  always #50 clk = ~clk;

  // power-on reset: a falling edge clears every register, also those whose
  // own clock has not ticked yet
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] e_def, e_up, e_dn;

  task automatic check(input string what);
    checks++;
    if (up_def !== e_def || dn_def !== e_def || up_cnt !== e_up || dn_cnt !== e_dn ||
        up_zero !== (e_up == 0) || dn_zero !== (e_dn == 0)) begin
      failures++;
      $display("FAIL %s: def %h/%h up %h/%h dn %h/%h", what, up_def, e_def, up_cnt, e_up, dn_cnt, e_dn);
    end
  endtask

  task automatic cycle(input logic w, input logic [W-1:0] d, input logic r, input logic e);
    def_we = w; def_in = d; reload = r; en = e;
    @(posedge clk);
    if (r) begin e_up = e_def; e_dn = e_def; end
    else if (e) begin e_up = e_up + 1'b1; e_dn = e_dn - 1'b1; end
    if (w) e_def = d;
    @(negedge clk);
  endtask

  initial begin
    def_we = 0; def_in = '0; reload = 0; en = 0;
    e_def = '0; e_up = '0; e_dn = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("after reset");
    cycle(1, 4'd9, 0, 0);  check("default written");
    cycle(0, 4'd0, 1, 0);  check("reload");
    if (up_cnt !== 4'd9) begin failures++; $display("FAIL reload value"); end
    checks++;
    cycle(0, 4'd0, 1, 1);  check("reload wins over count");
    cycle(1, 4'd1, 1, 0);  check("reload uses old default");
    cycle(0, 4'd0, 1, 0);  check("reload to 1");
    cycle(0, 4'd0, 0, 1);  check("down to zero");
    checks++;
    if (!dn_zero) begin failures++; $display("FAIL zero flag"); end
    cycle(0, 4'd0, 0, 1);  check("down wraps");
    checks++;
    if (dn_cnt !== 4'hF) begin failures++; $display("FAIL wrap"); end
    repeat (1000) begin
      cycle(($urandom_range(0, 7) == 0), 4'($urandom), ($urandom_range(0, 9) == 0),
            1'($urandom));
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
