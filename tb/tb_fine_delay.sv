// tb_fine_delay: self-checking test of the fine-delay model.
//
// For every tap the rising and falling edges of a 100 ns pulse are timed;
// the output must follow the input by tap * 10 ns, within 0.01 ns, and
// keep the pulse width.
`timescale 1ns / 1ps
module tb_fine_delay;
  logic       pulse_in = 1'b0, pulse_out;
  logic [2:0] sel;
  int checks = 0, failures = 0;
  realtime t_in, t_rise, t_fall;

  fine_delay dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge pulse_out) t_rise = $realtime;
  always @(negedge pulse_out) t_fall = $realtime;

  initial begin
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      #500;
      t_in = $realtime;
      pulse_in = 1'b1;
      #100 pulse_in = 1'b0;
      #400;
      checks++;
      if (t_rise - t_in > 10.0 * s + 0.01 || t_rise - t_in < 10.0 * s - 0.01) begin
        failures++;
        $display("FAIL tap %0d: rise after %0t", s, t_rise - t_in);
      end
      checks++;
      if (t_fall - t_rise > 100.01 || t_fall - t_rise < 99.99) begin
        failures++;
        $display("FAIL tap %0d: width %0t", s, t_fall - t_rise);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
