// tb_datapath_lca: self-checking test of one data path array (11 macros).
//
// Random vectors are written word by word (pin-0 data, pin-0 enable, pin-1
// data, pin-1 enable) through the bus, transferred with the enable vector
// and checked on all 22 pins. Random pin levels are then sampled with a
// sample-clock pulse and read back as the two result words.
`timescale 1ns / 1ps
module tb_datapath_lca;
  localparam int N = 11;
  logic clk = 1'b0, rst_n = 1'b1, xbank, xoe, sample_clk = 1'b0;
  logic [5:0] xsel;
  logic [N-1:0] ram_in, ram_out;
  logic [2*N-1:0] dut_out, dut_oe, dut_in;
  int checks = 0, failures = 0;

  datapath_lca dut (.*);

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

  logic [N-1:0] w [4];
  logic [2*N-1:0] e_out, e_oe, pins;

  initial begin
    xbank = 1; xoe = 0; xsel = '0; ram_in = '0; dut_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (100) begin
      for (int k = 0; k < 4; k++) begin
        w[k] = N'($urandom);
        @(negedge clk); xsel = 6'(1 << k); ram_in = w[k];
      end
      @(negedge clk); xsel = 6'b010000;
      @(negedge clk); xsel = '0;
      for (int i = 0; i < N; i++) begin
        e_out[2*i] = w[0][i]; e_oe[2*i] = w[1][i];
        e_out[2*i+1] = w[2][i]; e_oe[2*i+1] = w[3][i];
      end
      checks++;
      if (dut_out !== e_out || dut_oe !== e_oe) begin
        failures++;
        $display("FAIL pins %h/%h oe %h/%h", dut_out, e_out, dut_oe, e_oe);
      end
      pins = (2*N)'($urandom);
      dut_in = pins;
      #5 sample_clk = 1; #10 sample_clk = 0;
      dut_in = ~pins;
      xoe = 1;
      for (int r = 0; r < 2; r++) begin
        xsel = r ? 6'b100000 : 6'b000000;
        #1;
        checks++;
        for (int i = 0; i < N; i++)
          if (ram_out[i] !== pins[2*i+r]) begin
            failures++;
            $display("FAIL result word %0d macro %0d", r, i);
          end
      end
      xoe = 0; xsel = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
