// tb_sram_chip: self-checking test of the byte-wide static RAM, full size.
//
// Writes random bytes to random addresses (including the first and last
// word), keeping a copy in an associative array, then reads every written
// address back through the asynchronous read port. Also checks that a
// cycle without write enable leaves the contents alone.
`timescale 1ns / 1ps
module tb_sram_chip;
  localparam int AW = 15;
  logic clk = 1'b0, we;
  logic [AW-1:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] ref_mem [int];
  int checks = 0, failures = 0;

  sram_chip #(.ADDR_W(AW)) dut (.*);

  always #50 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [AW-1:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1;
    @(negedge clk); we = 0;
    ref_mem[int'(a)] = d;
  endtask

  initial begin
    we = 0; addr = '0; wdata = '0;
    wr('0, 8'hA5);
    wr('1, 8'h3C);
    repeat (2000) wr(AW'($urandom), 8'($urandom));
    // a cycle without write enable
    @(negedge clk); addr = '0; wdata = 8'h00; we = 0;
    @(negedge clk);
    foreach (ref_mem[a]) begin
      addr = AW'(a); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("FAIL addr %h: %h expected %h", a, rdata, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
