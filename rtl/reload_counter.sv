// reload_counter: synchronous counter with a buried default register.
//
// Models the counters of the controller, which are built from counter parts
// that hold a hidden register next to the count. The host writes the
// default value (def_we, def_in). reload copies the default into the count,
// which is how the address, loop and delay counters restart at the end of
// a block in infinite-loop mode. en steps the count by one, upwards when UP
// is 1 and downwards otherwise; reload wins over en. zero is high while the
// count is zero. All changes happen at the rising clock edge; the
// asynchronous reset clears count and default. The buried register and the
// reload follow the design; widths and the reset are choices of this RTL.
`timescale 1ns / 1ps
module reload_counter #(
  parameter int unsigned WIDTH = 4,
  parameter bit          UP    = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             def_we,   // write the buried default register
  input  logic [WIDTH-1:0] def_in,
  input  logic             reload,   // count <= default
  input  logic             en,       // count one step
  output logic [WIDTH-1:0] def_q,    // buried register, for read-back
  output logic [WIDTH-1:0] count,
  output logic             zero
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      def_q <= '0;
      count <= '0;
    end else begin
      if (def_we) def_q <= def_in;
      if (reload)  count <= def_q;
      else if (en) count <= UP ? count + 1'b1 : count - 1'b1;
    end
  end

  assign zero = (count == '0);

endmodule
