// tb_controller: self-checking test of the tester's sequencing controller.
//
// The controller is driven alone: the testbench plays the host (four-phase
// handshake), holds the control register value and presents a fixed
// pattern as each bank's local bus. A monitor records the select lines,
// bank enables, bus source, memory address/write and sample pulse every
// clock, and the checks compare that record with the expected sequences:
//  * setting registers read back;
//  * a host word write selects the right register of the right bank only;
//  * Step: one enable-vector cycle, the sample pulse exactly coarse+1
//    clocks later, for coarse = 3 and 0;
//  * a result read puts the arrays on the bus and returns the bank's bus;
//  * an offline block of two vectors: 4 reads, transfer, coarse delay,
//    sample, 2 writes per vector at consecutive addresses, 8+coarse clocks
//    per vector, done at the end;
//  * loop mode restarts at the start address until run is cleared, stops
//    at the end of a vector, and a memory access waits meanwhile.
`timescale 1ns / 1ps
module tb_controller;
  import tester_pkg::*;
  localparam int AW = RAM_ADDR_W;

  logic clk = 1'b0, rst_n = 1'b1;
  logic host_req = 0, host_we = 0, host_ack;
  logic [AW:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  ctrl_reg_t ctrl;
  logic ctrl_we;
  logic [31:0] bank_bus [2];
  logic [1:0] xbank;
  logic [5:0] xsel;
  logic xoe, mem_we, sample_pulse, busy, done;
  bus_src_e bus_src;
  logic [AW-1:0] mem_addr;
  logic [2:0] fine_sel;
  int checks = 0, failures = 0;

  controller dut (.*);

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

  typedef struct {
    int cyc; logic [1:0] xbank; logic [5:0] xsel; logic xoe; bus_src_e src;
    logic [AW-1:0] addr; logic we; logic sample; logic busy;
  } snap_t;
  snap_t log_q [$];
  int cyc = 0, ctrl_we_n = 0;

  always @(negedge clk) begin
    cyc++;
    log_q.push_back('{cyc, xbank, xsel, xoe, bus_src, mem_addr, mem_we, sample_pulse, busy});
    if (ctrl_we) ctrl_we_n++;
  end

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
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

  function automatic logic [AW:0] reg_addr(input logic [3:0] r);
    return (AW+1)'(r);
  endfunction

  task automatic check_eq(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) fail($sformatf("%s: %h expected %h", what, got, exp));
  endtask

  // expected offline vector sequence starting at log index i
  task automatic check_vector(inout int i, input int base, input int coarse, input string what);
    for (int k = 0; k < 4; k++, i++) begin
      checks++;
      if (log_q[i].xsel !== 6'(1 << k) || log_q[i].src !== BUS_MEM || log_q[i].addr !== AW'(base + k) ||
          log_q[i].we || log_q[i].xbank !== 2'b11)
        fail($sformatf("%s read %0d: xsel %b src %0d addr %0d", what, k, log_q[i].xsel, log_q[i].src, log_q[i].addr));
    end
    checks++;
    if (log_q[i].xsel !== 6'b010000) fail($sformatf("%s transfer", what));
    i++;
    for (int d = 0; d < coarse; d++, i++) begin
      checks++;
      if (log_q[i].xsel !== '0 || log_q[i].sample) fail($sformatf("%s delay %0d", what, d));
    end
    checks++;
    if (!log_q[i].sample || log_q[i].we) fail($sformatf("%s sample", what));
    i++;
    for (int k = 0; k < 2; k++, i++) begin
      checks++;
      if (!log_q[i].we || log_q[i].src !== BUS_LCA || !log_q[i].xoe || log_q[i].xsel !== (k ? 6'b100000 : 6'b0) ||
          log_q[i].addr !== AW'(base + 4 + k) || log_q[i].xbank !== 2'b11)
        fail($sformatf("%s write %0d: addr %0d we %b", what, k, log_q[i].addr, log_q[i].we));
    end
  endtask

  function automatic int first_of(input int from, input int kind);
    for (int i = from; i < log_q.size(); i++)
      if ((kind == 0 && log_q[i].xsel[4]) || (kind == 1 && log_q[i].sample) ||
          (kind == 2 && log_q[i].xsel[0] && log_q[i].src == BUS_MEM)) return i;
    return -1;
  endfunction

  logic [31:0] d;
  int ix, is, n, restarts, ack_cyc, stop_cyc;

  initial begin
    ctrl = '0;
    bank_bus[0] = 32'hB0B0_0000;
    bank_bus[1] = 32'hB1B1_0001;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // setting registers
    host_write(reg_addr(REG_COARSE), 3);
    host_write(reg_addr(REG_FINE), 5);
    host_write(reg_addr(REG_START), 10);
    host_write(reg_addr(REG_LENGTH), 12);
    host_read(reg_addr(REG_COARSE), d); check_eq(d, 3, "coarse");
    host_read(reg_addr(REG_FINE), d);   check_eq(d, 5, "fine");
    host_read(reg_addr(REG_START), d);  check_eq(d, 10, "start");
    host_read(reg_addr(REG_LENGTH), d); check_eq(d, 12, "length");
    check_eq(32'(fine_sel), 5, "fine_sel output");
    host_write(reg_addr(REG_CTRL), 7'b0000001);
    check_eq(ctrl_we_n, 1, "control register write strobe");
    ctrl.bank_sel = 2'd1;

    // host word write reaches only the selected bank
    log_q.delete();
    host_write(reg_addr(4'd2), 32'h1234);
    n = 0;
    foreach (log_q[i]) if (log_q[i].xsel != 0) begin
      n++;
      checks++;
      if (log_q[i].xsel !== 6'b000100 || log_q[i].xbank !== 2'b10 || log_q[i].src !== BUS_HOST)
        fail("word write select lines");
    end
    check_eq(n, 1, "word write cycles");

    // Step with coarse 3 and coarse 0
    for (int c = 3; c >= 0; c -= 3) begin
      host_write(reg_addr(REG_COARSE), c);
      log_q.delete();
      host_write(reg_addr(REG_STEP), 0);
      do @(negedge clk); while (busy);
      repeat (2) @(negedge clk);
      ix = first_of(0, 0); is = first_of(0, 1);
      checks++;
      if (ix < 0 || is < 0) fail("step: no transfer or no sample");
      else check_eq(log_q[is].cyc - log_q[ix].cyc, c + 1, $sformatf("step sample delay, coarse %0d", c));
      n = 0; foreach (log_q[i]) if (log_q[i].sample) n++;
      check_eq(n, 1, "step sample pulses");
    end

    // result read returns the selected bank's bus
    log_q.delete();
    host_read(reg_addr(REG_RES1), d);
    check_eq(d, 32'hB1B1_0001, "result read data");
    n = 0;
    foreach (log_q[i]) if (log_q[i].src == BUS_LCA) begin
      n++;
      checks++;
      if (!log_q[i].xoe || !log_q[i].xsel[5] || log_q[i].xbank !== 2'b10) fail("result read lines");
    end
    check_eq(n, 1, "result read cycles");

    // offline block: two vectors, coarse 2
    host_write(reg_addr(REG_COARSE), 2);
    log_q.delete();
    ctrl.run = 1;
    do @(negedge clk); while (!busy);
    do @(negedge clk); while (busy);
    repeat (2) @(negedge clk);   // let the monitor log the first idle cycle
    ix = first_of(0, 2);
    checks++;
    if (ix < 0) fail("offline: no read cycle");
    else begin
      check_vector(ix, 10, 2, "vector 0");
      check_vector(ix, 16, 2, "vector 1");
      checks++;
      if (log_q[ix].busy) fail("offline did not stop after the block");
    end
    n = 0; foreach (log_q[i]) if (log_q[i].busy) n++;
    check_eq(n, 2 * (8 + 2), "offline clocks for two vectors");
    host_read(reg_addr(REG_STATUS), d);
    check_eq(d, 32'b010, "status after block");
    ctrl.run = 0;
    @(negedge clk);

    // loop mode, a waiting memory access, stop on run = 0
    log_q.delete();
    ctrl.loop = 1; ctrl.run = 1;
    do begin host_read(reg_addr(REG_STATUS), d); end while (!d[2]);
    repeat (40) @(negedge clk);
    fork
      begin host_read((AW+1)'(1 << AW) | (AW+1)'(7), d); ack_cyc = cyc; end
      begin repeat (30) @(negedge clk); ctrl.run = 0; stop_cyc = cyc; end
    join
    check_eq(d, 32'hB1B1_0001, "memory read after stop");
    checks++;
    if (ack_cyc <= stop_cyc) fail("memory access served while a test ran");
    restarts = 0;
    for (int i = 1; i < log_q.size(); i++)
      if (log_q[i].src == BUS_MEM && log_q[i].xsel[0] && log_q[i].addr == 10 && log_q[i].busy) restarts++;
    checks++;
    if (restarts < 3) fail($sformatf("loop restarts %0d", restarts));
    // the last busy cycle is the second result write
    for (int i = log_q.size() - 1; i > 0; i--)
      if (log_q[i].busy) begin
        checks++;
        if (!(log_q[i].we && log_q[i].xsel[5])) fail("loop did not stop at a vector end");
        break;
      end
    $display("loop restarts seen: %0d", restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
