// controller: sequencing state machine of the tester.
//
// It answers the host bus, steers each bank's local bus and data path
// select lines, and times the delivery of a test vector and the sampling of
// the results, either one vector at a time under host control (Step) or for
// a whole block of vectors stored in local memory (offline test).
//
// Host bus: a four-phase handshake. The host raises host_req with host_we,
// host_addr and host_wdata stable; the controller performs the access in one
// clock, registers host_rdata and raises host_ack; the host then drops
// host_req and the controller drops host_ack. host_addr[15] = 1 reaches
// local-memory word host_addr[14:0] of the bank chosen by the control
// register, otherwise host_addr[3:0] is a register (tester_pkg REG_*).
// Control, delay, address, length and status registers are served at any
// time; memory, data path and Step accesses wait while a test runs.
//
// Vector timing (clk is the 100 ns state-machine clock): in XFER the enable
// vector Xselect<4> is high and all second-rank registers load at the end
// of that cycle (edge E). The sample pulse (readDUT) rises at edge
// E + coarse, stays high one clock and is then delayed by the fine delay
// outside this module. With coarse = 0 the pulse rises with the new inputs.
// Offline, one vector takes 4 read cycles (words 0..3 loaded into the first
// rank), XFER, coarse delay cycles, the sample cycle and 2 write cycles
// (readback results to words 4 and 5): 8 + coarse clocks.
//
// Counters: the address counter gives the memory address and steps on every
// memory cycle; the loop counter is loaded with the block length in words,
// counts down in step with it and marks the block end; the delay counter
// times the coarse delay. All three have a buried default register written
// by the host and are reloaded from it at a start and, in loop mode, at
// every block end. A block runs once, or forever while the loop bit is set;
// clearing the run bit stops it at the end of the current vector.
//
// The handshake style, register map, stop rule and the counting of the
// length in words are choices of this RTL; the four-read/two-write vector
// cycle, the three counters with reload, the coarse delay in clock periods
// and the single-bank host access with all banks running in parallel
// during a test follow the design.
`timescale 1ns / 1ps
module controller
  import tester_pkg::*;
#(
  parameter int unsigned N_BANKS = tester_pkg::NUM_BANKS,
  parameter int unsigned ADDR_W  = tester_pkg::RAM_ADDR_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host bus
  input  logic                  host_req,
  input  logic                  host_we,
  input  logic [ADDR_W:0]       host_addr,
  input  logic [BUS_W-1:0]      host_wdata,
  output logic [BUS_W-1:0]      host_rdata,
  output logic                  host_ack,
  // control register
  input  ctrl_reg_t             ctrl,
  output logic                  ctrl_we,
  // banks
  input  logic [BUS_W-1:0]      bank_bus [N_BANKS],
  output logic [N_BANKS-1:0]    xbank,
  output logic [5:0]            xsel,
  output logic                  xoe,
  output bus_src_e              bus_src,
  output logic [ADDR_W-1:0]     mem_addr,
  output logic                  mem_we,
  // sample clock generation
  output logic                  sample_pulse,
  output logic [FINE_SEL_W-1:0] fine_sel,
  // status
  output logic                  busy,
  output logic                  done
);
  typedef enum logic [2:0] {
    ST_IDLE, ST_RD, ST_XFER, ST_DELAY, ST_SAMPLE, ST_WR
  } state_e;

  state_e      state, state_n;
  logic [2:0]  word_q;          // memory word of the current vector cycle
  logic        offline_q;       // running an offline block
  logic        started_q;       // run bit already acted on
  logic        looped_q;        // a block end was passed in loop mode
  logic        sample_q;

  // ---- host access decode ------------------------------------------------
  logic             is_mem, needs_idle, accept, acc_wr;
  logic [3:0]       reg_a;
  logic [N_BANKS-1:0] sel_1h;

  assign is_mem     = host_addr[ADDR_W];
  assign reg_a      = host_addr[3:0];
  assign needs_idle = is_mem || (reg_a <= REG_STEP);
  assign accept     = host_req && !host_ack && (!needs_idle || state == ST_IDLE);
  assign acc_wr     = accept && host_we;

  logic [BUS_W-1:0] sel_bus;     // local bus of the selected bank

  always_comb begin
    sel_1h  = '0;
    sel_bus = '0;
    for (int b = 0; b < N_BANKS; b++)
      if (ctrl.bank_sel == BANK_SEL_W'(b)) begin
        sel_1h[b] = 1'b1;
        sel_bus   = bank_bus[b];
      end
  end

  // ---- counters ------------------------------------------------------------
  logic              mem_cycle, reload_blk, block_end, start_go;
  logic [ADDR_W-1:0] addr_cnt, addr_def;
  logic [ADDR_W:0]   loop_cnt, loop_def;
  logic [COARSE_W-1:0] dly_cnt, dly_def;

  assign mem_cycle = (state == ST_RD) || (state == ST_WR);
  // fewer than one whole vector left once this write is done
  assign block_end = (state == ST_WR) && (word_q == 3'(W_PIN2_RES)) &&
                     (loop_cnt <= (ADDR_W+1)'(WORDS_PER_VECTOR));
  assign start_go  = (state == ST_IDLE) && !accept && ctrl.run && !started_q;
  assign reload_blk = (start_go && !(loop_def < (ADDR_W+1)'(WORDS_PER_VECTOR))) ||
                      (block_end && ctrl.loop && ctrl.run);

  reload_counter #(.WIDTH(ADDR_W), .UP(1'b1)) u_addr_cnt (
    .clk(clk), .rst_n(rst_n),
    .def_we(acc_wr && !is_mem && reg_a == REG_START),
    .def_in(host_wdata[ADDR_W-1:0]),
    .reload(reload_blk), .en(mem_cycle),
    .def_q(addr_def), .count(addr_cnt), .zero());

  reload_counter #(.WIDTH(ADDR_W+1), .UP(1'b0)) u_loop_cnt (
    .clk(clk), .rst_n(rst_n),
    .def_we(acc_wr && !is_mem && reg_a == REG_LENGTH),
    .def_in(host_wdata[ADDR_W:0]),
    .reload(reload_blk), .en(mem_cycle),
    .def_q(loop_def), .count(loop_cnt), .zero());

  reload_counter #(.WIDTH(COARSE_W), .UP(1'b0)) u_delay_cnt (
    .clk(clk), .rst_n(rst_n),
    .def_we(acc_wr && !is_mem && reg_a == REG_COARSE),
    .def_in(host_wdata[COARSE_W-1:0]),
    .reload(state == ST_XFER), .en(state == ST_DELAY),
    .def_q(dly_def), .count(dly_cnt), .zero());

  // ---- next state ----------------------------------------------------------
  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE:
        if (acc_wr && !is_mem && reg_a == REG_STEP) state_n = ST_XFER;
        else if (reload_blk)                        state_n = ST_RD;
      ST_RD:     if (word_q == 3'(W_PIN2_EN)) state_n = ST_XFER;
      ST_XFER:   state_n = (dly_def == '0) ? ST_SAMPLE : ST_DELAY;
      ST_DELAY:  if (dly_cnt <= COARSE_W'(1)) state_n = ST_SAMPLE;
      ST_SAMPLE: state_n = offline_q ? ST_WR : ST_IDLE;
      ST_WR:
        if (word_q == 3'(W_PIN2_RES)) begin
          if (block_end) state_n = (ctrl.loop && ctrl.run) ? ST_RD : ST_IDLE;
          else           state_n = ctrl.run ? ST_RD : ST_IDLE;
        end
      default:   state_n = ST_IDLE;
    endcase
  end

  // ---- registers -------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      word_q     <= '0;
      offline_q  <= 1'b0;
      started_q  <= 1'b0;
      looped_q   <= 1'b0;
      done       <= 1'b0;
      sample_q   <= 1'b0;
      fine_sel   <= '0;
      host_ack   <= 1'b0;
      host_rdata <= '0;
    end else begin
      state    <= state_n;
      sample_q <= (state_n == ST_SAMPLE) && (state != ST_SAMPLE);

      // memory word sequencing
      if (state_n == ST_RD && state != ST_RD)      word_q <= 3'(W_PIN1_DATA);
      else if (state_n == ST_WR && state != ST_WR) word_q <= 3'(W_PIN1_RES);
      else if (mem_cycle)                          word_q <= word_q + 3'd1;

      // offline block bookkeeping
      if (!ctrl.run) started_q <= 1'b0;
      if (start_go) begin
        started_q <= 1'b1;
        looped_q  <= 1'b0;
        done      <= !reload_blk;      // empty block: finished at once
        offline_q <= reload_blk;
      end
      if (block_end && ctrl.loop && ctrl.run) looped_q <= 1'b1;
      if (state == ST_WR && state_n == ST_IDLE) begin
        offline_q <= 1'b0;
        done      <= 1'b1;
      end

      // host side
      if (accept) begin
        host_ack <= 1'b1;
        if (acc_wr && !is_mem && reg_a == REG_FINE)
          fine_sel <= host_wdata[FINE_SEL_W-1:0];
        if (is_mem || reg_a == REG_RES0 || reg_a == REG_RES1)
          host_rdata <= sel_bus;
        else
          unique case (reg_a)
            REG_CTRL:   host_rdata <= BUS_W'(ctrl);
            REG_COARSE: host_rdata <= BUS_W'(dly_def);
            REG_FINE:   host_rdata <= BUS_W'(fine_sel);
            REG_START:  host_rdata <= BUS_W'(addr_def);
            REG_LENGTH: host_rdata <= BUS_W'(loop_def);
            REG_STATUS: host_rdata <= BUS_W'({looped_q, done, busy});
            default:    host_rdata <= '0;
          endcase
      end else if (host_ack && !host_req) begin
        host_ack <= 1'b0;
      end
    end
  end

  // ---- outputs to the banks ---------------------------------------------------
  always_comb begin
    xbank    = '0;
    xsel     = '0;
    xoe      = 1'b0;
    bus_src  = BUS_HOST;
    mem_addr = addr_cnt;
    mem_we   = 1'b0;
    unique case (state)
      ST_IDLE:
        if (accept && needs_idle) begin
          xbank = sel_1h;
          if (is_mem) begin
            mem_addr = host_addr[ADDR_W-1:0];
            mem_we   = host_we;
            bus_src  = host_we ? BUS_HOST : BUS_MEM;
          end else if (reg_a <= 4'(W_PIN2_EN)) begin
            xsel[reg_a[2:0]] = host_we;
          end else if (reg_a == REG_RES0 || reg_a == REG_RES1) begin
            bus_src = BUS_LCA;
            xoe     = 1'b1;
            xsel[XSEL_OUTSEL] = reg_a[0];
          end
        end
      ST_RD: begin
        xbank           = '1;
        bus_src         = BUS_MEM;
        xsel[word_q]    = 1'b1;
      end
      ST_XFER: xsel[XSEL_XFER] = 1'b1;
      ST_WR: begin
        xbank   = '1;
        bus_src = BUS_LCA;
        xoe     = 1'b1;
        mem_we  = 1'b1;
        xsel[XSEL_OUTSEL] = word_q[0];
      end
      default: ;
    endcase
  end

  assign ctrl_we      = acc_wr && !is_mem && reg_a == REG_CTRL;
  assign sample_pulse = sample_q;
  assign busy         = (state != ST_IDLE);

  // ---- protocol checks ---------------------------------------------------------
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    host_req && !host_ack && !accept |=> host_req && $stable(host_addr) && $stable(host_we))
    else $error("host dropped or changed a request before it was acknowledged");
  a_ack_ends: assert property (@(posedge clk) disable iff (!rst_n)
    host_ack && !host_req |=> !host_ack)
    else $error("acknowledge held after the request ended");
  a_lca_oe: assert property (@(posedge clk) disable iff (!rst_n)
    bus_src == BUS_LCA |-> xoe)
    else $error("bank bus taken from the LCAs without Xoe");
  a_sample_one: assert property (@(posedge clk) disable iff (!rst_n)
    sample_q |=> !sample_q)
    else $error("sample pulse longer than one clock");

endmodule
