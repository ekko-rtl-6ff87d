// Workload testbench: the timer set-up of the system demonstration, at full
// size and at the 40 MHz system clock's cycle counts. Timer 0 is the RTOS
// tick: compare value 40,000,000 / 100 = 400,000, interrupt and auto reload
// on, so it interrupts the CPU every 10 ms; an interrupt handler that toggles
// a pin on each tick makes a 50 Hz square wave. Timer 1 is started at the
// same moment with the compare value for 5 minutes (40,000,000 * 300 =
// 12,000,000,000, more than 32 bits), interrupt off, and is read as a
// seconds counter (counter / 40,000,000) the way the application does.
// Checked: the register read-back of the 64-bit compare value, the tick
// period (compare + 2 cycles, see the timer), the square wave's half period,
// timer 1's count against elapsed cycles at every tick, and that timer 1 has
// neither interrupted nor overflowed. Five ticks are simulated (2 million
// cycles); the 5-minute overflow itself (1.2e10 cycles) is not.
// The CPU's data port is played by the testbench; the other hosts stay idle.
module tb_system_tick;
  timeunit 1ns; timeprecision 1ps;
  import ekko_pkg::*;

  localparam longint SYS_CLK  = 40_000_000;
  localparam longint TICK_CMP = SYS_CLK / 100;
  localparam longint T1_CMP   = SYS_CLK * 60 * 5;
  localparam int     N_TICKS  = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5ns clk = ~clk;   // 40 MHz
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  obi_req_t hreq [3];
  obi_rsp_t hrsp [3];
  obi_req_t dm_req;
  logic     irq_t0, irq_t1, irq_i2c, scl, sda_m;

  ekko_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cpu_instr_req_i(hreq[2]), .cpu_instr_rsp_o(hrsp[2]),
    .cpu_data_req_i(hreq[1]),  .cpu_data_rsp_o(hrsp[1]),
    .cpu_irq_timer_o(irq_t0),
    .dbg_host_req_i(hreq[0]),  .dbg_host_rsp_o(hrsp[0]),
    .dm_req_o(dm_req), .dm_rsp_i('0),
    .timer1_irq_o(irq_t1), .i2c_irq_o(irq_i2c),
    .i2c_scl_o(scl), .i2c_sda_o(sda_m), .i2c_sda_i(1'b1)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic access(bit we, logic [31:0] addr, logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    hreq[1] = '{req: 1'b1, we: we, be: 4'hF, addr: addr, wdata: d};
    #1;
    while (!hrsp[1].gnt) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 hreq[1].req = 1'b0;
    while (!hrsp[1].rvalid) begin @(posedge clk); #1; end
    q = hrsp[1].rdata;
  endtask
  task automatic wr(logic [31:0] a, logic [31:0] d);
    logic [31:0] q;
    access(1'b1, a, d, q);
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] q);
    access(1'b0, a, 0, q);
  endtask
  task automatic rmw(logic [31:0] a, int b, bit v);
    logic [31:0] q;
    rd(a, q);
    q[b] = v;
    wr(a, q);
  endtask
  // the driver's initialisation: clear, load the compare value, set the mode bits
  task automatic timer_init(logic [31:0] base, longint cmp, bit int_en, bit reload);
    wr(base + TIMER_CMP_H_OFS, 0);
    wr(base + TIMER_CMP_L_OFS, 0);
    wr(base + TIMER_CONF_OFS, 0);
    wr(base + TIMER_CMP_H_OFS, cmp[63:32]);
    wr(base + TIMER_CMP_L_OFS, cmp[31:0]);
    rmw(base, TIMER_RELOAD_BIT, reload);
    rmw(base, TIMER_INT_BIT, int_en);
    rmw(base, TIMER_EN_BIT, 1'b1);
  endtask

  // interrupt "handler": toggles a pin on every tick
  logic   pin = 1'b0;
  longint tick_at [$];
  longint pin_edge [$];
  int     n_t1_irq = 0;
  always @(posedge clk) if (rst_n) begin
    if (irq_t0) begin
      pin <= ~pin;
      pin_edge.push_back(cycle + 1);   // the pin changes after this edge
      tick_at.push_back(cycle);
    end
    if (irq_t1) n_t1_irq++;
  end

  initial begin : watchdog
    repeat (2_300_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : run
    logic [31:0] q, hi, lo;
    longint t1_start, seen;
    for (int h = 0; h < 3; h++) hreq[h] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    timer_init(TIMER0_BASE, TICK_CMP, 1'b1, 1'b1);
    timer_init(TIMER1_BASE, T1_CMP, 1'b0, 1'b0);
    rd(TIMER1_BASE + TIMER_CMP_H_OFS, hi);
    rd(TIMER1_BASE + TIMER_CMP_L_OFS, lo);
    check({hi, lo} == 64'(T1_CMP), $sformatf("5-minute compare value read back %h%h", hi, lo));
    check(hi == 32'd2, "5-minute compare value needs the upper word");

    // start both (the start bit is the last write of each read-modify-write)
    rmw(TIMER0_BASE, TIMER_START_BIT, 1'b1);
    rmw(TIMER1_BASE, TIMER_START_BIT, 1'b1);
    t1_start = cycle;

    seen = 0;
    while (tick_at.size() < N_TICKS) begin
      @(posedge clk);
      if (tick_at.size() > seen) begin
        seen = tick_at.size();
        // read timer 1 like the application: elapsed seconds = counter / clock
        rd(TIMER1_BASE + TIMER_VALUE_H_OFS, hi);
        rd(TIMER1_BASE + TIMER_VALUE_L_OFS, lo);
        check(hi == 0, "timer 1 upper word still 0");
        check(longint'(lo) <= cycle - t1_start && longint'(lo) + 40 >= cycle - t1_start,
              $sformatf("timer 1 count %0d after %0d cycles", lo, cycle - t1_start));
        check(longint'({hi, lo}) / SYS_CLK == 0, "under one second elapsed");
      end
    end

    for (int i = 1; i < tick_at.size(); i++) begin
      check(tick_at[i] - tick_at[i-1] == TICK_CMP + 2,
            $sformatf("tick period %0d cycles", tick_at[i] - tick_at[i-1]));
      // within 0.001 % of 10 ms at 25 ns per cycle
      check((tick_at[i] - tick_at[i-1]) * 25 >= 64'd9_999_900 &&
            (tick_at[i] - tick_at[i-1]) * 25 <= 64'd10_000_100, "tick is 10 ms");
    end
    for (int i = 2; i < pin_edge.size(); i++)
      check(pin_edge[i] - pin_edge[i-2] == 2 * (TICK_CMP + 2), "square wave period 20 ms (50 Hz)");
    check(pin_edge.size() >= N_TICKS, "square wave toggled on each tick");

    rd(TIMER1_BASE + TIMER_CONF_OFS, q);
    check(!q[TIMER_OVERFLOW_BIT] && n_t1_irq == 0, "timer 1 neither overflowed nor interrupted");
    rd(TIMER0_BASE + TIMER_CONF_OFS, q);
    check(q[TIMER_EN_BIT] && q[TIMER_INT_BIT] && q[TIMER_RELOAD_BIT] && !q[TIMER_START_BIT],
          $sformatf("timer 0 configuration %h", q));

    $display("ticks %0d, period %0d cycles, timer 1 at %0d cycles", tick_at.size(),
             tick_at[1] - tick_at[0], cycle - t1_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
