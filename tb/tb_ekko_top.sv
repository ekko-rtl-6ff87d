// End-to-end testbench of the microcontroller at its default sizes (128 KB
// RAM, standard-mode I2C). The testbench plays the parts that the design
// leaves outside: the CPU's instruction and data ports, the debug unit's bus
// host and its debug module slave, and an I2C real-time-clock chip at address
// 0x68. The run:
//   1. the debug host loads a 64-word program image into RAM while the CPU
//      fetches and the data port writes elsewhere, so hosts collide on the bus
//   2. the CPU fetches the image back and checks it; the debug host checks
//      the stack area written by the data port
//   3. AXI round trips: write 8 to the first AXI address (the timer 0
//      configuration register) and read 8 back; the same with a compare register
//   4. timer 0 as the system tick: interrupt + auto reload, periodic pulses
//      on the CPU timer interrupt, period checked
//   5. timer 1 free running: counter read back against elapsed cycles, then
//      single-shot overflow flag polled and cleared
//   6. I2C: write register 2 = 0x0A to the clock chip, read it back with a
//      repeated start, then a NACK from an absent slave gives ERROR; the I2C
//      interrupt fires on the write
//   7. an unmapped address answers with err; the debug module window reaches
//      the debug module port
// Each mechanism is counted; one that never happened is a failure.
module tb_ekko_top;
  import ekko_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;   // a 100 MHz simulation clock; the design's clock is 40 MHz
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  obi_req_t hreq [3];      // 0 debug host, 1 CPU data, 2 CPU instruction
  obi_rsp_t hrsp [3];
  obi_req_t dm_req;
  obi_rsp_t dm_rsp;
  logic     irq_t0, irq_t1, irq_i2c, scl, sda_m, sda_s, sda;
  int       n_start, n_stop, n_aack, n_bw, n_br;

  assign sda = sda_m & sda_s;

  ekko_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cpu_instr_req_i(hreq[2]), .cpu_instr_rsp_o(hrsp[2]),
    .cpu_data_req_i(hreq[1]),  .cpu_data_rsp_o(hrsp[1]),
    .cpu_irq_timer_o(irq_t0),
    .dbg_host_req_i(hreq[0]),  .dbg_host_rsp_o(hrsp[0]),
    .dm_req_o(dm_req), .dm_rsp_i(dm_rsp),
    .timer1_irq_o(irq_t1), .i2c_irq_o(irq_i2c),
    .i2c_scl_o(scl), .i2c_sda_o(sda_m), .i2c_sda_i(sda)
  );

  i2c_slave_model #(.ADDR7(7'h68)) rtc (
    .scl_i(scl), .sda_i(sda), .sda_o(sda_s), .n_start(n_start), .n_stop(n_stop),
    .n_addr_ack(n_aack), .n_bytes_written(n_bw), .n_bytes_read(n_br));

  // debug module slave: answers one cycle after the request
  logic        dm_v;
  logic [31:0] dm_d;
  assign dm_rsp = '{gnt: dm_req.req, rvalid: dm_v, rdata: dm_d, err: 1'b0};
  always @(posedge clk) begin
    dm_v <= dm_req.req;
    dm_d <= 32'hD0D0_0000 | {20'b0, dm_req.addr[11:0]};
  end

  // ---------------- mechanism counters ----------------
  typedef enum int {M_BUS_STALL, M_RAM, M_AXI, M_DM, M_BUS_ERR, M_TICK_IRQ, M_AUTO_RELOAD,
                    M_OVERFLOW_FLAG, M_I2C_WRITE, M_I2C_REPEATED_START, M_I2C_READ,
                    M_I2C_ERROR, M_I2C_IRQ, M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"bus stall (host waits for another)", "RAM access", "AXI access",
    "debug module access", "bus error", "timer tick interrupt", "timer auto reload",
    "timer overflow flag", "I2C write", "I2C repeated start", "I2C read", "I2C error",
    "I2C interrupt"};

  always @(posedge clk) if (rst_n) begin
    for (int h = 0; h < 3; h++) if (hreq[h].req && !hrsp[h].gnt) mech[M_BUS_STALL]++;
    if (dut.u_bus.req_ram_o) mech[M_RAM]++;
    if (dut.u_bus.req_axi_o && dut.u_bus.axi_rsp_i.gnt) mech[M_AXI]++;
    if (dm_req.req) mech[M_DM]++;
    if (irq_t0) mech[M_TICK_IRQ]++;
    if (irq_i2c) mech[M_I2C_IRQ]++;
    if (dut.u_timer0.u_cu.state_q == 2 && dut.u_timer0.reload_q) mech[M_AUTO_RELOAD]++;
    if (dut.u_i2c.u_master.u_cu.state_q == 6 && dut.u_i2c.u_master.half_end &&
        dut.u_i2c.u_master.u_cu.half_q == 2) mech[M_I2C_REPEATED_START]++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // one access by host h
  task automatic access(int h, bit we, logic [31:0] addr, logic [3:0] be, logic [31:0] d,
                        output logic [31:0] q, output logic err);
    @(negedge clk);
    hreq[h] = '{req: 1'b1, we: we, be: be, addr: addr, wdata: d};
    #1;
    while (!hrsp[h].gnt) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 hreq[h].req = 1'b0;
    while (!hrsp[h].rvalid) begin @(posedge clk); #1; end
    q = hrsp[h].rdata;
    err = hrsp[h].err;
    if (err) mech[M_BUS_ERR]++;
  endtask
  task automatic wr(logic [31:0] a, logic [31:0] d, logic [3:0] be = 4'hF);
    logic [31:0] q;
    logic e;
    access(1, 1'b1, a, be, d, q, e);
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] q);
    logic e;
    access(1, 1'b0, a, 4'hF, 0, q, e);
  endtask
  task automatic rmw(logic [31:0] a, int b, bit v, logic [3:0] be = 4'hF);
    logic [31:0] q;
    rd(a, q);
    q[b] = v;
    wr(a, q, be);
  endtask

  function automatic logic [31:0] image(int i);
    return 32'h0000_0013 ^ (32'(i) * 32'h0101_0100);   // distinct words per address
  endfunction

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, q2;
    logic e;
    int t0, ticks[$];
    for (int h = 0; h < 3; h++) hreq[h] = '0;
    dm_v = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. program load by the debug host, data-port stack writes and fetches at the same time
    fork
      for (int i = 0; i < 64; i++) access(0, 1'b1, 32'(i * 4), 4'hF, image(i), q, e);
      for (int i = 0; i < 32; i++) begin
        logic [31:0] qq; logic ee;
        access(1, 1'b1, STACK_BASE + 32'(i * 4), 4'hF, 32'h5000_0000 + 32'(i), qq, ee);
      end
      for (int i = 0; i < 32; i++) begin
        logic [31:0] qq; logic ee;
        access(2, 1'b0, 32'h0001_0000 + 32'(i * 4), 4'hF, 0, qq, ee);
      end
    join
    // 2. fetch the image, check it; debug host checks the stack
    for (int i = 0; i < 64; i++) begin
      access(2, 1'b0, 32'(i * 4), 4'hF, 0, q, e);
      check(q == image(i) && !e, $sformatf("fetch word %0d: %h", i, q));
    end
    for (int i = 0; i < 32; i++) begin
      access(0, 1'b0, STACK_BASE + 32'(i * 4), 4'hF, 0, q, e);
      check(q == 32'h5000_0000 + 32'(i), $sformatf("stack word %0d: %h", i, q));
    end
    // top of RAM, byte writes
    wr(32'h1FFFC, 32'hAABBCCDD);
    wr(32'h1FFFC, 32'h0000_1100, 4'b0010);
    rd(32'h1FFFC, q);
    check(q == 32'hAABB11DD, $sformatf("byte write at the top of RAM: %h", q));

    // 3. AXI round trip: the bus test of the original system (write 8 to the
    // first AXI address, read 8 back), then a compare register
    wr(AXI_BASE, 32'd8);
    rd(AXI_BASE, q);
    check(q == 32'd8, $sformatf("AXI read-back at the first AXI address %h", q));
    wr(AXI_BASE, 32'd0);
    wr(TIMER0_BASE + 32'h10, 32'd8);
    rd(TIMER0_BASE + 32'h10, q);
    check(q == 32'd8, $sformatf("AXI read-back %h", q));

    // 4. timer 0 as system tick: compare 200, INT, auto reload
    wr(TIMER0_BASE + 32'h0C, 0);
    wr(TIMER0_BASE + 32'h10, 32'd200);
    rmw(TIMER0_BASE, TIMER_RELOAD_BIT, 1'b1);
    rmw(TIMER0_BASE, TIMER_INT_BIT, 1'b1);
    rmw(TIMER0_BASE, TIMER_EN_BIT, 1'b1);
    rmw(TIMER0_BASE, TIMER_START_BIT, 1'b1);
    fork
      begin
        repeat (1500) begin
          @(posedge clk);
          if (irq_t0) ticks.push_back(cycle);
        end
      end
    join
    check(ticks.size() >= 6, $sformatf("%0d ticks", ticks.size()));
    for (int i = 1; i < ticks.size(); i++)
      check(ticks[i] - ticks[i-1] == 202, $sformatf("tick period %0d", ticks[i] - ticks[i-1]));
    rmw(TIMER0_BASE, TIMER_EN_BIT, 1'b0);

    // 5. timer 1: free running count against elapsed cycles, then a single overflow
    wr(TIMER1_BASE + 32'h0C, 32'hFFFF_FFFF);
    wr(TIMER1_BASE + 32'h10, 32'hFFFF_FFFF);
    rmw(TIMER1_BASE, TIMER_EN_BIT, 1'b1);
    rmw(TIMER1_BASE, TIMER_START_BIT, 1'b1);
    t0 = cycle;
    repeat (500) @(posedge clk);
    rd(TIMER1_BASE + 32'h08, q);
    rd(TIMER1_BASE + 32'h04, q2);
    check(q2 == 0 && q >= 32'(cycle - t0 - 20) && q <= 32'(cycle - t0),
          $sformatf("timer 1 counted %0d in %0d cycles", q, cycle - t0));
    wr(TIMER1_BASE, 0);
    wr(TIMER1_BASE + 32'h0C, 0);
    wr(TIMER1_BASE + 32'h10, 32'd100);
    rmw(TIMER1_BASE, TIMER_EN_BIT, 1'b1);
    rmw(TIMER1_BASE, TIMER_START_BIT, 1'b1);
    do rd(TIMER1_BASE, q); while (!q[TIMER_OVERFLOW_BIT]);
    mech[M_OVERFLOW_FLAG]++;
    rmw(TIMER1_BASE, TIMER_OVERFLOW_BIT, 1'b0);
    rd(TIMER1_BASE, q);
    check(!q[TIMER_OVERFLOW_BIT], "overflow flag cleared");
    check(!irq_t1, "timer 1 interrupt stays low with INT off");

    // 6. I2C with the clock chip, standard mode: prescaler 40e6/(2*100e3) - 1 = 199
    wr(I2C_BASE, 32'd199 << 16, 4'b1100);
    rmw(I2C_BASE, I2C_EN_BIT, 1'b1, 4'b0010);
    rmw(I2C_BASE, I2C_INT_BIT, 1'b1, 4'b0010);
    wr(I2C_BASE + 32'h04, 32'h020A_0000);
    wr(I2C_BASE + 32'h0C, 32'd2 << 16, 4'b0100);
    wr(I2C_BASE, 32'hD0, 4'b0001);
    rmw(I2C_BASE, I2C_START_BIT, 1'b1, 4'b0010);
    do rd(I2C_BASE, q); while (!q[I2C_VTX_BIT] && !q[I2C_ERROR_BIT]);
    check(q[I2C_VTX_BIT] && rtc.regs[2] == 8'h0A, "I2C write of register 2");
    if (q[I2C_VTX_BIT]) mech[M_I2C_WRITE]++;
    rmw(I2C_BASE, I2C_INT_BIT, 1'b0, 4'b0010);
    wr(I2C_BASE + 32'h04, 32'h0200_0000);
    wr(I2C_BASE, 32'hD1, 4'b0001);
    rmw(I2C_BASE, I2C_START_BIT, 1'b1, 4'b0010);
    do rd(I2C_BASE, q); while (!q[I2C_VRX_BIT] && !q[I2C_ERROR_BIT]);
    rd(I2C_BASE + 32'h0C, q2);
    check(q[I2C_VRX_BIT] && q2[15:8] == 8'h0A, $sformatf("I2C read of register 2: %h", q2[15:8]));
    if (q[I2C_VRX_BIT]) mech[M_I2C_READ]++;
    wr(I2C_BASE, 32'hA0, 4'b0001);
    rmw(I2C_BASE, I2C_START_BIT, 1'b1, 4'b0010);
    do rd(I2C_BASE, q); while (!q[I2C_VTX_BIT] && !q[I2C_ERROR_BIT]);
    check(q[I2C_ERROR_BIT], "I2C error for an absent slave");
    if (q[I2C_ERROR_BIT]) mech[M_I2C_ERROR]++;
    check(n_stop == 3 && n_start == 4, $sformatf("I2C starts/stops %0d/%0d", n_start, n_stop));

    // 7. unmapped address and the debug module window
    access(1, 1'b0, 32'h0003_0000, 4'hF, 0, q, e);
    check(e && q == 0, "unmapped address answers err");
    access(2, 1'b0, 32'h8000_0000, 4'hF, 0, q, e);
    check(e, "unmapped fetch answers err");
    access(1, 1'b0, DEBUG_BASE + 32'h800, 4'hF, 0, q, e);
    check(!e && q == 32'hD0D0_0800, $sformatf("debug module read %h", q));

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-36s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism never happened: %s", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
