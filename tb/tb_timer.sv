// Testbench of the timer peripheral, driven through its AXI4-Lite port by a
// bus-to-AXI bridge, the way the CPU reaches it. It follows the driver's
// sequences: clear the registers, load the 64-bit compare value, set auto
// reload / interrupt / enable, start, wait for the overflow flag and clear it
// by writing 0. Checked: register read-back and bit positions, the overflow
// flag and its clearing, the interrupt pulse and its period (cmp + 2 cycles
// in auto-reload mode), a single overflow without auto reload, the counter
// value while counting, stopping by clearing EN, and the 64-bit compare.
module tb_timer;
  import ekko_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  obi_req_t  breq;
  obi_rsp_t  brsp;
  axil_req_t areq;
  axil_rsp_t arsp;
  logic      irq;

  axi_master bridge (.clk_i(clk), .rst_ni(rst_n), .req_i(breq), .rsp_o(brsp),
                     .axi_req_o(areq), .axi_rsp_i(arsp));
  timer dut (.clk_i(clk), .rst_ni(rst_n), .axi_req_i(areq), .axi_rsp_o(arsp), .irq_o(irq));

  int irq_cycles[$];
  always @(posedge clk) if (rst_n && irq) irq_cycles.push_back(cycle);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic access(bit we, logic [11:0] ofs, logic [3:0] be, logic [31:0] d,
                        output logic [31:0] q);
    @(negedge clk);
    breq = '{req: 1'b1, we: we, be: be, addr: TIMER0_BASE + 32'(ofs), wdata: d};
    #1;
    while (!brsp.gnt) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 breq.req = 1'b0;
    while (!brsp.rvalid) begin @(posedge clk); #1; end
    q = brsp.rdata;
  endtask
  task automatic wr(logic [11:0] ofs, logic [31:0] d);
    logic [31:0] q;
    access(1'b1, ofs, 4'hF, d, q);
  endtask
  task automatic rd(logic [11:0] ofs, output logic [31:0] q);
    access(1'b0, ofs, 4'hF, 0, q);
  endtask
  // read-modify-write of one bit of the configuration register (as the driver's bit fields)
  task automatic set_bit(int b, bit v);
    logic [31:0] q;
    rd(TIMER_CONF_OFS, q);
    q[b] = v;
    wr(TIMER_CONF_OFS, q);
  endtask
  task automatic init(logic [63:0] cmp, bit int_en, bit reload);
    wr(TIMER_CMP_H_OFS, 0); wr(TIMER_CMP_L_OFS, 0); wr(TIMER_CONF_OFS, 0);
    wr(TIMER_VALUE_H_OFS, 0); wr(TIMER_VALUE_L_OFS, 0);
    wr(TIMER_CMP_H_OFS, cmp[63:32]);
    wr(TIMER_CMP_L_OFS, cmp[31:0]);
    set_bit(TIMER_RELOAD_BIT, reload);
    set_bit(TIMER_INT_BIT, int_en);
    set_bit(TIMER_EN_BIT, 1'b1);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, q2;
    int t0, n0;
    breq = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // register layout
    wr(TIMER_CMP_H_OFS, 32'hDEAD_BEEF); rd(TIMER_CMP_H_OFS, q);
    check(q == 32'hDEAD_BEEF, "cmp_high read-back");
    wr(TIMER_CMP_L_OFS, 32'h0BAD_F00D); rd(TIMER_CMP_L_OFS, q);
    check(q == 32'h0BAD_F00D, "cmp_low read-back");
    wr(TIMER_CONF_OFS, 32'h7000_0000); rd(TIMER_CONF_OFS, q);
    check(q == 32'h7000_0000, $sformatf("conf EN/INT/RELOAD read-back %h", q));
    wr(TIMER_CONF_OFS, 32'h0000_0008); rd(TIMER_CONF_OFS, q);
    check(q == 32'h0000_0008, $sformatf("unused conf bits stored: %h", q));
    wr(TIMER_CONF_OFS, 32'h8555_5555); rd(TIMER_CONF_OFS, q);
    check(q == 32'h0555_5555, $sformatf("START reads 0, unused bits stored: %h", q));
    rd(TIMER_VALUE_L_OFS, q);
    check(q == 0, "the unused bits do not start the timer without EN");
    wr(TIMER_CONF_OFS, 0);

    // 1. no interrupt, no auto reload: one overflow, flag polled and cleared
    init(64'd40, 1'b0, 1'b0);
    rd(TIMER_CONF_OFS, q);
    check(q == 32'h4000_0000, $sformatf("after init conf = %h", q));
    set_bit(TIMER_START_BIT, 1'b1);
    rd(TIMER_VALUE_L_OFS, q);
    rd(TIMER_VALUE_L_OFS, q2);
    check(q2 > q && q2 <= 40, $sformatf("counter running: %0d then %0d", q, q2));
    do rd(TIMER_CONF_OFS, q); while (!q[TIMER_OVERFLOW_BIT]);
    check(q[TIMER_START_BIT] == 1'b0, "START reads 0");
    set_bit(TIMER_OVERFLOW_BIT, 1'b0);
    rd(TIMER_CONF_OFS, q);
    check(!q[TIMER_OVERFLOW_BIT], "overflow cleared by writing 0");
    repeat (100) @(posedge clk);
    rd(TIMER_CONF_OFS, q);
    check(!q[TIMER_OVERFLOW_BIT], "no second overflow without auto reload");
    check(irq_cycles.size() == 0, "no interrupt while INT is 0");

    // 2. interrupt and auto reload: periodic pulses, period cmp + 2
    init(64'd30, 1'b1, 1'b1);
    set_bit(TIMER_START_BIT, 1'b1);
    repeat (400) @(posedge clk);
    check(irq_cycles.size() >= 10, $sformatf("%0d interrupts", irq_cycles.size()));
    for (int i = 1; i < irq_cycles.size(); i++)
      check(irq_cycles[i] - irq_cycles[i-1] == 32, $sformatf("irq period %0d, expected 32",
            irq_cycles[i] - irq_cycles[i-1]));
    rd(TIMER_CONF_OFS, q);
    check(!q[TIMER_OVERFLOW_BIT], "overflow flag kept clear while INT is on");
    // stop: clearing EN stops the interrupts and clears the counter
    set_bit(TIMER_EN_BIT, 1'b0);
    n0 = irq_cycles.size();
    repeat (200) @(posedge clk);
    check(irq_cycles.size() == n0, "no interrupt after EN cleared");
    rd(TIMER_VALUE_L_OFS, q);
    check(q == 0, "counter idle");

    // 3. 64-bit compare: above 2^32 the counter must not stop at the low half
    init({32'd1, 32'd20}, 1'b1, 1'b0);
    irq_cycles.delete();
    set_bit(TIMER_START_BIT, 1'b1);
    repeat (300) @(posedge clk);
    check(irq_cycles.size() == 0, "no overflow when only the low half matches");
    rd(TIMER_VALUE_H_OFS, q);
    check(q == 0, "value_high still 0");
    rd(TIMER_VALUE_L_OFS, q);
    check(q > 250, $sformatf("value_low counting past the low compare half: %0d", q));

    // 4. single-shot timing with INT on: pulse cmp + 2 cycles after START
    wr(TIMER_CONF_OFS, 0);
    init(64'd100, 1'b1, 1'b0);
    irq_cycles.delete();
    rd(TIMER_CONF_OFS, q);
    q[TIMER_START_BIT] = 1'b1;
    @(negedge clk);
    breq = '{req: 1'b1, we: 1'b1, be: 4'hF, addr: TIMER0_BASE, wdata: q};
    @(posedge clk);
    t0 = cycle;   // the bridge accepts here
    #1 breq.req = 1'b0;
    repeat (300) @(posedge clk);
    check(irq_cycles.size() == 1, $sformatf("one interrupt, got %0d", irq_cycles.size()));
    // the register write lands 2 cycles after the bridge accepts, then cmp + 2
    if (irq_cycles.size() > 0)
      check(irq_cycles[0] - t0 == 2 + 102, $sformatf("first interrupt after %0d cycles",
            irq_cycles[0] - t0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
