// Testbench of the timer control unit. Random values on all inputs drive the
// unit for many cycles; a reference model of the three-state machine
// (IDLE -> COUNT on start, COUNT -> STOP on done, STOP -> COUNT or IDLE by
// auto_reload, IDLE whenever the timer is disabled) predicts count, irq and
// overflow every cycle. Each transition of the diagram must be seen.
module tb_timer_control_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic auto_reload, interrupt_en, start_timer, timer_en, done;
  logic count, irq, overflow;

  timer_control_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .auto_reload_i(auto_reload), .interrupt_en_i(interrupt_en),
    .start_timer_i(start_timer), .timer_en_i(timer_en), .done_i(done),
    .count_o(count), .irq_o(irq), .overflow_o(overflow)
  );

  // reference: 0 IDLE, 1 COUNT, 2 STOP
  int ref_state;
  int seen [3][3];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nxt;
    {auto_reload, interrupt_en, start_timer, timer_en, done} = '0;
    ref_state = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 50000; n++) begin
      @(negedge clk);
      auto_reload  = 1'($urandom);
      interrupt_en = 1'($urandom);
      start_timer  = ($urandom_range(0, 3) == 0);
      timer_en     = ($urandom_range(0, 15) != 0);
      done         = ($urandom_range(0, 3) == 0);
      #1;
      check(count == (ref_state == 1), $sformatf("count in state %0d", ref_state));
      check(overflow == (ref_state == 2), $sformatf("overflow in state %0d", ref_state));
      check(irq == (ref_state == 2 && interrupt_en), $sformatf("irq in state %0d", ref_state));
      case (ref_state)
        0: nxt = start_timer ? 1 : 0;
        1: nxt = done ? 2 : 1;
        default: nxt = auto_reload ? 1 : 0;
      endcase
      if (!timer_en) nxt = 0;
      seen[ref_state][nxt]++;
      @(posedge clk);
      ref_state = nxt;
    end
    check(seen[0][1] > 0 && seen[0][0] > 0, "IDLE transitions");
    check(seen[1][1] > 0 && seen[1][2] > 0, "COUNT transitions");
    check(seen[2][1] > 0 && seen[2][0] > 0, "STOP transitions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
