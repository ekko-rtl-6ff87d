// Testbench of the timer datapath at its full 64-bit width. A reference
// counter predicts counter and done every cycle while count is driven in
// random bursts against random compare values (small ones, so that the
// counter does reach them, and random 64-bit ones).
module tb_timer_datapath;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        count;
  logic [63:0] cmp, counter;
  logic        done;
  logic [63:0] ref_cnt;
  int          n_done;

  timer_datapath dut (.clk_i(clk), .rst_ni(rst_n), .count_i(count), .cmp_value_i(cmp),
                      .done_o(done), .counter_o(counter));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    count = 0; cmp = 0; ref_cnt = 0; n_done = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 100000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 200) == 0)
        cmp = ($urandom_range(0, 3) == 0) ? {$urandom, $urandom} : 64'($urandom_range(0, 300));
      if ($urandom_range(0, 100) == 0) count = ~count;
      #1;
      check(counter == ref_cnt, $sformatf("counter %0d expected %0d", counter, ref_cnt));
      check(done == (ref_cnt == cmp), "done flag");
      if (count && ref_cnt == cmp) n_done++;
      @(posedge clk);
      if (!count) ref_cnt = 0;
      else if (ref_cnt != cmp) ref_cnt = ref_cnt + 1;
    end
    check(n_done > 10, "compare value reached while counting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
