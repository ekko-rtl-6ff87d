// Testbench of the I2C datapath, driven command by command the way the
// control unit drives it. Checked: the half-period counter (half_end every
// prescaler+1 cycles, mid at prescaler/2, resting at 0 while run is low) for
// several prescalers; SCL following its level one cycle later; the SDA
// commands; loading the write- and read-direction address bytes; loading
// data bytes in order with the byte count and data_sent, including sizes
// clamped to 9; shifting out (MSB first) and in from SDA; acknowledge
// sampling; storing the received byte; and read_op from address bit 0.
module tb_i2c_datapath;
  import ekko_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic           load, run, scl_level, sample_ack, rx_store, sda_in;
  logic [15:0]    presc;
  logic [7:0]     addr, size, rx;
  logic [I2C_MAX_BYTES-1:0][7:0] tx;
  i2c_sda_cmd_e   sda_cmd;
  i2c_shift_cmd_e shift_cmd;
  logic           half_end, mid, ack, data_sent, read_op, scl, sda;

  i2c_datapath dut (
    .clk_i(clk), .rst_ni(rst_n), .load_i(load), .prescaler_i(presc), .addr_i(addr),
    .data_size_i(size), .tx_bytes_i(tx), .run_i(run), .scl_level_i(scl_level),
    .sda_cmd_i(sda_cmd), .shift_cmd_i(shift_cmd), .sample_ack_i(sample_ack),
    .rx_store_i(rx_store), .half_end_o(half_end), .mid_o(mid), .ack_o(ack),
    .data_sent_o(data_sent), .read_op_o(read_op), .rx_data_o(rx),
    .scl_o(scl), .sda_o(sda), .sda_i(sda_in)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic idle_cmds();
    load = 0; run = 0; sample_ack = 0; rx_store = 0;
    sda_cmd = SDA_KEEP; shift_cmd = SH_NONE;
  endtask

  // one clock with the given shift command, then back to none
  task automatic shift(i2c_shift_cmd_e c);
    @(negedge clk); shift_cmd = c;
    @(negedge clk); shift_cmd = SH_NONE;
  endtask

  task automatic do_load(logic [15:0] p, logic [7:0] a, logic [7:0] n);
    @(negedge clk);
    presc = p; addr = a; size = n; load = 1;
    @(negedge clk);
    load = 0;
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : run_tests
    int p_list [4] = '{3, 7, 10, 199};
    logic [7:0] got;
    idle_cmds();
    presc = 0; addr = 0; size = 0; scl_level = 1; sda_in = 1;
    for (int i = 0; i < I2C_MAX_BYTES; i++) tx[i] = 8'hA0 + 8'(i);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    check(scl && sda, "lines released after reset");

    // half-period timing
    foreach (p_list[k]) begin
      int last_he, last_mid, n_he;
      last_mid = 0;
      do_load(16'(p_list[k]), 8'hD0, 8'd2);
      @(negedge clk); run = 1;
      last_he = -1; last_mid = -1; n_he = 0;
      repeat (6 * (p_list[k] + 1)) begin
        @(posedge clk); #1;
        if (half_end) begin
          if (last_he >= 0) check(cycle - last_he == p_list[k] + 1,
                                  $sformatf("half period %0d, prescaler %0d", cycle - last_he, p_list[k]));
          last_he = cycle; n_he++;
        end
        if (mid) begin
          check(last_he >= 0 ? (cycle - last_he == p_list[k] / 2 + 1) : 1'b1,
                $sformatf("mid %0d cycles after a half end, prescaler %0d", cycle - last_he, p_list[k]));
          last_mid = cycle;
        end
      end
      check(n_he >= 5, $sformatf("%0d half ends", n_he));
      check(last_mid > 0, "mid seen");
      @(negedge clk); run = 0;
      @(negedge clk);
      check(dut.cnt_q == 0 && !half_end, "counter rests at 0 while run is low");
    end

    // SCL follows its level one cycle later
    @(negedge clk); scl_level = 0;
    #1 check(scl == 1'b1, "SCL not yet changed");
    @(negedge clk); check(scl == 1'b0, "SCL low one cycle later");
    scl_level = 1;
    @(negedge clk); check(scl == 1'b1, "SCL high again");

    // SDA commands
    @(negedge clk); sda_cmd = SDA_LOW;  @(negedge clk); sda_cmd = SDA_KEEP;
    check(sda == 1'b0, "SDA low");
    repeat (2) @(negedge clk);
    check(sda == 1'b0, "SDA kept");
    sda_cmd = SDA_HIGH; @(negedge clk); sda_cmd = SDA_KEEP;
    check(sda == 1'b1, "SDA high");

    // address bytes, read_op
    do_load(16'd7, 8'hD1, 8'd0);
    check(read_op, "read_op from address bit 0");
    shift(SH_LOAD_AW);
    check(dut.shift_q == 8'hD0, $sformatf("write-direction address %h", dut.shift_q));
    shift(SH_LOAD_AR);
    check(dut.shift_q == 8'hD1, $sformatf("read-direction address %h", dut.shift_q));
    do_load(16'd7, 8'hA4, 8'd0);
    check(!read_op, "write operation");
    check(data_sent, "size 0: nothing to send");

    // shifting out MSB first through SDA
    shift(SH_LOAD_AW);
    got = 0;
    for (int b = 0; b < 8; b++) begin
      @(negedge clk); sda_cmd = SDA_SHIFT;
      @(negedge clk); sda_cmd = SDA_KEEP;
      got = {got[6:0], sda};
      shift(SH_OUT);
    end
    check(got == 8'hA4, $sformatf("bits sent %h", got));

    // data bytes in order, data_sent, clamp to 9
    for (int n = 0; n <= 12; n += 3) begin
      int expect_n;
      expect_n = n > I2C_MAX_BYTES ? I2C_MAX_BYTES : n;
      for (int i = 0; i < I2C_MAX_BYTES; i++) tx[i] = 8'($urandom);
      do_load(16'd7, 8'hD0, 8'(n));
      for (int i = 0; i < expect_n; i++) begin
        check(!data_sent, $sformatf("size %0d: data_sent early at %0d", n, i));
        shift(SH_LOAD_TX);
        check(dut.shift_q == tx[i], $sformatf("size %0d byte %0d = %h", n, i, dut.shift_q));
      end
      check(data_sent, $sformatf("size %0d: data_sent after %0d bytes", n, expect_n));
    end

    // shifting in from SDA, storing the byte
    got = 8'($urandom);
    for (int b = 7; b >= 0; b--) begin
      sda_in = got[b];
      shift(SH_IN);
    end
    sda_in = 1;
    @(negedge clk); rx_store = 1; @(negedge clk); rx_store = 0;
    check(rx == got, $sformatf("received %h, sent %h", rx, got));

    // acknowledge sampling
    sda_in = 0;
    @(negedge clk); sample_ack = 1; @(negedge clk); sample_ack = 0;
    check(ack, "ACK when SDA low");
    sda_in = 1;
    repeat (2) @(negedge clk);
    check(ack, "ACK held without sampling");
    @(negedge clk); sample_ack = 1; @(negedge clk); sample_ack = 0;
    check(!ack, "NACK when SDA high");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
