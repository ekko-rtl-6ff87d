// Testbench of the I2C master core against a behavioural slave at address
// 0x68 (address byte 0xD0/0xD1). It runs the transactions the driver makes:
// a write of a register number and one data byte, a read of that register
// (write of the register number, repeated start, read), a nine-byte write,
// an address-only write, and a write to an absent slave, which must end in
// ERROR with a stop condition. Checked: data arriving in the slave, the byte
// read back, the end pulses, the number of start and stop conditions, the
// SCL period 2*(prescaler+1), the length of each transaction in clock
// cycles, and that nothing starts while the core is disabled.
module tb_i2c_master;
  import ekko_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic        en, start, busy, vtx, vrx, err, scl, sda_m, sda_s, sda;
  logic [15:0] presc;
  logic [7:0]  addr, size, rx;
  logic [I2C_MAX_BYTES-1:0][7:0] tx;
  int          n_start, n_stop, n_aack, n_bw, n_br;
  int          n_vtx = 0, n_vrx = 0, n_err = 0;

  assign sda = sda_m & sda_s;

  i2c_master dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .start_i(start), .prescaler_i(presc),
    .addr_i(addr), .data_size_i(size), .tx_bytes_i(tx), .rx_data_o(rx), .busy_o(busy),
    .valid_tx_o(vtx), .valid_rx_o(vrx), .error_o(err),
    .scl_o(scl), .sda_o(sda_m), .sda_i(sda)
  );
  i2c_slave_model #(.ADDR7(7'h68)) slave (
    .scl_i(scl), .sda_i(sda), .sda_o(sda_s), .n_start(n_start), .n_stop(n_stop),
    .n_addr_ack(n_aack), .n_bytes_written(n_bw), .n_bytes_read(n_br)
  );

  always @(posedge clk) if (rst_n) begin
    if (vtx) n_vtx++;
    if (vrx) n_vrx++;
    if (err) n_err++;
  end

  // SCL period measurement
  int last_rise = -1, period_min = 1 << 30, period_max = 0;
  always @(posedge scl) begin
    if (last_rise >= 0 && busy && cycle - last_rise < 10000) begin
      if (cycle - last_rise < period_min) period_min = cycle - last_rise;
      if (cycle - last_rise > period_max) period_max = cycle - last_rise;
    end
    last_rise = cycle;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // one transaction; returns its length in cycles (busy high)
  task automatic run(logic [7:0] a, logic [7:0] n, output int len);
    int t0;
    @(negedge clk);
    last_rise = -1;
    addr = a;
    size = n;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cycle;
    check(busy, "busy after start");
    while (busy) @(negedge clk);
    len = cycle - t0;
    repeat (3) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    en = 1'b1; start = 1'b0; presc = 16'd7; addr = 0; size = 0; tx = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(scl && sda, "bus idle after reset");

    // write register 2 = 0x0A (2 bytes)
    tx[0] = 8'h02; tx[1] = 8'h0A;
    run(8'hD0, 8'd2, len);
    check(slave.regs[2] == 8'h0A, $sformatf("slave register 2 = %h", slave.regs[2]));
    check(n_vtx == 1 && n_vrx == 0 && n_err == 0, "valid_tx pulse once");
    check(n_start == 1 && n_stop == 1, $sformatf("start/stop %0d/%0d", n_start, n_stop));
    check(len == (23 + 18 * 2) * 8, $sformatf("2-byte write took %0d cycles", len));
    check(period_min == 16 && period_max == 16, $sformatf("SCL period %0d..%0d, expected 16",
          period_min, period_max));

    // read register 2
    tx[0] = 8'h02;
    run(8'hD1, 8'd0, len);
    check(rx == 8'h0A, $sformatf("read back %h, expected 0a", rx));
    check(n_vrx == 1 && n_vtx == 1 && n_err == 0, "valid_rx pulse once");
    check(n_start == 3 && n_stop == 2, $sformatf("start/stop %0d/%0d (repeated start)", n_start, n_stop));
    check(n_br == 1, "one byte read");
    check(len == 80 * 8, $sformatf("read took %0d cycles", len));

    // nine-byte write: register pointer 4, then 8 data bytes
    tx[0] = 8'h04;
    for (int k = 1; k < 9; k++) tx[k] = 8'h30 + 8'(k);
    run(8'hD0, 8'd9, len);
    for (int k = 1; k < 9; k++)
      check(slave.regs[3 + k] == 8'h30 + 8'(k), $sformatf("register %0d", 3 + k));
    check(len == (23 + 18 * 9) * 8, $sformatf("9-byte write took %0d cycles", len));
    check(n_vtx == 2, "second valid_tx");

    // sizes above nine count as nine
    begin
      int bw0;
      bw0 = n_bw;
      run(8'hD0, 8'd20, len);
      check(n_bw - bw0 == 9, $sformatf("size 20 sent %0d bytes", n_bw - bw0));
    end

    // address only
    run(8'hD0, 8'd0, len);
    check(len == 23 * 8 && n_vtx == 4, $sformatf("address-only write %0d cycles", len));

    // absent slave: NACK on the address -> ERROR, stop, no valid
    run(8'hA0, 8'd2, len);
    check(n_err == 1 && n_vtx == 4 && n_vrx == 1, "error pulse on NACK");
    // (one start more than stops: the read's repeated start)
    check(n_start == n_stop + 1, $sformatf("stop condition after the error: %0d/%0d", n_start, n_stop));
    // read from an absent slave
    run(8'hA1, 8'd0, len);
    check(n_err == 2 && n_vrx == 1, "error on read from absent slave");

    // disabled core ignores start
    en = 1'b0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (5) @(negedge clk);
    check(!busy, "no transaction while disabled");
    en = 1'b1;

    // standard mode at 40 MHz: prescaler 199, SCL period 400 cycles
    presc = 16'd199;
    period_min = 1 << 30; period_max = 0;
    tx[0] = 8'h02; tx[1] = 8'h0B;
    run(8'hD0, 8'd2, len);
    check(period_min == 400 && period_max == 400, $sformatf("SCL period %0d..%0d, expected 400",
          period_min, period_max));
    check(slave.regs[2] == 8'h0B, "standard-mode write");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
