// Testbench of the I2C control unit. The unit drives an I2C datapath, whose
// lines go to a behavioural slave at address 0x68. The sequence of states the
// unit passes through is recorded and compared with the sequence the
// transaction calls for: writes of 0, 1, 2 and 9 bytes, a register read
// (write the register number, repeated start, read, NACK), a NACK on the
// address (absent slave) and a NACK on a data byte (forced by the testbench).
// Also checked: which end pulse (valid_tx, valid_rx, error) comes, once, in
// the first cycle with busy low; the number of data bytes loaded; the
// transaction length of (23 + 18n)(prescaler+1) cycles for a write of n
// bytes and 80(prescaler+1) for a read; and that a start is ignored while
// the unit is disabled.
module tb_i2c_control_unit;
  import ekko_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  localparam logic [15:0] PRESC = 16'd5;

  logic           en, start, busy, vtx, vrx, err;
  logic           load, run, scl_level, sample_ack, rx_store;
  logic           half_end, mid, ack, data_sent, read_op;
  i2c_sda_cmd_e   sda_cmd;
  i2c_shift_cmd_e shift_cmd;
  logic [7:0]     addr, size, rx;
  logic [I2C_MAX_BYTES-1:0][7:0] tx;
  logic           scl, sda_m, sda_s, sda, nack_data;
  int             n_start, n_stop, n_aack, n_bw, n_br;

  i2c_control_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .start_i(start),
    .half_end_i(half_end), .mid_i(mid), .ack_i(ack), .data_sent_i(data_sent),
    .read_op_i(read_op), .load_o(load), .run_o(run), .scl_level_o(scl_level),
    .sda_cmd_o(sda_cmd), .shift_cmd_o(shift_cmd), .sample_ack_o(sample_ack),
    .rx_store_o(rx_store), .busy_o(busy), .valid_tx_o(vtx), .valid_rx_o(vrx),
    .error_o(err)
  );
  i2c_datapath dp (
    .clk_i(clk), .rst_ni(rst_n), .load_i(load), .prescaler_i(PRESC), .addr_i(addr),
    .data_size_i(size), .tx_bytes_i(tx), .run_i(run), .scl_level_i(scl_level),
    .sda_cmd_i(sda_cmd), .shift_cmd_i(shift_cmd), .sample_ack_i(sample_ack),
    .rx_store_i(rx_store), .half_end_o(half_end), .mid_o(mid), .ack_o(ack),
    .data_sent_o(data_sent), .read_op_o(read_op), .rx_data_o(rx),
    .scl_o(scl), .sda_o(sda_m), .sda_i(sda)
  );
  i2c_slave_model #(.ADDR7(7'h68)) slave (
    .scl_i(scl), .sda_i(sda), .sda_o(sda_s), .n_start(n_start), .n_stop(n_stop),
    .n_addr_ack(n_aack), .n_bytes_written(n_bw), .n_bytes_read(n_br)
  );
  // nack_data hides the slave's acknowledge of data bytes (until SCL is low)
  assign sda = sda_m & (sda_s | (nack_data && (dut.state_q.name() == "WRITE_ACK" ||
                                               dut.state_q.name() == "ERROR")));

  // state trace, pulses and loads
  string trace [$];
  int    n_vtx, n_vrx, n_err, n_load_tx, pulse_ok;
  always @(posedge clk) if (rst_n) begin
    if (dut.state_q.name() != trace[$]) trace.push_back(dut.state_q.name());
    if (vtx) n_vtx++;
    if (vrx) n_vrx++;
    if (err) n_err++;
    if ((vtx || vrx || err) && !busy) pulse_ok++;
    if (shift_cmd == SH_LOAD_TX) n_load_tx++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic string join_q(string q [$]);
    string s = "";
    foreach (q[i]) s = {s, (i == 0) ? "" : " ", q[i]};
    return s;
  endfunction

  // one transaction; compares the state trace and the end pulse
  task automatic run_one(logic [7:0] a, logic [7:0] n, string expect_trace, int expect_len,
                         int expect_loads, bit e_tx, bit e_rx, bit e_err, string what);
    int t0;
    @(negedge clk);
    trace = '{"IDLE"};
    n_vtx = 0; n_vrx = 0; n_err = 0; n_load_tx = 0; pulse_ok = 0;
    addr = a; size = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cycle;
    while (busy) @(negedge clk);
    @(negedge clk);
    check(join_q(trace) == expect_trace, $sformatf("%s: states %s", what, join_q(trace)));
    check(n_vtx == int'(e_tx) && n_vrx == int'(e_rx) && n_err == int'(e_err),
          $sformatf("%s: pulses tx %0d rx %0d err %0d", what, n_vtx, n_vrx, n_err));
    check(pulse_ok == 1, $sformatf("%s: end pulse with busy low", what));
    check(n_load_tx == expect_loads, $sformatf("%s: %0d bytes loaded", what, n_load_tx));
    if (expect_len > 0)
      check(cycle - t0 - 1 == expect_len,
            $sformatf("%s: %0d cycles, expected %0d", what, cycle - t0 - 1, expect_len));
    repeat (3) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    localparam int H = 32'(PRESC) + 1;
    string w;
    en = 1'b1; start = 1'b0; addr = 0; size = 0; nack_data = 1'b0;
    for (int i = 0; i < I2C_MAX_BYTES; i++) tx[i] = 8'h10 + 8'(i);
    tx[0] = 8'h03;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(negedge clk);

    run_one(8'hD0, 8'd0, "IDLE START ADDR ADDR_ACK STOP IDLE", 23 * H, 0, 1, 0, 0, "address only");
    run_one(8'hD0, 8'd1, "IDLE START ADDR ADDR_ACK WRITE WRITE_ACK STOP IDLE", (23 + 18) * H, 1,
            1, 0, 0, "1-byte write");
    run_one(8'hD0, 8'd2,
            "IDLE START ADDR ADDR_ACK WRITE WRITE_ACK WRITE WRITE_ACK STOP IDLE",
            (23 + 36) * H, 2, 1, 0, 0, "2-byte write");
    w = "IDLE START ADDR ADDR_ACK";
    for (int i = 0; i < 9; i++) w = {w, " WRITE WRITE_ACK"};
    run_one(8'hD0, 8'd9, {w, " STOP IDLE"}, (23 + 18 * 9) * H, 9, 1, 0, 0, "9-byte write");
    // byte 0 (3) is the register pointer, bytes 1..8 land in registers 3..10
    check(slave.regs[10] == 8'h18, $sformatf("last byte of the 9 stored: %h", slave.regs[10]));
    run_one(8'hD0, 8'd12, {w, " STOP IDLE"}, (23 + 18 * 9) * H, 9, 1, 0, 0, "size 12 sends 9");
    run_one(8'hD1, 8'd0,
            "IDLE START ADDR ADDR_ACK WRITE WRITE_ACK REPEATED_START ADDR ADDR_ACK READ READ_NACK STOP IDLE",
            80 * H, 1, 0, 1, 0, "register read");
    check(rx == 8'h11, $sformatf("register 3 read %h", rx));
    run_one(8'hA0, 8'd2, "IDLE START ADDR ADDR_ACK ERROR STOP IDLE", 0, 0, 0, 0, 1,
            "NACK on the address");
    nack_data = 1'b1;
    run_one(8'hD0, 8'd3, "IDLE START ADDR ADDR_ACK WRITE WRITE_ACK ERROR STOP IDLE", 0, 1,
            0, 0, 1, "NACK on a data byte");
    nack_data = 1'b0;
    run_one(8'hA1, 8'd0, "IDLE START ADDR ADDR_ACK ERROR STOP IDLE", 0, 0, 0, 0, 1,
            "read from an absent slave");

    // disabled: a start does nothing
    en = 1'b0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (5) @(negedge clk);
    check(!busy && dut.state_q.name() == "IDLE", "start ignored while disabled");
    check(n_start == n_stop + 1, $sformatf("a stop per transaction, one repeated start: %0d/%0d",
                                           n_start, n_stop));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
