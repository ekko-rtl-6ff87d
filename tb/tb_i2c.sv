// Testbench of the I2C peripheral, driven through its AXI4-Lite port by a
// bus-to-AXI bridge and connected to a behavioural slave at address 0x68.
// It repeats what the driver does: initialise (prescaler for standard mode
// at 40 MHz, 199; enable), transmit register number 2 and value 0x0A to
// address byte 0xD0, then receive register 2 from 0xD1. Register fields are
// written with byte-wide stores, as compiled bit-field code does. Checked:
// the flags VALID TX, VALID RX and ERROR and their clearing at the next
// start, DATA RECEIVED, a nine-byte write spread over conf1-conf3, the
// interrupt pulse when INT is set, and an error for an absent slave.
module tb_i2c;
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
  logic      irq, scl, sda_m, sda_s, sda;
  int        n_start, n_stop, n_aack, n_bw, n_br, n_irq = 0;

  assign sda = sda_m & sda_s;
  axi_master bridge (.clk_i(clk), .rst_ni(rst_n), .req_i(breq), .rsp_o(brsp),
                     .axi_req_o(areq), .axi_rsp_i(arsp));
  i2c dut (.clk_i(clk), .rst_ni(rst_n), .axi_req_i(areq), .axi_rsp_o(arsp), .irq_o(irq),
           .scl_o(scl), .sda_o(sda_m), .sda_i(sda));
  i2c_slave_model #(.ADDR7(7'h68)) slave (
    .scl_i(scl), .sda_i(sda), .sda_o(sda_s), .n_start(n_start), .n_stop(n_stop),
    .n_addr_ack(n_aack), .n_bytes_written(n_bw), .n_bytes_read(n_br));

  always @(posedge clk) if (rst_n && irq) n_irq++;

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
    breq = '{req: 1'b1, we: we, be: be, addr: I2C_BASE + 32'(ofs), wdata: d};
    #1;
    while (!brsp.gnt) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 breq.req = 1'b0;
    while (!brsp.rvalid) begin @(posedge clk); #1; end
    q = brsp.rdata;
  endtask
  task automatic wr(logic [11:0] ofs, logic [31:0] d, logic [3:0] be = 4'hF);
    logic [31:0] q;
    access(1'b1, ofs, be, d, q);
  endtask
  task automatic rd(logic [11:0] ofs, output logic [31:0] q);
    access(1'b0, ofs, 4'hF, 0, q);
  endtask
  // read-modify-write of one bit in byte 1 of conf0, stored with a byte store
  task automatic set_bit(int b, bit v);
    logic [31:0] q;
    rd(I2C_CONF0_OFS, q);
    q[b] = v;
    wr(I2C_CONF0_OFS, q, 4'b0010);
  endtask
  task automatic wait_flag(int b, output logic [31:0] q);
    do rd(I2C_CONF0_OFS, q); while (!q[b] && !q[I2C_ERROR_BIT]);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    breq = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // initialise: clear, prescaler 40e6 / (2*100*1000) - 1, enable, no interrupt
    wr(I2C_CONF0_OFS, 0); wr(I2C_CONF1_OFS, 0); wr(I2C_CONF2_OFS, 0); wr(I2C_CONF3_OFS, 0);
    wr(I2C_CONF0_OFS, 32'd199 << 16, 4'b1100);
    set_bit(I2C_EN_BIT, 1'b1);
    set_bit(I2C_INT_BIT, 1'b0);
    rd(I2C_CONF0_OFS, q);
    check(q == ((32'd199 << 16) | (32'b1 << I2C_EN_BIT)), $sformatf("conf0 after init %h", q));

    // transmit: address byte 0xD0, data {0x02, 0x0A}
    wr(I2C_CONF0_OFS, 0, 4'b0001);
    wr(I2C_CONF1_OFS, 0); wr(I2C_CONF2_OFS, 0); wr(I2C_CONF3_OFS, 0, 4'b0100);
    wr(I2C_CONF1_OFS, 32'h020A_0000);
    wr(I2C_CONF2_OFS, 0);
    wr(I2C_CONF3_OFS, 0, 4'b1000);
    wr(I2C_CONF3_OFS, 32'd2 << 16, 4'b0100);
    wr(I2C_CONF0_OFS, 32'hD0, 4'b0001);
    set_bit(I2C_START_BIT, 1'b1);
    rd(I2C_CONF0_OFS, q);
    check(!q[I2C_VTX_BIT] && !q[I2C_START_BIT], "no VALID TX while sending; START reads 0");
    wait_flag(I2C_VTX_BIT, q);
    check(q[I2C_VTX_BIT] && !q[I2C_ERROR_BIT], "VALID TX after transmit");
    check(slave.regs[2] == 8'h0A, $sformatf("slave register 2 = %h", slave.regs[2]));

    // receive: register 2 from 0xD1
    wr(I2C_CONF0_OFS, 0, 4'b0001);
    wr(I2C_CONF1_OFS, 0);
    wr(I2C_CONF1_OFS, 32'h0200_0000);
    wr(I2C_CONF0_OFS, 32'hD1, 4'b0001);
    set_bit(I2C_START_BIT, 1'b1);
    rd(I2C_CONF0_OFS, q);
    check(!q[I2C_VTX_BIT], "VALID TX cleared by the next start");
    wait_flag(I2C_VRX_BIT, q);
    check(q[I2C_VRX_BIT] && !q[I2C_ERROR_BIT], "VALID RX after receive");
    rd(I2C_CONF3_OFS, q);
    check(q[15:8] == 8'h0A, $sformatf("DATA RECEIVED = %h", q[15:8]));
    check(n_irq == 0, "no interrupt while INT is 0");

    // faster clock for the rest: prescaler 9
    wr(I2C_CONF0_OFS, 32'd9 << 16, 4'b1100);
    set_bit(I2C_INT_BIT, 1'b1);

    // nine-byte write: pointer 5, then 8 bytes from conf1 (3), conf2 (4), conf3[31:24] (1)
    wr(I2C_CONF1_OFS, 32'h05_A1_A2_A3);
    wr(I2C_CONF2_OFS, 32'hA4_A5_A6_A7);
    wr(I2C_CONF3_OFS, 32'hA8_09_00_00, 4'b1100);
    wr(I2C_CONF0_OFS, 32'hD0, 4'b0001);
    set_bit(I2C_START_BIT, 1'b1);
    wait_flag(I2C_VTX_BIT, q);
    for (int k = 0; k < 8; k++)
      check(slave.regs[5 + k] == 8'hA1 + 8'(k), $sformatf("slave register %0d = %h", 5 + k,
            slave.regs[5 + k]));
    check(n_irq == 1, $sformatf("one interrupt with INT set, got %0d", n_irq));

    // absent slave
    wr(I2C_CONF0_OFS, 32'hA0, 4'b0001);
    set_bit(I2C_START_BIT, 1'b1);
    wait_flag(I2C_VTX_BIT, q);
    check(q[I2C_ERROR_BIT] && !q[I2C_VTX_BIT], "ERROR for an absent slave");
    check(n_irq == 1, "no interrupt on error");
    // a good transaction clears ERROR
    wr(I2C_CONF0_OFS, 32'hD0, 4'b0001);
    set_bit(I2C_START_BIT, 1'b1);
    rd(I2C_CONF0_OFS, q);
    check(!q[I2C_ERROR_BIT], "ERROR cleared by the next start");
    wait_flag(I2C_VTX_BIT, q);
    check(q[I2C_VTX_BIT], "write after error");
    // disabled: START does nothing
    set_bit(I2C_EN_BIT, 1'b0);
    set_bit(I2C_START_BIT, 1'b1);
    repeat (20) @(posedge clk);
    rd(I2C_CONF0_OFS, q);
    check(q[I2C_VTX_BIT] && scl, "disabled core stays idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
