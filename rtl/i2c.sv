// I2C peripheral: the I2C master (i2c_master) behind an AXI4-Lite slave port.
//
// Registers, at byte offsets from the peripheral's base:
//   0x00 i2c_conf0 [31:16] PRESCALER  SCL half period minus one, in clocks
//                  bit 13  INT        interrupt enable (read/write)
//                  bit 12  EN         core enable (read/write)
//                  bit 11  VALID RX   a byte was received (read only)
//                  bit 10  VALID TX   the data were sent (read only)
//                  bit 9   ERROR      the slave did not acknowledge (read only)
//                  bit 8   START      write 1 to start a transaction (reads 0)
//                  [7:0]   ADDR       slave address byte; bit 0 is R/W
//   0x04 i2c_conf1 data bytes 0..3 to send, byte 0 in [31:24]
//   0x08 i2c_conf2 data bytes 4..7 to send, byte 4 in [31:24]
//   0x0C i2c_conf3 [31:24] data byte 8 to send
//                  [23:16] DATA SIZE  bytes to send in a write (at most 9)
//                  [15:8]  DATA RECEIVED (read only)
// VALID RX, VALID TX and ERROR are cleared when a transaction starts. For a
// read (ADDR bit 0 = 1), byte 0 is the slave register to read. irq_o pulses
// for one cycle when a transaction ends with VALID TX or VALID RX and INT is
// set. START takes effect one cycle after the write that sets it. Writes honour the byte strobes, so the driver's byte-wide field
// updates work. The layout follows the peripheral's register table and
// driver; the table marks INT read-only while the driver writes it, and here
// it is read/write. That the data registers read back is this design's
// choice.
module i2c
  import ekko_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axil_req_t axi_req_i,
  output axil_rsp_t axi_rsp_o,
  output logic      irq_o,
  output logic      scl_o,
  output logic      sda_o,
  input  logic      sda_i
);
  logic        wr_en, rd_en;
  logic [11:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  axil_reg_slave #(.ADDR_W(12)) u_axi (
    .clk_i, .rst_ni,
    .axi_req_i, .axi_rsp_o,
    .wr_en_o(wr_en), .wr_addr_o(wr_addr), .wr_data_o(wr_data), .wr_strb_o(wr_strb),
    .rd_en_o(rd_en), .rd_addr_o(rd_addr), .rd_data_i(rd_data)
  );

  logic [15:0] presc_q;
  logic [7:0]  addr_q, byte8_q, size_q, rx_data;
  logic [31:0] conf1_q, conf2_q;
  logic        int_q, en_q, vrx_q, vtx_q, err_q, start, start_q;
  logic        valid_tx, valid_rx, error, busy;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] strb);
    for (int b = 0; b < 4; b++) if (strb[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  logic wr0, wr1, wr2, wr3;
  assign wr0   = wr_en && (wr_addr == I2C_CONF0_OFS);
  assign wr1   = wr_en && (wr_addr == I2C_CONF1_OFS);
  assign wr2   = wr_en && (wr_addr == I2C_CONF2_OFS);
  assign wr3   = wr_en && (wr_addr == I2C_CONF3_OFS);
  assign start = wr0 && wr_strb[1] && wr_data[I2C_START_BIT];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      presc_q <= '0;
      addr_q  <= '0;
      byte8_q <= '0;
      size_q  <= '0;
      conf1_q <= '0;
      conf2_q <= '0;
      int_q   <= 1'b0;
      en_q    <= 1'b0;
      vrx_q   <= 1'b0;
      vtx_q   <= 1'b0;
      err_q   <= 1'b0;
      start_q <= 1'b0;
    end else begin
      // START acts one cycle after its write, so that fields written in the
      // same word (address, enable, prescaler) are already in place
      start_q <= start;
      if (wr0) begin
        if (wr_strb[0]) addr_q  <= wr_data[7:0];
        if (wr_strb[1]) begin
          en_q  <= wr_data[I2C_EN_BIT];
          int_q <= wr_data[I2C_INT_BIT];
        end
        if (wr_strb[2]) presc_q[7:0]  <= wr_data[23:16];
        if (wr_strb[3]) presc_q[15:8] <= wr_data[31:24];
      end
      if (wr1) conf1_q <= merge(conf1_q, wr_data, wr_strb);
      if (wr2) conf2_q <= merge(conf2_q, wr_data, wr_strb);
      if (wr3) begin
        if (wr_strb[3]) byte8_q <= wr_data[31:24];
        if (wr_strb[2]) size_q  <= wr_data[23:16];
      end
      // status flags: cleared when a transaction starts, set at its end
      if (start_q && en_q && !busy) begin
        vrx_q <= 1'b0;
        vtx_q <= 1'b0;
        err_q <= 1'b0;
      end else begin
        if (valid_rx) vrx_q <= 1'b1;
        if (valid_tx) vtx_q <= 1'b1;
        if (error)    err_q <= 1'b1;
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      I2C_CONF0_OFS: rd_data = {presc_q, 2'b00, int_q, en_q, vrx_q, vtx_q, err_q, 1'b0, addr_q};
      I2C_CONF1_OFS: rd_data = conf1_q;
      I2C_CONF2_OFS: rd_data = conf2_q;
      I2C_CONF3_OFS: rd_data = {byte8_q, size_q, rx_data, 8'h00};
      default:       rd_data = '0;
    endcase
  end

  logic [I2C_MAX_BYTES-1:0][7:0] tx_bytes;
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      tx_bytes[k]     = conf1_q[31 - 8*k -: 8];
      tx_bytes[4 + k] = conf2_q[31 - 8*k -: 8];
    end
    tx_bytes[8] = byte8_q;
  end

  i2c_master u_master (
    .clk_i, .rst_ni,
    .en_i       (en_q),
    .start_i    (start_q && !busy),
    .prescaler_i(presc_q),
    .addr_i     (addr_q),
    .data_size_i(size_q),
    .tx_bytes_i (tx_bytes),
    .rx_data_o  (rx_data),
    .busy_o     (busy),
    .valid_tx_o (valid_tx),
    .valid_rx_o (valid_rx),
    .error_o    (error),
    .scl_o, .sda_o, .sda_i
  );

  assign irq_o = int_q && (valid_tx || valid_rx);

endmodule
