// I2C master: the I2C control unit and the I2C datapath joined, as the core
// of the I2C peripheral.
//
// One start_i pulse (taken only while en_i is high) runs one complete bus
// transaction. A write operation (addr_i bit 0 = 0) sends the start
// condition, addr_i, then data_size_i bytes from tx_bytes_i (byte 0 first, at
// most 9; larger sizes count as 9, size 0 sends only the address) and the
// stop condition. A read operation (addr_i bit 0 = 1) reads one register of
// a slave: it sends the address with bit 0 cleared and tx_bytes_i[0] (the
// register number), then a repeated start and the address with bit 0 set,
// reads one byte, answers NACK and stops; the byte appears on rx_data_o. A
// NACK from the slave where an acknowledge is due ends the transaction with
// a stop condition and error_o. The control unit (i2c_control_unit) holds
// the states and decisions; the datapath (i2c_datapath) holds the bus timing,
// the shift register and the transaction's data, and drives the lines.
//
// Timing: SCL has a period of 2*(prescaler_i+1) clock cycles (each half
// lasts prescaler_i+1 cycles, so prescaler = f_clk/(2*f_scl) - 1). SDA is
// changed in the middle of the SCL-low half and sampled in the middle of the
// SCL-high half. prescaler_i must be at least 3. A write of n bytes lasts
// (23 + 18n)(prescaler_i+1) cycles from the start pulse to the end pulse, a
// read 80(prescaler_i+1). Both lines are open drain: scl_o/sda_o = 0 pull
// the line low, 1 release it. The master does not read SCL back, so slaves
// cannot stretch the clock. When the stop condition is complete, one of
// valid_tx_o, valid_rx_o or error_o pulses for a cycle, the first cycle with
// busy_o low; busy_o is high from the cycle after the start pulse until then.
// The split into a control unit and a datapath follows the published I2C
// architecture; the timing details are this design's choices.
module i2c_master
  import ekko_pkg::*;
(
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  logic                          en_i,
  input  logic                          start_i,
  input  logic [15:0]                   prescaler_i,
  input  logic [7:0]                    addr_i,
  input  logic [7:0]                    data_size_i,
  input  logic [I2C_MAX_BYTES-1:0][7:0] tx_bytes_i,
  output logic [7:0]                    rx_data_o,
  output logic                          busy_o,
  output logic                          valid_tx_o,
  output logic                          valid_rx_o,
  output logic                          error_o,
  output logic                          scl_o,
  output logic                          sda_o,
  input  logic                          sda_i
);
  logic           load, run, scl_level, sample_ack, rx_store;
  logic           half_end, mid, ack, data_sent, read_op;
  i2c_sda_cmd_e   sda_cmd;
  i2c_shift_cmd_e shift_cmd;

  i2c_control_unit u_cu (
    .clk_i, .rst_ni, .en_i, .start_i,
    .half_end_i  (half_end),
    .mid_i       (mid),
    .ack_i       (ack),
    .data_sent_i (data_sent),
    .read_op_i   (read_op),
    .load_o      (load),
    .run_o       (run),
    .scl_level_o (scl_level),
    .sda_cmd_o   (sda_cmd),
    .shift_cmd_o (shift_cmd),
    .sample_ack_o(sample_ack),
    .rx_store_o  (rx_store),
    .busy_o, .valid_tx_o, .valid_rx_o, .error_o
  );

  i2c_datapath u_dp (
    .clk_i, .rst_ni,
    .load_i      (load),
    .prescaler_i, .addr_i, .data_size_i, .tx_bytes_i,
    .run_i       (run),
    .scl_level_i (scl_level),
    .sda_cmd_i   (sda_cmd),
    .shift_cmd_i (shift_cmd),
    .sample_ack_i(sample_ack),
    .rx_store_i  (rx_store),
    .half_end_o  (half_end),
    .mid_o       (mid),
    .ack_o       (ack),
    .data_sent_o (data_sent),
    .read_op_o   (read_op),
    .rx_data_o,
    .scl_o, .sda_o, .sda_i
  );

endmodule
