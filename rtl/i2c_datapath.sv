// I2C datapath: drives the SCL and SDA lines and holds the data of one
// transaction, on the commands of the I2C control unit.
//
// At load_i (the cycle a transaction starts) it latches the prescaler, the
// address byte, the number of bytes to send (sizes above 9 count as 9) and
// the bytes themselves, and clears its byte counter. While run_i is high a
// half-period counter runs from 0 to the prescaler value: half_end_o marks
// the last cycle of an SCL half period, mid_o its middle (prescaler / 2),
// where SDA is changed (low half) or sampled (high half). While run_i is low
// the counter rests at 0.
//
// SCL is a register that follows scl_level_i one cycle later. SDA is a
// register loaded by sda_cmd_i: from the shift register's MSB, high or low.
// The 8-bit shift register is loaded with the write- or read-direction
// address byte or with the next data byte (shift_cmd_i), is shifted left
// after each sent bit and takes the sampled SDA in from the right when
// receiving. sample_ack_i stores the acknowledge (SDA low) on ack_o;
// rx_store_i copies the shift register to rx_data_o. data_sent_o is high once
// as many bytes have been loaded as were to be sent; read_op_o is bit 0 of the
// latched address (1 = read operation). Both lines are open drain: 0 pulls
// the line low, 1 releases it.
//
// That the module drives the SCL and SDA pins under a control unit follows
// the published I2C architecture; the counter-based half-period timing and
// the command encoding are this design's choices.
module i2c_datapath
  import ekko_pkg::*;
(
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  logic                          load_i,
  input  logic [15:0]                   prescaler_i,
  input  logic [7:0]                    addr_i,
  input  logic [7:0]                    data_size_i,
  input  logic [I2C_MAX_BYTES-1:0][7:0] tx_bytes_i,
  input  logic                          run_i,
  input  logic                          scl_level_i,
  input  i2c_sda_cmd_e                  sda_cmd_i,
  input  i2c_shift_cmd_e                shift_cmd_i,
  input  logic                          sample_ack_i,
  input  logic                          rx_store_i,
  output logic                          half_end_o,
  output logic                          mid_o,
  output logic                          ack_o,
  output logic                          data_sent_o,
  output logic                          read_op_o,
  output logic [7:0]                    rx_data_o,
  output logic                          scl_o,
  output logic                          sda_o,
  input  logic                          sda_i
);
  logic [15:0] cnt_q, presc_q;
  logic [7:0]  shift_q, addr_q, size_q;
  logic [3:0]  byte_q;          // bytes loaded for sending so far
  logic [I2C_MAX_BYTES-1:0][7:0] tx_q;
  logic        ack_q, scl_q, sda_q;

  assign half_end_o  = (cnt_q == presc_q);
  assign mid_o       = (cnt_q == (presc_q >> 1));
  assign data_sent_o = ({4'b0, byte_q} == size_q);
  assign read_op_o   = addr_q[0];
  assign ack_o       = ack_q;
  assign scl_o       = scl_q;
  assign sda_o       = sda_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q     <= '0;
      presc_q   <= '0;
      shift_q   <= '0;
      addr_q    <= '0;
      size_q    <= '0;
      byte_q    <= '0;
      tx_q      <= '0;
      ack_q     <= 1'b0;
      rx_data_o <= '0;
      scl_q     <= 1'b1;
      sda_q     <= 1'b1;
    end else begin
      scl_q <= scl_level_i;
      cnt_q <= (!run_i || half_end_o) ? '0 : cnt_q + 1'b1;

      if (load_i) begin
        presc_q <= prescaler_i;
        addr_q  <= addr_i;
        size_q  <= (data_size_i > 8'(I2C_MAX_BYTES)) ? 8'(I2C_MAX_BYTES) : data_size_i;
        tx_q    <= tx_bytes_i;
        byte_q  <= '0;
      end

      unique case (sda_cmd_i)
        SDA_SHIFT: sda_q <= shift_q[7];
        SDA_HIGH:  sda_q <= 1'b1;
        SDA_LOW:   sda_q <= 1'b0;
        default: ;
      endcase

      unique case (shift_cmd_i)
        SH_LOAD_AW: shift_q <= {addr_q[7:1], 1'b0};
        SH_LOAD_AR: shift_q <= {addr_q[7:1], 1'b1};
        SH_LOAD_TX: begin
          shift_q <= tx_q[byte_q];
          byte_q  <= byte_q + 1'b1;
        end
        SH_OUT:     shift_q <= {shift_q[6:0], 1'b0};
        SH_IN:      shift_q <= {shift_q[6:0], sda_i};
        default: ;
      endcase

      if (sample_ack_i) ack_q     <= !sda_i;
      if (rx_store_i)   rx_data_o <= shift_q;
    end
  end

endmodule
