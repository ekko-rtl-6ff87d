// I2C control unit: the state machine that runs one I2C transaction by
// commanding the I2C datapath.
//
// One start_i pulse (taken only in IDLE while en_i is high) loads the
// datapath and runs one complete bus transaction through these states:
//   START          start condition (SDA falls while SCL is high)
//   ADDR           the 8-bit address byte, MSB first
//   ADDR_ACK       the slave's acknowledge; NACK -> ERROR; otherwise READ
//                  if addr_sent is set, else WRITE
//   WRITE          one data byte, MSB first
//   WRITE_ACK      the slave's acknowledge; NACK -> ERROR; for a read
//                  operation -> REPEATED_START; for a write -> STOP once
//                  all bytes are sent (data_sent), else the next byte
//   REPEATED_START a repeated start before the read-direction address; sets
//                  addr_sent
//   READ           one byte from the slave, MSB first
//   READ_NACK      the master's NACK that ends the read
//   STOP           stop condition (SDA rises while SCL is high)
//   ERROR          one cycle that records the error, then STOP
// A bit takes two SCL half periods (low, high); START takes two, STOP and
// REPEATED_START three. The unit counts the halves of each step (half_q) and
// the bits of each byte (bit_q), and steps on the datapath's half_end_i. In
// each cycle it tells the datapath the SCL level, what to do with SDA (change
// it in the middle of the low half, or at the end of a half for the start and
// stop conditions), what to do with the shift register and when to sample.
// When the stop condition is complete, one of valid_tx_o, valid_rx_o or
// error_o pulses for a cycle, the first cycle with busy_o low; busy_o is high
// from the cycle after the start pulse until then.
//
// The states, their order and the addr_sent / wr / data_sent decisions follow
// the published description of the I2C control unit (wr is the read_op_i
// input here); READ_NACK as a state of its own, ERROR ending in a stop
// condition and the half-period step counting are this design's choices.
module i2c_control_unit
  import ekko_pkg::*;
(
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           en_i,
  input  logic           start_i,
  // status from the datapath
  input  logic           half_end_i,
  input  logic           mid_i,
  input  logic           ack_i,
  input  logic           data_sent_i,
  input  logic           read_op_i,
  // commands to the datapath
  output logic           load_o,
  output logic           run_o,
  output logic           scl_level_o,
  output i2c_sda_cmd_e   sda_cmd_o,
  output i2c_shift_cmd_e shift_cmd_o,
  output logic           sample_ack_o,
  output logic           rx_store_o,
  // status to the register file
  output logic           busy_o,
  output logic           valid_tx_o,
  output logic           valid_rx_o,
  output logic           error_o
);
  typedef enum logic [3:0] {
    IDLE, START, ADDR, ADDR_ACK, WRITE, WRITE_ACK, REPEATED_START,
    READ, READ_NACK, STOP, ERROR
  } state_e;

  state_e     state_q;
  logic [1:0] half_q;           // which SCL half of the current step
  logic [2:0] bit_q;            // bits left in the current byte, minus one
  logic       addr_sent_q, err_q;

  logic ack_step, mid_low, mid_high, bit_step;
  assign ack_step = state_q inside {ADDR_ACK, WRITE_ACK};
  assign mid_low  = mid_i && half_q == 2'd0;
  assign mid_high = mid_i && half_q == 2'd1;
  // end of the high half of a bit (data, acknowledge or NACK)
  assign bit_step = half_end_i && half_q == 2'd1;

  assign busy_o = (state_q != IDLE);
  assign load_o = (state_q == IDLE) && start_i && en_i;
  assign run_o  = !(state_q inside {IDLE, ERROR});

  // SCL level of each state and half
  always_comb begin
    unique case (state_q)
      IDLE, START:          scl_level_o = 1'b1;
      REPEATED_START, STOP: scl_level_o = (half_q != 2'd0);
      ERROR:                scl_level_o = 1'b0;
      default:              scl_level_o = (half_q == 2'd1);  // low half, high half
    endcase
  end

  // SDA: set in the middle of the low half; start/stop edges at a half's end
  always_comb begin
    sda_cmd_o = SDA_KEEP;
    if (state_q == IDLE) begin
      sda_cmd_o = SDA_HIGH;
    end else if (state_q != ERROR) begin
      if (mid_low) begin
        unique case (state_q)
          ADDR, WRITE: sda_cmd_o = SDA_SHIFT;
          STOP:        sda_cmd_o = SDA_LOW;
          START:       sda_cmd_o = SDA_KEEP;
          default:     sda_cmd_o = SDA_HIGH;  // release for ACK, READ, NACK, repeated start
        endcase
      end else if (half_end_i) begin
        if (state_q == START && half_q == 2'd0)          sda_cmd_o = SDA_LOW;
        if (state_q == REPEATED_START && half_q == 2'd1) sda_cmd_o = SDA_LOW;
        if (state_q == STOP && half_q == 2'd1)           sda_cmd_o = SDA_HIGH;
      end
    end
  end

  // next step after an acknowledge bit
  logic next_is_write;
  assign next_is_write = ack_i && !(state_q == ADDR_ACK && addr_sent_q) &&
                         !(state_q == WRITE_ACK && read_op_i) &&
                         (read_op_i || !data_sent_i);

  // shift register, sampling and the received byte
  always_comb begin
    shift_cmd_o  = SH_NONE;
    sample_ack_o = ack_step && mid_high;
    rx_store_o   = (state_q == READ_NACK) && bit_step;
    if (state_q == READ && mid_high) shift_cmd_o = SH_IN;
    if (half_end_i) begin
      unique case (state_q)
        START:               if (half_q == 2'd1) shift_cmd_o = SH_LOAD_AW;
        REPEATED_START:      if (half_q == 2'd2) shift_cmd_o = SH_LOAD_AR;
        ADDR, WRITE:         if (half_q == 2'd1) shift_cmd_o = SH_OUT;
        ADDR_ACK, WRITE_ACK: if (half_q == 2'd1 && next_is_write) shift_cmd_o = SH_LOAD_TX;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= IDLE;
      half_q      <= '0;
      bit_q       <= '0;
      addr_sent_q <= 1'b0;
      err_q       <= 1'b0;
      valid_tx_o  <= 1'b0;
      valid_rx_o  <= 1'b0;
      error_o     <= 1'b0;
    end else begin
      valid_tx_o <= 1'b0;
      valid_rx_o <= 1'b0;
      error_o    <= 1'b0;

      if (state_q == IDLE) begin
        if (load_o) begin
          addr_sent_q <= 1'b0;
          err_q       <= 1'b0;
          half_q      <= '0;
          state_q     <= START;
        end
      end else if (state_q == ERROR) begin
        err_q   <= 1'b1;
        half_q  <= '0;
        state_q <= STOP;
      end else if (half_end_i) begin
        unique case (state_q)
          START: begin
            if (half_q == 2'd0) begin
              half_q <= 2'd1;
            end else begin
              bit_q   <= 3'd7;
              half_q  <= 2'd0;
              state_q <= ADDR;
            end
          end
          REPEATED_START: begin
            if (half_q == 2'd2) begin
              bit_q       <= 3'd7;
              half_q      <= 2'd0;
              addr_sent_q <= 1'b1;
              state_q     <= ADDR;
            end else begin
              half_q <= half_q + 1'b1;
            end
          end
          ADDR, WRITE, READ: begin
            if (half_q == 2'd0) begin
              half_q <= 2'd1;
            end else begin
              half_q <= 2'd0;
              if (bit_q == 3'd0) begin
                unique case (state_q)
                  ADDR:    state_q <= ADDR_ACK;
                  WRITE:   state_q <= WRITE_ACK;
                  default: state_q <= READ_NACK;
                endcase
              end else begin
                bit_q <= bit_q - 1'b1;
              end
            end
          end
          ADDR_ACK, WRITE_ACK: begin
            if (half_q == 2'd0) begin
              half_q <= 2'd1;
            end else begin
              half_q <= 2'd0;
              bit_q  <= 3'd7;
              if (!ack_i)                                     state_q <= ERROR;
              else if (state_q == ADDR_ACK && addr_sent_q)    state_q <= READ;
              else if (state_q == WRITE_ACK && read_op_i)     state_q <= REPEATED_START;
              else if (!read_op_i && data_sent_i)             state_q <= STOP;
              else                                            state_q <= WRITE;
            end
          end
          READ_NACK: begin
            if (half_q == 2'd0) begin
              half_q <= 2'd1;
            end else begin
              half_q  <= 2'd0;
              state_q <= STOP;
            end
          end
          STOP: begin
            if (half_q == 2'd2) begin
              half_q     <= 2'd0;
              state_q    <= IDLE;
              error_o    <= err_q;
              valid_rx_o <= !err_q && read_op_i;
              valid_tx_o <= !err_q && !read_op_i;
            end else begin
              half_q <= half_q + 1'b1;
            end
          end
          default: state_q <= IDLE;
        endcase
      end
    end
  end

endmodule
