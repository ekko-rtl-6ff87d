// Behavioural I2C slave for testbenches, shaped like a small real-time-clock
// chip: it answers to the 7-bit address ADDR7 and holds 16 byte registers.
// A write transaction's first data byte sets the register pointer, further
// bytes are stored at the pointer, which then advances. A read transaction
// returns the register at the pointer (advancing after each byte) until the
// master answers NACK. It acknowledges its address and every byte written;
// other addresses get no acknowledge. Start (and repeated start) and stop
// conditions are counted; any fall of SDA while SCL is high counts as a
// start and any rise after a start as a stop, so unexpected counts also
// reveal badly timed SDA changes.
// Open-drain output: sda_o = 0 pulls SDA low.
module i2c_slave_model #(
  parameter logic [6:0] ADDR7 = 7'h68
) (
  input  logic scl_i,
  input  logic sda_i,
  output logic sda_o,
  output int   n_start,
  output int   n_stop,
  output int   n_addr_ack,
  output int   n_bytes_written,
  output int   n_bytes_read
);
  typedef enum {S_IDLE, S_ADDR, S_ACK_ADDR, S_WRITE, S_ACK_W, S_READ, S_READ_ACK} st_e;
  st_e         st = S_IDLE;
  logic [7:0]  regs [16];
  logic [7:0]  sh = 0, tx = 0;
  int          nbits = 0, rbit = 0;
  logic [3:0]  ptr = 0;
  logic        first = 0, rw = 0, mack = 0;
  logic        in_xfer = 0;   // a start has been seen and no stop yet
  logic        armed = 0;     // the lines settling at power-up are ignored
  initial #1 armed = 1'b1;

  initial begin
    sda_o = 1'b1;
    n_start = 0; n_stop = 0; n_addr_ack = 0; n_bytes_written = 0; n_bytes_read = 0;
    for (int i = 0; i < 16; i++) regs[i] = 8'h50 + 8'(i);
  end

  // start and stop conditions
  always @(negedge sda_i) if (scl_i && armed) begin
    n_start++;
    in_xfer = 1'b1;
    st = S_ADDR;
    nbits = 0;
    sda_o = 1'b1;
  end
  always @(posedge sda_i) if (scl_i && armed) begin
    if (in_xfer) n_stop++;   // the lines rising out of reset are no stop
    in_xfer = 1'b0;
    st = S_IDLE;
    sda_o = 1'b1;
  end

  always @(posedge scl_i) begin
    case (st)
      S_ADDR, S_WRITE: begin
        sh = {sh[6:0], sda_i};
        nbits++;
      end
      S_READ_ACK: mack = !sda_i;
      default: ;
    endcase
  end

  always @(negedge scl_i) begin
    case (st)
      S_ADDR: if (nbits == 8) begin
        if (sh[7:1] == ADDR7) begin
          rw = sh[0];
          sda_o = 1'b0;
          n_addr_ack++;
          st = S_ACK_ADDR;
        end else begin
          st = S_IDLE;
        end
      end
      S_ACK_ADDR: begin
        if (rw) begin
          tx = regs[ptr];
          ptr = ptr + 1'b1;
          sda_o = tx[7];
          rbit = 6;
          st = S_READ;
        end else begin
          sda_o = 1'b1;
          nbits = 0;
          first = 1'b1;
          st = S_WRITE;
        end
      end
      S_WRITE: if (nbits == 8) begin
        if (first) ptr = sh[3:0];
        else begin
          regs[ptr] = sh;
          ptr = ptr + 1'b1;
        end
        first = 1'b0;
        n_bytes_written++;
        sda_o = 1'b0;
        st = S_ACK_W;
      end
      S_ACK_W: begin
        sda_o = 1'b1;
        nbits = 0;
        st = S_WRITE;
      end
      S_READ: begin
        if (rbit >= 0) begin
          sda_o = tx[rbit];
          rbit--;
        end else begin
          sda_o = 1'b1;
          n_bytes_read++;
          st = S_READ_ACK;
        end
      end
      S_READ_ACK: begin
        if (mack) begin
          tx = regs[ptr];
          ptr = ptr + 1'b1;
          sda_o = tx[7];
          rbit = 6;
          st = S_READ;
        end else begin
          st = S_IDLE;
        end
      end
      default: ;
    endcase
  end
endmodule
