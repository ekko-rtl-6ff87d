// Shared types and constants of the EKKO microcontroller.
//
// The memory map follows the microcontroller's published map: 128 KB of RAM
// from 0x00000 (the top 8 KB, from 0x1E000, hold the stack), then three 4 KB
// peripheral windows reached over AXI4-Lite: timer 0 at 0x20000, timer 1 at
// 0x21000 and the I2C master at 0x22000. The base of the debug module window
// is not part of that map; 0x1A110000 is this design's choice.
//
// obi_req_t/obi_rsp_t bundle the request/grant/valid memory protocol that the
// CPU ports, the debug host and the system bus speak. axil_req_t/axil_rsp_t
// bundle the five AXI4-Lite channels, split by direction.
package ekko_pkg;

  // ---------------- memory map ----------------
  localparam logic [31:0] RAM_BASE    = 32'h0000_0000;
  localparam int unsigned RAM_BYTES   = 128 * 1024;
  localparam logic [31:0] STACK_BASE  = 32'h0001_E000;
  localparam logic [31:0] AXI_BASE    = 32'h0002_0000;
  localparam logic [31:0] TIMER0_BASE = 32'h0002_0000;
  localparam logic [31:0] TIMER1_BASE = 32'h0002_1000;
  localparam logic [31:0] I2C_BASE    = 32'h0002_2000;
  localparam int unsigned PERIPH_BYTES = 4096;
  localparam int unsigned N_PERIPH     = 3;
  localparam logic [31:0] DEBUG_BASE  = 32'h1A11_0000;
  localparam int unsigned DEBUG_BYTES = 4096;

  // ---------------- request/grant/valid bus ----------------
  typedef struct packed {
    logic        req;
    logic        we;
    logic [3:0]  be;
    logic [31:0] addr;
    logic [31:0] wdata;
  } obi_req_t;

  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic [31:0] rdata;
    logic        err;
  } obi_rsp_t;

  // ---------------- AXI4-Lite ----------------
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  typedef struct packed {
    logic [31:0] aw_addr;
    logic        aw_valid;
    logic [31:0] w_data;
    logic [3:0]  w_strb;
    logic        w_valid;
    logic        b_ready;
    logic [31:0] ar_addr;
    logic        ar_valid;
    logic        r_ready;
  } axil_req_t;

  typedef struct packed {
    logic        aw_ready;
    logic        w_ready;
    axi_resp_e   b_resp;
    logic        b_valid;
    logic        ar_ready;
    logic [31:0] r_data;
    axi_resp_e   r_resp;
    logic        r_valid;
  } axil_rsp_t;

  // ---------------- timer register file ----------------
  localparam logic [11:0] TIMER_CONF_OFS    = 12'h000;
  localparam logic [11:0] TIMER_VALUE_H_OFS = 12'h004;
  localparam logic [11:0] TIMER_VALUE_L_OFS = 12'h008;
  localparam logic [11:0] TIMER_CMP_H_OFS   = 12'h00C;
  localparam logic [11:0] TIMER_CMP_L_OFS   = 12'h010;
  localparam int TIMER_START_BIT    = 31;
  localparam int TIMER_EN_BIT       = 30;
  localparam int TIMER_INT_BIT      = 29;
  localparam int TIMER_RELOAD_BIT   = 28;
  localparam int TIMER_OVERFLOW_BIT = 27;

  // ---------------- I2C register file ----------------
  localparam logic [11:0] I2C_CONF0_OFS = 12'h000;
  localparam logic [11:0] I2C_CONF1_OFS = 12'h004;
  localparam logic [11:0] I2C_CONF2_OFS = 12'h008;
  localparam logic [11:0] I2C_CONF3_OFS = 12'h00C;
  localparam int I2C_START_BIT = 8;
  localparam int I2C_ERROR_BIT = 9;
  localparam int I2C_VTX_BIT   = 10;
  localparam int I2C_VRX_BIT   = 11;
  localparam int I2C_EN_BIT    = 12;
  localparam int I2C_INT_BIT   = 13;
  localparam int I2C_MAX_BYTES = 9;

  // commands from the I2C control unit to the I2C datapath
  typedef enum logic [1:0] {
    SDA_KEEP,    // leave SDA as it is
    SDA_SHIFT,   // drive the shift register's MSB
    SDA_HIGH,    // release SDA
    SDA_LOW      // pull SDA low
  } i2c_sda_cmd_e;
  typedef enum logic [2:0] {
    SH_NONE,
    SH_LOAD_AW,  // load the address byte with bit 0 cleared (write direction)
    SH_LOAD_AR,  // load the address byte with bit 0 set (read direction)
    SH_LOAD_TX,  // load the next byte to send and count it
    SH_OUT,      // shift left after a sent bit
    SH_IN        // shift the sampled SDA in from the right
  } i2c_shift_cmd_e;

endpackage
