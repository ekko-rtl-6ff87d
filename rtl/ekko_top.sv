// EKKO: a small RISC-V microcontroller for FPGA, the system around the CPU.
//
// A shared system bus joins three hosts (the CPU's instruction port, the
// CPU's data port and the bus host of the debug unit) to three targets: the
// 128 KB RAM that holds code, data and stack; the debug module's own slave
// window; and an AXI master. The AXI master turns each access to 0x20000 -
// 0x22FFF into one AXI4-Lite transaction, and the AXI interconnect hands it
// to one of three 4 KB peripherals: timer 0 (0x20000), timer 1 (0x21000) and
// the I2C master (0x22000). Timer 0's interrupt is the CPU's timer interrupt
// (the RTOS tick).
//
// The CPU (a two-stage RV32IMC core) and the JTAG debug unit are existing
// cores that this design does not contain: their bus ports are this module's
// ports, in the request/grant/valid protocol of ekko_pkg::obi_req_t and
// obi_rsp_t (hold req with the address until gnt; rvalid and rdata follow).
// The I2C lines are open drain: i2c_scl_o/i2c_sda_o = 0 pulls the line low,
// 1 releases it; i2c_sda_i is the level on the SDA wire.
// One clock, one active-low asynchronous reset.
module ekko_top
  import ekko_pkg::*;
#(
  parameter int unsigned MEM_BYTES     = RAM_BYTES,
  parameter string       MEM_INIT_FILE = ""
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  // CPU instruction and data ports
  input  obi_req_t cpu_instr_req_i,
  output obi_rsp_t cpu_instr_rsp_o,
  input  obi_req_t cpu_data_req_i,
  output obi_rsp_t cpu_data_rsp_o,
  output logic     cpu_irq_timer_o,
  // debug unit: its bus host port and its debug module slave port
  input  obi_req_t dbg_host_req_i,
  output obi_rsp_t dbg_host_rsp_o,
  output obi_req_t dm_req_o,
  input  obi_rsp_t dm_rsp_i,
  // other peripheral interrupts
  output logic     timer1_irq_o,
  output logic     i2c_irq_o,
  // I2C bus
  output logic     i2c_scl_o,
  output logic     i2c_sda_o,
  input  logic     i2c_sda_i
);
  obi_req_t  host_req [3];
  obi_rsp_t  host_rsp [3];
  obi_req_t  ram_req, axi_bus_req;
  obi_rsp_t  ram_rsp, axi_bus_rsp;
  axil_req_t axi_req;
  axil_rsp_t axi_rsp;
  axil_req_t periph_req [N_PERIPH];
  axil_rsp_t periph_rsp [N_PERIPH];
  logic      ssb_req_sram, ssb_req_axi;

  assign host_req[0]     = dbg_host_req_i;
  assign host_req[1]     = cpu_data_req_i;
  assign host_req[2]     = cpu_instr_req_i;
  assign dbg_host_rsp_o  = host_rsp[0];
  assign cpu_data_rsp_o  = host_rsp[1];
  assign cpu_instr_rsp_o = host_rsp[2];

  system_bus u_bus (
    .clk_i, .rst_ni,
    .host_req_i(host_req),
    .host_rsp_o(host_rsp),
    .ram_req_o (ram_req),
    .ram_rsp_i (ram_rsp),
    .axi_req_o (axi_bus_req),
    .axi_rsp_i (axi_bus_rsp),
    .dbg_req_o (dm_req_o),
    .dbg_rsp_i (dm_rsp_i),
    .req_ram_o (ssb_req_sram),
    .req_axi_o (ssb_req_axi)
  );

  ram #(.BYTES(MEM_BYTES), .INIT_FILE(MEM_INIT_FILE)) u_ram (
    .clk_i, .rst_ni,
    .req_i(ram_req),
    .rsp_o(ram_rsp)
  );

  axi_master u_axi_master (
    .clk_i, .rst_ni,
    .req_i    (axi_bus_req),
    .rsp_o    (axi_bus_rsp),
    .axi_req_o(axi_req),
    .axi_rsp_i(axi_rsp)
  );

  axi_interconnect u_axi_xbar (
    .clk_i, .rst_ni,
    .mst_req_i(axi_req),
    .mst_rsp_o(axi_rsp),
    .slv_req_o(periph_req),
    .slv_rsp_i(periph_rsp)
  );

  timer u_timer0 (
    .clk_i, .rst_ni,
    .axi_req_i(periph_req[0]),
    .axi_rsp_o(periph_rsp[0]),
    .irq_o    (cpu_irq_timer_o)
  );

  timer u_timer1 (
    .clk_i, .rst_ni,
    .axi_req_i(periph_req[1]),
    .axi_rsp_o(periph_rsp[1]),
    .irq_o    (timer1_irq_o)
  );

  i2c u_i2c (
    .clk_i, .rst_ni,
    .axi_req_i(periph_req[2]),
    .axi_rsp_o(periph_rsp[2]),
    .irq_o    (i2c_irq_o),
    .scl_o    (i2c_scl_o),
    .sda_o    (i2c_sda_o),
    .sda_i    (i2c_sda_i)
  );

endmodule
