// Timer peripheral: a 64-bit timer on an AXI4-Lite slave port.
//
// The control unit (timer_control_unit) and the datapath (timer_datapath) do
// the counting; this module adds the register file that software sees and
// the AXI4-Lite front end (axil_reg_slave). Registers, at byte offsets from
// the peripheral's base:
//   0x00 timer_conf   bit 31 START (write 1 to start; reads 0)
//                     bit 30 EN, bit 29 INT, bit 28 AUTO RELOAD (read/write)
//                     bit 27 OVERFLOW: set when the counter reaches the
//                     compare value while INT is 0; writing 0 clears it,
//                     writing 1 leaves it; held at 0 while INT is 1
//                     bits 26:0 unused: stored and read back, no effect
//   0x04 timer_value_high  counter[63:32] (read only)
//   0x08 timer_value_low   counter[31:0]  (read only)
//   0x0C timer_cmp_high    compare[63:32]
//   0x10 timer_cmp_low     compare[31:0]
// irq_o is a one-cycle pulse each time the compare value is reached with INT
// set. The register layout, offsets and bit positions follow the timer's
// register table and its driver; that the compare registers also read back,
// the write-0-to-clear overflow bit and the pulse-shaped interrupt are this
// design's choices. So is keeping the unused configuration bits as plain
// storage: a word written to the configuration register with only those bits
// set reads back unchanged, as the bus test of the original system shows
// (write 8, read 8 at the timer's base address). The two halves of the
// counter are read separately, so a
// read of both while counting is not atomic.
module timer
  import ekko_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axil_req_t axi_req_i,
  output axil_rsp_t axi_rsp_o,
  output logic      irq_o
);
  logic        wr_en, rd_en;
  logic [11:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  logic [63:0] cmp_q, counter;
  logic        en_q, int_q, reload_q, ovf_q, start;
  logic [26:0] spare_q;
  logic [31:0] conf_merged;
  logic        count, done, ovf_event;

  axil_reg_slave #(.ADDR_W(12)) u_axi (
    .clk_i, .rst_ni,
    .axi_req_i, .axi_rsp_o,
    .wr_en_o(wr_en), .wr_addr_o(wr_addr), .wr_data_o(wr_data), .wr_strb_o(wr_strb),
    .rd_en_o(rd_en), .rd_addr_o(rd_addr), .rd_data_i(rd_data)
  );

  // byte-wise update of a 32-bit register
  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] strb);
    for (int b = 0; b < 4; b++) if (strb[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  logic conf_wr;
  assign conf_wr = wr_en && (wr_addr == TIMER_CONF_OFS) && wr_strb[3];
  assign start   = conf_wr && wr_data[TIMER_START_BIT];
  assign conf_merged = merge({5'b0, spare_q}, wr_data, wr_strb);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cmp_q    <= '0;
      en_q     <= 1'b0;
      int_q    <= 1'b0;
      reload_q <= 1'b0;
      ovf_q    <= 1'b0;
      spare_q  <= '0;
    end else begin
      if (wr_en && wr_addr == TIMER_CONF_OFS) spare_q <= conf_merged[26:0];
      if (conf_wr) begin
        en_q     <= wr_data[TIMER_EN_BIT];
        int_q    <= wr_data[TIMER_INT_BIT];
        reload_q <= wr_data[TIMER_RELOAD_BIT];
      end
      if (wr_en && wr_addr == TIMER_CMP_H_OFS) cmp_q[63:32] <= merge(cmp_q[63:32], wr_data, wr_strb);
      if (wr_en && wr_addr == TIMER_CMP_L_OFS) cmp_q[31:0]  <= merge(cmp_q[31:0],  wr_data, wr_strb);
      // overflow flag: set by hardware, cleared by writing 0 or while INT is on
      if (ovf_event && !int_q)                          ovf_q <= 1'b1;
      else if (int_q)                                   ovf_q <= 1'b0;
      else if (conf_wr && !wr_data[TIMER_OVERFLOW_BIT]) ovf_q <= 1'b0;
    end
  end

  always_comb begin
    unique case (rd_addr)
      TIMER_CONF_OFS:    rd_data = {1'b0, en_q, int_q, reload_q, ovf_q, spare_q};
      TIMER_VALUE_H_OFS: rd_data = counter[63:32];
      TIMER_VALUE_L_OFS: rd_data = counter[31:0];
      TIMER_CMP_H_OFS:   rd_data = cmp_q[63:32];
      TIMER_CMP_L_OFS:   rd_data = cmp_q[31:0];
      default:           rd_data = '0;
    endcase
  end

  timer_control_unit u_cu (
    .clk_i, .rst_ni,
    .auto_reload_i (reload_q),
    .interrupt_en_i(int_q),
    // START and EN may be written together, so the EN being written counts
    .start_timer_i (start),
    .timer_en_i    (conf_wr ? wr_data[TIMER_EN_BIT] : en_q),
    .done_i        (done),
    .count_o       (count),
    .irq_o         (irq_o),
    .overflow_o    (ovf_event)
  );

  logic [WIDTH-1:0] counter_w;
  timer_datapath #(.WIDTH(WIDTH)) u_dp (
    .clk_i, .rst_ni,
    .count_i    (count),
    .cmp_value_i(cmp_q[WIDTH-1:0]),
    .done_o     (done),
    .counter_o  (counter_w)
  );
  assign counter = 64'(counter_w);

endmodule
