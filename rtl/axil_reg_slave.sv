// AXI4-Lite slave front end shared by the peripherals.
//
// It turns AXI4-Lite transactions into single-cycle register accesses on a
// simple port, so that a peripheral only has to describe its register file.
//   write: AW and W are accepted independently (each ready while nothing of
//          its kind is held and no B response is waiting). In the cycle after
//          both are held, wr_en_o is high for one cycle with the word offset,
//          data and strobes, and B (always OKAY) is raised until b_ready.
//   read:  AR is accepted while no R response is waiting; in the accepting
//          cycle rd_en_o is high and rd_data_i, which the register file must
//          drive combinationally from rd_addr_o, is captured and returned on R
//          (always OKAY) in the next cycle.
// Offsets are the low ADDR_W bits of the address. Every slave on the
// microcontroller's AXI interconnect has an AXI slave interface; this
// particular front end is this design's.
module axil_reg_slave
  import ekko_pkg::*;
#(
  parameter int unsigned ADDR_W = 12
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  axil_req_t         axi_req_i,
  output axil_rsp_t         axi_rsp_o,
  output logic              wr_en_o,
  output logic [ADDR_W-1:0] wr_addr_o,
  output logic [31:0]       wr_data_o,
  output logic [3:0]        wr_strb_o,
  output logic              rd_en_o,
  output logic [ADDR_W-1:0] rd_addr_o,
  input  logic [31:0]       rd_data_i
);
  logic              aw_have_q, w_have_q, b_valid_q, r_valid_q;
  logic [ADDR_W-1:0] aw_addr_q;
  logic [31:0]       w_data_q, r_data_q;
  logic [3:0]        w_strb_q;

  always_comb begin
    axi_rsp_o          = '0;
    axi_rsp_o.aw_ready = !aw_have_q && !b_valid_q;
    axi_rsp_o.w_ready  = !w_have_q && !b_valid_q;
    axi_rsp_o.b_valid  = b_valid_q;
    axi_rsp_o.b_resp   = RESP_OKAY;
    axi_rsp_o.ar_ready = !r_valid_q;
    axi_rsp_o.r_valid  = r_valid_q;
    axi_rsp_o.r_data   = r_data_q;
    axi_rsp_o.r_resp   = RESP_OKAY;
  end

  assign wr_en_o   = aw_have_q && w_have_q;
  assign wr_addr_o = aw_addr_q;
  assign wr_data_o = w_data_q;
  assign wr_strb_o = w_strb_q;
  assign rd_en_o   = axi_req_i.ar_valid && axi_rsp_o.ar_ready;
  assign rd_addr_o = axi_req_i.ar_addr[ADDR_W-1:0];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      aw_have_q <= 1'b0;
      w_have_q  <= 1'b0;
      b_valid_q <= 1'b0;
      r_valid_q <= 1'b0;
      aw_addr_q <= '0;
      w_data_q  <= '0;
      w_strb_q  <= '0;
      r_data_q  <= '0;
    end else begin
      if (axi_req_i.aw_valid && axi_rsp_o.aw_ready) begin
        aw_have_q <= 1'b1;
        aw_addr_q <= axi_req_i.aw_addr[ADDR_W-1:0];
      end
      if (axi_req_i.w_valid && axi_rsp_o.w_ready) begin
        w_have_q <= 1'b1;
        w_data_q <= axi_req_i.w_data;
        w_strb_q <= axi_req_i.w_strb;
      end
      if (wr_en_o) begin
        aw_have_q <= 1'b0;
        w_have_q  <= 1'b0;
        b_valid_q <= 1'b1;
      end else if (b_valid_q && axi_req_i.b_ready) begin
        b_valid_q <= 1'b0;
      end
      if (rd_en_o) begin
        r_valid_q <= 1'b1;
        r_data_q  <= rd_data_i;
      end else if (r_valid_q && axi_req_i.r_ready) begin
        r_valid_q <= 1'b0;
      end
    end
  end

endmodule
