// AXI master: bridge from the system bus to AXI4-Lite.
//
// The system bus sends here every access to the peripheral windows. The
// bridge turns one bus request into one AXI4-Lite transaction and answers the
// bus when the transaction ends:
//   write: AW and W are raised together, each drops once its own handshake is
//          seen; then the B response is awaited (b_ready is high).
//   read:  AR is raised until accepted, then the R response is awaited.
// The request is granted in the cycle it is made if the bridge is idle, and
// its address, data and byte enables (which become WSTRB) are latched then.
// rvalid (with RDATA for reads, zero data for writes) is given one cycle after
// the B or R handshake; err is set for a SLVERR or DECERR response. So a write
// to a slave that is always ready takes 4 cycles from grant to rvalid, and a
// read 4 as well. Only one transaction is in flight. AXI4-Lite and a master
// between the system bus and the interconnect are the microcontroller's; the
// state sequence and timing are this design's.
module axi_master
  import ekko_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_ni,
  // system bus side
  input  obi_req_t  req_i,
  output obi_rsp_t  rsp_o,
  // AXI4-Lite side
  output axil_req_t axi_req_o,
  input  axil_rsp_t axi_rsp_i
);
  typedef enum logic [2:0] {IDLE, WR_ADDR_DATA, WR_RESP, RD_ADDR, RD_DATA} state_e;

  state_e      state_q;
  logic [31:0] addr_q, wdata_q, rdata_q;
  logic [3:0]  strb_q;
  logic        aw_pend_q, w_pend_q, rvalid_q, err_q;

  assign rsp_o.gnt    = req_i.req && (state_q == IDLE);
  assign rsp_o.rvalid = rvalid_q;
  assign rsp_o.rdata  = rdata_q;
  assign rsp_o.err    = err_q;

  always_comb begin
    axi_req_o          = '0;
    axi_req_o.aw_addr  = addr_q;
    axi_req_o.ar_addr  = addr_q;
    axi_req_o.w_data   = wdata_q;
    axi_req_o.w_strb   = strb_q;
    axi_req_o.aw_valid = (state_q == WR_ADDR_DATA) && aw_pend_q;
    axi_req_o.w_valid  = (state_q == WR_ADDR_DATA) && w_pend_q;
    axi_req_o.b_ready  = (state_q == WR_RESP);
    axi_req_o.ar_valid = (state_q == RD_ADDR);
    axi_req_o.r_ready  = (state_q == RD_DATA);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= IDLE;
      addr_q    <= '0;
      wdata_q   <= '0;
      strb_q    <= '0;
      rdata_q   <= '0;
      aw_pend_q <= 1'b0;
      w_pend_q  <= 1'b0;
      rvalid_q  <= 1'b0;
      err_q     <= 1'b0;
    end else begin
      rvalid_q <= 1'b0;
      unique case (state_q)
        IDLE: if (req_i.req) begin
          addr_q  <= req_i.addr;
          wdata_q <= req_i.wdata;
          strb_q  <= req_i.we ? req_i.be : 4'b0000;
          if (req_i.we) begin
            aw_pend_q <= 1'b1;
            w_pend_q  <= 1'b1;
            state_q   <= WR_ADDR_DATA;
          end else begin
            state_q   <= RD_ADDR;
          end
        end
        WR_ADDR_DATA: begin
          if (axi_rsp_i.aw_ready) aw_pend_q <= 1'b0;
          if (axi_rsp_i.w_ready)  w_pend_q  <= 1'b0;
          if ((axi_rsp_i.aw_ready || !aw_pend_q) && (axi_rsp_i.w_ready || !w_pend_q))
            state_q <= WR_RESP;
        end
        WR_RESP: if (axi_rsp_i.b_valid) begin
          rvalid_q <= 1'b1;
          rdata_q  <= '0;
          err_q    <= axi_rsp_i.b_resp inside {RESP_SLVERR, RESP_DECERR};
          state_q  <= IDLE;
        end
        RD_ADDR: if (axi_rsp_i.ar_ready) state_q <= RD_DATA;
        RD_DATA: if (axi_rsp_i.r_valid) begin
          rvalid_q <= 1'b1;
          rdata_q  <= axi_rsp_i.r_data;
          err_q    <= axi_rsp_i.r_resp inside {RESP_SLVERR, RESP_DECERR};
          state_q  <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  // AXI rule: a raised VALID stays up until its READY.
  a_aw_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_req_o.aw_valid && !axi_rsp_i.aw_ready |=> axi_req_o.aw_valid);
  a_w_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_req_o.w_valid && !axi_rsp_i.w_ready |=> axi_req_o.w_valid);
  a_ar_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_req_o.ar_valid && !axi_rsp_i.ar_ready |=> axi_req_o.ar_valid);

endmodule
