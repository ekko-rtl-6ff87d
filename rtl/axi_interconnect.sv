// AXI interconnect: connects the one AXI4-Lite master to the peripheral
// slaves.
//
// Slave i owns the WINDOW-byte region that starts at BASE + i*WINDOW; with
// the defaults these are timer 0 (0x20000), timer 1 (0x21000) and the I2C
// master (0x22000), 4 KB each, as in the microcontroller's memory map. An
// address outside all windows gets a DECERR response from the interconnect
// itself. The full address is passed on; each slave uses the low bits.
//
// Writes and reads are routed independently. For a write the interconnect
// waits in idle for AWVALID, decodes AWADDR and latches the chosen slave
// (one cycle), then connects AW, W and B of the master straight to that slave
// until the B handshake. Reads do the same with AR and R. One write and one
// read can thus be in flight at a time, which is all the single master ever
// issues. The routing latency is one cycle per transaction in each direction.
// That the interconnect decodes the address and picks the slave is the
// microcontroller's; the latched one-at-a-time routing is this design's.
module axi_interconnect
  import ekko_pkg::*;
#(
  parameter int unsigned N_SLAVES = N_PERIPH,
  parameter logic [31:0] BASE     = AXI_BASE,
  parameter int unsigned WINDOW   = PERIPH_BYTES
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axil_req_t mst_req_i,
  output axil_rsp_t mst_rsp_o,
  output axil_req_t slv_req_o [N_SLAVES],
  input  axil_rsp_t slv_rsp_i [N_SLAVES]
);
  localparam int unsigned SW = $clog2(N_SLAVES + 1);

  typedef enum logic [1:0] {IDLE, FWD, ERR_RESP} phase_e;

  phase_e        w_phase_q, r_phase_q;
  logic [SW-1:0] w_sel_q, r_sel_q;
  logic          err_aw_done_q, err_w_done_q, err_ar_done_q;

  // Window index of an address; N_SLAVES when it is outside every window.
  function automatic logic [SW-1:0] decode(logic [31:0] a);
    logic [31:0] ofs;
    ofs = a - BASE;
    if (a < BASE || ofs >= N_SLAVES * WINDOW) return SW'(N_SLAVES);
    return SW'(ofs / WINDOW);
  endfunction

  // ---------------- routing ----------------
  always_comb begin
    mst_rsp_o = '0;
    for (int s = 0; s < N_SLAVES; s++) begin
      slv_req_o[s]         = mst_req_i;
      slv_req_o[s].aw_valid = mst_req_i.aw_valid && (w_phase_q == FWD) && (w_sel_q == SW'(s));
      slv_req_o[s].w_valid  = mst_req_i.w_valid  && (w_phase_q == FWD) && (w_sel_q == SW'(s));
      slv_req_o[s].b_ready  = mst_req_i.b_ready  && (w_phase_q == FWD) && (w_sel_q == SW'(s));
      slv_req_o[s].ar_valid = mst_req_i.ar_valid && (r_phase_q == FWD) && (r_sel_q == SW'(s));
      slv_req_o[s].r_ready  = mst_req_i.r_ready  && (r_phase_q == FWD) && (r_sel_q == SW'(s));
    end
    // write channels
    if (w_phase_q == FWD) begin
      for (int s = 0; s < N_SLAVES; s++) begin
        if (w_sel_q == SW'(s)) begin
          mst_rsp_o.aw_ready = slv_rsp_i[s].aw_ready;
          mst_rsp_o.w_ready  = slv_rsp_i[s].w_ready;
          mst_rsp_o.b_valid  = slv_rsp_i[s].b_valid;
          mst_rsp_o.b_resp   = slv_rsp_i[s].b_resp;
        end
      end
    end else if (w_phase_q == ERR_RESP) begin
      mst_rsp_o.aw_ready = !err_aw_done_q;
      mst_rsp_o.w_ready  = !err_w_done_q;
      mst_rsp_o.b_valid  = err_aw_done_q && err_w_done_q;
      mst_rsp_o.b_resp   = RESP_DECERR;
    end
    // read channels
    if (r_phase_q == FWD) begin
      for (int s = 0; s < N_SLAVES; s++) begin
        if (r_sel_q == SW'(s)) begin
          mst_rsp_o.ar_ready = slv_rsp_i[s].ar_ready;
          mst_rsp_o.r_valid  = slv_rsp_i[s].r_valid;
          mst_rsp_o.r_data   = slv_rsp_i[s].r_data;
          mst_rsp_o.r_resp   = slv_rsp_i[s].r_resp;
        end
      end
    end else if (r_phase_q == ERR_RESP) begin
      mst_rsp_o.ar_ready = !err_ar_done_q;
      mst_rsp_o.r_valid  = err_ar_done_q;
      mst_rsp_o.r_data   = '0;
      mst_rsp_o.r_resp   = RESP_DECERR;
    end
  end

  // ---------------- write routing state ----------------
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      w_phase_q     <= IDLE;
      w_sel_q       <= '0;
      err_aw_done_q <= 1'b0;
      err_w_done_q  <= 1'b0;
    end else begin
      unique case (w_phase_q)
        IDLE: if (mst_req_i.aw_valid) begin
          w_sel_q       <= decode(mst_req_i.aw_addr);
          w_phase_q     <= (decode(mst_req_i.aw_addr) == SW'(N_SLAVES)) ? ERR_RESP : FWD;
          err_aw_done_q <= 1'b0;
          err_w_done_q  <= 1'b0;
        end
        FWD: if (mst_req_i.b_ready && mst_rsp_o.b_valid) w_phase_q <= IDLE;
        ERR_RESP: begin
          if (mst_req_i.aw_valid) err_aw_done_q <= 1'b1;
          if (mst_req_i.w_valid)  err_w_done_q  <= 1'b1;
          if (mst_req_i.b_ready && mst_rsp_o.b_valid) w_phase_q <= IDLE;
        end
        default: w_phase_q <= IDLE;
      endcase
    end
  end

  // ---------------- read routing state ----------------
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      r_phase_q     <= IDLE;
      r_sel_q       <= '0;
      err_ar_done_q <= 1'b0;
    end else begin
      unique case (r_phase_q)
        IDLE: if (mst_req_i.ar_valid) begin
          r_sel_q   <= decode(mst_req_i.ar_addr);
          r_phase_q     <= (decode(mst_req_i.ar_addr) == SW'(N_SLAVES)) ? ERR_RESP : FWD;
          err_ar_done_q <= 1'b0;
        end
        FWD: if (mst_req_i.r_ready && mst_rsp_o.r_valid) r_phase_q <= IDLE;
        ERR_RESP: begin
          if (mst_req_i.ar_valid) err_ar_done_q <= 1'b1;
          if (mst_req_i.r_ready && mst_rsp_o.r_valid) r_phase_q <= IDLE;
        end
        default:  r_phase_q <= IDLE;
      endcase
    end
  end

endmodule
