// AXI4-Lite slave model for testbenches: 1024 words of memory behind the low
// address bits. With STALL set, AWREADY, WREADY and ARREADY are random and
// B and R come after a random delay; without it the slave is always ready
// and answers in the next cycle. Accesses to offsets 0xF00-0xFFF answer
// SLVERR. Counts the write and read transactions it served.
module axil_mem_model
  import ekko_pkg::*;
#(
  parameter bit STALL = 1'b1
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axil_req_t req_i,
  output axil_rsp_t rsp_o,
  output int        n_writes,
  output int        n_reads
);
  logic [31:0] mem [1024];
  logic        aw_have, w_have, ar_have;
  logic [31:0] aw_addr, w_data, ar_addr;
  logic [3:0]  w_strb;
  logic        rdy_aw, rdy_w, rdy_ar;
  int          b_wait, r_wait;

  initial for (int i = 0; i < 1024; i++) mem[i] = 32'hA000_0000 + i;

  assign rsp_o.aw_ready = rdy_aw && !aw_have;
  assign rsp_o.w_ready  = rdy_w && !w_have;
  assign rsp_o.ar_ready = rdy_ar && !ar_have;

  always @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      aw_have <= 0; w_have <= 0; ar_have <= 0;
      rsp_o.b_valid <= 0; rsp_o.r_valid <= 0;
      rsp_o.b_resp <= RESP_OKAY; rsp_o.r_resp <= RESP_OKAY; rsp_o.r_data <= 0;
      rdy_aw <= 0; rdy_w <= 0; rdy_ar <= 0;
      b_wait <= 0; r_wait <= 0;
      n_writes <= 0; n_reads <= 0;
    end else begin
      rdy_aw <= STALL ? 1'($urandom) : 1'b1;
      rdy_w  <= STALL ? 1'($urandom) : 1'b1;
      rdy_ar <= STALL ? 1'($urandom) : 1'b1;
      if (req_i.aw_valid && rsp_o.aw_ready) begin aw_have <= 1; aw_addr <= req_i.aw_addr; end
      if (req_i.w_valid && rsp_o.w_ready) begin w_have <= 1; w_data <= req_i.w_data; w_strb <= req_i.w_strb; end
      if (aw_have && w_have && !rsp_o.b_valid) begin
        if (b_wait == 0) begin
          for (int b = 0; b < 4; b++)
            if (w_strb[b] && aw_addr[11:8] != 4'hF) mem[aw_addr[11:2]][8*b +: 8] <= w_data[8*b +: 8];
          rsp_o.b_valid <= 1;
          rsp_o.b_resp  <= (aw_addr[11:8] == 4'hF) ? RESP_SLVERR : RESP_OKAY;
          b_wait <= STALL ? $urandom_range(0, 3) : 0;
        end else b_wait <= b_wait - 1;
      end
      if (rsp_o.b_valid && req_i.b_ready) begin
        rsp_o.b_valid <= 0; aw_have <= 0; w_have <= 0; n_writes <= n_writes + 1;
      end
      if (req_i.ar_valid && rsp_o.ar_ready) begin ar_have <= 1; ar_addr <= req_i.ar_addr; end
      if (ar_have && !rsp_o.r_valid) begin
        if (r_wait == 0) begin
          rsp_o.r_valid <= 1;
          rsp_o.r_data  <= mem[ar_addr[11:2]];
          rsp_o.r_resp  <= (ar_addr[11:8] == 4'hF) ? RESP_SLVERR : RESP_OKAY;
          r_wait <= STALL ? $urandom_range(0, 3) : 0;
        end else r_wait <= r_wait - 1;
      end
      if (rsp_o.r_valid && req_i.r_ready) begin
        rsp_o.r_valid <= 0; ar_have <= 0; n_reads <= n_reads + 1;
      end
    end
  end
endmodule
