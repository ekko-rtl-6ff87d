// System bus: the shared bus that joins the CPU, the debug unit, the RAM and
// the AXI master.
//
// Three hosts share it: the debug unit's bus host (index 0), the CPU's data
// port (1) and the CPU's instruction port (2). Each speaks the CPU's memory
// protocol: it holds req with addr/we/be/wdata until gnt, and its answer
// comes later with rvalid. The bus decodes the address of the chosen request
// to one of three targets: the RAM (0x00000-0x1FFFF), the AXI master, which
// covers the three 4 KB peripheral windows from 0x20000, and the debug
// module's slave window (DEBUG_BASE). Any other address is answered one cycle
// after the grant by an internal responder with err set and zero data.
//
// One transaction is in flight at a time. A new request can be granted in the
// same cycle that the answer to the previous one arrives, so RAM accesses,
// which answer in the next cycle, run back to back, one per cycle. When
// several hosts ask at once, the fixed priority is debug host, then data,
// then instruction fetch; the others wait (their gnt stays low). Read data
// are one shared bus (every host sees the same rdata), and rvalid goes only to
// the host that owns the transaction. The sharing, the decoding and the
// single shared read-data bus follow the microcontroller's description; the
// priority order, the one-outstanding rule and the error responder are this
// design's choices.
module system_bus
  import ekko_pkg::*;
#(
  parameter int unsigned N_HOSTS = 3
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  // hosts: 0 debug unit, 1 CPU data, 2 CPU instruction
  input  obi_req_t host_req_i [N_HOSTS],
  output obi_rsp_t host_rsp_o [N_HOSTS],
  // targets
  output obi_req_t ram_req_o,
  input  obi_rsp_t ram_rsp_i,
  output obi_req_t axi_req_o,
  input  obi_rsp_t axi_rsp_i,
  output obi_req_t dbg_req_o,
  input  obi_rsp_t dbg_rsp_i,
  // which target is being requested this cycle (observability)
  output logic     req_ram_o,
  output logic     req_axi_o
);
  typedef enum logic [1:0] {TGT_RAM, TGT_AXI, TGT_DBG, TGT_ERR} target_e;
  localparam int unsigned HW = (N_HOSTS > 1) ? $clog2(N_HOSTS) : 1;

  logic          busy_q, err_rvalid_q;
  logic [HW-1:0] owner_q, sel;
  target_e       target_q, target;
  logic          any_req, can_issue, granted, resp_done;
  obi_req_t      sel_req;
  obi_rsp_t      tgt_rsp;    // answer of the target of the transaction in flight
  logic          tgt_gnt;

  // ---------------- arbitration ----------------
  always_comb begin
    any_req = 1'b0;
    sel     = '0;
    for (int h = N_HOSTS - 1; h >= 0; h--) begin
      if (host_req_i[h].req) begin
        any_req = 1'b1;
        sel     = HW'(h);
      end
    end
    sel_req = host_req_i[sel];
  end

  // ---------------- address decoding ----------------
  function automatic target_e decode(logic [31:0] a);
    if (a < RAM_BASE + RAM_BYTES)
      return TGT_RAM;
    else if (a >= AXI_BASE && a < AXI_BASE + N_PERIPH * PERIPH_BYTES)
      return TGT_AXI;
    else if (a >= DEBUG_BASE && a < DEBUG_BASE + DEBUG_BYTES)
      return TGT_DBG;
    else
      return TGT_ERR;
  endfunction

  assign target = decode(sel_req.addr);

  // ---------------- answer of the transaction in flight ----------------
  always_comb begin
    unique case (target_q)
      TGT_RAM: tgt_rsp = ram_rsp_i;
      TGT_AXI: tgt_rsp = axi_rsp_i;
      TGT_DBG: tgt_rsp = dbg_rsp_i;
      default: tgt_rsp = '{gnt: 1'b1, rvalid: err_rvalid_q, rdata: '0, err: 1'b1};
    endcase
  end

  assign resp_done = busy_q && tgt_rsp.rvalid;
  assign can_issue = !busy_q || resp_done;

  // ---------------- request forwarding ----------------
  always_comb begin
    ram_req_o = sel_req;
    axi_req_o = sel_req;
    dbg_req_o = sel_req;
    ram_req_o.req = can_issue && any_req && (target == TGT_RAM);
    axi_req_o.req = can_issue && any_req && (target == TGT_AXI);
    dbg_req_o.req = can_issue && any_req && (target == TGT_DBG);
    unique case (target)
      TGT_RAM: tgt_gnt = ram_rsp_i.gnt;
      TGT_AXI: tgt_gnt = axi_rsp_i.gnt;
      TGT_DBG: tgt_gnt = dbg_rsp_i.gnt;
      default: tgt_gnt = 1'b1;
    endcase
  end

  assign granted   = can_issue && any_req && tgt_gnt;
  assign req_ram_o = ram_req_o.req;
  assign req_axi_o = axi_req_o.req;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q       <= 1'b0;
      owner_q      <= '0;
      target_q     <= TGT_RAM;
      err_rvalid_q <= 1'b0;
    end else begin
      err_rvalid_q <= granted && (target == TGT_ERR);
      if (granted) begin
        busy_q   <= 1'b1;
        owner_q  <= sel;
        target_q <= target;
      end else if (resp_done) begin
        busy_q <= 1'b0;
      end
    end
  end

  // ---------------- answers to the hosts ----------------
  always_comb begin
    for (int h = 0; h < N_HOSTS; h++) begin
      host_rsp_o[h].gnt    = granted && (sel == HW'(h));
      host_rsp_o[h].rvalid = resp_done && (owner_q == HW'(h));
      host_rsp_o[h].rdata  = tgt_rsp.rdata;
      host_rsp_o[h].err    = tgt_rsp.err;
    end
  end

  // A target must not answer when nothing is in flight.
  a_no_spurious_rvalid: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !busy_q |-> !(ram_rsp_i.rvalid || axi_rsp_i.rvalid || dbg_rsp_i.rvalid));

endmodule
