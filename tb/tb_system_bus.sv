// Testbench of the system bus. Three random hosts (debug, data, instruction)
// issue reads and writes to the RAM region, the AXI region, the debug module
// window and unmapped addresses. The three targets are models: the RAM and
// the debug module answer one cycle after the grant; the AXI target grants
// at random and answers after a random delay. Each target answers a read
// with addr ^ TAG and a write with wdata ^ TAG, so a host can tell from the
// answer which target served it and that address and data were routed. The
// testbench checks routing, error answers for unmapped addresses, the fixed
// priority (debug, data, instruction), that only one host is granted per
// cycle, that rvalid reaches only the owner, and that back-to-back RAM reads
// run at one per cycle.
module tb_system_bus;
  import ekko_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  obi_req_t host_req [3];
  obi_rsp_t host_rsp [3];
  obi_req_t ram_req, axi_req, dbg_req;
  obi_rsp_t ram_rsp, axi_rsp, dbg_rsp;
  logic     req_ram, req_axi;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  system_bus dut (
    .clk_i(clk), .rst_ni(rst_n),
    .host_req_i(host_req), .host_rsp_o(host_rsp),
    .ram_req_o(ram_req), .ram_rsp_i(ram_rsp),
    .axi_req_o(axi_req), .axi_rsp_i(axi_rsp),
    .dbg_req_o(dbg_req), .dbg_rsp_i(dbg_rsp),
    .req_ram_o(req_ram), .req_axi_o(req_axi)
  );

  localparam logic [31:0] TAG_RAM = 32'h1111_0000;
  localparam logic [31:0] TAG_AXI = 32'h2222_0000;
  localparam logic [31:0] TAG_DBG = 32'h3333_0000;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- target models ----------------
  logic        ram_v, dbg_v, axi_busy, axi_gnt_ok;
  logic [31:0] ram_d, dbg_d, axi_d;
  int          axi_wait;
  logic        axi_v;

  assign ram_rsp = '{gnt: ram_req.req, rvalid: ram_v, rdata: ram_d, err: 1'b0};
  assign dbg_rsp = '{gnt: dbg_req.req, rvalid: dbg_v, rdata: dbg_d, err: 1'b0};
  assign axi_rsp = '{gnt: axi_req.req && axi_gnt_ok && !axi_busy, rvalid: axi_v, rdata: axi_d, err: 1'b0};

  always @(posedge clk) begin
    ram_v <= ram_req.req;
    ram_d <= (ram_req.we ? ram_req.wdata : ram_req.addr) ^ TAG_RAM;
    dbg_v <= dbg_req.req;
    dbg_d <= (dbg_req.we ? dbg_req.wdata : dbg_req.addr) ^ TAG_DBG;
    axi_gnt_ok <= ($urandom_range(0, 2) != 0);
    axi_v <= 1'b0;
    if (axi_rsp.gnt) begin
      axi_busy <= 1'b1;
      axi_wait <= $urandom_range(0, 4);
      axi_d    <= (axi_req.we ? axi_req.wdata : axi_req.addr) ^ TAG_AXI;
    end else if (axi_busy) begin
      if (axi_wait == 0) begin
        axi_v    <= 1'b1;
        axi_busy <= 1'b0;
      end else begin
        axi_wait <= axi_wait - 1;
      end
    end
  end

  // ---------------- host models ----------------
  typedef struct {logic [31:0] data; logic err;} exp_t;
  exp_t  expq [3][$];
  bit    run_random = 1'b0;
  int    done_cnt [3];
  int    region_seen [4];

  function automatic obi_req_t rand_req(int h);
    obi_req_t r;
    int region;
    region  = $urandom_range(0, 3);
    r.req   = 1'b1;
    r.we    = (h == 2) ? 1'b0 : 1'($urandom);
    r.be    = r.we ? 4'($urandom) : 4'hF;
    r.wdata = $urandom;
    unique case (region)
      0: r.addr = {15'b0, 15'($urandom), 2'b00};
      1: r.addr = AXI_BASE + {18'b0, 14'($urandom_range(0, 3 * 4096 - 1)) & 14'h3FFC};
      2: r.addr = DEBUG_BASE + {20'b0, 10'($urandom), 2'b00};
      default: r.addr = 32'h4000_0000 + {$urandom} % 32'h1000_0000;
    endcase
    return r;
  endfunction

  function automatic exp_t expect_of(obi_req_t r);
    logic [31:0] v;
    v = r.we ? r.wdata : r.addr;
    if (r.addr < 32'h2_0000)                          return '{v ^ TAG_RAM, 1'b0};
    if (r.addr >= AXI_BASE && r.addr < 32'h2_3000)    return '{v ^ TAG_AXI, 1'b0};
    if (r.addr >= DEBUG_BASE && r.addr < DEBUG_BASE + 4096) return '{v ^ TAG_DBG, 1'b0};
    return '{32'h0, 1'b1};
  endfunction

  for (genvar h = 0; h < 3; h++) begin : g_host
    always @(posedge clk) begin
      if (rst_n) begin
        if (host_rsp[h].rvalid) begin
          check(expq[h].size() > 0, $sformatf("host %0d: rvalid without request", h));
          if (expq[h].size() > 0) begin
            exp_t e;
            e = expq[h].pop_front();
            check(host_rsp[h].rdata == e.data && host_rsp[h].err == e.err,
                  $sformatf("host %0d: answer %h/%0d expected %h/%0d", h,
                            host_rsp[h].rdata, host_rsp[h].err, e.data, e.err));
            done_cnt[h]++;
          end
        end
        if (host_req[h].req && host_rsp[h].gnt) begin
          expq[h].push_back(expect_of(host_req[h]));
          host_req[h] <= (run_random && $urandom_range(0, 1)) ? rand_req(h) : '0;
        end else if (!host_req[h].req && run_random && $urandom_range(0, 2) == 0) begin
          host_req[h] <= rand_req(h);
        end
      end
    end
  end

  // priority and single-grant rules, checked every cycle
  always @(posedge clk) begin
    if (rst_n) begin
      int ngnt, first;
      ngnt = 0;
      first = -1;
      for (int h = 2; h >= 0; h--) if (host_req[h].req) first = h;
      for (int h = 0; h < 3; h++) begin
        if (host_rsp[h].gnt) begin
          ngnt++;
          check(h == first, $sformatf("grant to host %0d while host %0d asks", h, first));
          region_seen[expect_of(host_req[h]).err ? 3 :
                      host_req[h].addr < 32'h2_0000 ? 0 :
                      host_req[h].addr < 32'h2_3000 ? 1 : 2]++;
        end
      end
      check(ngnt <= 1, "at most one grant per cycle");
      check(req_ram == ram_req.req && req_axi == axi_req.req, "observation outputs");
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, n0;
    for (int h = 0; h < 3; h++) host_req[h] = '0;
    axi_busy = 1'b0; axi_v = 1'b0; ram_v = 1'b0; dbg_v = 1'b0;
    axi_gnt_ok = 1'b0; axi_wait = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // all three hosts ask in the same cycle: debug first, data, then fetch
    @(negedge clk);
    host_req[0] = '{req: 1'b1, we: 1'b0, be: 4'hF, addr: 32'h100, wdata: 0};
    host_req[1] = '{req: 1'b1, we: 1'b0, be: 4'hF, addr: 32'h200, wdata: 0};
    host_req[2] = '{req: 1'b1, we: 1'b0, be: 4'hF, addr: 32'h300, wdata: 0};
    #1 check(host_rsp[0].gnt && !host_rsp[1].gnt && !host_rsp[2].gnt, "debug host wins");
    wait (done_cnt[2] == 1);
    check(done_cnt[0] == 1 && done_cnt[1] == 1, "all three served");

    // random traffic
    run_random = 1'b1;
    repeat (20000) @(posedge clk);
    run_random = 1'b0;
    repeat (50) @(posedge clk);
    for (int h = 0; h < 3; h++) check(expq[h].size() == 0, "no answer missing");
    for (int r = 0; r < 4; r++) check(region_seen[r] > 50, $sformatf("region %0d used", r));

    // throughput: 16 back-to-back RAM reads from the data port
    @(negedge clk);
    n0 = done_cnt[1];
    t0 = cycle;
    fork
      begin
        for (int i = 0; i < 16; i++) begin
          host_req[1] = '{req: 1'b1, we: 1'b0, be: 4'hF, addr: 32'(i * 4), wdata: 0};
          @(posedge clk);
          while (!host_rsp[1].gnt) @(posedge clk);
          #1;
        end
        host_req[1] = '0;
      end
    join
    wait (done_cnt[1] == n0 + 16);
    check(cycle - t0 == 17, $sformatf("16 RAM reads took %0d cycles, expected 17", cycle - t0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
