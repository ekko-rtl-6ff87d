// Testbench of the AXI interconnect. An AXI master bridge drives it; three
// slave models sit on its ports (slave 0 always ready, slaves 1 and 2 with
// random stalls). Random reads and writes across the three 4 KB windows are
// checked against a reference copy of each slave's memory, which also shows
// that every access reached the right slave and only that one. Accesses
// beyond the last window must end with a DECERR (err on the bus side). The
// extra routing cycle is checked on slave 0: 5 cycles from bus grant to
// rvalid for reads and writes.
module tb_axi_interconnect;
  import ekko_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  obi_req_t  breq;
  obi_rsp_t  brsp;
  axil_req_t mreq;
  axil_rsp_t mrsp;
  axil_req_t sreq [3];
  axil_rsp_t srsp [3];
  int        nw [3], nr [3];

  axi_master bridge (.clk_i(clk), .rst_ni(rst_n), .req_i(breq), .rsp_o(brsp),
                     .axi_req_o(mreq), .axi_rsp_i(mrsp));
  axi_interconnect dut (.clk_i(clk), .rst_ni(rst_n), .mst_req_i(mreq), .mst_rsp_o(mrsp),
                        .slv_req_o(sreq), .slv_rsp_i(srsp));
  for (genvar s = 0; s < 3; s++) begin : g
    axil_mem_model #(.STALL(s != 0)) slave (.clk_i(clk), .rst_ni(rst_n), .req_i(sreq[s]),
                     .rsp_o(srsp[s]), .n_writes(nw[s]), .n_reads(nr[s]));
  end

  logic [31:0] model [3][1024];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic access(bit we, logic [31:0] addr, logic [3:0] be, logic [31:0] d,
                        output logic [31:0] q, output logic err, output int lat);
    int tg;
    @(negedge clk);
    breq = '{req: 1'b1, we: we, be: be, addr: addr, wdata: d};
    #1;
    while (!brsp.gnt) begin @(negedge clk); #1; end
    tg = cycle;
    @(posedge clk);
    #1 breq.req = 1'b0;
    while (!brsp.rvalid) begin @(posedge clk); #1; end
    lat = cycle - tg;
    q = brsp.rdata;
    err = brsp.err;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, d, a, e;
    logic [3:0] be;
    logic err;
    int lat, s, n_decerr;
    breq = '0;
    n_decerr = 0;
    for (int k = 0; k < 3; k++) for (int w = 0; w < 1024; w++) model[k][w] = 32'hA000_0000 + w;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    access(1'b1, 32'h20040, 4'hF, 32'h1234_5678, q, err, lat);
    model[0][16] = 32'h1234_5678;
    check(lat == 5 && !err, $sformatf("write latency %0d, expected 5", lat));
    access(1'b0, 32'h20040, 4'hF, 0, q, err, lat);
    check(lat == 5 && q == 32'h1234_5678, $sformatf("read latency %0d, data %h", lat, q));

    for (int n = 0; n < 4000; n++) begin
      bit we;
      s  = $urandom_range(0, 3);                  // 3: outside every window
      we = 1'($urandom);
      a  = 32'h20000 + 32'(s) * 32'h1000 + {20'b0, 2'b00, 8'($urandom), 2'b00};
      if (s == 3 && $urandom_range(0, 1) == 1) a = 32'h1000_0000 + {$urandom} % 32'h1000;
      be = 4'($urandom);
      d  = $urandom;
      access(we, a, be, d, q, err, lat);
      if (s == 3) begin
        check(err, $sformatf("DECERR expected for %h", a));
        n_decerr++;
      end else begin
        check(!err, $sformatf("no error expected for %h", a));
        if (we) begin
          for (int b = 0; b < 4; b++) if (be[b]) model[s][a[11:2]][8*b +: 8] = d[8*b +: 8];
        end else begin
          e = model[s][a[11:2]];
          check(q == e, $sformatf("read %h: got %h expected %h", a, q, e));
        end
      end
    end
    // every slave's whole touched range still matches: no write went astray
    for (int k = 0; k < 3; k++)
      for (int w = 0; w < 256; w++) begin
        access(1'b0, 32'h20000 + 32'(k) * 32'h1000 + 32'(w * 4), 4'hF, 0, q, err, lat);
        check(q == model[k][w], $sformatf("slave %0d word %0d: %h vs %h", k, w, q, model[k][w]));
      end
    check(n_decerr > 100, "decode errors exercised");
    for (int k = 0; k < 3; k++) check(nw[k] > 100 && nr[k] > 100, "each slave used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
