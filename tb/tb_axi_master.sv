// Testbench of the AXI master (system bus to AXI4-Lite bridge). Two copies
// of the bridge drive two slave models: one always ready, on which the
// latency from grant to rvalid is checked (4 cycles for reads and writes),
// and one with random ready signals and response delays. Random reads and
// writes with random byte enables are checked against a reference copy of
// the slave's memory; accesses to the slave's error range must come back
// with err set.
module tb_axi_master;
  import ekko_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  obi_req_t  breq [2];
  obi_rsp_t  brsp [2];
  axil_req_t areq [2];
  axil_rsp_t arsp [2];
  int        nw [2], nr [2];

  for (genvar i = 0; i < 2; i++) begin : g
    axi_master dut (.clk_i(clk), .rst_ni(rst_n), .req_i(breq[i]), .rsp_o(brsp[i]),
                    .axi_req_o(areq[i]), .axi_rsp_i(arsp[i]));
    axil_mem_model #(.STALL(i == 1)) slave (.clk_i(clk), .rst_ni(rst_n), .req_i(areq[i]),
                    .rsp_o(arsp[i]), .n_writes(nw[i]), .n_reads(nr[i]));
  end

  logic [31:0] model [2][1024];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // one bus access on bridge i; returns data, error flag and cycles from grant to rvalid
  task automatic access(int i, bit we, logic [31:0] addr, logic [3:0] be, logic [31:0] d,
                        output logic [31:0] q, output logic err, output int lat);
    int tg;
    @(negedge clk);
    breq[i] = '{req: 1'b1, we: we, be: be, addr: addr, wdata: d};
    #1;
    while (!brsp[i].gnt) begin @(negedge clk); #1; end
    tg = cycle;
    @(posedge clk);
    #1 breq[i].req = 1'b0;
    while (!brsp[i].rvalid) begin @(posedge clk); #1; end
    lat = cycle - tg;
    q = brsp[i].rdata;
    err = brsp[i].err;
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
    int lat;
    breq[0] = '0; breq[1] = '0;
    for (int i = 0; i < 2; i++) for (int w = 0; w < 1024; w++) model[i][w] = 32'hA000_0000 + w;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // latency on the always-ready slave
    access(0, 1'b1, 32'h20010, 4'hF, 32'hCAFE_0001, q, err, lat);
    model[0][4] = 32'hCAFE_0001;
    check(lat == 4 && !err, $sformatf("write latency %0d, expected 4", lat));
    access(0, 1'b0, 32'h20010, 4'hF, 0, q, err, lat);
    check(lat == 4 && q == 32'hCAFE_0001 && !err, $sformatf("read latency %0d data %h", lat, q));

    for (int n = 0; n < 3000; n++) begin
      int i;
      bit we;
      i  = $urandom_range(0, 1);
      we = 1'($urandom);
      a  = 32'h20000 + {20'b0, 10'($urandom), 2'b00};
      be = 4'($urandom);
      d  = $urandom;
      access(i, we, a, be, d, q, err, lat);
      check(err == (a[11:8] == 4'hF), $sformatf("err %0d for address %h", err, a));
      if (we) begin
        if (a[11:8] != 4'hF)
          for (int b = 0; b < 4; b++) if (be[b]) model[i][a[11:2]][8*b +: 8] = d[8*b +: 8];
      end else if (a[11:8] != 4'hF) begin
        e = model[i][a[11:2]];
        check(q == e, $sformatf("read %h: got %h expected %h", a, q, e));
      end
      if (i == 0 && a[11:8] != 4'hF) check(lat == 4, "latency on a ready slave");
    end
    check(nw[1] + nr[1] > 1000, "stalling slave exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
