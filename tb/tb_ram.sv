// Testbench of the RAM: random word writes with random byte enables and
// reads, checked against a reference memory kept by the testbench. Also
// checks that each request is granted at once and answered exactly one cycle
// later, and that back-to-back accesses are possible.
module tb_ram;
  import ekko_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  obi_req_t req;
  obi_rsp_t rsp;
  int checks = 0, failures = 0;

  ram dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));

  logic [31:0] model [logic [14:0]];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one access; returns the read data seen with rvalid
  task automatic access(bit we, logic [14:0] w, logic [3:0] be, logic [31:0] d,
                        output logic [31:0] q);
    req.req   = 1'b1;
    req.we    = we;
    req.be    = be;
    req.addr  = {15'b0, w, 2'b00};
    req.wdata = d;
    #1 check(rsp.gnt, "request granted in the same cycle");
    @(posedge clk);
    #1 req.req = 1'b0;
    check(rsp.rvalid, "rvalid one cycle after the grant");
    q = rsp.rdata;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, exp;
    logic [14:0] w;
    logic [3:0]  be;
    logic [31:0] d;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!rsp.rvalid, "no rvalid after reset");
    // fill some words fully, including the first and last word
    for (int i = 0; i < 64; i++) begin
      w = (i == 0) ? 15'd0 : (i == 1) ? 15'h7FFF : 15'($urandom);
      d = $urandom;
      access(1'b1, w, 4'hF, d, q);
      model[w] = d;
      @(negedge clk);
    end
    // partial writes and reads
    for (int i = 0; i < 2000; i++) begin
      int k;
      k = $urandom_range(0, model.num() - 1);
      w = 15'd0;
      void'(model.first(w));
      for (int j = 0; j < k; j++) void'(model.next(w));
      if ($urandom_range(0, 1) == 1) begin
        be = 4'($urandom);
        d  = $urandom;
        access(1'b1, w, be, d, q);
        exp = model[w];
        for (int b = 0; b < 4; b++) if (be[b]) exp[8*b +: 8] = d[8*b +: 8];
        model[w] = exp;
      end else begin
        access(1'b0, w, 4'h0, 32'h0, q);
        check(q == model[w], $sformatf("read word %h: got %h expected %h", w, q, model[w]));
      end
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
