// Single-port instruction and data RAM of the microcontroller.
//
// The CPU fetches code and reads and writes data in this one memory (a von
// Neumann arrangement); the debug unit loads programs into it. It holds
// BYTES bytes as 32-bit words, 128 KB by default as in the microcontroller's
// memory map (the linker keeps the top 8 KB for the stack; to the hardware
// it is all one array).
//
// Interface: the request/grant/valid protocol of the system bus. A request is
// granted in the cycle it is made; the read data (for writes too) arrive with
// rvalid in the next cycle, so one access can be accepted every cycle. Writes
// honour the four byte enables. The word index is taken from the address
// bits above bit 1; higher address bits are decoded by the system bus.
//
// INIT_FILE optionally preloads the array with $readmemh. Resetting the array
// is not done, as block RAM cannot be reset; only the rvalid flag is.
module ram
  import ekko_pkg::*;
#(
  parameter int unsigned BYTES     = RAM_BYTES,
  parameter string       INIT_FILE = ""
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  obi_req_t req_i,
  output obi_rsp_t rsp_o
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [31:0] rdata_q;
  logic        rvalid_q;
  logic [AW-1:0] idx;

  assign idx = req_i.addr[AW+1:2];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk_i) begin
    if (req_i.req) begin
      if (req_i.we) begin
        for (int b = 0; b < 4; b++)
          if (req_i.be[b]) mem[idx][8*b +: 8] <= req_i.wdata[8*b +: 8];
      end
      rdata_q <= mem[idx];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rvalid_q <= 1'b0;
    else         rvalid_q <= req_i.req;
  end

  assign rsp_o.gnt    = req_i.req;
  assign rsp_o.rvalid = rvalid_q;
  assign rsp_o.rdata  = rdata_q;
  assign rsp_o.err    = 1'b0;

endmodule
