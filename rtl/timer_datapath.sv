// Timer datapath: the counter and its comparator.
//
// While count_i is high the WIDTH-bit counter goes up by one every clock
// cycle until it equals cmp_value_i; there it holds and done_o is high. While
// count_i is low the counter is cleared. done_o is the combinational compare
// counter == cmp_value. With the control unit this gives, in auto-reload
// mode, one overflow every cmp_value + 2 cycles (cmp_value + 1 counting
// cycles, from 0 up to cmp_value, and one STOP cycle). The 64-bit width, the
// increment of one per clock cycle and the signal names are the timer's
// published ones; clearing on count_i low is this design's choice.
module timer_datapath #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             count_i,
  input  logic [WIDTH-1:0] cmp_value_i,
  output logic             done_o,
  output logic [WIDTH-1:0] counter_o
);
  logic [WIDTH-1:0] counter_q;

  assign done_o    = (counter_q == cmp_value_i);
  assign counter_o = counter_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)             counter_q <= '0;
    else if (!count_i)       counter_q <= '0;
    else if (!done_o)        counter_q <= counter_q + 1'b1;
  end

endmodule
