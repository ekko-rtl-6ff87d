// Timer control unit: the three-state machine that runs the timer.
//
//   IDLE  -- start_timer=1 (with timer_en=1) --> COUNT
//   COUNT -- done=0 --> COUNT, done=1 --> STOP
//   STOP  -- auto_reload=1 --> COUNT, auto_reload=0 --> IDLE
// In COUNT the unit raises count, which lets the datapath's counter run; in
// the other states count is low, which the datapath takes as "clear the
// counter", so every COUNT phase starts from zero. In STOP, for one cycle, it
// raises overflow_o (the compare value was reached) and, if interrupt_en is
// set, irq_o. Clearing timer_en returns the unit to IDLE from any state.
// The states, their transitions and the signals follow the timer's published
// state diagram and block diagram; the role of timer_en, the overflow_o
// output and the one-cycle interrupt pulse are this design's.
module timer_control_unit (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic auto_reload_i,
  input  logic interrupt_en_i,
  input  logic start_timer_i,
  input  logic timer_en_i,
  input  logic done_i,
  output logic count_o,
  output logic irq_o,
  output logic overflow_o
);
  typedef enum logic [1:0] {IDLE, COUNT, STOP} state_e;
  state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      IDLE:    if (start_timer_i) state_d = COUNT;
      COUNT:   if (done_i)        state_d = STOP;
      STOP:    state_d = auto_reload_i ? COUNT : IDLE;
      default: state_d = IDLE;
    endcase
    if (!timer_en_i) state_d = IDLE;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) state_q <= IDLE;
    else         state_q <= state_d;
  end

  assign count_o    = (state_q == COUNT);
  assign overflow_o = (state_q == STOP);
  assign irq_o      = (state_q == STOP) && interrupt_en_i;

endmodule
