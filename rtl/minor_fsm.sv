// minor_fsm: a supervised ("minor") finite state machine of the major/minor
// FSM hierarchy.
//
// The machine is a ring of NSTATES states A1..An. A1 is the idle state,
// entered on init, and is the only state in which busy is low. In A1 the
// machine waits for start; start moves it to A2, and from there it walks
// A3, ..., An unconditionally, one state per clock, and returns to A1. busy
// is therefore high for NSTATES-1 clocks, beginning the clock after start is
// seen. The major FSM uses the falling edge of busy as "done" and its low
// level as "ready". The state chain and the busy output follow the lecture's
// minor FSM; the state numbering as a binary counter is this design's choice.
//
// The shortest path from A1 back to A1 must be at least two clocks, so
// NSTATES must be at least 2 (checked at elaboration).
//
// Interface: clk (rising edge), init (synchronous, one clock long),
// start (level, sampled only in A1), busy (registered Moore output).
module minor_fsm #(
  parameter int unsigned NSTATES = 4
) (
  input  logic clk,
  input  logic init,
  input  logic start,
  output logic busy
);
  localparam int unsigned SW = (NSTATES > 2) ? $clog2(NSTATES) : 1;

  if (NSTATES < 2) begin : g_bad
    $error("minor_fsm: NSTATES must be at least 2");
  end

  logic [SW-1:0] state;  // 0 = A1, k = A(k+1)

  always_ff @(posedge clk) begin
    if (init)                               state <= '0;
    else if (state == '0)                   state <= start ? SW'(1) : '0;
    else if (state == SW'(NSTATES - 1))     state <= '0;
    else                                    state <= state + SW'(1);
  end

  assign busy = (state != '0);
endmodule
