// tick_gen: the periodic TICK that paces the major/minor FSM example.
//
// A free-running modulo-PERIOD counter with a decode of its last count: tick
// is high for one clock every PERIOD clocks. The lecture only says TICK comes
// from "a counter with appropriate combinational logic"; the period is this
// design's choice (PERIOD = 32 by default).
//
// Interface: clk (rising edge), init (synchronous clear, one clock long),
// tick (combinational decode of the registered count). The first tick comes
// PERIOD clocks after init.
module tick_gen #(
  parameter int unsigned PERIOD = 32
) (
  input  logic clk,
  input  logic init,
  output logic tick
);
  localparam int unsigned CW = (PERIOD > 2) ? $clog2(PERIOD) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (init || cnt == CW'(PERIOD - 1)) cnt <= '0;
    else                                cnt <= cnt + CW'(1);
  end

  assign tick = (cnt == CW'(PERIOD - 1));
endmodule
