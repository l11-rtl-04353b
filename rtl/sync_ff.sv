// sync_ff: synchronizer for a signal that changes asynchronously to clk.
//
// Every start, busy, status or switch signal that comes from another clock
// domain or from outside the chip passes through STAGES D flip-flops clocked
// by the receiving FSM's clock before it can steer a state transition. The
// lecture draws one D flip-flop per signal, which is the default here;
// STAGES = 2 gives the usual two-flop synchronizer with more settling time.
// The flops have no reset: their content is defined STAGES clocks after clk
// starts.
//
// Interface: clk of the receiving domain, d (asynchronous, WIDTH bits),
// q (d delayed by STAGES rising edges of clk).
module sync_ff #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] r [STAGES];

  always_ff @(posedge clk) begin
    r[0] <= d;
    for (int i = 1; i < STAGES; i++) r[i] <= r[i-1];
  end

  assign q = r[STAGES-1];
endmodule
