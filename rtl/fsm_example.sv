// fsm_example: the lecture's major/minor FSM example, complete.
//
// A tick counter paces a major FSM that supervises three minor FSMs: on each
// tick it starts computations A and B together, waits until both are done,
// then starts C and waits for it. Computations are stand-ins: each minor FSM
// is a chain of states that stays busy for a fixed number of clocks
// (NA-1, NB-1, NC-1). All machines share one rising-edge clock and one
// synchronous, one-clock init, as the lecture requires.
//
// With C_ASYNC = 1 minor FSM C runs on its own clock clk_c, which may have
// any frequency and phase. Then cstart is synchronised into clk_c and
// C's busy back into clk, each by one flip-flop, before either steers a
// transition; init also reaches C through a flip-flop on clk_c. This is the
// lecture's remedy for minor FSMs on other clocks. The handshake then has a
// round trip of about two clk periods plus two clk_c periods, and C must
// stay busy longer than that, or it will see the old start again and run
// twice: (NC-1)*Tc > 2*T + 2*Tc. init must also be held for longer than one
// clk_c period. With C_ASYNC = 0 (the default, the lecture's example) all
// three minors share clk and clk_c is not used.
//
// Interface: clk, clk_c, init in; the tick, the start/busy handshakes (as
// seen by the major FSM), err (major FSM in its error state) and done (one C
// computation finished) are brought out for observation.
module fsm_example #(
  parameter int unsigned PERIOD  = 32,
  parameter int unsigned NA      = 4,
  parameter int unsigned NB      = 4,
  parameter int unsigned NC      = 4,
  parameter bit          C_ASYNC = 1'b0
) (
  input  logic clk,
  input  logic clk_c,
  input  logic init,
  output logic tick,
  output logic astart,
  output logic bstart,
  output logic cstart,
  output logic abusy,
  output logic bbusy,
  output logic cbusy,
  output logic err,
  output logic done
);
  tick_gen #(.PERIOD(PERIOD)) u_tick (.clk, .init, .tick);

  major_fsm u_major (
    .clk, .init, .tick, .abusy, .bbusy, .cbusy,
    .astart, .bstart, .cstart, .err, .done
  );

  minor_fsm #(.NSTATES(NA)) u_a (.clk, .init, .start(astart), .busy(abusy));
  minor_fsm #(.NSTATES(NB)) u_b (.clk, .init, .start(bstart), .busy(bbusy));
  if (C_ASYNC) begin : g_c_async
    logic sastart, scbusy, cbusy_c, init_c;
    sync_ff u_sinit  (.clk(clk_c), .d(init),    .q(init_c));
    sync_ff u_sstart (.clk(clk_c), .d(cstart),  .q(sastart));
    sync_ff u_sbusy  (.clk(clk),   .d(cbusy_c), .q(scbusy));
    minor_fsm #(.NSTATES(NC)) u_c (.clk(clk_c), .init(init_c), .start(sastart),
                                   .busy(cbusy_c));
    assign cbusy = scbusy;
  end else begin : g_c_sync
    minor_fsm #(.NSTATES(NC)) u_c (.clk, .init, .start(cstart), .busy(cbusy));
  end
endmodule
