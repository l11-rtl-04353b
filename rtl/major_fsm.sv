// major_fsm: the supervising ("major") FSM of the lecture's example
// computation: on every tick, run computations A and B in parallel, then,
// once both are finished, run computation C.
//
// States (Moore outputs in brackets):
//   WT   wait for tick
//   CK   check that A, B and C are all idle; if any is busy go to ERR
//   SAB  [astart, bstart] hold both starts until both minors report busy
//   WAB  wait while abusy or bbusy
//   SC   [cstart] hold start until cbusy
//   WC   wait while cbusy, then back to WT
//   ERR  [err] stay until init
// The transition conditions are those of the lecture's state diagram; the
// state encoding (an enum) is this design's choice. A start is held until the
// minor FSM answers with busy, so it works for minor FSMs of any length of at
// least two clocks, and for minors whose busy arrives one clock late through
// a synchronizer.
//
// Interface: clk (rising edge), init (synchronous, one clock long), tick
// (one-clock pulse), abusy/bbusy/cbusy from the minor FSMs; astart, bstart,
// cstart, err are registered-state decodes. done pulses for one clock in the
// last WC clock, when a whole A,B then C sequence has finished.
module major_fsm (
  input  logic clk,
  input  logic init,
  input  logic tick,
  input  logic abusy,
  input  logic bbusy,
  input  logic cbusy,
  output logic astart,
  output logic bstart,
  output logic cstart,
  output logic err,
  output logic done
);
  typedef enum logic [2:0] {WT, CK, SAB, WAB, SC, WC, ERR} state_t;
  state_t state, nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      WT:  if (tick) nxt = CK;
      CK:  nxt = (abusy || bbusy || cbusy) ? ERR : SAB;
      SAB: if (abusy && bbusy) nxt = WAB;
      WAB: if (!abusy && !bbusy) nxt = SC;
      SC:  if (cbusy) nxt = WC;
      WC:  if (!cbusy) nxt = WT;
      ERR: nxt = ERR;
      default: nxt = ERR;
    endcase
  end

  always_ff @(posedge clk) begin
    if (init) state <= WT;
    else      state <= nxt;
  end

  assign astart = (state == SAB);
  assign bstart = (state == SAB);
  assign cstart = (state == SC);
  assign err    = (state == ERR);
  assign done   = (state == WC) && !cbusy;
endmodule
