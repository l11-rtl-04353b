// sample_timer: paces the FIR filter's main loop.
//
// A modulo-DIV counter on the system clock; sample is high for one clock
// every DIV clocks and tells the main-loop FSM to output the last result and
// take the next sample. The lab says only that the timer "figures out when
// to start each operation"; the default DIV = 256 is this design's choice:
// it leaves room for a worst-case convolution of 16 taps (about 190 clocks)
// and gives, for example, a 7.8 kHz sample rate from a 2 MHz clock.
//
// Interface: clk, init (synchronous clear), sample (decoded from the
// registered count; first pulse DIV clocks after init).
module sample_timer #(
  parameter int unsigned DIV = 256
) (
  input  logic clk,
  input  logic init,
  output logic sample
);
  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (init || cnt == CW'(DIV - 1)) cnt <= '0;
    else                             cnt <= cnt + CW'(1);
  end

  assign sample = (cnt == CW'(DIV - 1));
endmodule
