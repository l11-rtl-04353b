// fir_ctrl: main-loop controller of the FIR filter (the major FSM).
//
// After init it clears the 16-word sample store, starts a first A/D
// conversion and then runs the lab's main loop once per sample pulse:
//   WAIT    wait for the sample timer
//   OUT     [da_wr] hand the result computed on the previous sample to the
//           D/A converter, so output timing does not depend on how long the
//           convolution took
//   STORE   wait until the (synchronised) A/D status shows the conversion is
//           finished, then [ad_rd, ram_we] copy the A/D word into the store
//           at the write pointer
//   ADC     [ad_start] start the next A/D conversion
//   CLR     [clac] clear the accumulator
//   MSTART  [ar_start] present sample wp-k and coefficient k, start the
//           arithmetic unit and hold start until it reports busy
//   MWAIT   wait while the arithmetic unit is busy; then next tap, or, after
//           tap 15, advance the write pointer and return to WAIT
// The loop and its order follow the lab's main loop; the start/busy
// handshake with the arithmetic unit is the lecture's major/minor FSM
// handshake. Clearing the store and converting once at init, and waiting in
// STORE for a slow converter, are this design's choices.
//
// Interface: sample (one-clock pulse), ad_busy (A/D status, already
// synchronised), ar_busy (arithmetic unit); the store address ram_addr,
// ram_we and ram_zero (write zero instead of A/D data), the coefficient
// index tap, ar_start, clac, and the converter strobes ad_start, ad_rd,
// da_wr, each one clock long. conv_busy is high from OUT to the end of the
// convolution. A sample pulse that arrives while conv_busy is high is not
// seen; the sample period must cover one pass (see fir_filter).
module fir_ctrl
  import fir_pkg::*;
(
  input  logic             clk,
  input  logic             init,
  input  logic             sample,
  input  logic             ad_busy,
  input  logic             ar_busy,
  output logic [TAP_W-1:0] ram_addr,
  output logic             ram_we,
  output logic             ram_zero,
  output logic [TAP_W-1:0] tap,
  output logic             ar_start,
  output logic             clac,
  output logic             ad_start,
  output logic             ad_rd,
  output logic             da_wr,
  output logic             conv_busy
);
  typedef enum logic [3:0] {
    ICLR, IADC, WAIT, OUT, STORE, ADC, CLR, MSTART, MWAIT
  } state_t;
  state_t state;

  logic [TAP_W-1:0] wp;   // next store address; newest sample after STORE
  logic [TAP_W-1:0] k;    // tap index, also the clear counter during ICLR

  always_ff @(posedge clk) begin
    if (init) begin
      state <= ICLR;
      wp    <= '0;
      k     <= '0;
    end else begin
      unique case (state)
        ICLR: begin
          k <= k + TAP_W'(1);
          if (k == TAP_W'(TAPS - 1)) state <= IADC;
        end
        IADC:   state <= WAIT;
        WAIT:   if (sample) state <= OUT;
        OUT:    state <= STORE;
        STORE:  if (!ad_busy) state <= ADC;
        ADC:    state <= CLR;
        CLR: begin
          k     <= '0;
          state <= MSTART;
        end
        MSTART: if (ar_busy) state <= MWAIT;
        MWAIT: begin
          if (!ar_busy) begin
            k <= k + TAP_W'(1);
            if (k == TAP_W'(TAPS - 1)) begin
              wp    <= wp + TAP_W'(1);
              state <= WAIT;
            end else begin
              state <= MSTART;
            end
          end
        end
        default: state <= WAIT;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      ICLR:          ram_addr = k;
      MSTART, MWAIT: ram_addr = wp - k;
      default:       ram_addr = wp;
    endcase
  end

  assign tap       = k;
  assign ram_zero  = (state == ICLR);
  assign ad_rd     = (state == STORE) && !ad_busy;
  assign ram_we    = (state == ICLR) || ad_rd;
  assign ad_start  = (state == IADC) || (state == ADC);
  assign clac      = (state == CLR);
  assign ar_start  = (state == MSTART);
  assign da_wr     = (state == OUT);
  assign conv_busy = (state != WAIT) && (state != ICLR) && (state != IADC);
endmodule
