// fir_arith: multiply-accumulate unit of the FIR filter, built as a minor FSM.
//
// One operation adds the product of a two's complement sample S and a
// sign/magnitude coefficient H to the accumulator, by shift and add:
//   * HREG is loaded with H. Its sign bit H[7] stays put; its 7-bit magnitude
//     shifts right one place per step, and HZERO flags that it has become 0.
//   * SR is loaded with S XOR {8{H[7]}} sign-extended to 15 bits, i.e. S when
//     H is positive and the ones complement of S when H is negative.
//   * Each step, if H[0] is 1, SR is added to the accumulator with carry-in
//     H[7]; then SR shifts left and HREG right. The bit shifted into SR is
//     H[7], so that for a negative H the ones complement of S*2^j plus the
//     carry-in is exactly the twos complement -S*2^j.
//   * Steps stop when HZERO is set, so a multiply takes at most 7 steps and
//     fewer for small coefficients; a zero coefficient takes none.
// The XOR "programmable inverter", the carry-in of H[7] and the final
// conversion to offset binary (invert the top bit) follow the lecture's
// efficient arithmetic datapath. Shifting H[7] into SR (which makes the
// result exact instead of ones-complement accurate), stopping on HZERO and
// taking accumulator bits 14:7 as the 8-bit output are this design's choices.
//
// Timing: start is sampled in IDLE. busy rises the next clock and stays high
// for 2 + (position of the highest set magnitude bit + 1) clocks: LOADH
// (HREG <= h_in), LOADS (SR <= s_in ^ sign), then the steps. s_in is read in
// LOADS, one clock after h_in, so a source with a registered address has time
// to respond. clac clears the accumulator (only while idle). acc is the raw
// 16-bit sum; dout is acc[14:7] in offset binary for the D/A converter.
// HZERO (magnitude of HREG is zero) is used inside the unit to end a
// multiply and is not brought out.
module fir_arith
  import fir_pkg::*;
(
  input  logic              clk,
  input  logic              init,
  input  logic              clac,
  input  logic              start,
  input  logic [DATA_W-1:0] s_in,
  input  logic [DATA_W-1:0] h_in,
  output logic              busy,
  output logic [ACC_W-1:0]  acc,
  output logic [DATA_W-1:0] dout
);
  typedef enum logic [1:0] {IDLE, LOADH, LOADS, STEP} state_t;
  state_t state;

  logic             hsign, hzero;
  logic [MAG_W-1:0] hmag;
  logic [SR_W-1:0]  sr;
  logic [DATA_W-1:0] s_conv;

  assign hzero  = (hmag == '0);
  assign s_conv = s_in ^ {DATA_W{hsign}};

  always_ff @(posedge clk) begin
    if (init) begin
      state <= IDLE;
      acc   <= '0;
      hsign <= 1'b0;
      hmag  <= '0;
      sr    <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (clac) acc <= '0;
          if (start) state <= LOADH;
        end
        LOADH: begin
          {hsign, hmag} <= h_in;
          state <= LOADS;
        end
        LOADS: begin
          sr    <= {{(SR_W-DATA_W){s_conv[DATA_W-1]}}, s_conv};
          state <= hzero ? IDLE : STEP;
        end
        STEP: begin
          if (hmag[0])
            acc <= acc + {{(ACC_W-SR_W){sr[SR_W-1]}}, sr} + ACC_W'(hsign);
          sr    <= {sr[SR_W-2:0], hsign};
          hmag  <= hmag >> 1;
          if (hmag[MAG_W-1:1] == '0) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
  assign dout = {~acc[ACC_W-2], acc[ACC_W-3:ACC_W-DATA_W-1]};
endmodule
