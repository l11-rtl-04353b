// impulse_rom: the impulse response ROM of the FIR filter.
//
// 16 impulse responses of 16 coefficients each, 8-bit sign/magnitude
// (bit 7 sign, bits 6:0 magnitude in 1/128 units). The four selection
// switches form the upper address bits and the tap number the lower ones,
// so the ROM is 256 x 8. Read is asynchronous (unregistered address and
// output).
//
// The first three responses are the debugging ones of the lab:
//   0: unit sample          h[0] = +127/128, all others 0 (output = input)
//   1: negative unit sample h[0] = -127/128 (output = -input)
//   2: boxcar               16 equal coefficients of 8/128 (sum 1)
// Response 3 is an exponential decay, h[k] = 64/2^k for k < 7 (sum 127/128),
// the second filter whose step response the lab shows; its exact values are
// this design's choice, as are responses 4..15, which the lab does not list
// and which are left at zero (the filter then outputs silence). The contents
// are generated by a function, so the table's formula is the documentation.
module impulse_rom
  import fir_pkg::*;
(
  input  logic [SEL_W-1:0]  sel,
  input  logic [TAP_W-1:0]  tap,
  output logic [DATA_W-1:0] q
);
  function automatic logic [DATA_W-1:0] coef(input logic [SEL_W-1:0] f,
                                             input logic [TAP_W-1:0] k);
    unique case (f)
      4'd0:    return (k == '0) ? 8'h7F : 8'h00;
      4'd1:    return (k == '0) ? 8'hFF : 8'h00;
      4'd2:    return 8'h08;
      4'd3:    return (k < 4'd7) ? (8'd64 >> k) : 8'h00;
      default: return 8'h00;
    endcase
  endfunction

  always_comb q = coef(sel, tap);
endmodule
