// fir_pkg: sizes shared by the blocks of the FIR filter.
//
// Samples are 8-bit two's complement numbers from the A/D converter; the D/A
// converter takes 8-bit offset binary. Impulse response coefficients are 8-bit
// sign/magnitude words: bit 7 is the sign, bits 6:0 the magnitude, read as a
// fraction of 128. The filter keeps the last 16 samples and has 16
// coefficients per impulse response, and four switches select one of 16
// impulse responses. Products and their sum are formed in a 16-bit
// accumulator.
package fir_pkg;
  localparam int unsigned DATA_W = 8;   // sample and coefficient width
  localparam int unsigned MAG_W  = 7;   // coefficient magnitude bits
  localparam int unsigned SR_W   = 15;  // shifted-sample register width
  localparam int unsigned ACC_W  = 16;  // accumulator width
  localparam int unsigned TAPS   = 16;  // coefficients per impulse response
  localparam int unsigned TAP_W  = 4;   // address width of sample store/ROM
  localparam int unsigned SEL_W  = 4;   // impulse response selection switches
endpackage
