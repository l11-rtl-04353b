// fir_filter: the lab's audio FIR filter, the logic inside the FPGA.
//
// The filter forms y[n] = sum_{k=0..15} h_sel[k] * x[n-k] once per sample
// period. x are 8-bit two's complement samples read from an external A/D
// converter, h_sel is one of 16 impulse responses chosen by four switches,
// and y goes to an external D/A converter as 8-bit offset binary. It is
// built from the lab's functional blocks:
//   sample_timer  sample pulse every DIV clocks
//   fir_ctrl      main-loop FSM (output, store, start A/D, convolve)
//   lpm_ram_dq    sample store, 16 x 8, registered address and data
//   impulse_rom   16 responses x 16 coefficients, sign/magnitude
//   fir_arith     shift-and-add multiply-accumulate unit
//   sync_ff       synchronisers for the reset button, the selection
//                 switches and the A/D status line, which all change
//                 asynchronously to clk
// The converters are outside the chip. The A/D is seen through a start
// strobe (ad_start), a status line that is high while it converts
// (ad_status) and a read strobe (ad_rd) during which ad_data is taken; the
// D/A latches da_data on da_wr. Separate input and output data ports stand
// for the shared 8-bit bus that the board can use; the bus itself (its
// tri-state drivers) is left to the pins.
//
// Timing: the output written on sample n is the result of samples up to
// n-1, so the filter has one sample period of latency and a fixed output
// instant. A pass (OUT to end of convolution) takes 4 + sum over taps of
// (4 + bit length of |h[k]|) clocks, at most 180 clocks for 16 taps of
// 7-bit magnitude, so DIV must be at least that; the default 256 is this
// design's choice, as are the reset synchroniser and using one register
// stage per synchroniser as the lecture draws it.
module fir_filter
  import fir_pkg::*;
#(
  parameter int unsigned DIV = 256
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [SEL_W-1:0]  sel_sw,
  input  logic [DATA_W-1:0] ad_data,
  input  logic              ad_status,
  output logic              ad_start,
  output logic              ad_rd,
  output logic [DATA_W-1:0] da_data,
  output logic              da_wr,
  output logic              sample,
  output logic              conv_busy
);
  logic             init, ad_busy;
  logic [SEL_W-1:0] sel;
  logic [TAP_W-1:0] ram_addr, tap;
  logic             ram_we, ram_zero, ar_start, ar_busy, clac;
  logic [DATA_W-1:0] ram_d, ram_q, rom_q;
  logic [ACC_W-1:0]  acc;

  sync_ff #(.WIDTH(1))     u_rst_sync (.clk, .d(reset),     .q(init));
  sync_ff #(.WIDTH(1))     u_ad_sync  (.clk, .d(ad_status), .q(ad_busy));
  sync_ff #(.WIDTH(SEL_W)) u_sel_sync (.clk, .d(sel_sw),    .q(sel));

  sample_timer #(.DIV(DIV)) u_timer (.clk, .init, .sample);

  fir_ctrl u_ctrl (
    .clk, .init, .sample, .ad_busy, .ar_busy,
    .ram_addr, .ram_we, .ram_zero, .tap, .ar_start, .clac,
    .ad_start, .ad_rd, .da_wr, .conv_busy
  );

  assign ram_d = ram_zero ? '0 : ad_data;

  lpm_ram_dq #(
    .WIDTH(DATA_W), .WIDTHAD(TAP_W),
    .ADDRESS_REG(1'b1), .INDATA_REG(1'b1), .OUTDATA_REG(1'b0)
  ) u_store (
    .inclock(clk), .outclock(clk), .address(ram_addr), .data(ram_d),
    .we(ram_we), .q(ram_q)
  );

  impulse_rom u_rom (.sel, .tap, .q(rom_q));

  fir_arith u_arith (
    .clk, .init, .clac, .start(ar_start), .s_in(ram_q), .h_in(rom_q),
    .busy(ar_busy), .acc, .dout(da_data)
  );
endmodule
