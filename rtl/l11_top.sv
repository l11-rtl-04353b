// l11_top: the three designs of the lecture side by side.
//
//   u_fsm    major/minor FSM example: a tick counter paces a major FSM that
//            runs computations A and B in parallel and then C, each done by
//            a minor FSM (clock clk, init init).
//   u_fir    Lab 3 audio FIR filter: A/D in, 16-tap convolution with one of
//            16 switch-selected impulse responses, D/A out (clock clk,
//            asynchronous reset button fir_reset). The A/D and D/A
//            converters are external chips; their control, status and
//            data signals are ports of this module.
//   u_rom2   the 8 x 8 example ROM (07 down to 00), unregistered.
//   u_ram2   the 4 x 2 example RAM, unregistered (level-sensitive write).
// The designs share nothing but the clock; each keeps its own ports.
module l11_top
  import fir_pkg::*;
(
  input  logic              clk,
  // major/minor FSM example
  input  logic              init,
  output logic              tick,
  output logic              astart,
  output logic              bstart,
  output logic              cstart,
  output logic              abusy,
  output logic              bbusy,
  output logic              cbusy,
  output logic              fsm_err,
  output logic              fsm_done,
  // FIR filter
  input  logic              fir_reset,
  input  logic [SEL_W-1:0]  sel_sw,
  input  logic [DATA_W-1:0] ad_data,
  input  logic              ad_status,
  output logic              ad_start,
  output logic              ad_rd,
  output logic [DATA_W-1:0] da_data,
  output logic              da_wr,
  output logic              fir_sample,
  output logic              fir_busy,
  // example ROM
  input  logic [2:0]        rom2_address,
  output logic [7:0]        rom2_q,
  // example RAM
  input  logic [1:0]        ram2_address,
  input  logic [1:0]        ram2_data,
  input  logic              ram2_we,
  output logic [1:0]        ram2_q
);
  fsm_example u_fsm (
    .clk, .clk_c(clk), .init, .tick, .astart, .bstart, .cstart, .abusy, .bbusy, .cbusy,
    .err(fsm_err), .done(fsm_done)
  );

  fir_filter u_fir (
    .clk, .reset(fir_reset), .sel_sw, .ad_data, .ad_status, .ad_start,
    .ad_rd, .da_data, .da_wr, .sample(fir_sample), .conv_busy(fir_busy)
  );

  lpm_rom u_rom2 (
    .inclock(clk), .outclock(clk), .address(rom2_address), .q(rom2_q)
  );

  lpm_ram_dq u_ram2 (
    .inclock(clk), .outclock(clk), .address(ram2_address), .data(ram2_data),
    .we(ram2_we), .q(ram2_q)
  );
endmodule
