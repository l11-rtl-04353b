// tb_fir_filter: end-to-end test of the FIR filter with its default sample
// period (256 clocks) and a behavioural A/D converter.
//
// The "analog" input is a square wave of +-100 with a few random and
// full-scale samples mixed in. The response switches step through the unit
// sample, the negative unit sample, the boxcar, the exponential response
// and an empty one, 40 samples each, changed between passes. fir_scoreboard
// checks every D/A word against the convolution computed with integers and
// the length of every pass; the first conversion is made slower than a
// sample period so the store step has to wait for the converter once. The
// unit sample must reproduce the input to within one step (127/128 gain),
// which is checked as well.
module tb_fir_filter;
  logic       clk = 1'b0, reset = 1'b1;
  logic [3:0] sel_sw = 4'd0;
  logic [7:0] ad_data, da_data, vin = '0;
  logic       ad_status, ad_start, ad_rd, da_wr, sample, conv_busy;
  int         checks, failures, passes, stall_passes, short_passes, sel_changes;
  int         conversions, bad_reads, n = 0, unity_checks = 0;
  int         prev_in [$];

  always #5 clk = ~clk;

  fir_filter dut (.clk, .reset, .sel_sw, .ad_data, .ad_status, .ad_start,
                  .ad_rd, .da_data, .da_wr, .sample, .conv_busy);

  ad670_model #(.CONV(20), .FIRST_CONV(300)) u_ad (
    .clk, .start(ad_start), .rd(ad_rd), .vin, .data(ad_data), .status(ad_status),
    .conversions, .bad_reads);

  fir_scoreboard u_sb (
    .clk, .init(reset), .ad_start, .ad_rd, .ad_status, .vin, .sel_sw, .da_wr,
    .da_data, .conv_busy, .checks, .failures, .passes, .stall_passes,
    .short_passes, .sel_changes);

  int extra_checks = 0, extra_fail = 0;

  initial begin
    repeat (256 * 230) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail + 1);
    $finish;
  end

  // Next input code after every A/D start.
  always @(posedge clk) if (ad_start) begin
    n++;
    prev_in.push_back(int'($signed(vin)));
    #1;
    if (n % 7 == 3)       vin = 8'($urandom);
    else if (n % 29 == 5) vin = 8'h80;
    else if (n % 31 == 6) vin = 8'h7F;
    else                  vin = ((n / 12) % 2 == 0) ? 8'd100 : 8'(-100);
  end

  // With the unit sample selected, output p+1 carries input x[p-1]*127/128.
  int q = 0;
  always @(posedge clk) if (da_wr) begin
    q++;
    if (sel_sw == 4'd0 && q >= 3 && q <= 40) begin : unity
    int xin, yout;
    xin  = prev_in[q - 2];
    yout = int'($signed(da_data ^ 8'h80));
    extra_checks++;
    if (yout != ((xin * 127) >>> 7)) begin
      extra_fail++;
      $display("unit sample: in %0d out %0d", xin, yout);
    end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    reset <= 1'b0;
    for (int f = 0; f < 5; f++) begin
      while (passes < 40 * (f + 1)) @(posedge clk);
      @(negedge conv_busy);
      sel_sw <= (f == 3) ? 4'd9 : 4'(f + 1);
    end
    extra_checks++;
    if (stall_passes < 1 || short_passes < 1 || sel_changes < 4 || bad_reads != 0 ||
        conversions < 200) begin
      extra_fail++;
      $display("stalls=%0d short=%0d sel_changes=%0d bad_reads=%0d conversions=%0d",
               stall_passes, short_passes, sel_changes, bad_reads, conversions);
    end
    $display("passes=%0d stalls=%0d short=%0d sel_changes=%0d", passes, stall_passes,
             short_passes, sel_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail);
    $finish;
  end
endmodule
