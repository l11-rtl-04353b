// tb_fir_square_wave: the filter's step responses to a square wave.
//
// A +-100 square wave (24 samples per half period) is filtered first by the
// 16-point boxcar, then by the exponential response. The check looks only at
// the shape of the output, independent of any reference model:
//  * boxcar: the output sits at exactly +-100 between edges, and each edge
//    becomes a straight ramp of 16 steps of 12 or 13 codes (200/16 = 12.5);
//  * exponential: the output sits at 99 / -100 (gain 127/128, truncated),
//    and each edge becomes 7 steps whose sizes halve: 100, 50, 25, ..., 1
//    (to within one code of truncation).
module tb_fir_square_wave;
  logic       clk = 1'b0, reset = 1'b1;
  logic [3:0] sel_sw = 4'd2;
  logic [7:0] ad_data, da_data, vin = 8'(-100);
  logic       ad_status, ad_start, ad_rd, da_wr, sample, conv_busy;
  int         conversions, bad_reads, n = 0, checks = 0, failures = 0;
  int         y [$];

  always #5 clk = ~clk;

  fir_filter dut (.clk, .reset, .sel_sw, .ad_data, .ad_status, .ad_start,
                  .ad_rd, .da_data, .da_wr, .sample, .conv_busy);

  ad670_model #(.CONV(20), .FIRST_CONV(20)) u_ad (
    .clk, .start(ad_start), .rd(ad_rd), .vin, .data(ad_data), .status(ad_status),
    .conversions, .bad_reads);

  initial begin
    repeat (256 * 340) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (ad_start) begin
    n++;
    #1 vin = ((n / 24) % 2 == 0) ? 8'(-100) : 8'd100;
  end

  always @(posedge clk) if (da_wr) y.push_back(int'($signed(da_data ^ 8'h80)));

  // Split a stretch of outputs into plateaus and transitions and check them.
  task automatic analyse(input int first, input int last, input int hi, input int lo,
                         input int nsteps, input bit halving, output int edges);
    int i, steps, prev_step;
    edges = 0;
    i = first;
    while (i < last && y[i] != hi && y[i] != lo) i++;
    while (i < last) begin
      int level = y[i];
      while (i < last && y[i] == level) i++;
      if (i >= last) break;
      steps = 0; prev_step = 1000;
      while (i < last && y[i] != hi && y[i] != lo) begin
        int d = y[i] - y[i-1];
        if (d < 0) d = -d;
        steps++;
        checks++;
        if (halving ? (d > prev_step / 2 + 1 && steps > 1) || d == 0
                    : (d < 12 || d > 13)) begin
          failures++;
          $display("output %0d: step %0d (previous %0d)", i, d, prev_step);
        end
        prev_step = d;
        i++;
      end
      if (i >= last) break;
      steps++;  // the step onto the new plateau
      checks++;
      if (steps != nsteps) begin
        failures++;
        $display("edge near output %0d: %0d steps, expected %0d", i, steps, nsteps);
      end
      edges++;
    end
  endtask

  initial begin
    int e_box, e_exp, split;
    repeat (4) @(posedge clk);
    reset <= 1'b0;
    while (y.size() < 150) @(posedge clk);
    @(negedge conv_busy);
    split = y.size();
    sel_sw <= 4'd3;
    while (y.size() < 300) @(posedge clk);
    analyse(20, split, 100, -100, 16, 1'b0, e_box);
    analyse(split + 20, y.size(), 99, -100, 7, 1'b1, e_exp);
    checks++;
    if (e_box < 4 || e_exp < 4 || bad_reads != 0) begin
      failures++;
      $display("edges: boxcar %0d exponential %0d", e_box, e_exp);
    end
    $display("edges seen: boxcar %0d, exponential %0d", e_box, e_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
