// tb_fsm_example: end-to-end test of the major/minor FSM example.
//
// With PERIOD = 40 and minor FSMs of 4, 5 and 3 states, every tick must
// start A and B together, start C only after both finished, and end with a
// done pulse 3 + max(NA, NB) + NC clocks after the tick: two clocks from the
// tick to the start of A and B, NA-1 and NB-1 busy clocks, one clock to
// notice both are idle, one clock to start C, NC-1 busy clocks and one clock
// to notice C is idle. The err output must never rise.
// Two more instances run minor FSM C on its own clock (C_ASYNC = 1), one
// faster (period 7) and one slower (period 13) than the major FSM's clock
// (period 10), with NC = 8. For them every tick must still give exactly one
// C run after A and B, one done and no error.
module tb_fsm_example;
  localparam int P = 40, NA = 4, NB = 5, NC = 3;
  localparam int LAT = 3 + ((NA > NB) ? NA : NB) + NC;
  logic clk = 1'b0, init = 1'b1;
  logic tick, astart, bstart, cstart, abusy, bbusy, cbusy, err, done;
  int   checks = 0, failures = 0, ticks = 0, dones = 0, cyc = 0, tick_cyc = 0;
  int   abusy_len = 0, bbusy_len = 0, cbusy_len = 0;

  always #5 clk = ~clk;

  // Asynchronous minor C: two clock ratios.
  logic clk_f = 1'b0, clk_s = 1'b0, init_x = 1'b1;
  always #3.5 clk_f = ~clk_f;
  always #6.5 clk_s = ~clk_s;
  logic [1:0] x_tick, x_astart, x_bstart, x_cstart, x_abusy, x_bbusy, x_cbusy, x_err, x_done;
  int x_ticks [2], x_dones [2], x_cruns [2];
  logic [1:0] x_cbusy_d = '0;

  fsm_example #(.PERIOD(P), .NA(NA), .NB(NB), .NC(8), .C_ASYNC(1'b1)) dut_f (
    .clk, .clk_c(clk_f), .init(init_x), .tick(x_tick[0]), .astart(x_astart[0]),
    .bstart(x_bstart[0]), .cstart(x_cstart[0]), .abusy(x_abusy[0]), .bbusy(x_bbusy[0]),
    .cbusy(x_cbusy[0]), .err(x_err[0]), .done(x_done[0]));
  fsm_example #(.PERIOD(P), .NA(NA), .NB(NB), .NC(8), .C_ASYNC(1'b1)) dut_s (
    .clk, .clk_c(clk_s), .init(init_x), .tick(x_tick[1]), .astart(x_astart[1]),
    .bstart(x_bstart[1]), .cstart(x_cstart[1]), .abusy(x_abusy[1]), .bbusy(x_bbusy[1]),
    .cbusy(x_cbusy[1]), .err(x_err[1]), .done(x_done[1]));

  initial begin x_ticks = '{0, 0}; x_dones = '{0, 0}; x_cruns = '{0, 0}; end

  always @(negedge clk) if (!init_x) begin
    for (int i = 0; i < 2; i++) begin
      if (x_tick[i]) x_ticks[i]++;
      if (x_done[i]) x_dones[i]++;
      if (x_cbusy[i] && !x_cbusy_d[i]) begin
        x_cruns[i]++;
        checks++;
        if (x_abusy[i] || x_bbusy[i]) begin failures++; $display("async C overlaps A/B"); end
      end
      checks++;
      if (x_err[i]) begin failures++; $display("async instance %0d err", i); end
    end
    x_cbusy_d = x_cbusy;
  end

  fsm_example #(.PERIOD(P), .NA(NA), .NB(NB), .NC(NC)) dut (
    .clk, .clk_c(clk), .init, .tick, .astart, .bstart, .cstart, .abusy, .bbusy, .cbusy,
    .err, .done);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!init) begin
    cyc++;
    if (tick) begin ticks++; tick_cyc = cyc; end
    if (abusy) abusy_len++;
    if (bbusy) bbusy_len++;
    if (cbusy) begin
      cbusy_len++;
      checks++;
      if (abusy || bbusy) begin failures++; $display("C overlaps A/B"); end
    end
    if (done) begin
      dones++;
      checks++;
      if (cyc - tick_cyc != LAT) begin
        failures++;
        $display("done %0d clocks after tick, expected %0d", cyc - tick_cyc, LAT);
      end
    end
    checks++;
    if (err) begin failures++; $display("err raised"); end
  end

  initial begin
    repeat (2) @(posedge clk);
    init <= 1'b0;
    // The asynchronous instances need init for more than one clk_c period.
    fork begin repeat (3) @(posedge clk); init_x <= 1'b0; end join_none
    repeat (P * 10 + 30) @(posedge clk);
    checks++;
    if (ticks != 10 || dones != 10) begin
      failures++; $display("ticks=%0d dones=%0d", ticks, dones);
    end
    checks++;
    if (abusy_len != 10 * (NA - 1) || bbusy_len != 10 * (NB - 1) ||
        cbusy_len != 10 * (NC - 1)) begin
      failures++;
      $display("busy clocks a=%0d b=%0d c=%0d", abusy_len, bbusy_len, cbusy_len);
    end
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (x_ticks[i] != 10 || x_dones[i] != 10 || x_cruns[i] != 10) begin
        failures++;
        $display("async %0d: ticks=%0d dones=%0d c runs=%0d", i, x_ticks[i], x_dones[i], x_cruns[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
