// tb_major_fsm: self-checking test of major_fsm.
//
// The minor FSMs are replaced by behavioural models whose busy time is drawn
// at random (1 to 6 clocks, different for A, B and C), so the major FSM is
// tested against minors of unknown duration. Checked every clock:
//   astart equals bstart; no start while in error;
//   C starts only after both A and B have finished;
// and per tick: A, B and C each run exactly once and done pulses once.
// A last phase forces abusy high while the major FSM waits, gives a tick and
// checks that the FSM enters and stays in its error state until init.
module tb_major_fsm;
  logic clk = 1'b0, init = 1'b1, tick = 1'b0;
  logic abusy_m, bbusy_m, cbusy_m, force_a = 1'b0;
  logic abusy, bbusy, cbusy;
  logic astart, bstart, cstart, err, done;
  int   checks = 0, failures = 0;
  int   arem = 0, brem = 0, crem = 0;
  int   aruns = 0, bruns = 0, cruns = 0, dones = 0;
  int   la = 3, lb = 3, lc = 3;

  always #5 clk = ~clk;

  major_fsm dut (.clk, .init, .tick, .abusy, .bbusy, .cbusy,
                 .astart, .bstart, .cstart, .err, .done);

  assign abusy_m = (arem > 0);
  assign bbusy_m = (brem > 0);
  assign cbusy_m = (crem > 0);
  assign abusy   = abusy_m || force_a;
  assign bbusy   = bbusy_m;
  assign cbusy   = cbusy_m;

  // Behavioural minor FSMs: idle until start, then busy for l clocks.
  always @(posedge clk) begin
    if (init) begin
      arem <= 0; brem <= 0; crem <= 0;
    end else begin
      if (arem > 0) arem <= arem - 1; else if (astart) begin arem <= la; aruns++; end
      if (brem > 0) brem <= brem - 1; else if (bstart) begin brem <= lb; bruns++; end
      if (crem > 0) crem <= crem - 1;
      else if (cstart) begin
        crem <= lc; cruns++;
        checks++;
        if (abusy_m || bbusy_m) begin
          failures++; $display("C started while A or B busy");
        end
      end
    end
  end

  always @(negedge clk) if (!init) begin
    checks++;
    if (astart !== bstart) begin failures++; $display("astart != bstart"); end
    if (done) dones++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_tick();
    @(posedge clk); tick <= 1'b1;
    @(posedge clk); tick <= 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    init <= 1'b0;
    for (int t = 1; t <= 30; t++) begin
      la = $urandom_range(1, 6); lb = $urandom_range(1, 6); lc = $urandom_range(1, 6);
      repeat ($urandom_range(1, 5)) @(posedge clk);
      pulse_tick();
      // wait for done (bounded)
      for (int w = 0; w < 60 && dones < t; w++) @(posedge clk);
      repeat (2) @(posedge clk);
      checks++;
      if (aruns != t || bruns != t || cruns != t || dones != t || err) begin
        failures++;
        $display("tick %0d: runs a=%0d b=%0d c=%0d done=%0d err=%0b",
                 t, aruns, bruns, cruns, dones, err);
      end
    end
    // A tick while nothing runs leaves no trace if it is absent: no starts.
    repeat (10) @(posedge clk);
    checks++;
    if (aruns != 30) failures++;
    // Error path: a minor FSM still busy when the tick comes.
    force_a = 1'b1;
    pulse_tick();
    repeat (3) @(posedge clk);
    checks++;
    if (!err) begin failures++; $display("no error state"); end
    force_a = 1'b0;
    pulse_tick();
    repeat (20) @(posedge clk);
    checks++;
    if (!err || aruns != 30 || astart || cstart) begin
      failures++; $display("error state not held");
    end
    init <= 1'b1; @(posedge clk); init <= 1'b0; @(posedge clk); #1;
    checks++;
    if (err) begin failures++; $display("init did not clear error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
