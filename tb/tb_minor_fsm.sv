// tb_minor_fsm: self-checking test of minor_fsm.
//
// Two instances (4 and 2 states) are started by random start pulses and
// random long start levels. A reference counts the expected busy time,
// NSTATES-1 clocks beginning the clock after start is seen while idle, and
// busy is compared every clock.
module tb_minor_fsm;
  logic clk = 1'b0, init = 1'b1, start4 = 1'b0, start2 = 1'b0;
  logic busy4, busy2;
  int   checks = 0, failures = 0;
  int   rem4 = 0, rem2 = 0, runs4 = 0, runs2 = 0;

  always #5 clk = ~clk;

  minor_fsm #(.NSTATES(4)) dut4 (.clk, .init, .start(start4), .busy(busy4));
  minor_fsm #(.NSTATES(2)) dut2 (.clk, .init, .start(start2), .busy(busy2));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: remaining busy clocks after each edge.
  always @(posedge clk) begin
    if (init) begin
      rem4 <= 0; rem2 <= 0;
    end else begin
      if (rem4 > 0) rem4 <= rem4 - 1; else if (start4) begin rem4 <= 3; runs4++; end
      if (rem2 > 0) rem2 <= rem2 - 1; else if (start2) begin rem2 <= 1; runs2++; end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    init <= 1'b0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk);
      start4 <= ($urandom_range(0, 3) == 0) || (i > 300 && i < 320);
      start2 <= ($urandom_range(0, 2) == 0);
      #1;
      checks++;
      if (busy4 !== (rem4 > 0) || busy2 !== (rem2 > 0)) begin
        failures++;
        if (failures < 10)
          $display("mismatch at %0d: busy4=%0b exp %0b busy2=%0b exp %0b",
                   i, busy4, rem4 > 0, busy2, rem2 > 0);
      end
    end
    checks++;
    if (runs4 < 20 || runs2 < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
