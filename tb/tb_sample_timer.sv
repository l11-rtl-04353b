// tb_sample_timer: self-checking test of sample_timer with DIV = 5.
// sample must be high exactly on clocks 5, 10, 15, ... after init is released,
// also after a second init in mid-count.
module tb_sample_timer;
  logic clk = 1'b0, init = 1'b1, tick;
  int   checks = 0, failures = 0;
  localparam int P = 5;

  always #5 clk = ~clk;
  sample_timer #(.DIV(P)) dut (.clk, .init, .sample(tick));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    for (int c = 1; c <= n; c++) begin
      @(posedge clk); #1;
      checks++;
      if (tick !== ((c % P) == P - 1)) begin
        failures++;
        $display("clock %0d after init: tick=%0b", c, tick);
      end
    end
  endtask

  initial begin
    @(posedge clk); #1;
    init = 1'b0;
    // count c: clocks since init released; cnt == c-1 after c-th edge... tick
    // is a decode of the count, so it is high when c mod P == P-1 here.
    run(23);
    init = 1'b1; @(posedge clk); #1; init = 1'b0;
    run(17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
