// tb_sync_ff: self-checking test of sync_ff.
// A 4-bit one-stage and a 1-bit two-stage synchroniser get random inputs that
// change between clock edges; each output must equal the input sampled
// STAGES edges earlier.
module tb_sync_ff;
  logic       clk = 1'b0;
  logic [3:0] d4 = '0, q4;
  logic       d1 = 1'b0, q1;
  logic [3:0] h4 [3];
  logic       h1 [3];
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;
  sync_ff #(.WIDTH(4), .STAGES(1)) dut4 (.clk, .d(d4), .q(q4));
  sync_ff #(.WIDTH(1), .STAGES(2)) dut1 (.clk, .d(d1), .q(q1));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      @(posedge clk);
      h4[1] = h4[0]; h4[0] = d4;
      h1[1] = h1[0]; h1[0] = d1;
      #1;
      if (i >= 2) begin
        checks++;
        if (q4 !== h4[0] || q1 !== h1[1]) begin
          failures++;
          $display("cycle %0d: q4=%h exp %h q1=%0b exp %0b", i, q4, h4[0], q1, h1[1]);
        end
      end
      #($urandom_range(1, 7));
      d4 = 4'($urandom);
      d1 = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
