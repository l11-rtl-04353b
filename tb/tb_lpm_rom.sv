// tb_lpm_rom: self-checking test of lpm_rom.
// The default ROM (8 x 8, unregistered) must return 07 - address, as in the
// lab's example waveform where addresses 0..7 read 07, 06, ..., 00. A second
// instance with a registered address must return the word of the address
// presented before the last clock edge, and a third with registered address
// and output one more clock later.
module tb_lpm_rom;
  logic       clk = 1'b0;
  logic [2:0] a;
  logic [7:0] q0, q1, q2;
  logic [2:0] prev1, prev2;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  lpm_rom dut0 (.inclock(clk), .outclock(clk), .address(a), .q(q0));
  lpm_rom #(.ADDRESS_REG(1'b1)) dut1 (.inclock(clk), .outclock(clk), .address(a), .q(q1));
  lpm_rom #(.ADDRESS_REG(1'b1), .OUTDATA_REG(1'b1))
    dut2 (.inclock(clk), .outclock(clk), .address(a), .q(q2));

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    for (int i = 0; i < 40; i++) begin
      a = (i < 16) ? 3'(i) : 3'($urandom);
      #1;
      checks++;
      if (q0 !== 8'(7 - a)) begin
        failures++; $display("addr %0d: q=%h", a, q0);
      end
      @(posedge clk);
      prev2 = prev1; prev1 = a;
      #1;
      if (i >= 2) begin
        checks++;
        if (q1 !== 8'(7 - prev1) || q2 !== 8'(7 - prev2)) begin
          failures++;
          $display("registered: q1=%h exp %h q2=%h exp %h", q1, 7 - prev1, q2, 7 - prev2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
