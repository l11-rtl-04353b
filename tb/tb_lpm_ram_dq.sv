// tb_lpm_ram_dq: self-checking test of lpm_ram_dq.
// Instance 0 is the default 4 x 2 RAM with everything unregistered: writes
// are we pulses between clock edges, and q must follow the array at once.
// Instance 1 is a 16 x 8 RAM with registered address and data (the FIR
// sample store's setting): writes happen at the clock edge and q shows the
// word of the address captured at the last edge. Both are compared with a
// reference array after random writes and reads.
module tb_lpm_ram_dq;
  logic       clk = 1'b0;
  logic [1:0] a0 = '0, d0 = '0, q0;
  logic       we0 = 1'b0;
  logic [3:0] a1 = '0, a1_cap;
  logic [7:0] d1 = '0, q1;
  logic       we1 = 1'b0;
  logic [1:0] ref0 [4];
  logic [7:0] ref1 [16];
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  lpm_ram_dq dut0 (.inclock(clk), .outclock(clk), .address(a0), .data(d0),
                   .we(we0), .q(q0));
  lpm_ram_dq #(.WIDTH(8), .WIDTHAD(4), .ADDRESS_REG(1'b1), .INDATA_REG(1'b1))
    dut1 (.inclock(clk), .outclock(clk), .address(a1), .data(d1), .we(we1), .q(q1));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Asynchronous RAM: address and data set up, we pulsed, then read back.
  initial begin
    for (int i = 0; i < 4; i++) ref0[i] = '0;
    for (int i = 0; i < 400; i++) begin
      a0 = 2'($urandom); d0 = 2'($urandom);
      #2;
      if ($urandom_range(0, 1) == 1) begin
        we0 = 1'b1; #2; we0 = 1'b0; ref0[a0] = d0;
      end
      #2;
      checks++;
      if (q0 !== ref0[a0]) begin
        failures++; $display("ram0 addr %0d: q=%0d exp %0d", a0, q0, ref0[a0]);
      end
    end
  end

  // Synchronous RAM: one access per clock.
  initial begin
    for (int i = 0; i < 16; i++) ref1[i] = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a1 = 4'($urandom); d1 = 8'($urandom); we1 = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (we1) ref1[a1] = d1;
      a1_cap = a1;
      #1;
      checks++;
      if (q1 !== ref1[a1_cap]) begin
        failures++; $display("ram1 addr %0d: q=%h exp %h", a1_cap, q1, ref1[a1_cap]);
      end
    end
    #50;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
