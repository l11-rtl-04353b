// tb_fir_ctrl: self-checking test of the FIR main-loop controller.
//
// The controller runs against a behavioural arithmetic unit (busy for a
// random 2..9 clocks after each start) and a driven A/D status line. Checked:
// after init, 16 zero-writes to addresses 0..15 and one A/D start; per
// sample pulse, in order: one D/A write on the next clock, the store (ad_rd
// with ram_we to the write pointer) only when the A/D status is low, one A/D
// start, one accumulator clear, and 16 multiplies with tap k = 0..15 reading
// sample address wp - k; the write pointer advances by one per pass. Some
// passes hold the A/D status high for a while, so the controller must wait.
module tb_fir_ctrl;
  logic       clk = 1'b0, init = 1'b1, sample = 1'b0, ad_busy = 1'b0, ar_busy;
  logic [3:0] ram_addr, tap;
  logic       ram_we, ram_zero, ar_start, clac, ad_start, ad_rd, da_wr, conv_busy;
  int         checks = 0, failures = 0, arem = 0, stalls = 0;
  logic [3:0] wp = '0;

  always #5 clk = ~clk;

  fir_ctrl dut (.clk, .init, .sample, .ad_busy, .ar_busy, .ram_addr, .ram_we,
                .ram_zero, .tap, .ar_start, .clac, .ad_start, .ad_rd, .da_wr,
                .conv_busy);

  assign ar_busy = (arem > 0);
  always @(posedge clk) begin
    if (arem > 0) arem <= arem - 1;
    else if (ar_start) arem <= $urandom_range(2, 9);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%t: %s", $time, what);
    end
  endtask

  // Never read the A/D while it converts.
  always @(negedge clk) if (!init && ad_rd) expect1(!ad_busy, "read while A/D busy");

  initial begin
    repeat (2) @(posedge clk);
    init <= 1'b0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      expect1(ram_we && ram_zero && ram_addr == 4'(i) && !ad_start, "init clear");
    end
    @(negedge clk);
    expect1(ad_start && !ram_we, "init A/D start");
    @(negedge clk);
    expect1(!ad_start && !conv_busy, "idle after init");
    for (int p = 0; p < 40; p++) begin
      bit stall;
      int wait_clk;
      repeat ($urandom_range(1, 5)) @(negedge clk);
      stall = (p % 4 == 1);
      ad_busy = stall;
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      expect1(da_wr && !ram_we && !ad_start, "D/A write after sample");
      if (stall) begin
        repeat (7) begin
          @(negedge clk);
          expect1(!ad_rd && !ram_we && !ad_start && !da_wr, "wait for A/D");
        end
        ad_busy = 1'b0;
        stalls++;
        #1;
      end else begin
        @(negedge clk);
      end
      expect1(ad_rd && ram_we && !ram_zero && ram_addr == wp, "store");
      @(negedge clk);
      expect1(ad_start && !ram_we, "A/D start");
      @(negedge clk);
      expect1(clac && !ar_start, "clear accumulator");
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        expect1(ar_start && tap == 4'(k) && ram_addr == 4'(wp - 4'(k)), "multiply start");
        wait_clk = 0;
        while (ar_start || ar_busy) begin
          expect1(tap == 4'(k) && ram_addr == 4'(wp - 4'(k)) && !clac, "operands held");
          @(negedge clk);
          wait_clk++;
          if (wait_clk > 20) break;
        end
      end
      @(negedge clk);
      expect1(!conv_busy && !ar_start, "pass ended");
      wp = wp + 4'd1;
    end
    expect1(stalls == 10, "stall count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
