// tb_l11_top: end-to-end test of l11_top at its default parameters.
//
// All three designs run at once on one clock:
//  * FSM example: every tick (period 32) must run A and B together, then C,
//    and give done 3 + 4 + 4 = 11 clocks after the tick; err never rises.
//  * FIR filter: a behavioural A/D supplies a square wave with noise; the
//    responses unit sample, negative unit sample, boxcar and exponential are
//    used 30 samples each; fir_scoreboard checks every D/A word and every
//    pass length. The first conversion is slow, so the store step waits once.
//  * example ROM: all eight addresses read 07 - address.
//  * example RAM: random level-sensitive writes are read back.
// Each mechanism (tick, parallel A/B run, C run, done, D/A output, A/D wait,
// early end of a multiply on a short coefficient, response switch, ROM read,
// RAM write) is counted, and one that never happened is a failure.
module tb_l11_top;
  logic       clk = 1'b0, init = 1'b1, fir_reset = 1'b1;
  logic       tick, astart, bstart, cstart, abusy, bbusy, cbusy, fsm_err, fsm_done;
  logic [3:0] sel_sw = 4'd0;
  logic [7:0] ad_data, da_data, vin = 8'd0;
  logic       ad_status, ad_start, ad_rd, da_wr, fir_sample, fir_busy;
  logic [2:0] rom2_address = '0;
  logic [7:0] rom2_q;
  logic [1:0] ram2_address = '0, ram2_data = '0, ram2_q;
  logic       ram2_we = 1'b0;
  logic [1:0] ram_ref [4];

  int checks, failures, passes, stall_passes, short_passes, sel_changes;
  int conversions, bad_reads;
  int my_checks = 0, my_fail = 0, n = 0;
  int ticks = 0, ab_runs = 0, c_runs = 0, dones = 0, cyc = 0, tick_cyc = 0;
  int rom_reads = 0, ram_writes = 0;

  always #5 clk = ~clk;

  l11_top dut (
    .clk, .init, .tick, .astart, .bstart, .cstart, .abusy, .bbusy, .cbusy,
    .fsm_err, .fsm_done, .fir_reset, .sel_sw, .ad_data, .ad_status, .ad_start,
    .ad_rd, .da_data, .da_wr, .fir_sample, .fir_busy, .rom2_address, .rom2_q,
    .ram2_address, .ram2_data, .ram2_we, .ram2_q);

  ad670_model #(.CONV(30), .FIRST_CONV(280)) u_ad (
    .clk, .start(ad_start), .rd(ad_rd), .vin, .data(ad_data), .status(ad_status),
    .conversions, .bad_reads);

  fir_scoreboard u_sb (
    .clk, .init(fir_reset), .ad_start, .ad_rd, .ad_status, .vin, .sel_sw, .da_wr,
    .da_data, .conv_busy(fir_busy), .checks, .failures, .passes, .stall_passes,
    .short_passes, .sel_changes);

  initial begin
    repeat (256 * 150) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + my_checks, failures + my_fail + 1);
    $finish;
  end

  // A/D input
  always @(posedge clk) if (ad_start) begin
    n++;
    #1;
    if (n % 5 == 2) vin = 8'($urandom);
    else            vin = ((n / 10) % 2 == 0) ? 8'd90 : 8'(-90);
  end

  // FSM example monitor
  logic abusy_d = 1'b0, cbusy_d = 1'b0;
  always @(negedge clk) if (!init) begin
    cyc++;
    if (tick) begin ticks++; tick_cyc = cyc; end
    if (abusy && !abusy_d) begin
      ab_runs++;
      my_checks++;
      if (!bbusy || cbusy) begin my_fail++; $display("A started without B or during C"); end
    end
    if (cbusy && !cbusy_d) begin
      c_runs++;
      my_checks++;
      if (abusy || bbusy) begin my_fail++; $display("C started during A/B"); end
    end
    if (fsm_done) begin
      dones++;
      my_checks++;
      if (cyc - tick_cyc != 11) begin
        my_fail++; $display("done %0d clocks after tick", cyc - tick_cyc);
      end
    end
    if (fsm_err) begin my_checks++; my_fail++; end
    abusy_d = abusy; cbusy_d = cbusy;
  end

  // ROM and RAM examples, run while the others work
  initial begin
    for (int i = 0; i < 4; i++) ram_ref[i] = '0;
    repeat (10) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      rom2_address = 3'(i);
      #1;
      my_checks++; rom_reads++;
      if (rom2_q !== 8'(7 - (i % 8))) begin my_fail++; $display("rom2[%0d]=%h", i % 8, rom2_q); end
      ram2_address = 2'($urandom); ram2_data = 2'($urandom);
      #1; ram2_we = 1'b1; #1; ram2_we = 1'b0; ram_ref[ram2_address] = ram2_data; ram_writes++;
      ram2_address = 2'($urandom);
      #1;
      my_checks++;
      if (ram2_q !== ram_ref[ram2_address]) begin my_fail++; $display("ram2 mismatch"); end
      @(negedge clk);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    init <= 1'b0;
    fir_reset <= 1'b0;
    for (int f = 0; f < 4; f++) begin
      while (passes < 30 * (f + 1)) @(posedge clk);
      @(negedge fir_busy);
      sel_sw <= 4'(f + 1);
    end
    my_checks++;
    if (ticks < 10 || ab_runs < 10 || c_runs < 10 || dones < 10 || passes < 120 ||
        stall_passes < 1 || short_passes < 1 || sel_changes < 3 || rom_reads == 0 ||
        ram_writes == 0 || bad_reads != 0) begin
      my_fail++;
    end
    $display("ticks=%0d ab_runs=%0d c_runs=%0d dones=%0d passes=%0d stalls=%0d short=%0d sel_changes=%0d rom_reads=%0d ram_writes=%0d",
             ticks, ab_runs, c_runs, dones, passes, stall_passes, short_passes,
             sel_changes, rom_reads, ram_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks + my_checks, failures + my_fail);
    $finish;
  end
endmodule
