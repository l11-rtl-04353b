// tb_impulse_rom: self-checking test of impulse_rom.
// Reads all 256 words and compares them with the lab's debugging responses:
// unit sample, negative unit sample, 16-point boxcar, plus the exponential
// response 64, 32, ..., 1 and zeros elsewhere. Also checks that the unit
// sample and boxcar coefficient magnitudes add up to about one (127/128 and
// 128/128).
module tb_impulse_rom;
  logic [3:0] sel, tap;
  logic [7:0] q, exp_q;
  int         checks = 0, failures = 0, sum;

  impulse_rom dut (.sel, .tap, .q);

  initial begin
    for (int f = 0; f < 16; f++) begin
      sum = 0;
      for (int k = 0; k < 16; k++) begin
        sel = 4'(f); tap = 4'(k);
        #1;
        if      (f == 0) exp_q = (k == 0) ? 8'd127 : 8'd0;
        else if (f == 1) exp_q = (k == 0) ? 8'd255 : 8'd0;
        else if (f == 2) exp_q = 8'd8;
        else if (f == 3) exp_q = (k <= 6) ? 8'(1 << (6 - k)) : 8'd0;
        else             exp_q = 8'd0;
        checks++;
        if (q !== exp_q) begin
          failures++;
          $display("sel %0d tap %0d: %h expected %h", f, k, q, exp_q);
        end
        sum += int'(q[6:0]);
      end
      if (f == 0 || f == 1 || f == 3) begin
        checks++; if (sum != 127) failures++;
      end
      if (f == 2) begin
        checks++; if (sum != 128) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
