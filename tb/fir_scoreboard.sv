// fir_scoreboard: reference model and checker for the FIR filter's pins,
// used by the filter and top-level testbenches (simulation only).
//
// It watches the converter strobes. Every A/D start records the input code
// the converter samples (x[0] at init, x[p] in pass p). Pass p begins with the
// D/A write and stores x[p-1]; its convolution is
//   y[p] = sum_{k=0..15} h[k] * x[p-1-k]   (x before x[0] counts as 0)
// with h the response selected by sel_sw at the start of the pass and h[k]
// the signed value of the sign/magnitude coefficient. The D/A write of pass
// p+1 must carry bits 14:7 of the 16-bit wrapped sum y[p], top bit inverted
// (offset binary); the first write carries 0x80. The number of clocks the
// filter reports busy per pass must be 4 + sum_k (4 + bit length of |h[k]|)
// unless the A/D status was high when the pass reached its store step.
// Counts: passes, passes that waited for the A/D, passes that ended sooner
// than 16 full 7-step multiplies (coefficients with short magnitudes), and
// passes whose response differs from the previous pass's.
module fir_scoreboard (
  input  logic       clk,
  input  logic       init,
  input  logic       ad_start,
  input  logic       ad_rd,
  input  logic       ad_status,
  input  logic [7:0] vin,
  input  logic [3:0] sel_sw,
  input  logic       da_wr,
  input  logic [7:0] da_data,
  input  logic       conv_busy,
  output int         checks,
  output int         failures,
  output int         passes,
  output int         stall_passes,
  output int         short_passes,
  output int         sel_changes
);
  int         x [$];
  int         pass_sel [$];
  logic [7:0] expect_out;
  int         busy_clk, exp_clk, last_sel;
  bit         in_pass, stalled, before_store;

  initial begin
    checks = 0; failures = 0; passes = 0; stall_passes = 0;
    short_passes = 0; sel_changes = 0; expect_out = 8'h80; last_sel = -1;
    in_pass = 0; stalled = 0; before_store = 0;
  end

  function automatic int coef(input int f, input int k);
    case (f)
      0: return (k == 0) ? 127 : 0;
      1: return (k == 0) ? -127 : 0;
      2: return 8;
      3: return (k <= 6) ? (64 >> k) : 0;
      default: return 0;
    endcase
  endfunction

  function automatic int bitlen(input int m);
    int b = 0;
    if (m < 0) m = -m;
    while (m > 0) begin b++; m = m >> 1; end
    return b;
  endfunction

  always @(posedge clk) if (!init) begin
    if (ad_start) x.push_back(int'($signed(vin)));
    if (in_pass) begin
      if (before_store && ad_status) stalled = 1;
      if (ad_rd) before_store = 0;
      if (conv_busy) busy_clk++;
      else begin
        // pass over: check its length, compute its result
        int y, p, idx;
        logic [15:0] acc;
        y = 0;
        p = passes;
        in_pass = 0;
        exp_clk = 4;
        for (int k = 0; k < 16; k++) begin
          idx = p - 1 - k;
          exp_clk += 4 + bitlen(coef(last_sel, k));
          if (idx >= 0) y += coef(last_sel, k) * x[idx];
        end
        if (exp_clk < 4 + 16 * 11) short_passes++;
        acc = 16'(y);
        expect_out = {~acc[14], acc[13:7]};
        if (stalled) begin
          stall_passes++;
          checks++;
          if (busy_clk <= exp_clk) failures++;
        end else begin
          checks++;
          if (busy_clk != exp_clk) begin
            failures++;
            $display("pass %0d: busy %0d clocks, expected %0d", p, busy_clk, exp_clk);
          end
        end
      end
    end
    if (da_wr) begin
      passes++;
      checks++;
      if (da_data !== expect_out) begin
        failures++;
        if (failures < 20)
          $display("pass %0d (sel %0d): D/A %h expected %h", passes, last_sel, da_data, expect_out);
      end
      if (int'(sel_sw) != last_sel && last_sel >= 0) sel_changes++;
      last_sel = int'(sel_sw);
      in_pass = 1; before_store = 1; stalled = 0; busy_clk = 1;
    end
  end
endmodule
