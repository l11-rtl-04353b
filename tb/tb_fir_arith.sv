// tb_fir_arith: self-checking test of the multiply-accumulate unit.
//
// Groups of 1..16 products of a random two's complement sample and a random
// sign/magnitude coefficient (corner values included: 0, negative zero,
// +-127, sample -128) are accumulated after a clear. Checked: the 16-bit
// accumulator against the exact sum computed with integers, the offset-binary
// output bits, and the busy time of every multiply, which must be
// 2 + (bit length of the coefficient magnitude) clocks.
module tb_fir_arith;
  logic        clk = 1'b0, init = 1'b1, clac = 1'b0, start = 1'b0;
  logic [7:0]  s_in = '0, h_in = '0, dout;
  logic        busy;
  logic [15:0] acc;
  int          checks = 0, failures = 0, sum, hv, busy_clk, blen, early = 0;

  always #5 clk = ~clk;

  fir_arith dut (.clk, .init, .clac, .start, .s_in, .h_in, .busy, .acc, .dout);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitlen(input int m);
    int b = 0;
    while (m > 0) begin b++; m = m >> 1; end
    return b;
  endfunction

  task automatic mac(input logic [7:0] s, input logic [7:0] h);
    s_in <= s; h_in <= h; start <= 1'b1;
    @(posedge clk);
    while (!busy) @(posedge clk);
    start <= 1'b0;
    busy_clk = 0;
    while (busy) begin busy_clk++; @(posedge clk); end
    hv  = h[7] ? -int'(h[6:0]) : int'(h[6:0]);
    sum += int'($signed(s)) * hv;
    blen = bitlen(int'(h[6:0]));
    if (blen < 7) early++;
    checks++;
    if (busy_clk != 2 + blen) begin
      failures++;
      $display("h=%h: busy %0d clocks, expected %0d", h, busy_clk, 2 + blen);
    end
  endtask

  initial begin
    logic [15:0] e;
    repeat (2) @(posedge clk);
    init <= 1'b0;
    for (int g = 0; g < 300; g++) begin
      @(posedge clk);
      clac <= 1'b1; @(posedge clk); clac <= 1'b0;
      sum = 0;
      for (int n = 0; n < $urandom_range(1, 16); n++) begin
        logic [7:0] s, h;
        s = 8'($urandom); h = 8'($urandom);
        case ($urandom_range(0, 9))
          0: h = 8'h00;
          1: h = 8'h80;
          2: h = 8'h7F;
          3: h = 8'hFF;
          4: s = 8'h80;
          default: ;
        endcase
        mac(s, h);
      end
      @(posedge clk); #1;
      e = 16'(sum);
      checks++;
      if (acc !== e || dout !== {~e[14], e[13:7]}) begin
        failures++;
        $display("group %0d: acc=%h exp %h dout=%h", g, acc, e, dout);
      end
    end
    checks++;
    if (early == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
