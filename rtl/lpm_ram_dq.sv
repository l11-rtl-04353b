// lpm_ram_dq: parameterised RAM with separate data input and output ("dq"),
// in the style of the LPM_RAM_DQ library module of Altera's FPGA tools.
//
// 2^WIDTHAD words of WIDTH bits. Each group of inputs can be registered:
//   ADDRESS_REG = 1: address and we are captured on the rising edge of
//                    inclock; the write happens at that edge and reads use
//                    the captured address, so q follows the address one
//                    clock late;
//   INDATA_REG  = 1: data is captured on the rising edge of inclock, and the
//                    write happens at that edge;
//   OUTDATA_REG = 1: q is captured again on the rising edge of outclock.
// With both input options 0 the RAM is asynchronous: while we is high the
// addressed word follows data (a level-sensitive write, so this setting
// synthesises to latches, one per bit, which is its intended behaviour;
// keep address stable while we is high). The read is combinational from the
// (possibly registered) address.
// The defaults are the lab's example RAM "ram2": 4 words of 2 bits with
// address, data and output all unregistered. The FIR filter uses the same
// module with registered inputs as its sample store. The memory starts
// cleared.
//
// Interface: inclock, outclock (unused when the matching option is 0),
// address, data, we (active high), q.
module lpm_ram_dq #(
  parameter int unsigned WIDTH       = 2,
  parameter int unsigned WIDTHAD     = 2,
  parameter bit          ADDRESS_REG = 1'b0,
  parameter bit          INDATA_REG  = 1'b0,
  parameter bit          OUTDATA_REG = 1'b0
) (
  input  logic               inclock,
  input  logic               outclock,
  input  logic [WIDTHAD-1:0] address,
  input  logic [WIDTH-1:0]   data,
  input  logic               we,
  output logic [WIDTH-1:0]   q
);
  logic [WIDTH-1:0]   mem [2**WIDTHAD];
  logic [WIDTHAD-1:0] addr_eff;
  logic [WIDTH-1:0]   rd;

  initial for (int i = 0; i < 2**WIDTHAD; i++) mem[i] = '0;

  if (ADDRESS_REG) begin : g_areg
    logic [WIDTHAD-1:0] addr_q;
    always_ff @(posedge inclock) addr_q <= address;
    assign addr_eff = addr_q;
  end else begin : g_acomb
    assign addr_eff = address;
  end

  if (ADDRESS_REG || INDATA_REG) begin : g_syncwr
    // Synchronous write: the word, address and enable present at the edge.
    always_ff @(posedge inclock)
      if (we) mem[address] <= data;
  end else begin : g_asyncwr
    // Asynchronous write: transparent while we is high.
    always_latch
      if (we) mem[address] = data;
  end

  assign rd = mem[addr_eff];

  if (OUTDATA_REG) begin : g_oreg
    always_ff @(posedge outclock) q <= rd;
  end else begin : g_ocomb
    assign q = rd;
  end
endmodule
