// lpm_rom: parameterised read-only memory in the style of the LPM_ROM
// library module of Altera's FPGA tools.
//
// 2^WIDTHAD words of WIDTH bits, initialised from INIT_FILE ($readmemh
// format: one hexadecimal word per line from address 0). The address and the
// output can each be registered or not:
//   ADDRESS_REG = 0: the address reaches the array directly;
//   ADDRESS_REG = 1: the address is captured on the rising edge of inclock,
//                    so q shows the word of the address presented before the
//                    last edge (the "previous address" trap of registered
//                    addresses);
//   OUTDATA_REG = 1: q is captured again on the rising edge of outclock.
// The defaults are the lab's example ROM "rom2": 8 words of 8 bits, address
// and output unregistered, holding 07, 06, ..., 00 at addresses 0..7. The
// Intel HEX file of the example is replaced by a plain $readmemh file with
// the same eight bytes.
//
// Interface: inclock, outclock (unused when the matching option is 0),
// address, q.
module lpm_rom #(
  parameter int unsigned WIDTH       = 8,
  parameter int unsigned WIDTHAD     = 3,
  parameter bit          ADDRESS_REG = 1'b0,
  parameter bit          OUTDATA_REG = 1'b0,
  parameter string       INIT_FILE   = "rtl/rom2.hex"
) (
  input  logic               inclock,
  input  logic               outclock,
  input  logic [WIDTHAD-1:0] address,
  output logic [WIDTH-1:0]   q
);
  logic [WIDTH-1:0]   mem [2**WIDTHAD];
  logic [WIDTHAD-1:0] addr_eff;
  logic [WIDTH-1:0]   rd;

  initial begin
    for (int i = 0; i < 2**WIDTHAD; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  if (ADDRESS_REG) begin : g_areg
    logic [WIDTHAD-1:0] addr_q;
    always_ff @(posedge inclock) addr_q <= address;
    assign addr_eff = addr_q;
  end else begin : g_acomb
    assign addr_eff = address;
  end

  assign rd = mem[addr_eff];

  if (OUTDATA_REG) begin : g_oreg
    always_ff @(posedge outclock) q <= rd;
  end else begin : g_ocomb
    assign q = rd;
  end
endmodule
