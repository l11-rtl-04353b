// ad670_model: behavioural model of the A/D converter seen by the FIR
// filter, for simulation only (not synthesizable logic).
//
// A start strobe (start, one clock) samples the "analog" input vin, given
// here as the 8-bit two's complement code the converter would produce. The
// status line rises shortly after that clock edge and stays high for CONV
// clocks (FIRST_CONV for the first conversion after time zero, to model a
// slow first conversion), then falls; from then on data holds the new code.
// status changes a few time units after the clock edge, i.e. asynchronously
// to the filter's clock, as a real converter's status line would. rd is
// accepted at any time and only counted: reading while status is high is
// reported as an error count.
module ad670_model #(
  parameter int CONV       = 20,
  parameter int FIRST_CONV = 20
) (
  input  logic       clk,
  input  logic       start,
  input  logic       rd,
  input  logic [7:0] vin,
  output logic [7:0] data,
  output logic       status,
  output int         conversions,
  output int         bad_reads
);
  logic [7:0] held;

  initial begin
    data = '0; status = 1'b0; conversions = 0; bad_reads = 0;
  end

  always @(posedge clk) begin
    if (rd && status) bad_reads++;
    if (start) begin
      held = vin;
      fork
        begin
          int n;
          n = (conversions == 0) ? FIRST_CONV : CONV;
          conversions++;
          #3 status = 1'b1;
          repeat (n) @(posedge clk);
          #3;
          data   = held;
          status = 1'b0;
        end
      join_none
    end
  end
endmodule
