// split2: 2-way split unit. Steers each packet to output 0 or 1 by one bit of
// the packet (bit SEL_BIT of in_data). Purely combinational: the packet waits
// at the input until the selected output is ready. The reference design names
// this unit as a building block of its switches; its logic here is the
// simplest one that does the job.
module split2 #(
  parameter int unsigned W       = 32,
  parameter int unsigned SEL_BIT = 0
) (
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic [1:0]   out_valid,
  input  logic [1:0]   out_ready,
  output logic [W-1:0] out_data
);
  logic sel;
  assign sel          = in_data[SEL_BIT];
  assign out_data     = in_data;
  assign out_valid[0] = in_valid && !sel;
  assign out_valid[1] = in_valid &&  sel;
  assign in_ready     = out_ready[sel];
endmodule
