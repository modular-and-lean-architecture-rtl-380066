// concat: packs N narrow streams into one wide stream (a join).
//
// A wide word is offered when every input has a word; lane i of the output is
// input i. All inputs are taken in the same cycle the wide word is taken. In
// the kernel it gathers one drained total from each of the 8 accumulator
// banks, i.e. y[8a .. 8a+7], into one 256-bit HBM beat. The join rule is this
// design's choice for the reference design's concatenation block.
module concat #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 32
) (
  input  logic [N-1:0]   in_valid,
  output logic [N-1:0]   in_ready,
  input  logic [W-1:0]   in_data [N],
  output logic           out_valid,
  input  logic           out_ready,
  output logic [N*W-1:0] out_data
);
  assign out_valid = &in_valid;
  assign in_ready  = {N{out_valid && out_ready}};
  always_comb
    for (int i = 0; i < N; i++) out_data[i*W +: W] = in_data[i];
endmodule
