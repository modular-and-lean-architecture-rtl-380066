// stream_splitter: splits one wide stream of N lanes into N narrow streams.
//
// An eager fork: each lane is offered on its own output as soon as the wide
// word arrives, and a lane that has been taken is remembered, so a slow
// output never holds back the others. The wide word is taken in the cycle
// its last lane goes out. In the kernel, b_A0 and b_A1 split an HBM beat into
// its four non-zeros and b_x splits a beat of x into its eight entries, one
// per vector bank. Function as in the reference design; the eager-fork
// structure is this design's choice.
module stream_splitter #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [N*W-1:0] in_data,
  output logic [N-1:0]   out_valid,
  input  logic [N-1:0]   out_ready,
  output logic [W-1:0]   out_data [N]
);
  logic [N-1:0] sent;

  assign out_valid = {N{in_valid}} & ~sent;
  assign in_ready  = &(out_ready | sent);
  always_comb
    for (int i = 0; i < N; i++) out_data[i] = in_data[i*W +: W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    sent <= '0;
    else if (in_valid && in_ready) sent <= '0;
    else                           sent <= sent | (out_valid & out_ready);
  end
endmodule
