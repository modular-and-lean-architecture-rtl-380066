// elastic_buffer: full-bandwidth 2-slot elastic buffer on a ready/valid channel.
//
// Two registers hold up to two packets. in_ready is a register (not full), so
// the buffer cuts the combinational ready path between neighbours, and with
// two slots it still passes one packet per cycle without bubbles when both
// sides are ready. A packet written in one cycle can leave in the next; the
// output is always taken from the older slot. The 2-slot, full-throughput
// structure is the one the reference design names for its switches; the
// pointer-based implementation is this design's own.
module elastic_buffer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  logic [W-1:0] slot [2];
  logic         wr_ptr, rd_ptr;
  logic [1:0]   count;
  logic         push, pop;

  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_valid = count != 2'd0;
  assign out_data  = slot[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= 1'b0;
      rd_ptr   <= 1'b0;
      count    <= 2'd0;
      in_ready <= 1'b1;
    end else begin
      if (push) wr_ptr <= ~wr_ptr;
      if (pop)  rd_ptr <= ~rd_ptr;
      count    <= count + 2'(push) - 2'(pop);
      in_ready <= (count + 2'(push) - 2'(pop)) != 2'd2;
    end
  end

  always_ff @(posedge clk) begin
    if (push) slot[wr_ptr] <= in_data;
  end

  // Handshake rule for the upstream side: an offered packet stays until taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid && !in_ready |=> in_valid && $stable(in_data));
endmodule
