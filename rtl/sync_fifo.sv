// sync_fifo: first-in first-out buffer on ready/valid channels.
//
// DEPTH entries (a power of two) in a circular array with read and write
// pointers; one push and one pop per cycle. in_ready is "not full", out_valid
// is "not empty"; data pushed in one cycle can be popped in the next. `level`
// is the number of entries held. Used by the load-store adaptor to hold read
// data returned by the memory channels.
module sync_fifo #(
  parameter int unsigned W     = 256,
  parameter int unsigned DEPTH = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [W-1:0]           in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [W-1:0]           out_data,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign in_ready  = level != (AW+1)'(DEPTH);
  assign out_valid = level != '0;
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      level <= level + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;
endmodule
