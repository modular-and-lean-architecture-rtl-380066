// hrb: hazard resolving backpressure unit in front of one accumulator.
//
// A shift register of DEPTH slots remembers the row index of every product
// passed to the accumulator in each of the last DEPTH cycles (an empty slot
// for a cycle without one); it shifts every cycle, in step with the
// accumulator's read-add-write pipeline. An incoming product whose row
// matches any remembered row would read a total that is still being
// updated, so the unit drops in_ready until that row has left the window;
// any other product passes straight through in the same cycle. The
// accumulator thus takes a new product every cycle (II = 1) except for real
// read-after-write hazards. DEPTH must cover the accumulator's window
// (spmv_pkg::ACC_WINDOW). The mechanism is the reference design's; the slot
// count follows from this design's adder latency. `stall` is high in every
// cycle a product is held back by a hazard.
module hrb
  import spmv_pkg::*;
#(
  parameter int unsigned DEPTH = ACC_WINDOW
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  prod_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output prod_t out_data,
  output logic  stall
);
  logic [DEPTH-1:0] sr_v;
  logic [IDX_W-1:0] sr_row [DEPTH];
  logic             hazard;

  always_comb begin
    hazard = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (sr_v[i] && sr_row[i] == in_data.row) hazard = 1'b1;
  end

  assign out_valid = in_valid && !hazard;
  assign in_ready  = out_ready && !hazard;
  assign out_data  = in_data;
  assign stall     = in_valid && hazard;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr_v <= '0;
    else        sr_v <= {sr_v[DEPTH-2:0], out_valid && out_ready};
  end

  always_ff @(posedge clk) begin
    sr_row[0] <= in_data.row;
    for (int i = 1; i < DEPTH; i++) sr_row[i] <= sr_row[i-1];
  end
endmodule
