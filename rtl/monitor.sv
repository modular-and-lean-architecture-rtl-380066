// monitor: counts the non-zeros that reach the accumulators and flags the
// moment the last one of a job has been taken.
//
// Each cycle it adds the number of set bits of `fire` (one bit per
// accumulator lane, set when that lane takes a product). `start` clears the
// count and loads the number of non-zeros expected; `done` rises when the
// count reaches it and stays high until the next start, so the results can
// be drained as soon as the last non-zero is processed. Its role follows the
// reference design; counting at the accumulator inputs is this design's
// choice.
module monitor #(
  parameter int unsigned LANES = 8,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] expected,
  input  logic [LANES-1:0] fire,
  output logic [CNT_W-1:0] count,
  output logic             done
);
  logic [CNT_W-1:0] target;
  logic             armed;
  logic [CNT_W-1:0] n_fire;

  always_comb begin
    n_fire = '0;
    for (int i = 0; i < LANES; i++) n_fire = n_fire + CNT_W'(fire[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      target <= '0;
      armed  <= 1'b0;
    end else if (start) begin
      count  <= '0;
      target <= expected;
      armed  <= 1'b1;
    end else begin
      count <= count + n_fire;
    end
  end

  assign done = armed && !start && count == target;
endmodule
