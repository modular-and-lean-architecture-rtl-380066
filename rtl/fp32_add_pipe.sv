// fp32_add_pipe: FP32 adder with LAT pipeline stages and a clock enable.
//
// The sum is formed by fp32_pkg::fp32_add on the input and then carried
// through LAT registers, so a result appears LAT enabled cycles after its
// operands; with en held high it accepts one operation per cycle. Synthesis
// is expected to retime the registers into the adder. The latency is
// this design's choice (the reference design only quotes 4-8 cycles for
// FPGA FP32 operators).
module fp32_add_pipe #(
  parameter int unsigned LAT = spmv_pkg::ADD_LAT
) (
  input  logic        clk,
  input  logic        en,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] s
);
  logic [31:0] stage [LAT];
  always_ff @(posedge clk) begin
    if (en) begin
      stage[0] <= fp32_pkg::fp32_add(a, b);
      for (int i = 1; i < LAT; i++) stage[i] <= stage[i-1];
    end
  end
  assign s = stage[LAT-1];
endmodule
