// switch2x2: buffered 2x2 switch built from elastic dataflow units.
//
// Each input passes an elastic buffer and then a 2-way split that looks at
// bit SEL_BIT of the packet; output k merges, round-robin, the packets of both
// inputs that chose k and passes them through another elastic buffer. So the
// switch holds 2 split units, 2 merge units and 4 elastic buffers, as in the
// reference design. Both sides are ready/valid channels; all ready signals
// leaving the switch are registered. Latency through an idle switch is 2
// cycles; throughput is one packet per output per cycle.
module switch2x2 #(
  parameter int unsigned W       = 32,
  parameter int unsigned SEL_BIT = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   in_valid,
  output logic [1:0]   in_ready,
  input  logic [W-1:0] in_data  [2],
  output logic [1:0]   out_valid,
  input  logic [1:0]   out_ready,
  output logic [W-1:0] out_data [2]
);
  logic [1:0]   b_valid, b_ready;      // after the input buffers
  logic [W-1:0] b_data [2];
  logic [1:0]   s_valid [2];           // split i, leg k
  logic [1:0]   s_ready [2];
  logic [W-1:0] s_data  [2];
  logic [1:0]   m_valid, m_ready;      // merge outputs
  logic [W-1:0] m_data [2];

  for (genvar i = 0; i < 2; i++) begin : g_in
    elastic_buffer #(.W(W)) u_eb_in (
      .clk, .rst_n,
      .in_valid (in_valid[i]), .in_ready (in_ready[i]), .in_data (in_data[i]),
      .out_valid(b_valid[i]),  .out_ready(b_ready[i]),  .out_data(b_data[i])
    );
    split2 #(.W(W), .SEL_BIT(SEL_BIT)) u_split (
      .in_valid (b_valid[i]), .in_ready (b_ready[i]), .in_data (b_data[i]),
      .out_valid(s_valid[i]), .out_ready(s_ready[i]), .out_data(s_data[i])
    );
  end

  for (genvar k = 0; k < 2; k++) begin : g_out
    logic [1:0] mi_valid, mi_ready;
    assign mi_valid      = {s_valid[1][k], s_valid[0][k]};
    assign s_ready[0][k] = mi_ready[0];
    assign s_ready[1][k] = mi_ready[1];
    merge2 #(.W(W)) u_merge (
      .clk, .rst_n,
      .in_valid (mi_valid),   .in_ready (mi_ready),   .in_data (s_data),
      .out_valid(m_valid[k]), .out_ready(m_ready[k]), .out_data(m_data[k])
    );
    elastic_buffer #(.W(W)) u_eb_out (
      .clk, .rst_n,
      .in_valid (m_valid[k]),   .in_ready (m_ready[k]),   .in_data (m_data[k]),
      .out_valid(out_valid[k]), .out_ready(out_ready[k]), .out_data(out_data[k])
    );
  end
endmodule
