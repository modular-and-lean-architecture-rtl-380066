// noc: 8x8 multi-stage switching network that routes packets to the output
// port given by three bits of the packet.
//
// It replaces a crossbar in front of the banked vector buffers. Three stages
// of four buffered 2x2 switches (12 switches, 48 elastic buffers) form a
// butterfly: the switches of stage s pair ports p and p+2^b, with b = 2-s, and
// send each packet to the port whose bit b equals bit (ROUTE_LSB+b) of the
// packet. After the last stage a packet's port number equals its three
// routing bits, whichever input it entered on. The network blocks: two
// packets that want the same switch output in the same cycle wait in the
// elastic buffers, which absorb bank conflicts without stalling other
// traffic. The switch count, the 3-LSB routing and the buffered 2x2 switch
// are the reference design's; the butterfly wiring order is this design's.
// Latency through an idle network is 6 cycles.
module noc #(
  parameter int unsigned W         = 64,
  parameter int unsigned ROUTE_LSB = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [7:0]   in_valid,
  output logic [7:0]   in_ready,
  input  logic [W-1:0] in_data  [8],
  output logic [7:0]   out_valid,
  input  logic [7:0]   out_ready,
  output logic [W-1:0] out_data [8]
);
  localparam int unsigned STAGES = 3;

  logic [7:0]   st_valid [STAGES+1];
  logic [7:0]   st_ready [STAGES+1];
  logic [W-1:0] st_data  [STAGES+1][8];

  assign st_valid[0] = in_valid;
  assign in_ready    = st_ready[0];
  assign st_data[0]  = in_data;
  assign out_valid   = st_valid[STAGES];
  assign st_ready[STAGES] = out_ready;
  assign out_data    = st_data[STAGES];

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned B = STAGES - 1 - s;
    for (genvar j = 0; j < 4; j++) begin : g_sw
      // j enumerates the ports whose bit B is 0: insert a 0 at position B.
      localparam int unsigned P0 = ((j >> B) << (B + 1)) | (j & ((1 << B) - 1));
      localparam int unsigned P1 = P0 | (1 << B);
      logic [W-1:0] sw_in [2];
      logic [W-1:0] sw_out [2];
      logic [1:0]   sw_in_ready, sw_out_valid;
      assign sw_in[0] = st_data[s][P0];
      assign sw_in[1] = st_data[s][P1];
      switch2x2 #(.W(W), .SEL_BIT(ROUTE_LSB + B)) u_sw (
        .clk, .rst_n,
        .in_valid ({st_valid[s][P1], st_valid[s][P0]}),
        .in_ready (sw_in_ready),
        .in_data  (sw_in),
        .out_valid(sw_out_valid),
        .out_ready({st_ready[s+1][P1], st_ready[s+1][P0]}),
        .out_data (sw_out)
      );
      assign st_ready[s][P0]   = sw_in_ready[0];
      assign st_ready[s][P1]   = sw_in_ready[1];
      assign st_valid[s+1][P0] = sw_out_valid[0];
      assign st_valid[s+1][P1] = sw_out_valid[1];
      assign st_data[s+1][P0]  = sw_out[0];
      assign st_data[s+1][P1]  = sw_out[1];
    end
  end
endmodule
