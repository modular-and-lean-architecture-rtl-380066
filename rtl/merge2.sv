// merge2: 2-way merge unit with round-robin arbitration.
//
// When both inputs offer a packet, the one that did not win last time goes
// first, so neither input can starve; a single request is granted at once.
// The priority pointer moves only when a packet is actually taken. A packet
// offered but not taken stays the offered one in the next cycle even if the
// other input wakes up, so the output obeys the ready/valid rule (an offer is
// held until taken). The reference design names this unit; round-robin is
// this design's choice.
module merge2 #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   in_valid,
  output logic [1:0]   in_ready,
  input  logic [W-1:0] in_data [2],
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  logic prio;   // input that wins a tie
  logic grant;
  logic hold_q;  // last cycle's offer was not taken
  logic grant_q;

  always_comb begin
    if (hold_q)                          grant = grant_q;
    else if (in_valid[0] && in_valid[1]) grant = prio;
    else                                 grant = in_valid[1];
  end

  assign out_valid   = |in_valid;
  assign out_data    = in_data[grant];
  assign in_ready[0] = out_ready && (grant == 1'b0);
  assign in_ready[1] = out_ready && (grant == 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio    <= 1'b0;
      hold_q  <= 1'b0;
      grant_q <= 1'b0;
    end else begin
      if (out_valid && out_ready) prio <= ~grant;
      hold_q  <= out_valid && !out_ready;
      grant_q <= grant;
    end
  end
endmodule
