// bvb_mul: one bank of the input banked vector buffer with its FP32 multiplier.
//
// The bank holds BANK_DEPTH FP32 entries of x: entry a of bank k is x[8a+k].
// It is filled through the write port (one entry per cycle, always accepted)
// before the matrix is streamed. Each non-zero that arrives on the input
// stream has already been routed to this bank by its column's three LSBs; its
// column bits [15:3] read x, and the entry is multiplied by the non-zero's
// value. The product leaves tagged with the non-zero's row. The pipeline is
// 1 read cycle + MUL_LAT multiply cycles long and moves as a whole: it
// advances whenever its last stage is empty or taken, so it accepts one
// non-zero per cycle while the output is ready. Bank size and function follow
// the reference design; the pipeline and its stall scheme are this design's.
module bvb_mul
  import spmv_pkg::*;
#(
  parameter int unsigned DEPTH = BANK_DEPTH,
  parameter int unsigned LAT   = MUL_LAT
) (
  input  logic  clk,
  input  logic  rst_n,
  // x load port
  input  logic  xw_valid,
  input  xw_t   xw_data,
  // non-zeros in
  input  logic  in_valid,
  output logic  in_ready,
  input  nz_t   in_data,
  // products out
  output logic  out_valid,
  input  logic  out_ready,
  output prod_t out_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  fp32_t            mem [DEPTH];
  fp32_t            x_q, val_q, prod;
  logic             adv;
  logic [LAT:0]     v;
  logic [IDX_W-1:0] row [LAT+1];

  assign adv      = !v[LAT] || out_ready;
  assign in_ready = adv;

  always_ff @(posedge clk) begin
    if (xw_valid) mem[xw_data.addr[AW-1:0]] <= xw_data.val;
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      x_q    <= mem[in_data.col[BANK_SEL_W +: AW]];
      val_q  <= in_data.val;
      row[0] <= in_data.row;
      for (int i = 1; i <= LAT; i++) row[i] <= row[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   v <= '0;
    else if (adv) v <= {v[LAT-1:0], in_valid};
  end

  fp32_mul_pipe #(.LAT(LAT)) u_mul (.clk, .en(adv), .a(x_q), .b(val_q), .p(prod));

  assign out_valid    = v[LAT];
  assign out_data.row = row[LAT];
  assign out_data.val = prod;
endmodule
