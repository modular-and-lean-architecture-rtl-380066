// spmv_kernel: one SpMV accelerator, y = A x, fed by two HBM pseudo-channels.
//
// Dataflow (all links are ready/valid streams):
//   lsa -> b_x -> 8 x bvb_mul (x load port)
//   lsa -> b_A0, b_A1 (4 non-zeros each) -> noc_0 (route by column bits [2:0])
//       -> 8 x bvb_mul (read x[col], multiply) -> noc_1 (route by row bits [2:0])
//       -> 8 x hrb (hold back read-after-write hazards) -> 8 x acc (y[row] += p)
//   8 x acc (drain) -> concat_0 -> lsa -> HBM
// monitor_0 counts products taken by the accumulators so the lsa can start
// draining as soon as the last non-zero has been processed.
// Up to 8 non-zeros enter per cycle. Any order of non-zeros is correct;
// random order spreads them over the banks and keeps stalls rare, while
// row-sorted input makes the hazard units stall. Bank conflicts are absorbed
// by the elastic buffers of the networks. The block structure and sizes
// follow the reference design; see the modules for the detail choices.
// `hrb_stall` reports, per lane, cycles in which a hazard held a product back.
module spmv_kernel
  import spmv_pkg::*;
#(
  parameter int unsigned BANK_DEPTH_P = BANK_DEPTH,
  parameter int unsigned FIFO_DEPTH   = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  job_t             job,
  output logic             busy,
  output logic             done,
  output logic [1:0]       req_valid,
  input  logic [1:0]       req_ready,
  output mem_req_t         req [2],
  input  logic [1:0]       rsp_valid,
  output logic [1:0]       rsp_ready,
  input  logic [HBM_W-1:0] rsp_data [2],
  output logic [NUM_BANKS-1:0] hrb_stall
);
  localparam int unsigned XW = $bits(xw_t);
  localparam int unsigned CW = $clog2(BANK_DEPTH_P) + 1;

  // lsa <-> splitters
  logic                          x_valid, x_ready;
  logic [FP_PER_BEAT*XW-1:0]     x_data;
  logic [1:0]                    a_valid, a_ready;
  logic [HBM_W-1:0]              a_data [2];
  // splitters -> noc_0 and bvbs
  logic [NUM_BANKS-1:0]          xl_valid;
  logic [XW-1:0]                 xl_data [NUM_BANKS];
  logic [NUM_BANKS-1:0]          n0i_valid, n0i_ready;
  logic [NZ_W-1:0]               n0i_data [NUM_BANKS];
  logic [NUM_BANKS-1:0]          n0o_valid, n0o_ready;
  logic [NZ_W-1:0]               n0o_data [NUM_BANKS];
  // bvb -> noc_1 -> hrb -> acc
  localparam int unsigned PW = $bits(prod_t);
  logic [NUM_BANKS-1:0]          n1i_valid, n1i_ready;
  logic [PW-1:0]                 n1i_data [NUM_BANKS];
  logic [NUM_BANKS-1:0]          n1o_valid, n1o_ready;
  logic [PW-1:0]                 n1o_data [NUM_BANKS];
  logic [NUM_BANKS-1:0]          h_valid, h_ready;
  prod_t                         h_data [NUM_BANKS];
  // drain
  logic                          mon_start, mon_done, drain_start;
  logic [ADDR_W+2:0]             mon_expected, mon_count;
  logic [ADDR_W-1:0]             drain_count;
  logic [NUM_BANKS-1:0]          d_valid, d_ready, acc_busy;
  logic [31:0]                   d_data [NUM_BANKS];
  logic                          y_valid, y_ready;
  logic [HBM_W-1:0]              y_data;

  lsa #(.FIFO_DEPTH(FIFO_DEPTH)) u_lsa (
    .clk, .rst_n, .start, .job, .busy, .done,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready, .rsp_data,
    .x_valid, .x_ready, .x_data,
    .a_valid, .a_ready, .a_data,
    .mon_start, .mon_expected, .mon_done,
    .drain_start, .drain_count,
    .y_valid, .y_ready, .y_data
  );

  // b_x: one beat of x -> one entry per bank (the banks always take it).
  stream_splitter #(.N(FP_PER_BEAT), .W(XW)) u_b_x (
    .clk, .rst_n,
    .in_valid (x_valid), .in_ready (x_ready), .in_data (x_data),
    .out_valid(xl_valid), .out_ready('1), .out_data (xl_data)
  );

  // b_A0 and b_A1: one beat -> four non-zeros, onto noc_0 ports 0-3 and 4-7.
  for (genvar c = 0; c < 2; c++) begin : g_b_a
    logic [NZ_W-1:0] lanes [NZ_PER_BEAT];
    stream_splitter #(.N(NZ_PER_BEAT), .W(NZ_W)) u_b_a (
      .clk, .rst_n,
      .in_valid (a_valid[c]), .in_ready (a_ready[c]), .in_data (a_data[c]),
      .out_valid(n0i_valid[c*NZ_PER_BEAT +: NZ_PER_BEAT]),
      .out_ready(n0i_ready[c*NZ_PER_BEAT +: NZ_PER_BEAT]),
      .out_data (lanes)
    );
    for (genvar k = 0; k < NZ_PER_BEAT; k++) begin : g_lane
      assign n0i_data[c*NZ_PER_BEAT + k] = lanes[k];
    end
  end

  // noc_0 routes on column bits [2:0] (bits 34:32 of a non-zero).
  noc #(.W(NZ_W), .ROUTE_LSB(32)) u_noc_0 (
    .clk, .rst_n,
    .in_valid (n0i_valid), .in_ready (n0i_ready), .in_data (n0i_data),
    .out_valid(n0o_valid), .out_ready(n0o_ready), .out_data(n0o_data)
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    prod_t p_out;
    bvb_mul #(.DEPTH(BANK_DEPTH_P)) u_bvb (
      .clk, .rst_n,
      .xw_valid (xl_valid[b]), .xw_data (xw_t'(xl_data[b])),
      .in_valid (n0o_valid[b]), .in_ready (n0o_ready[b]), .in_data (nz_t'(n0o_data[b])),
      .out_valid(n1i_valid[b]), .out_ready(n1i_ready[b]), .out_data(p_out)
    );
    assign n1i_data[b] = p_out;

    hrb u_hrb (
      .clk, .rst_n,
      .in_valid (n1o_valid[b]), .in_ready (n1o_ready[b]), .in_data (prod_t'(n1o_data[b])),
      .out_valid(h_valid[b]),   .out_ready(h_ready[b]),   .out_data(h_data[b]),
      .stall    (hrb_stall[b])
    );

    acc #(.DEPTH(BANK_DEPTH_P)) u_acc (
      .clk, .rst_n,
      .in_valid (h_valid[b]), .in_ready (h_ready[b]), .in_data (h_data[b]),
      .drain_start, .drain_count (CW'(drain_count)),
      .out_valid(d_valid[b]), .out_ready(d_ready[b]), .out_data(d_data[b]),
      .busy     (acc_busy[b])
    );
  end

  // noc_1 routes on row bits [2:0] (bits 34:32 of a product).
  noc #(.W(PW), .ROUTE_LSB(32)) u_noc_1 (
    .clk, .rst_n,
    .in_valid (n1i_valid), .in_ready (n1i_ready), .in_data (n1i_data),
    .out_valid(n1o_valid), .out_ready(n1o_ready), .out_data(n1o_data)
  );

  concat #(.N(NUM_BANKS), .W(32)) u_concat (
    .in_valid (d_valid), .in_ready (d_ready), .in_data (d_data),
    .out_valid(y_valid), .out_ready(y_ready), .out_data(y_data)
  );

  monitor #(.LANES(NUM_BANKS), .CNT_W(ADDR_W+3)) u_monitor (
    .clk, .rst_n,
    .start   (mon_start), .expected(mon_expected),
    .fire    (h_valid & h_ready),
    .count   (mon_count), .done(mon_done)
  );
endmodule
