// lsa: load-store adaptor between two HBM pseudo-channels and the SpMV pipeline.
//
// A job runs in four phases after a start pulse:
//   1. LOAD_X: read x_beats beats of x from channel 0; each beat holds x[8a ..
//      8a+7] and leaves on the x stream as eight (address a, value) lanes, one
//      per input vector bank.
//   2. STREAM: read a_beats beats of non-zeros from each channel in parallel,
//      four non-zeros per beat, eight per cycle in all, and pass them on the
//      two non-zero streams. The monitor is started with 8*a_beats expected
//      non-zeros as this phase begins.
//   3. WAIT: wait for the monitor to report that the last non-zero reached
//      the accumulators, then pulse drain_start to the accumulators.
//   4. DRAIN: write each packed result beat y[8a .. 8a+7] from the concat
//      stream to channel 0 at y_base + a, y_beats beats in all; then pulse
//      done.
// Each channel has a request stream (one-beat reads, or posted one-beat
// writes) and a read data stream that returns data in request order. Read
// data lands in a FIFO of FIFO_DEPTH beats per channel; a read is issued only
// while the FIFO has room for every read outstanding, so the memory can
// never be stalled by a full adaptor. One request per channel per cycle.
// The phases follow the reference design; the channel protocol, the credit
// scheme and the job fields are this design's own (its adaptor is an HLS
// block talking AXI to the HBM subsystem).
module lsa
  import spmv_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // control
  input  logic                start,
  input  job_t                job,
  output logic                busy,
  output logic                done,
  // memory channels
  output logic [1:0]          req_valid,
  input  logic [1:0]          req_ready,
  output mem_req_t            req [2],
  input  logic [1:0]          rsp_valid,
  output logic [1:0]          rsp_ready,
  input  logic [HBM_W-1:0]    rsp_data [2],
  // x entries to the stream splitter b_x
  output logic                x_valid,
  input  logic                x_ready,
  output logic [FP_PER_BEAT*$bits(xw_t)-1:0] x_data,
  // non-zero beats to the stream splitters b_A0, b_A1
  output logic [1:0]          a_valid,
  input  logic [1:0]          a_ready,
  output logic [HBM_W-1:0]    a_data [2],
  // monitor
  output logic                mon_start,
  output logic [ADDR_W+2:0]   mon_expected,
  input  logic                mon_done,
  // accumulator drain and packed results
  output logic                drain_start,
  output logic [ADDR_W-1:0]   drain_count,
  input  logic                y_valid,
  output logic                y_ready,
  input  logic [HBM_W-1:0]    y_data
);
  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD_X, S_STREAM, S_WAIT, S_DRAIN} state_t;
  state_t state;
  job_t   job_q;

  logic [ADDR_W-1:0] n_req  [2];   // reads issued in this phase
  logic [ADDR_W-1:0] n_rsp  [2];   // read beats passed on in this phase
  logic [ADDR_W-1:0] n_wr;         // result beats written
  logic [LW-1:0]     inflight [2]; // reads issued, data not yet popped from the FIFO
  logic [1:0]        rd_issue, rd_want, f_valid, f_ready;
  logic [HBM_W-1:0]  f_data [2];
  logic [LW-1:0]     f_level [2];
  logic [ADDR_W-1:0] rd_total, rd_base [2];

  assign busy     = state != S_IDLE;
  assign rd_total = (state == S_LOAD_X) ? job_q.x_beats : job_q.a_beats;
  assign rd_base[0] = (state == S_LOAD_X) ? job_q.x_base : job_q.a0_base;
  assign rd_base[1] = job_q.a1_base;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic active;
    assign active = (state == S_STREAM) || (state == S_LOAD_X && c == 0);
    assign rd_want[c]  = active && n_req[c] != rd_total &&
                         inflight[c] != LW'(FIFO_DEPTH);
    assign rd_issue[c] = rd_want[c] && req_ready[c];

    sync_fifo #(.W(HBM_W), .DEPTH(FIFO_DEPTH)) u_rsp_fifo (
      .clk, .rst_n,
      .in_valid (rsp_valid[c]), .in_ready (rsp_ready[c]), .in_data (rsp_data[c]),
      .out_valid(f_valid[c]),   .out_ready(f_ready[c]),   .out_data(f_data[c]),
      .level    (f_level[c])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) inflight[c] <= '0;
      else        inflight[c] <= inflight[c] + LW'(rd_issue[c]) - LW'(f_valid[c] && f_ready[c]);
    end
  end

  // Channel 0 carries reads, or result writes while draining.
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      req_valid[c]   = rd_want[c];
      req[c].we      = 1'b0;
      req[c].addr    = rd_base[c] + n_req[c];
      req[c].wdata   = '0;
    end
    if (state == S_DRAIN) begin
      req_valid[0] = y_valid && n_wr != job_q.y_beats;
      req[0].we    = 1'b1;
      req[0].addr  = job_q.y_base + n_wr;
      req[0].wdata = y_data;
    end
  end
  assign y_ready = state == S_DRAIN && n_wr != job_q.y_beats && req_ready[0];

  // Read data out of the FIFOs.
  assign x_valid    = state == S_LOAD_X && f_valid[0];
  assign a_valid[0] = state == S_STREAM && f_valid[0];
  assign a_valid[1] = state == S_STREAM && f_valid[1];
  assign a_data     = f_data;
  assign f_ready[0] = (state == S_LOAD_X) ? x_ready : (state == S_STREAM && a_ready[0]);
  assign f_ready[1] = state == S_STREAM && a_ready[1];

  always_comb begin
    xw_t lane;
    for (int k = 0; k < FP_PER_BEAT; k++) begin
      lane.addr = n_rsp[0][BANK_ADDR_W-1:0];
      lane.val  = f_data[0][32*k +: 32];
      x_data[k*$bits(xw_t) +: $bits(xw_t)] = lane;
    end
  end

  assign mon_expected = {job_q.a_beats, 3'b000};
  assign drain_count  = job_q.y_beats;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      job_q       <= '0;
      n_req       <= '{default: '0};
      n_rsp       <= '{default: '0};
      n_wr        <= '0;
      done        <= 1'b0;
      mon_start   <= 1'b0;
      drain_start <= 1'b0;
    end else begin
      done        <= 1'b0;
      mon_start   <= 1'b0;
      drain_start <= 1'b0;
      for (int c = 0; c < 2; c++) begin
        if (rd_issue[c])             n_req[c] <= n_req[c] + 1'b1;
        if (f_valid[c] && f_ready[c]) n_rsp[c] <= n_rsp[c] + 1'b1;
      end
      if (req_valid[0] && req_ready[0] && req[0].we) n_wr <= n_wr + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          job_q <= job;
          n_req <= '{default: '0};
          n_rsp <= '{default: '0};
          state <= S_LOAD_X;
        end
        S_LOAD_X: if (n_rsp[0] == job_q.x_beats) begin
          n_req     <= '{default: '0};
          n_rsp     <= '{default: '0};
          mon_start <= 1'b1;
          state     <= S_STREAM;
        end
        S_STREAM: if (n_rsp[0] == job_q.a_beats && n_rsp[1] == job_q.a_beats)
          state <= S_WAIT;
        S_WAIT: if (mon_done && !mon_start) begin
          drain_start <= 1'b1;
          n_wr        <= '0;
          state       <= S_DRAIN;
        end
        S_DRAIN: if (n_wr == job_q.y_beats) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
