// hbm_model: behavioural model of one HBM pseudo-channel, for testbenches only.
//
// DEPTH beats of 256 bits. Requests arrive on a ready/valid channel; a read
// returns its beat LAT cycles later, in order, on the response stream, which
// the reader may stall (read data then queues up inside the model); a write
// is posted and updates the array at once. req_ready is dropped at random in
// (100 - READY_PCT) percent of the cycles to model a busy memory; a
// testbench may change `ready_pct` while running. Testbenches fill and
// inspect the array `mem` directly. `stalls` counts cycles in which a request
// was held off.
module hbm_model
  import spmv_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned LAT       = 20,
  parameter int unsigned READY_PCT = 100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  mem_req_t         req,
  output logic             rsp_valid,
  input  logic             rsp_ready,
  output logic [HBM_W-1:0] rsp_data
);
  logic [HBM_W-1:0] mem [DEPTH];
  logic [HBM_W-1:0] q_data [$];
  longint           q_time [$];
  longint           now;
  int               stalls;
  int unsigned      ready_pct = READY_PCT;

  assign rsp_valid = q_time.size() != 0 && q_time[0] <= now;
  assign rsp_data  = q_data.size() != 0 ? q_data[0] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now       <= 0;
      req_ready <= 1'b1;
      stalls    <= 0;
    end else begin
      now       <= now + 1;
      req_ready <= ($urandom_range(99, 0) < ready_pct);
      if (req_valid && !req_ready) stalls <= stalls + 1;
      if (rsp_valid && rsp_ready) begin
        void'(q_data.pop_front());
        void'(q_time.pop_front());
      end
      if (req_valid && req_ready) begin
        if (req.we) mem[req.addr % DEPTH] <= req.wdata;
        else begin
          q_data.push_back(mem[req.addr % DEPTH]);
          q_time.push_back(now + LAT);
        end
      end
    end
  end
endmodule
