// acc: one bank of the output banked vector buffer with its FP32 accumulator.
//
// The bank holds the running totals of the rows routed to it: entry a of
// bank k is y[8a+k]. Each product taken from the input (after the hazard
// unit) reads its row's total, adds the product in a pipelined FP32 adder and
// writes the sum back ADD_LAT+2 cycles after acceptance. The unit accepts a
// product every cycle while running; it does not itself check for two
// products of the same row in flight: the hrb in front of it does.
//
// After reset the bank is cleared, one entry per cycle (DEPTH cycles, in_ready
// low). A drain_start pulse asks for the first drain_count totals: the unit
// stops accepting, lets its pipeline empty, then reads entry 0, 1, ... and
// offers each on the output stream, writing zero back so that the next job
// starts from a cleared bank. A drained entry is offered every second cycle
// at best. `busy` is high while clearing or draining. Storage and function
// follow the reference design; the clear-on-drain scheme, the reset sweep and
// the drain rate are this design's choices.
module acc
  import spmv_pkg::*;
#(
  parameter int unsigned DEPTH = BANK_DEPTH,
  parameter int unsigned LAT   = ADD_LAT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  prod_t                  in_data,
  input  logic                   drain_start,
  input  logic [$clog2(DEPTH):0] drain_count,
  output logic                   out_valid,
  input  logic                   out_ready,
  output fp32_t                  out_data,
  output logic                   busy
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [2:0] {S_CLEAR, S_RUN, S_FLUSH, S_READ, S_OFFER} state_t;
  state_t state;

  fp32_t          mem [DEPTH];
  fp32_t          rd_q, val_q, sum;
  logic [AW-1:0]  rd_addr, wr_addr;
  fp32_t          wr_data;
  logic           we;
  logic           fire;
  logic [LAT:0]   v;
  logic [AW-1:0]  addr_p [LAT+1];
  logic [AW:0]    idx, count_q;
  logic           pend;     // drain requested while running

  assign fire     = in_valid && in_ready;
  assign in_ready = state == S_RUN && !pend;
  assign busy     = state != S_RUN;
  assign rd_addr  = (state == S_RUN) ? in_data.row[BANK_SEL_W +: AW] : idx[AW-1:0];

  // Single write port: clearing, accumulation or zeroing a drained entry.
  always_comb begin
    we      = 1'b0;
    wr_addr = addr_p[LAT];
    wr_data = sum;
    if (state == S_CLEAR || state == S_READ) begin
      we      = 1'b1;
      wr_addr = idx[AW-1:0];
      wr_data = '0;
    end else if (v[LAT]) begin
      we = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (state != S_OFFER) rd_q <= mem[rd_addr];   // hold a drained total while offered
    val_q <= in_data.val;
    if (we) mem[wr_addr] <= wr_data;
    addr_p[0] <= rd_addr;
    for (int i = 1; i <= LAT; i++) addr_p[i] <= addr_p[i-1];
  end

  fp32_add_pipe #(.LAT(LAT)) u_add (.clk, .en(1'b1), .a(rd_q), .b(val_q), .s(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_CLEAR;
      idx     <= '0;
      count_q <= '0;
      pend    <= 1'b0;
      v       <= '0;
    end else begin
      v <= {v[LAT-1:0], fire};
      if (drain_start) begin
        pend    <= 1'b1;
        count_q <= drain_count;
      end
      unique case (state)
        S_CLEAR: begin
          idx <= idx + 1'b1;
          if (idx == (AW+1)'(DEPTH - 1)) begin
            state <= S_RUN;
            idx   <= '0;
          end
        end
        S_RUN:   if (pend || drain_start) state <= S_FLUSH;
        S_FLUSH: if (v == '0) begin
          pend <= 1'b0;
          idx  <= '0;
          state <= (count_q == '0) ? S_RUN : S_READ;
        end
        S_READ:  state <= S_OFFER;
        S_OFFER: if (out_ready) begin
          idx   <= idx + 1'b1;
          state <= (idx + 1'b1 == count_q) ? S_RUN : S_READ;
        end
        default: state <= S_RUN;
      endcase
    end
  end

  assign out_valid = state == S_OFFER;
  assign out_data  = rd_q;
endmodule
