// spmv_top: NUM_KERNELS independent SpMV kernels side by side.
//
// Each kernel owns two HBM pseudo-channels (16 kernels use all 32 of a
// device with 32 pseudo-channels) and computes one horizontal slice of the
// matrix: the host splits A into NUM_KERNELS groups of rows, gives kernel k its
// rows, its copy of x and its place for the y slice, and starts it through
// start[k] / job[k]. Kernels share nothing but the clock and reset. The
// memory-side ports of kernel k are channel pair (2k, 2k+1), to be connected
// to the memory subsystem. The kernel count follows the reference design.
module spmv_top
  import spmv_pkg::*;
#(
  parameter int unsigned NUM_KERNELS = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NUM_KERNELS-1:0]   start,
  input  job_t                     job       [NUM_KERNELS],
  output logic [NUM_KERNELS-1:0]   busy,
  output logic [NUM_KERNELS-1:0]   done,
  output logic [2*NUM_KERNELS-1:0] req_valid,
  input  logic [2*NUM_KERNELS-1:0] req_ready,
  output mem_req_t                 req       [2*NUM_KERNELS],
  input  logic [2*NUM_KERNELS-1:0] rsp_valid,
  output logic [2*NUM_KERNELS-1:0] rsp_ready,
  input  logic [HBM_W-1:0]         rsp_data  [2*NUM_KERNELS],
  output logic [NUM_BANKS-1:0]     hrb_stall [NUM_KERNELS]
);
  for (genvar k = 0; k < NUM_KERNELS; k++) begin : g_kernel
    mem_req_t         k_req [2];
    logic [HBM_W-1:0] k_rsp [2];
    assign k_rsp[0]       = rsp_data[2*k];
    assign k_rsp[1]       = rsp_data[2*k+1];
    assign req[2*k]       = k_req[0];
    assign req[2*k+1]     = k_req[1];
    spmv_kernel u_kernel (
      .clk, .rst_n,
      .start    (start[k]), .job (job[k]), .busy (busy[k]), .done (done[k]),
      .req_valid(req_valid[2*k +: 2]), .req_ready(req_ready[2*k +: 2]), .req (k_req),
      .rsp_valid(rsp_valid[2*k +: 2]), .rsp_ready(rsp_ready[2*k +: 2]), .rsp_data(k_rsp),
      .hrb_stall(hrb_stall[k])
    );
  end
endmodule
