// spmv_pkg: types and constants shared by the SpMV kernel.
//
// A non-zero of the sparse matrix is stored in COO form: a 16-bit row index,
// a 16-bit column index and an FP32 value, 8 bytes in all, so one 256-bit
// (32-byte) HBM beat carries four non-zeros. The vectors x and y are banked
// over NUM_BANKS = 8 banks by the three least significant bits of the index;
// bits [15:3] address an entry inside a bank (8K entries per bank, 64K in
// all). These numbers are the ones of the reference design. The bit layout
// of a non-zero inside its 64-bit slot, the adder and multiplier latencies and
// the memory address width are this design's own choices.
package spmv_pkg;

  localparam int unsigned IDX_W       = 16;              // row / column index width
  localparam int unsigned NUM_BANKS   = 8;               // vector banks per kernel
  localparam int unsigned BANK_SEL_W  = $clog2(NUM_BANKS);
  localparam int unsigned BANK_ADDR_W = IDX_W - BANK_SEL_W;   // 13
  localparam int unsigned BANK_DEPTH  = 1 << BANK_ADDR_W;     // 8192 FP32 entries
  localparam int unsigned HBM_W       = 256;             // one pseudo-channel beat
  localparam int unsigned NZ_W        = 64;
  localparam int unsigned NZ_PER_BEAT = HBM_W / NZ_W;    // 4
  localparam int unsigned FP_PER_BEAT = HBM_W / 32;      // 8
  localparam int unsigned ADDR_W      = 28;              // beat address (8 GB / 32 B)
  localparam int unsigned MUL_LAT     = 4;               // FP32 multiplier latency
  localparam int unsigned ADD_LAT     = 4;               // FP32 adder latency
  // Cycles during which a row accepted by an accumulator is still being
  // read, added and written back: the depth of the hazard window.
  localparam int unsigned ACC_WINDOW  = ADD_LAT + 1;

  typedef logic [31:0] fp32_t;

  // One non-zero. In memory: row in [63:48], col in [47:32], value in [31:0].
  typedef struct packed {
    logic [IDX_W-1:0] row;
    logic [IDX_W-1:0] col;
    fp32_t            val;
  } nz_t;

  // A product on its way to the accumulators.
  typedef struct packed {
    logic [IDX_W-1:0] row;
    fp32_t            val;
  } prod_t;

  // One x entry on its way into an input vector bank.
  typedef struct packed {
    logic [BANK_ADDR_W-1:0] addr;
    fp32_t                  val;
  } xw_t;

  // A request to an HBM pseudo-channel: a one-beat read, or a posted one-beat write.
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [HBM_W-1:0]  wdata;
  } mem_req_t;

  // Job description handed to one kernel with its start pulse. All addresses
  // and counts are in 256-bit beats.
  typedef struct packed {
    logic [ADDR_W-1:0] x_base;   // x on channel 0
    logic [ADDR_W-1:0] x_beats;  // 8 entries per beat
    logic [ADDR_W-1:0] a0_base;  // non-zeros on channel 0
    logic [ADDR_W-1:0] a1_base;  // non-zeros on channel 1
    logic [ADDR_W-1:0] a_beats;  // beats on each channel, 4 non-zeros per beat
    logic [ADDR_W-1:0] y_base;   // y written to channel 0
    logic [ADDR_W-1:0] y_beats;  // 8 entries per beat
  } job_t;

endpackage
