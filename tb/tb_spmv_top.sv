// tb_spmv_top: one complete SpMV on the full 16-kernel design, every
// parameter at its default.
//
// A random 4096 x 1024 matrix is cut into 16 horizontal slices of 256 rows;
// kernel k gets slice k (row indices relative to the slice), a copy of x and
// its own two memory channels. Even kernels get their non-zeros in random
// order, odd kernels in row-major order; channels of kernels 4-7 are busy at
// random. All kernels start together; every y entry is compared with y = A x
// worked out here (small integer values, so FP32 sums are exact in any
// order). Counted and required: hrb hazard stalls, network bank-conflict
// stalls, memory back-pressure, and one drain and done per kernel.
module tb_spmv_top;
  import spmv_pkg::*;
  import tb_fp_pkg::*;
  localparam int K = 16, RS = 256, NC = 1024, NNZ_K = 1000;
  localparam int NNZ_P = (NNZ_K + 7) / 8 * 8;
  localparam int X_BASE = 0, A_BASE = 256, Y_BASE = 1024, MDEPTH = 2048;
  logic clk = 0, rst_n = 0;
  logic [K-1:0] start, busy, done;
  job_t job [K];
  logic [2*K-1:0] req_valid, req_ready, rsp_valid, rsp_ready;
  mem_req_t req [2*K];
  logic [HBM_W-1:0] rsp_data [2*K];
  logic [NUM_BANKS-1:0] hrb_stall [K];
  int checks = 0, failures = 0, cycle = 0;
  int n_hrb_stall = 0, n_noc_stall = 0, n_mem_stall = 0, n_drain = 0, n_done = 0;
  logic [HBM_W-1:0] img [2*K][MDEPTH];
  logic [31:0] xv [NC];
  real yref [K][RS];
  int mstall [2*K];
  int nstall [K];
  logic load_stb = 0, dump_stb = 0;

  spmv_top dut (.*);

  for (genvar c = 0; c < 2*K; c++) begin : g_mem
    hbm_model #(.DEPTH(MDEPTH), .LAT(20)) u_m (
      .clk, .rst_n, .req_valid(req_valid[c]), .req_ready(req_ready[c]), .req(req[c]),
      .rsp_valid(rsp_valid[c]), .rsp_ready(rsp_ready[c]), .rsp_data(rsp_data[c]));
    always @(posedge load_stb) begin
      for (int a = 0; a < MDEPTH; a++) u_m.mem[a] = img[c][a];
      if (c >= 8 && c < 16) u_m.ready_pct = 70;
    end
    always @(posedge dump_stb) for (int a = 0; a < MDEPTH; a++) img[c][a] = u_m.mem[a];
    assign mstall[c] = u_m.stalls;
  end
  for (genvar k = 0; k < K; k++) begin : g_watch
    always @(posedge clk) if (rst_n) begin
      nstall[k] <= nstall[k] + $countones(dut.g_kernel[k].u_kernel.n0i_valid & ~dut.g_kernel[k].u_kernel.n0i_ready);
      if (dut.g_kernel[k].u_kernel.drain_start) n_drain <= n_drain + 1;
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < K; k++) n_hrb_stall <= n_hrb_stall + $countones(hrb_stall[k]);
    n_done <= n_done + $countones(done);
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic build();
    nz_t nzs [NNZ_P];
    for (int c = 0; c < NC; c++) xv[c] = real2fp(real'($urandom_range(8, 0)) - 4.0);
    for (int k = 0; k < K; k++) begin
      for (int r = 0; r < RS; r++) yref[k][r] = 0.0;
      for (int a = 0; a < MDEPTH; a++) begin img[2*k][a] = '0; img[2*k+1][a] = '0; end
      for (int i = 0; i < NNZ_P; i++) begin
        if (i < NNZ_K) begin
          int v;
          v = $urandom_range(6, 0) - 3;
          if (v == 0) v = 2;
          nzs[i].row = 16'($urandom_range(RS - 1, 0));
          nzs[i].col = 16'($urandom_range(NC - 1, 0));
          nzs[i].val = real2fp(real'(v));
          yref[k][nzs[i].row] += fp2real(xv[nzs[i].col]) * real'(v);
        end else nzs[i] = '0;
      end
      if (k % 2 == 1)   // row-major order for odd kernels
        for (int i = 1; i < NNZ_P; i++) begin
          nz_t t; int j;
          t = nzs[i]; j = i - 1;
          while (j >= 0 && nzs[j].row > t.row) begin nzs[j+1] = nzs[j]; j--; end
          nzs[j+1] = t;
        end
      for (int b = 0; b < NC / 8; b++)
        for (int q = 0; q < 8; q++) img[2*k][X_BASE + b][32*q +: 32] = xv[8*b + q];
      for (int b = 0; b < NNZ_P / 8; b++)
        for (int q = 0; q < 4; q++) begin
          img[2*k][A_BASE + b][64*q +: 64]   = nzs[8*b + q];
          img[2*k+1][A_BASE + b][64*q +: 64] = nzs[8*b + 4 + q];
        end
      job[k].x_base = X_BASE; job[k].x_beats = NC / 8;
      job[k].a0_base = A_BASE; job[k].a1_base = A_BASE; job[k].a_beats = NNZ_P / 8;
      job[k].y_base = Y_BASE; job[k].y_beats = RS / 8;
    end
  endtask

  initial begin
    int t0;
    start = '0;
    for (int k = 0; k < K; k++) begin job[k] = '0; nstall[k] = 0; end
    build();
    load_stb = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (busy != '0 || dut.g_kernel[0].u_kernel.acc_busy != 0) @(negedge clk);
    @(negedge clk); start = '1;
    @(negedge clk); start = '0; t0 = cycle;
    while (n_done < K && cycle - t0 < 100000) @(negedge clk);
    $display("all kernels done after %0d cycles", cycle - t0);
    chk(n_done == K, $sformatf("%0d of %0d kernels done", n_done, K));
    dump_stb = 1;
    @(negedge clk);
    for (int k = 0; k < K; k++)
      for (int r = 0; r < RS; r++)
        chk(img[2*k][Y_BASE + r / 8][32*(r % 8) +: 32] == real2fp(yref[k][r]),
            $sformatf("kernel %0d y[%0d] got %h want %h", k, r, img[2*k][Y_BASE + r / 8][32*(r % 8) +: 32], real2fp(yref[k][r])));
    for (int c = 0; c < 2*K; c++) n_mem_stall += mstall[c];
    for (int k = 0; k < K; k++) n_noc_stall += nstall[k];
    $display("hrb stalls %0d, network stalls %0d, memory stalls %0d, drains %0d",
             n_hrb_stall, n_noc_stall, n_mem_stall, n_drain);
    chk(n_hrb_stall > 0, "hrb hazard stalls happened");
    chk(n_noc_stall > 0, "network conflict stalls happened");
    chk(n_mem_stall > 0, "memory back-pressure happened");
    chk(n_drain == K, "one drain per kernel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
