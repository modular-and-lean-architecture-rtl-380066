// tb_spmv_kernel: end-to-end SpMV on one kernel with its default sizes.
//
// A random 2048 x 2048 matrix with 4000 non-zeros (small integer values, so
// every FP32 sum is exact whatever the order of accumulation) is laid out in
// COO form over the two memory channels, x is loaded from channel 0 and y is
// read back from channel 0 and compared with y = A x worked out here. The
// same matrix is run in random, row-major and column-major order, and once
// more in random order with both memory channels busy at random. Counted
// and required: hazard stalls in the hrb units, bank-conflict stalls at the
// network inputs, memory back-pressure, and a drain per job. The rate of
// non-zeros per cycle is reported; random order must reach at least 3 per
// cycle (of 8) and row-major order must be the slowest.
module tb_spmv_kernel;
  import spmv_pkg::*;
  import tb_fp_pkg::*;
  localparam int NR = 2048, NC = 2048, NNZ = 4000;
  localparam int NNZ_P = (NNZ + 7) / 8 * 8;
  localparam int X_BASE = 0, A_BASE = 256, Y_BASE = 2048;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  job_t job;
  logic [1:0] req_valid, req_ready, rsp_valid, rsp_ready;
  mem_req_t req [2];
  logic [HBM_W-1:0] rsp_data [2];
  logic [NUM_BANKS-1:0] hrb_stall;
  int checks = 0, failures = 0, cycle = 0;
  int n_hrb_stall = 0, n_noc_stall = 0, n_drain = 0;
  nz_t nzs [NNZ_P];
  logic [31:0] xv [NC];
  real yref [NR];

  spmv_kernel dut (.*);
  hbm_model #(.DEPTH(4096), .LAT(20)) u_m0 (.clk, .rst_n, .req_valid(req_valid[0]), .req_ready(req_ready[0]), .req(req[0]), .rsp_valid(rsp_valid[0]), .rsp_ready(rsp_ready[0]), .rsp_data(rsp_data[0]));
  hbm_model #(.DEPTH(4096), .LAT(20)) u_m1 (.clk, .rst_n, .req_valid(req_valid[1]), .req_ready(req_ready[1]), .req(req[1]), .rsp_valid(rsp_valid[1]), .rsp_ready(rsp_ready[1]), .rsp_data(rsp_data[1]));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n) begin
    n_hrb_stall <= n_hrb_stall + $countones(hrb_stall);
    n_noc_stall <= n_noc_stall + $countones(dut.n0i_valid & ~dut.n0i_ready);
    if (dut.drain_start) n_drain <= n_drain + 1;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [31:0] fint(int v);
    return real2fp(real'(v));
  endfunction

  task automatic make_matrix();
    for (int c = 0; c < NC; c++) xv[c] = fint($urandom_range(8, 0) - 4);
    for (int r = 0; r < NR; r++) yref[r] = 0.0;
    for (int i = 0; i < NNZ_P; i++) begin
      if (i < NNZ) begin
        int v;
        v = $urandom_range(6, 0) - 3;
        if (v == 0) v = 5;
        nzs[i].row = 16'($urandom_range(NR - 1, 0));
        nzs[i].col = 16'($urandom_range(NC - 1, 0));
        nzs[i].val = fint(v);
        yref[nzs[i].row] += fp2real(xv[nzs[i].col]) * real'(v);
      end else nzs[i] = '0;   // padding: adds 0 to y[0]
    end
  endtask

  // order: 0 random (Fisher-Yates), 1 row-major, 2 column-major
  task automatic arrange(input int order);
    for (int i = NNZ_P - 1; i > 0; i--) begin
      int j; nz_t t;
      j = $urandom_range(i, 0);
      t = nzs[i]; nzs[i] = nzs[j]; nzs[j] = t;
    end
    if (order != 0)
      for (int i = 1; i < NNZ_P; i++) begin   // insertion sort on the key
        nz_t t; int j;
        t = nzs[i]; j = i - 1;
        while (j >= 0 && (order == 1 ? nzs[j].row > t.row : nzs[j].col > t.col)) begin
          nzs[j+1] = nzs[j]; j--;
        end
        nzs[j+1] = t;
      end
  endtask

  // Lay out x and the non-zeros (beat b of channel c holds non-zeros 8b+4c .. 8b+4c+3).
  task automatic load_memory();
    for (int b = 0; b < NC / 8; b++)
      for (int k = 0; k < 8; k++) u_m0.mem[X_BASE + b][32*k +: 32] = xv[8*b + k];
    for (int b = 0; b < NNZ_P / 8; b++)
      for (int k = 0; k < 4; k++) begin
        u_m0.mem[A_BASE + b][64*k +: 64] = nzs[8*b + k];
        u_m1.mem[A_BASE + b][64*k +: 64] = nzs[8*b + 4 + k];
      end
    for (int b = 0; b < NR / 8; b++) u_m0.mem[Y_BASE + b] = '1;
  endtask

  task automatic run(input string name, output real rate);
    int t0, ts, te;
    job.x_base = X_BASE; job.x_beats = NC / 8;
    job.a0_base = A_BASE; job.a1_base = A_BASE; job.a_beats = NNZ_P / 8;
    job.y_base = Y_BASE; job.y_beats = NR / 8;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; t0 = cycle; ts = 0; te = 0;
    while (!done && cycle - t0 < 200000) begin
      if (ts == 0 && dut.u_lsa.state == dut.u_lsa.S_STREAM) ts = cycle;
      if (te == 0 && dut.u_lsa.state == dut.u_lsa.S_DRAIN) te = cycle;
      @(negedge clk);
    end
    chk(done, {name, ": job done"});
    rate = real'(NNZ_P) / real'(te - ts);
    $display("%s: %0d cycles in all, %0d non-zeros in %0d cycles = %0.2f per cycle", name, cycle - t0, NNZ_P, te - ts, rate);
    for (int r = 0; r < NR; r++)
      chk(u_m0.mem[Y_BASE + r / 8][32*(r % 8) +: 32] == real2fp(yref[r]),
          $sformatf("%s: y[%0d] got %h want %h", name, r, u_m0.mem[Y_BASE + r / 8][32*(r % 8) +: 32], real2fp(yref[r])));
  endtask

  initial begin
    real r_rand, r_row, r_col, r_busy;
    int hs0, hs1;
    start = 0; job = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (dut.acc_busy != 0) @(negedge clk);   // reset-time clear of the y banks
    make_matrix();
    arrange(0); load_memory(); hs0 = n_hrb_stall; run("random", r_rand);
    arrange(1); load_memory(); hs1 = n_hrb_stall; run("row-major", r_row);
    chk(n_hrb_stall - hs1 > hs1 - hs0, "row-major order stalls the hrb most");
    arrange(2); load_memory(); run("column-major", r_col);
    u_m0.ready_pct = 60; u_m1.ready_pct = 60;
    arrange(0); load_memory(); run("random, busy memory", r_busy);
    chk(r_rand >= 3.0, $sformatf("random order rate %0.2f", r_rand));
    chk(r_row < r_rand && r_row < r_col, "row-major order is the slowest");
    chk(n_hrb_stall > 0, $sformatf("hrb hazard stalls: %0d", n_hrb_stall));
    chk(n_noc_stall > 0, $sformatf("network input stalls: %0d", n_noc_stall));
    chk(u_m0.stalls + u_m1.stalls > 0, $sformatf("memory back-pressure: %0d", u_m0.stalls + u_m1.stalls));
    chk(n_drain == 4, $sformatf("drains: %0d", n_drain));
    $display("hrb stalls %0d, network stalls %0d, memory stalls %0d, drains %0d",
             n_hrb_stall, n_noc_stall, u_m0.stalls + u_m1.stalls, n_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
