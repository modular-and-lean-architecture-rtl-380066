// tb_lsa: runs two jobs through the load-store adaptor with behavioural
// memory channels (one of them busy at random) and stand-ins for the
// pipeline. Checks: every x beat leaves as eight (beat index, entry) lanes in
// order; each channel's non-zero beats arrive complete and in order; the
// monitor is started with 8 x a_beats; the drain waits for the monitor; every
// result beat lands at y_base + index on channel 0; done follows.
module tb_lsa;
  import spmv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  job_t job;
  logic [1:0] req_valid, req_ready, rsp_valid, rsp_ready;
  mem_req_t req [2];
  logic [HBM_W-1:0] rsp_data [2];
  logic x_valid, x_ready;
  logic [FP_PER_BEAT*$bits(xw_t)-1:0] x_data;
  logic [1:0] a_valid, a_ready;
  logic [HBM_W-1:0] a_data [2];
  logic mon_start, mon_done, drain_start, y_valid, y_ready;
  logic [ADDR_W+2:0] mon_expected;
  logic [ADDR_W-1:0] drain_count;
  logic [HBM_W-1:0] y_data;
  int checks = 0, failures = 0, cycle = 0;
  int nx, na [2], ny_sent, mon_starts, drains;
  bit mon_fin;

  lsa dut (.*);
  hbm_model #(.DEPTH(4096), .LAT(15))                  u_m0 (.clk, .rst_n, .req_valid(req_valid[0]), .req_ready(req_ready[0]), .req(req[0]), .rsp_valid(rsp_valid[0]), .rsp_ready(rsp_ready[0]), .rsp_data(rsp_data[0]));
  hbm_model #(.DEPTH(4096), .LAT(25), .READY_PCT(70))  u_m1 (.clk, .rst_n, .req_valid(req_valid[1]), .req_ready(req_ready[1]), .req(req[1]), .rsp_valid(rsp_valid[1]), .rsp_ready(rsp_ready[1]), .rsp_data(rsp_data[1]));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [HBM_W-1:0] pattern(int ch, int a);
    logic [HBM_W-1:0] w;
    for (int k = 0; k < 8; k++) w[32*k +: 32] = {8'(ch), 8'(k), 16'(a)};
    return w;
  endfunction

  // Pipeline stand-ins.
  assign x_ready = 1'b1;
  always @(posedge clk) begin
    a_ready <= 2'($urandom) | 2'($urandom);
  end
  always @(posedge clk) if (rst_n) begin
    if (x_valid && x_ready) begin
      for (int k = 0; k < 8; k++) begin
        xw_t l;
        l = x_data[k*$bits(xw_t) +: $bits(xw_t)];
        chk(l.addr == 13'(nx) && l.val == pattern(0, int'(job.x_base) + nx)[32*k +: 32], $sformatf("x beat %0d lane %0d", nx, k));
      end
      nx <= nx + 1;
    end
    for (int c = 0; c < 2; c++) if (a_valid[c] && a_ready[c]) begin
      chk(a_data[c] == pattern(c, int'(c ? job.a1_base : job.a0_base) + na[c]), $sformatf("ch%0d nz beat %0d", c, na[c]));
      na[c] <= na[c] + 1;
    end
    if (mon_start) begin
      mon_starts <= mon_starts + 1;
      chk(mon_expected == (ADDR_W+3)'(8 * job.a_beats), "monitor expects 8 per beat pair");
    end
    if (drain_start) begin
      drains <= drains + 1;
      chk(mon_fin, "drain only after the monitor");
      chk(drain_count == job.y_beats, "drain count");
    end
    if (y_valid && y_ready) ny_sent <= ny_sent + 1;
  end
  // The monitor reports done a few cycles after the last non-zero beat.
  always @(posedge clk) mon_fin <= rst_n && busy && na[0] == int'(job.a_beats) && na[1] == int'(job.a_beats) && mon_starts > 0;
  assign mon_done = mon_fin;
  // Results offered at random.
  always @(posedge clk) if (!(y_valid && !y_ready)) y_valid <= drains > 0 && $urandom_range(1, 0) == 1;
  assign y_data = pattern(7, ny_sent);

  task automatic run_job(input int xb, input int ab, input int yb, input int base);
    int t0, ta, tb;
    nx = 0; na = '{0, 0}; ny_sent = 0; mon_starts = 0; drains = 0;
    job.x_base = ADDR_W'(base);       job.x_beats = ADDR_W'(xb);
    job.a0_base = ADDR_W'(base + 100); job.a1_base = ADDR_W'(base + 200);
    job.a_beats = ADDR_W'(ab);
    job.y_base = ADDR_W'(base + 1000); job.y_beats = ADDR_W'(yb);
    for (int a = 0; a < 4096; a++) begin
      u_m0.mem[a] = pattern(0, a);
      u_m1.mem[a] = pattern(1, a);
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; t0 = cycle;
    while (!done && cycle - t0 < 5000) @(negedge clk);
    chk(done, "job done");
    chk(nx == xb && na[0] == ab && na[1] == ab, $sformatf("beats x %0d a %0d/%0d", nx, na[0], na[1]));
    chk(mon_starts == 1 && drains == 1, "one monitor start and one drain");
    for (int a = 0; a < yb; a++)
      chk(u_m0.mem[base + 1000 + a] == pattern(7, a), $sformatf("y beat %0d", a));
  endtask

  initial begin
    start = 0; job = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_job(8, 60, 8, 0);
    run_job(3, 90, 5, 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
