// tb_bvb_mul: loads random FP32 entries into a bank, streams non-zeros that
// read them, and compares every product (value and row, in order) with
// reference FP32 multiplication; the output is stalled at random. Also checks
// the idle latency of 1 + MUL_LAT cycles and one product per cycle when the
// output is always ready.
module tb_bvb_mul;
  import spmv_pkg::*;
  import tb_fp_pkg::*;
  localparam int NX = 64;
  logic clk = 0, rst_n = 0;
  logic xw_valid, in_valid, in_ready, out_valid, out_ready;
  xw_t xw_data;
  nz_t in_data;
  prod_t out_data;
  int checks = 0, failures = 0, cycle = 0, n_out = 0;
  logic [31:0] xv [NX];
  int unsigned xa [NX];
  prod_t expq [$];

  bvb_mul dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    prod_t e;
    n_out <= n_out + 1;
    if (expq.size() == 0) chk(0, "unexpected product");
    else begin
      e = expq.pop_front();
      chk(out_data == e, $sformatf("product row %0d got %h want %h", e.row, out_data.val, e.val));
    end
  end

  task automatic send_nz(input int i, input int row);
    nz_t n;
    n.row = 16'(row);
    n.col = {xa[i][12:0], 3'($urandom)};
    n.val = rand_fp(-6, 6);
    in_data = n;
    expq.push_back('{row: n.row, val: ref_mul(xv[i], n.val)});
  endtask

  initial begin
    bit fired;
    in_valid = 0; xw_valid = 0; out_ready = 1; in_data = '0; xw_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NX; i++) begin
      xa[i] = (i * 97 + 11) % BANK_DEPTH;   // spread over the bank
      xv[i] = rand_fp(-10, 10);
      xw_valid = 1; xw_data.addr = 13'(xa[i]); xw_data.val = xv[i];
      @(negedge clk);
    end
    xw_valid = 0;
    // Idle latency.
    begin
      int t0;
      in_valid = 1; send_nz(3, 77); t0 = cycle;
      @(negedge clk); in_valid = 0;
      while (!out_valid && cycle - t0 < 40) @(negedge clk);
      chk(cycle - t0 == 1 + MUL_LAT, $sformatf("latency %0d", cycle - t0));
      @(negedge clk);
    end
    // Full rate.
    begin
      int n0, t0;
      n0 = n_out; t0 = cycle;
      for (int i = 0; i < 100; i++) begin
        in_valid = 1; send_nz(i % NX, i);
        #1; chk(in_ready, "always ready at full rate");
        @(negedge clk);
      end
      in_valid = 0;
      repeat (1 + MUL_LAT) @(negedge clk);
      chk(n_out - n0 == 100 && cycle - t0 == 100 + 1 + MUL_LAT, $sformatf("rate: %0d in %0d cycles", n_out - n0, cycle - t0));
    end
    // Random stalls on both sides.
    fired = 0;
    for (int i = 0; i < 2000; i++) begin
      if (fired || !in_valid) begin
        in_valid = 1'($urandom);
        if (in_valid) send_nz($urandom_range(NX-1, 0), $urandom_range(65535, 0));
      end
      out_ready = 1'($urandom);
      #1; fired = in_valid && in_ready;
      @(negedge clk);
    end
    out_ready = 1;
    while (in_valid && !fired) begin #1; fired = in_ready; @(negedge clk); end
    in_valid = 0;
    repeat (10) @(negedge clk);
    chk(expq.size() == 0, $sformatf("%0d products missing", expq.size()));
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
