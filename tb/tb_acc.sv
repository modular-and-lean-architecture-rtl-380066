// tb_acc: after the reset-time clear, streams products into 16 rows of the
// bank (same-row products never closer than the hazard window, as the hrb
// guarantees) and compares the drained totals with reference FP32 sums taken
// in the same order. Also: in_ready low while clearing (DEPTH cycles); a row
// hit exactly every ACC_WINDOW+1 cycles (the closest spacing the hazard unit
// lets through) still sums correctly; drained entries are zero for the next
// job; random stalls on the drain output.
module tb_acc;
  import spmv_pkg::*;
  import tb_fp_pkg::*;
  localparam int NR = 16, DEPTH = 256;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, drain_start, out_valid, out_ready, busy;
  prod_t in_data;
  logic [$clog2(DEPTH):0] drain_count;
  fp32_t out_data;
  int checks = 0, failures = 0, cycle = 0;
  logic [31:0] tot [NR];

  acc #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic put(input int r, input logic [31:0] v);
    in_valid = 1; in_data.row = 16'(r * 8 + 5); in_data.val = v;
    #1; chk(in_ready, "accepting while running");
    tot[r] = ref_add(tot[r], v);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic drain_and_check(input int n, input string tag);
    int got;
    @(negedge clk); drain_start = 1; drain_count = ($clog2(DEPTH)+1)'(n);
    @(negedge clk); drain_start = 0;
    got = 0;
    while (got < n) begin
      out_ready = 1'($urandom);
      #1;
      if (out_valid && out_ready) begin
        chk(out_data == tot[got], $sformatf("%s row %0d got %h want %h", tag, got, out_data, tot[got]));
        got++;
      end
      @(negedge clk);
      if (cycle > 50000) break;
    end
    out_ready = 0;
    repeat (2) @(negedge clk);
    chk(!out_valid && !busy, "drain finished");
    for (int r = 0; r < NR; r++) tot[r] = 0;
  endtask

  initial begin
    int t0;
    in_valid = 0; in_data = '0; drain_start = 0; drain_count = 0; out_ready = 0;
    for (int r = 0; r < NR; r++) tot[r] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; t0 = cycle;
    @(negedge clk);
    chk(!in_ready && busy, "clearing after reset");
    while (busy && cycle - t0 < 2 * DEPTH) @(negedge clk);
    chk(cycle - t0 >= DEPTH && cycle - t0 <= DEPTH + 2, $sformatf("clear took %0d cycles", cycle - t0));
    // Round-robin over the 16 rows, back to back, with occasional gaps.
    for (int i = 0; i < 800; i++) begin
      put(i % NR, rand_fp(-2, 3));
      if ($urandom_range(7, 0) == 0) @(negedge clk);
    end
    drain_and_check(NR, "job1");
    // Row 3 every ACC_WINDOW+1 cycles.
    for (int i = 0; i < 40; i++) begin
      put(3, rand_fp(-1, 2));
      repeat (ACC_WINDOW) @(negedge clk);
    end
    drain_and_check(NR, "window");
    // Everything is zero again.
    drain_and_check(NR, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
