// tb_hrb: products with rows from a small set arrive at random; a product
// must pass iff no product of the same row was passed in the last DEPTH
// cycles (worked out here from the history of passed rows), and must then
// pass in the same cycle. Also checks that a stream cycling through more
// rows than the window never stalls (II = 1) and that hazards do occur.
module tb_hrb;
  import spmv_pkg::*;
  localparam int DEPTH = ACC_WINDOW;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, stall;
  prod_t in_data, out_data;
  int checks = 0, failures = 0, cycle = 0, stalls = 0, passed = 0;
  int last [int];

  hrb dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic bit hazard_ref(int row);
    return last.exists(row) && (cycle - last[row] <= DEPTH);
  endfunction

  // One cycle: offer (valid, row), check, advance.
  task automatic step(input bit v, input int row, input bit rdy);
    bit exp_pass;
    in_valid = v; in_data.row = 16'(row); in_data.val = $urandom; out_ready = rdy;
    #1;
    exp_pass = v && rdy && !hazard_ref(row);
    chk(out_valid == (v && !hazard_ref(row)), $sformatf("cycle %0d row %0d out_valid %b", cycle, row, out_valid));
    chk((in_ready && v) == exp_pass, $sformatf("cycle %0d row %0d in_ready %b", cycle, row, in_ready));
    chk(out_data == in_data, "data passes unchanged");
    if (v && hazard_ref(row)) stalls++;
    chk(stall == (v && hazard_ref(row)), "stall flag");
    if (exp_pass) begin last[row] = cycle; passed++; end
    @(negedge clk);
    cycle++;
  endtask

  initial begin
    in_valid = 0; out_ready = 1; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // Cycling over 8 rows: never a hazard.
    begin
      int s0;
      s0 = stalls;
      for (int i = 0; i < 80; i++) step(1, (i % 8) * 8, 1);
      chk(stalls == s0, "distinct rows never stall");
    end
    // The same row back to back: passes once per DEPTH+1 cycles.
    begin
      int p0;
      p0 = passed;
      for (int i = 0; i < 10 * (DEPTH + 1); i++) step(1, 5, 1);
      chk(passed - p0 == 10, $sformatf("same row passed %0d times", passed - p0));
    end
    // Random.
    begin
      bit v; int row;
      v = 0; row = 0;
      for (int i = 0; i < 4000; i++) begin
        if (!v || in_ready) begin
          v = ($urandom_range(3, 0) != 0);
          row = $urandom_range(5, 0);
        end
        step(v, row, $urandom_range(7, 0) != 0);
      end
    end
    chk(stalls > 100, $sformatf("hazard stalls seen: %0d", stalls));
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
