// tb_monitor: random per-lane fire patterns; the count must equal the number
// of fires since start and done must rise exactly when it reaches the
// expected total, for several jobs in a row.
module tb_monitor;
  localparam int L = 8, CW = 32;
  logic clk = 0, rst_n = 0;
  logic start;
  logic [CW-1:0] expected, count;
  logic [L-1:0] fire;
  logic done;
  int checks = 0, failures = 0;

  monitor #(.LANES(L), .CNT_W(CW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    start = 0; expected = 0; fire = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int job = 0; job < 5; job++) begin
      int total, sofar;
      total = 50 + int'($urandom_range(400, 0));
      @(negedge clk); start = 1; expected = CW'(total);
      @(negedge clk); start = 0;
      sofar = 0;
      while (sofar < total) begin
        logic [L-1:0] f;
        chk(!done, "done too early");
        chk(count == CW'(sofar), $sformatf("count %0d want %0d", count, sofar));
        f = L'($urandom);
        for (int i = 0; i < L; i++) if (f[i]) begin
          if (sofar < total) sofar++; else f[i] = 0;
        end
        fire = f;
        @(negedge clk);
      end
      fire = 0;
      chk(done, "done when the last one is counted");
      chk(count == CW'(total), "final count");
      repeat (3) @(negedge clk);
      chk(done, "done stays high");
    end
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
