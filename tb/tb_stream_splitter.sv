// tb_stream_splitter: wide words of 4 lanes with random per-lane stalls. Each
// lane output must carry its lane of every word, in order, exactly once, and
// the wide word must be taken only after all its lanes went out. With all
// outputs ready it takes one wide word per cycle.
module tb_stream_splitter;
  localparam int N = 4, W = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic [N*W-1:0] in_data;
  logic [N-1:0] out_valid, out_ready;
  logic [W-1:0] out_data [N];
  int checks = 0, failures = 0, words = 0, cycle = 0;
  int got [N];

  stream_splitter #(.N(N), .W(W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [N*W-1:0] word(int n);
    logic [N*W-1:0] w;
    for (int k = 0; k < N; k++) w[k*W +: W] = W'(n * 16 + k);
    return w;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) if (out_valid[k] && out_ready[k]) begin
      chk(out_data[k] == W'(got[k] * 16 + k), $sformatf("lane %0d word %0d", k, got[k]));
      got[k]++;
    end
    if (in_valid && in_ready)
      for (int k = 0; k < N; k++) chk(got[k] == words || (got[k] == words + 1), "word taken after its lanes");
  end

  initial begin
    bit fired;
    int t0;
    got = '{default: 0};
    in_valid = 0; in_data = '0; out_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    t0 = cycle;
    for (int c = 0; c < 50; c++) begin
      in_valid = 1; in_data = word(words);
      #1; fired = in_ready;
      @(negedge clk); if (fired) words++;
    end
    chk(words == 50, $sformatf("full rate: %0d words in 50 cycles", words));
    fired = 0;
    for (int c = 0; c < 3000; c++) begin
      if (fired) words++;
      in_valid = 1'($urandom) | in_valid & !fired;
      in_data  = word(words);
      out_ready = N'($urandom);
      #1; fired = in_valid && in_ready;
      @(negedge clk);
    end
    out_ready = '1;
    while (in_valid) begin
      if (fired) begin words++; in_valid = 0; end
      in_data = word(words);
      #1; fired = in_valid && in_ready;
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    for (int k = 0; k < N; k++) chk(got[k] == words, $sformatf("lane %0d got %0d of %0d", k, got[k], words));
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
