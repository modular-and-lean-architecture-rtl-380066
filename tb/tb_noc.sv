// tb_noc: random traffic on all 8 inputs of the 8x8 network. Every packet
// must leave on the port named by its three routing bits, none may be lost
// or duplicated, and packets of one source to one destination keep their
// order. Also checks the idle latency (6 cycles) and the full rate of 8
// packets per cycle for conflict-free (identity) traffic.
module tb_noc;
  localparam int W = 32, N = 8, LSB = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data [N], out_data [N];
  int checks = 0, failures = 0, cycle = 0;
  int seq [N];
  int n_sent [N][N], n_rcvd [N][N], last [N][N];
  int total_rcvd = 0, conflicts = 0;

  noc #(.W(W), .ROUTE_LSB(LSB)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Packet: [31:8] sequence, [6:4] destination, [2:0] source.
  function automatic logic [W-1:0] pkt(int src, int dst, int s);
    return {24'(s), 1'b0, 3'(dst), 1'b0, 3'(src)};
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++) if (out_valid[o] && out_ready[o]) begin
      int src, dst, s;
      src = int'(out_data[o][2:0]);
      dst = int'(out_data[o][6:4]);
      s   = int'(out_data[o][31:8]);
      chk(dst == o, $sformatf("packet for %0d left on %0d", dst, o));
      chk(s > last[src][dst], $sformatf("order %0d->%0d", src, dst));
      last[src][dst]   = s;
      n_rcvd[src][dst] = n_rcvd[src][dst] + 1;
      total_rcvd       = total_rcvd + 1;
    end
    for (int i = 0; i < N; i++) if (in_valid[i] && !in_ready[i]) conflicts++;
  end

  initial begin
    bit [N-1:0] fired;
    int t0, r0;
    for (int i = 0; i < N; i++) begin
      seq[i] = 1; in_data[i] = '0;
      for (int j = 0; j < N; j++) begin n_sent[i][j] = 0; n_rcvd[i][j] = 0; last[i][j] = 0; end
    end
    in_valid = 0; out_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Idle latency: one packet from input 2 to output 5.
    @(negedge clk);
    in_valid[2] = 1; in_data[2] = pkt(2, 5, seq[2]); t0 = cycle;
    @(negedge clk); in_valid[2] = 0; seq[2]++; n_sent[2][5]++;
    while (!out_valid[5] && cycle - t0 < 50) @(negedge clk);
    chk(cycle - t0 == 6, $sformatf("idle latency %0d", cycle - t0));
    repeat (3) @(negedge clk);
    // Identity traffic at full rate: 100 cycles x 8 packets.
    r0 = total_rcvd; t0 = cycle;
    for (int c = 0; c < 100; c++) begin
      for (int i = 0; i < N; i++) begin
        in_valid[i] = 1; in_data[i] = pkt(i, i, seq[i]);
      end
      #1;
      fired = in_valid & in_ready;
      @(negedge clk);
      for (int i = 0; i < N; i++) if (fired[i]) begin seq[i]++; n_sent[i][i]++; end
      chk(fired == '1, "identity traffic never stalls");
    end
    in_valid = ~fired;   // an offer not yet taken stays on offer
    while (in_valid != 0) begin
      #1;
      fired = in_valid & in_ready;
      @(negedge clk);
      for (int i = 0; i < N; i++) if (fired[i]) begin in_valid[i] = 0; seq[i]++; n_sent[i][i]++; end
    end
    repeat (10) @(negedge clk);
    chk(total_rcvd - r0 == 800, $sformatf("identity delivered %0d", total_rcvd - r0));
    // Random traffic with random output stalls.
    fired = 0;
    for (int c = 0; c < 3000; c++) begin
      for (int i = 0; i < N; i++) begin
        if (fired[i]) begin in_valid[i] = 0; seq[i]++; end
        if (!in_valid[i] && $urandom_range(3, 0) != 0) begin
          int d;
          d = $urandom_range(N-1, 0);
          in_valid[i] = 1; in_data[i] = pkt(i, d, seq[i]);
          n_sent[i][d]++;
        end
      end
      out_ready = N'($urandom) | N'($urandom);
      #1;
      fired = in_valid & in_ready;
      @(negedge clk);
    end
    // Let the packets still on offer in.
    out_ready = '1;
    while (in_valid != 0) begin
      for (int i = 0; i < N; i++) if (fired[i]) begin in_valid[i] = 0; seq[i]++; end
      #1;
      fired = in_valid & in_ready;
      @(negedge clk);
    end
    repeat (30) @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        chk(n_sent[i][j] == n_rcvd[i][j], $sformatf("%0d->%0d sent %0d got %0d", i, j, n_sent[i][j], n_rcvd[i][j]));
    chk(conflicts > 0, "conflicts were exercised");
    $display("input stall cycles from conflicts: %0d, packets delivered: %0d", conflicts, total_rcvd);
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
