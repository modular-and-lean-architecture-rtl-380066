// tb_elastic_buffer: checks order, no loss, capacity (exactly two packets
// held when the output stalls) and full throughput (one packet per cycle).
module tb_elastic_buffer;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0, cycle = 0;
  int sent = 0, rcvd = 0;
  bit rand_mode;

  elastic_buffer #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Receiver: checks that packets come out in order.
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    chk(out_data == W'(rcvd), $sformatf("order: got %0d want %0d", out_data, rcvd));
    rcvd <= rcvd + 1;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Capacity: output stalled, offer 3 packets: only 2 accepted.
    @(negedge clk); in_valid = 1; in_data = 0;
    repeat (4) begin
      bit f;
      f = in_ready;
      @(negedge clk); if (f) sent++;
      in_data = W'(sent);
    end
    chk(sent == 2, $sformatf("capacity %0d", sent));
    chk(!in_ready, "in_ready low when full");
    // Drain them; the third packet, still offered, gets in.
    out_ready = 1;
    while (sent < 3) begin
      bit f;
      f = in_ready;
      @(negedge clk); if (f) sent++;
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    chk(rcvd == 3, "drained three");
    // Throughput: 100 packets, both sides always ready.
    begin
      int t0;
      t0 = cycle;
      in_valid = 1; in_data = W'(sent);
      while (sent < 102) begin
        bit f;
        f = in_ready;
        @(negedge clk); if (f) sent++;
        in_data = W'(sent);
      end
      in_valid = 0;
      repeat (3) @(negedge clk);
      chk(rcvd == 102, $sformatf("received %0d", rcvd));
      chk(cycle - t0 <= 100 + 4, $sformatf("100 packets took %0d cycles", cycle - t0));
    end
    // Random valid / ready.
    while (sent < 1102) begin
      @(negedge clk);
      out_ready = $urandom_range(1, 0);
      if (!in_valid) in_valid = $urandom_range(1, 0);
      in_data = W'(sent);
      #1;
      if (in_valid && in_ready) begin
        @(negedge clk); sent++; in_valid = 0;
      end
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    chk(rcvd == sent, $sformatf("random: sent %0d received %0d", sent, rcvd));
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
