// tb_merge2: with both inputs always offering, grants must alternate (fair
// round robin) at one packet per cycle; with random traffic no packet is lost
// or duplicated and each input's order is kept.
module tb_merge2;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic [1:0] in_valid, in_ready;
  logic [W-1:0] in_data [2];
  logic out_valid, out_ready;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0;
  int sent [2], rcvd [2];
  int last_src = -1, alternations = 0, taken = 0;
  bit fair_phase;

  merge2 #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Packet = {source, sequence number}.
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int src;
    src = out_data[W-1];
    chk(out_data[W-2:0] == (W-1)'(rcvd[src]), $sformatf("src %0d order got %0d want %0d", src, out_data[W-2:0], rcvd[src]));
    rcvd[src] <= rcvd[src] + 1;
    if (fair_phase) begin
      if (last_src != -1 && src != last_src) alternations <= alternations + 1;
      taken <= taken + 1;
    end
    last_src <= src;
  end

  initial begin
    sent = '{0, 0}; rcvd = '{0, 0};
    in_valid = 0; out_ready = 0;
    in_data[0] = 0; in_data[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Fair phase: both always valid, output always ready.
    fair_phase = 1;
    out_ready  = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      in_valid = 2'b11;
      in_data[0] = {1'b0, (W-1)'(sent[0])};
      in_data[1] = {1'b1, (W-1)'(sent[1])};
      #1;
      for (int k = 0; k < 2; k++) if (in_ready[k]) sent[k]++;
    end
    @(negedge clk); in_valid = 0; fair_phase = 0;
    @(negedge clk);
    chk(taken == 100, $sformatf("one per cycle: %0d", taken));
    chk(alternations == 99, $sformatf("alternations %0d", alternations));
    // Random phase.
    begin
      bit [1:0] fired;
      fired = 0;
      for (int i = 0; i < 2000; i++) begin
        @(negedge clk);
        for (int k = 0; k < 2; k++) if (fired[k]) begin
          sent[k]++;
          in_valid[k] = 0;
        end
        out_ready = 1'($urandom);
        for (int k = 0; k < 2; k++) begin
          if (!in_valid[k]) in_valid[k] = 1'($urandom);
          in_data[k] = {1'(k), (W-1)'(sent[k])};
        end
        #1;
        fired = in_valid & in_ready;
      end
      @(negedge clk);
      for (int k = 0; k < 2; k++) if (fired[k]) sent[k]++;
    end
    in_valid = 0; out_ready = 1;
    repeat (3) @(negedge clk);
    chk(rcvd[0] == sent[0] && rcvd[1] == sent[1], "all delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
