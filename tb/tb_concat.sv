// tb_concat: eight lanes become valid at random times; the wide word must be
// offered only when all are valid, carry lane i in bits [32i+31:32i], and
// take all lanes in the cycle it is taken.
module tb_concat;
  localparam int N = 8, W = 32;
  logic [N-1:0] in_valid, in_ready;
  logic [W-1:0] in_data [N];
  logic out_valid, out_ready;
  logic [N*W-1:0] out_data;
  int checks = 0, failures = 0;

  concat #(.N(N), .W(W)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      in_valid  = ($urandom_range(3, 0) == 0) ? '1 : N'($urandom);
      out_ready = 1'($urandom);
      for (int i = 0; i < N; i++) in_data[i] = $urandom;
      #1;
      chk(out_valid == (in_valid == '1), "valid only when all lanes valid");
      chk(in_ready == {N{in_valid == '1 && out_ready}}, "lanes taken together");
      for (int i = 0; i < N; i++) chk(out_data[i*W +: W] == in_data[i], "lane placement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
