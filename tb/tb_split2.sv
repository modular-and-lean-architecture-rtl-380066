// tb_split2: checks that each packet is offered only on the output its select
// bit names and that the input waits for that output's ready alone.
module tb_split2;
  localparam int W = 8, SEL = 3;
  logic in_valid, in_ready;
  logic [W-1:0] in_data, out_data;
  logic [1:0] out_valid, out_ready;
  int checks = 0, failures = 0;

  split2 #(.W(W), .SEL_BIT(SEL)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      bit s;
      in_valid  = 1'($urandom);
      in_data   = W'($urandom);
      out_ready = 2'($urandom);
      #1;
      s = in_data[SEL];
      chk(out_valid[s] == in_valid && out_valid[!s] == 1'b0, $sformatf("valid %b data %h", out_valid, in_data));
      chk(in_ready == out_ready[s], "ready follows selected output");
      chk(out_data == in_data, "data");
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
