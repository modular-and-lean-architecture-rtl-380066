// fp32_pkg: single-precision floating-point multiply and add as functions.
//
// Both round to nearest, ties to even. Subnormal inputs are read as zero and
// subnormal results are flushed to zero; an infinite or NaN input gives an
// infinity (NaN for inf - inf or 0 * inf). This is the usual FPGA operator
// subset; the exact rules for special values are this design's own choice.
// The pipelined wrappers fp32_mul_pipe and fp32_add_pipe add the latency.
package fp32_pkg;

  localparam logic [31:0] FP_NAN = 32'h7fc0_0000;

  function automatic logic [31:0] fp32_pack(input logic s, input int e,
                                            input logic [22:0] m,
                                            input logic g, input logic st);
    logic [23:0] mr;
    int          er;
    mr = {1'b0, m} + 24'((g & (st | m[0])) ? 1 : 0);
    er = e;
    if (mr[23]) begin
      er = er + 1;
    end
    if (er >= 255) return {s, 8'hff, 23'd0};
    if (er <= 0)   return {s, 31'd0};
    return {s, er[7:0], mr[22:0]};
  endfunction

  function automatic logic [31:0] fp32_mul(input logic [31:0] a, input logic [31:0] b);
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'hff || b[30:23] == 8'hff) begin
      if ((a[30:23] == 8'h00) || (b[30:23] == 8'h00)) return FP_NAN;
      return {s, 8'hff, 23'd0};
    end
    if (a[30:23] == 8'h00 || b[30:23] == 8'h00) return {s, 31'd0};
    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return fp32_pack(s, e + 1, p[46:24], p[23], |p[22:0]);
    else       return fp32_pack(s, e,     p[45:23], p[22], |p[21:0]);
  endfunction

  function automatic logic [31:0] fp32_add(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] x, y;
    logic [56:0] mx, my, sum, nrm;
    int          d, lead;
    logic        sticky;
    // Special values.
    if (a[30:23] == 8'hff || b[30:23] == 8'hff) begin
      if (a[30:23] == 8'hff && b[30:23] == 8'hff && a[31] != b[31]) return FP_NAN;
      return (a[30:23] == 8'hff) ? {a[31], 8'hff, 23'd0} : {b[31], 8'hff, 23'd0};
    end
    if (b[30:23] == 8'h00) return (a[30:23] == 8'h00) ? {a[31] & b[31], 31'd0} : a;
    if (a[30:23] == 8'h00) return b;
    // x is the operand of larger magnitude.
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    d  = int'(x[30:23]) - int'(y[30:23]);
    mx = {1'b0, 1'b1, x[22:0], 32'd0};
    my = {1'b0, 1'b1, y[22:0], 32'd0};
    if (d > 56) begin
      sticky = 1'b1;
      my     = '0;
    end else begin
      sticky = (my & ((57'd1 << d) - 57'd1)) != '0;
      my     = my >> d;
    end
    my[0] = my[0] | sticky;
    sum = (x[31] == y[31]) ? mx + my : mx - my;
    if (sum == '0) return 32'd0;
    lead = 0;
    for (int i = 0; i < 57; i++) if (sum[i]) lead = i;
    nrm = sum << (56 - lead);
    return fp32_pack(x[31], int'(x[30:23]) + lead - 55, nrm[55:33], nrm[32], |nrm[31:0]);
  endfunction

endpackage
