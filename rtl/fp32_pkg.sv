// Single-precision (IEEE 754 binary32) add and multiply as combinational
// functions, for the floating-point variant of the pipeline operators.
//
// Both round to nearest, ties to even. Simplifications, chosen to keep the
// operators small: subnormal inputs are read as zero and subnormal results
// are flushed to zero (sign kept); results too large become infinity; NaN
// and infinity inputs are not treated specially (the kernel's data are finite
// and non-negative). fp_add aligns the smaller operand with guard, round and
// sticky bits, adds or subtracts the significands, renormalises and rounds.
// fp_mul multiplies the 24-bit significands, renormalises the 48-bit product
// and rounds. Latency is set by the pipeline that calls them.
package fp32_pkg;
  typedef logic [31:0] f32_t;

  function automatic f32_t fp_pack(input logic s, input int e, input logic [23:0] m);
    // m holds the rounded significand with its hidden bit at position 23
    if (m == '0 || e <= 0) return {s, 31'd0};
    if (e >= 255)          return {s, 8'hFF, 23'd0};
    return {s, e[7:0], m[22:0]};
  endfunction

  // Round a significand given as [26:3] kept bits and [2:0] guard/round/sticky.
  function automatic void fp_round(input logic [26:0] x, inout int e, output logic [23:0] m);
    logic [24:0] r;
    logic        up;
    up = x[2] && (x[1] || x[0] || x[3]);
    r  = {1'b0, x[26:3]} + 25'(up);
    if (r[24]) begin
      m = r[24:1];
      e = e + 1;
    end else begin
      m = r[23:0];
    end
  endfunction

  function automatic f32_t fp_add(input f32_t a, input f32_t b);
    logic        sa, sb, sx, sy;
    logic [7:0]  ea, eb;
    logic [23:0] ma, mb;
    logic [26:0] mx, my, sh;
    logic [27:0] sum;
    logic [7:0]  ex;
    int          d, e, lz;
    logic        sticky;
    logic [26:0] norm;
    logic [23:0] m;
    sa = a[31]; ea = a[30:23]; ma = (ea == 0) ? 24'd0 : {1'b1, a[22:0]};
    sb = b[31]; eb = b[30:23]; mb = (eb == 0) ? 24'd0 : {1'b1, b[22:0]};
    if (ea == 0) ea = 8'd0;
    if (eb == 0) eb = 8'd0;
    // order so that x is the operand of larger magnitude
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = {ma, 3'b000}; sy = sb; my = {mb, 3'b000}; d = int'(ea) - int'(eb);
    end else begin
      sx = sb; ex = eb; mx = {mb, 3'b000}; sy = sa; my = {ma, 3'b000}; d = int'(eb) - int'(ea);
    end
    if (mx == '0) return 32'd0;
    // align y with sticky
    if (d > 26) begin
      sh = {26'd0, (my != '0)};
    end else begin
      sticky = 1'b0;
      for (int k = 0; k < 27; k++) if (k < d && my[k]) sticky = 1'b1;
      sh = (my >> d) | {26'd0, sticky};
    end
    e = int'(ex);
    if (sx == sy) begin
      sum = {1'b0, mx} + {1'b0, sh};
      if (sum[27]) begin
        norm = sum[27:1] | {26'd0, sum[0]};
        e    = e + 1;
      end else begin
        norm = sum[26:0];
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, sh};
      if (sum == '0) return 32'd0;
      lz = 0;
      for (int k = 26; k >= 0; k--) begin
        if (sum[k]) break;
        lz++;
      end
      norm = sum[26:0] << lz;
      e    = e - lz;
    end
    fp_round(norm, e, m);
    return fp_pack(sx, e, m);
  endfunction

  function automatic f32_t fp_mul(input f32_t a, input f32_t b);
    logic        s;
    logic [23:0] ma, mb, m;
    logic [47:0] p;
    logic [26:0] x;
    int          e;
    s  = a[31] ^ b[31];
    if (a[30:23] == 0 || b[30:23] == 0) return {s, 31'd0};
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    p  = ma * mb;
    e  = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      x = {p[47:22], (p[21:0] != '0)};
      e = e + 1;
    end else begin
      x = {p[46:21], (p[20:0] != '0)};
    end
    fp_round(x, e, m);
    return fp_pack(s, e, m);
  endfunction
endpackage
