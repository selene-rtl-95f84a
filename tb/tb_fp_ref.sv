// Reference conversions between IEEE single precision bit patterns and
// simulator reals, for the floating-point testbenches. to_f32 rounds to
// nearest, ties to even, flushes results below the normal range to zero and
// turns overflow into infinity, matching the simplifications of the design's
// single-precision operators.
package tb_fp_ref;
  function automatic real from_f32(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 3'b000 + ((f[30:23] == 8'hFF) ? 11'h7FF : 11'(int'(f[30:23]) + 1023 - 127)), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_f32(input real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] k;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:0]};
    k  = {1'b0, m[52:29]};
    g  = m[28];
    st = (m[27:0] != '0);
    if (g && (st || k[0])) k = k + 1'b1;
    if (k[24]) begin k = k >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), k[22:0]};
  endfunction
endpackage
