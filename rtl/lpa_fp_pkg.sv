// lpa_fp_pkg: single-precision floating-point arithmetic for the FP units.
//
// IEEE 754 binary32 add and multiply with round-to-nearest-even.  As in the
// host processor's FPU, denormalized operands are read as zero and results
// that would be denormalized are flushed to zero.  Any NaN operand, inf-inf
// and 0*inf give the quiet NaN 0x7FC00000.  The functions are
// combinational; the FP units place their pipeline registers around them.
package lpa_fp_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // m27: bit 26 is the leading one, bits 25:3 the fraction, then guard,
  // round and sticky.  e is the biased exponent of bit 26.
  function automatic logic [31:0] fp_round_pack(input logic s, input logic signed [10:0] e,
                                                input logic [26:0] m27);
    logic [24:0] m;
    logic signed [10:0] ex;
    logic rnd;
    rnd = m27[2] & (m27[1] | m27[0] | m27[3]);
    m   = {1'b0, m27[26:3]} + 25'(rnd);
    ex  = e;
    if (m[24]) begin
      m  = m >> 1;
      ex = ex + 11'sd1;
    end
    if (ex >= 11'sd255) return {s, 8'hFF, 23'd0};
    if (ex <= 11'sd0)   return {s, 31'd0};
    return {s, ex[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] fp_add(input logic [31:0] a, input logic [31:0] b);
    logic        sa, sb;
    logic [7:0]  ea, eb, d;
    logic [23:0] ma, mb;
    logic [53:0] sh;
    logic [26:0] xa, xb, m27;
    logic [27:0] sum;
    logic signed [10:0] e;
    int          lz;
    sa = a[31]; sb = b[31]; ea = a[30:23]; eb = b[30:23];
    if ((ea == 8'hFF && a[22:0] != 0) || (eb == 8'hFF && b[22:0] != 0)) return QNAN;
    if (ea == 8'hFF && eb == 8'hFF) return (sa != sb) ? QNAN : a;
    if (ea == 8'hFF) return a;
    if (eb == 8'hFF) return b;
    if (ea == 8'd0 && eb == 8'd0) return {sa & sb, 31'd0};
    if (ea == 8'd0) return b;
    if (eb == 8'd0) return a;
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    if ({ea, ma} < {eb, mb}) begin   // larger magnitude first
      {sa, sb} = {sb, sa};
      {ea, eb} = {eb, ea};
      {ma, mb} = {mb, ma};
    end
    d  = ea - eb;
    xa = {ma, 3'b000};
    sh = (d >= 8'd27) ? 54'd0 : ({mb, 3'b000, 27'd0} >> d);
    xb = sh[53:27];
    xb[0] = xb[0] | (|sh[26:0]) | ((d >= 8'd27) ? 1'b1 : 1'b0);
    e  = 11'(ea);
    if (sa == sb) begin
      sum = {1'b0, xa} + {1'b0, xb};
      if (sum[27]) begin
        m27 = {sum[27:2], sum[1] | sum[0]};
        e   = e + 11'sd1;
      end else
        m27 = sum[26:0];
    end else begin
      m27 = xa - xb;
      if (m27 == 27'd0) return 32'd0;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (m27[i]) break;
        lz++;
      end
      m27 = m27 << lz;
      e   = e - 11'(lz);
    end
    return fp_round_pack(sa, e, m27);
  endfunction

  function automatic logic [31:0] fp_mul(input logic [31:0] a, input logic [31:0] b);
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    logic [26:0] m27;
    logic signed [10:0] e;
    logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    s  = a[31] ^ b[31];
    ea = a[30:23]; eb = b[30:23];
    a_nan = ea == 8'hFF && a[22:0] != 0;  b_nan = eb == 8'hFF && b[22:0] != 0;
    a_inf = ea == 8'hFF && a[22:0] == 0;  b_inf = eb == 8'hFF && b[22:0] == 0;
    a_zero = ea == 8'd0;                  b_zero = eb == 8'd0;
    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) return QNAN;
    if (a_inf || b_inf) return {s, 8'hFF, 23'd0};
    if (a_zero || b_zero) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 11'(ea) + 11'(eb) - 11'sd127;
    if (p[47]) begin
      m27 = {p[47:22], |p[21:0]};
      e   = e + 11'sd1;
    end else
      m27 = {p[46:21], |p[20:0]};
    return fp_round_pack(s, e, m27);
  endfunction

endpackage
