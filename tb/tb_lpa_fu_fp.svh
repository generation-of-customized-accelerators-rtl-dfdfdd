// Reference single-precision arithmetic for the FP unit testbenches.
// Operands are converted exactly to double; a product, or a sum of two
// singles less than 2^25 apart in magnitude, is then exact, and one
// rounding to nearest even back to single gives the reference result.
function automatic real s2d(logic [31:0] a);
  return $bitstoreal({a[31], 11'(a[30:23]) - 11'd127 + 11'd1023, a[22:0], 29'd0});
endfunction
function automatic logic [31:0] d2s(real r);
  logic [63:0] d;
  logic [24:0] m;
  int e;
  d = $realtobits(r);
  if (d[62:0] == 0) return {d[63], 31'd0};
  e = int'(d[62:52]) - 1023 + 127;
  m = {2'b01, d[51:29]} + 25'(d[28] & ((|d[27:0]) | d[29]));
  if (m[24]) begin m = m >> 1; e++; end
  if (e >= 255) return {d[63], 8'hFF, 23'd0};
  if (e <= 0)   return {d[63], 31'd0};
  return {d[63], 8'(e), m[22:0]};
endfunction
function automatic logic [31:0] rnd_f(int emin, int emax);
  return {1'($urandom), 8'(emin + int'($urandom % (emax - emin + 1))), 23'($urandom)};
endfunction
