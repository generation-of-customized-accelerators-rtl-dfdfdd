// lpa_fu_fconv: conversion between single-precision floating point and
// 32-bit signed integers, like the host's flt and fint instructions.
//
// fn = 0 (flt): the integer is normalized with a leading-zero count and
// rounded to nearest even.  fn = 1 (fint): the float is truncated toward
// zero; denormals and magnitudes below one give 0, values outside the
// integer range and NaN saturate to 0x7FFFFFFF or 0x80000000 by sign.
// The unit is combinational, so like an integer unit it has a latency of
// one cycle (the pool register behind it captures y at the end of the
// issue cycle).
// Interface: fn select, a operand, y result.
// From the document: conversion from floating point to integer and back is
// a supported operation.  My own choice: the latency (not stated), the
// saturation values, and one unit for both directions.
module lpa_fu_fconv
  import lpa_pkg::*;
  import lpa_fp_pkg::*;
(
  input  logic  fn,
  input  word_t a,
  output word_t y
);
  word_t flt_y, fint_y;

  // integer to float
  always_comb begin
    word_t mag, norm;
    int    lz;
    mag = a[31] ? word_t'(-a) : a;
    lz  = 0;
    for (int i = 31; i >= 0; i--) if (mag[i]) begin lz = 31 - i; break; end
    norm = mag << lz;
    if (a == '0) flt_y = '0;
    else flt_y = fp_round_pack(a[31], 11'(127 + 31 - lz), {norm[31:6], |norm[5:0]});
  end

  // float to integer
  always_comb begin
    logic [7:0]  e;
    logic [54:0] v;
    word_t       mag;
    e = a[30:23];
    v = '0;
    mag = '0;
    if (e < 8'd127) fint_y = '0;
    else if (e >= 8'd158) fint_y = (a[31] && !(e == 8'hFF && a[22:0] != '0)) ? 32'h8000_0000
                                                                             : 32'h7FFF_FFFF;
    else begin
      v      = 55'({1'b1, a[22:0]}) << (e - 8'd127);
      mag    = v[54:23];
      fint_y = a[31] ? word_t'(-mag) : mag;
    end
  end

  assign y = fn ? fint_y : flt_y;
endmodule
