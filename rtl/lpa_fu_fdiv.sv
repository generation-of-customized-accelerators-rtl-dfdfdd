// lpa_fu_fdiv: single-precision floating-point divider, not pipelined,
// y = b / a as in the host's fdiv instruction (dividend b, divisor a).
//
// Cycle 0 (issue) decodes the operands: special cases (NaN, infinity,
// zero; denormals read as zero) are settled at once, otherwise the two
// 24-bit significands are loaded, the dividend pre-shifted so the quotient
// lies in [1, 2).  Cycles 1 to 27 each produce one quotient bit by
// restoring division.  In cycle 30 the quotient, with the remainder as the
// sticky bit, is rounded to nearest even and registered, and from cycle 31
// it is on y until the next division ends: latency 32.
// Interface: clk, rst_n, start, a divisor, b dividend, y quotient, busy.
// From the document: a non-pipelined FP divider with a latency of 32
// cycles, no denormal operands or results.  My own choice: the radix-2
// algorithm, the idle cycles 28 and 29 that pad it to 32, and the quiet
// NaN 0x7FC00000 for invalid operations.
module lpa_fu_fdiv
  import lpa_pkg::*;
  import lpa_fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t a,
  input  word_t b,
  output word_t y,
  output logic  busy
);
  logic [4:0]  cnt;
  logic [24:0] rem, dvs;
  logic [26:0] quo;
  logic        sgn, spec;
  logic signed [10:0] ex;
  word_t       spec_val, res;

  // operand decode
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero, pre;
  logic signed [10:0] e0;
  always_comb begin
    a_nan  = a[30:23] == 8'hFF && a[22:0] != '0;
    b_nan  = b[30:23] == 8'hFF && b[22:0] != '0;
    a_inf  = a[30:23] == 8'hFF && a[22:0] == '0;
    b_inf  = b[30:23] == 8'hFF && b[22:0] == '0;
    a_zero = a[30:23] == 8'h00;
    b_zero = b[30:23] == 8'h00;
    pre    = b[22:0] < a[22:0];          // b's significand below a's
    e0     = 11'(b[30:23]) - 11'(a[30:23]) + 11'sd127 - (pre ? 11'sd1 : 11'sd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; busy <= 1'b0; rem <= '0; dvs <= '0; quo <= '0; sgn <= 1'b0;
      spec <= 1'b0; ex <= '0; spec_val <= '0; res <= '0;
    end else if (start) begin
      busy <= 1'b1;
      cnt  <= '0;
      sgn  <= a[31] ^ b[31];
      ex   <= e0;
      dvs  <= {1'b0, 1'b1, a[22:0]};
      rem  <= pre ? {1'b1, b[22:0], 1'b0} : {1'b0, 1'b1, b[22:0]};
      quo  <= '0;
      spec <= 1'b1;
      if (a_nan || b_nan || (a_inf && b_inf) || (a_zero && b_zero)) spec_val <= QNAN;
      else if (b_inf || a_zero) spec_val <= {a[31] ^ b[31], 8'hFF, 23'd0};
      else if (a_inf || b_zero) spec_val <= {a[31] ^ b[31], 31'd0};
      else spec <= 1'b0;
    end else if (busy) begin
      cnt <= cnt + 5'd1;
      if (cnt < 5'd27) begin
        if (rem >= dvs) begin
          rem <= (rem - dvs) << 1;
          quo <= {quo[25:0], 1'b1};
        end else begin
          rem <= rem << 1;
          quo <= {quo[25:0], 1'b0};
        end
      end else if (cnt == 5'd29) begin
        res  <= spec ? spec_val : fp_round_pack(sgn, ex, {quo[26:1], quo[0] | (rem != '0)});
        busy <= 1'b0;
      end
    end
  end
  assign y = res;
endmodule
