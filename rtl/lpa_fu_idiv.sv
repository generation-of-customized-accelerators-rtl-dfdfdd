// lpa_fu_idiv: integer divider, not pipelined, y = b / a as in the host's
// idiv/idivu instructions (dividend in b, divisor in a).
//
// A restoring shift-subtract divider works on the magnitudes, one quotient
// bit per cycle.  Cycle 0 (issue) loads the magnitudes, cycles 1 to 32
// produce the 32 quotient bits, cycle 33 applies the sign and registers
// the result, and from cycle 34 the quotient is on y until the next
// division ends: latency 35.  A new start while a division runs restarts
// the unit; the schedule never does this, because the unit is not
// pipelined.  Division by zero gives zero, like the host.
// Interface: clk, rst_n, start, uns (fn bit 0: unsigned), a divisor,
// b dividend, y quotient, busy.
// From the document: a non-pipelined division unit with a latency of 35
// cycles; the other units keep running meanwhile.  My own choice: the
// radix-2 restoring algorithm and the zero result for a zero divisor.
module lpa_fu_idiv
  import lpa_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  uns,
  input  word_t a,
  input  word_t b,
  output word_t y,
  output logic  busy
);
  logic [5:0]  cnt;
  word_t       dvs, quo, res, rem;
  logic [DW:0] diff;
  logic        neg, zero;

  assign diff = {rem[DW-1:0], quo[DW-1]} - {1'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; busy <= 1'b0; dvs <= '0; quo <= '0; rem <= '0; res <= '0;
      neg <= 1'b0; zero <= 1'b0;
    end else if (start) begin
      busy <= 1'b1;
      cnt  <= '0;
      rem  <= '0;
      dvs  <= (!uns && a[DW-1]) ? word_t'(-a) : a;
      quo  <= (!uns && b[DW-1]) ? word_t'(-b) : b;
      neg  <= !uns && (a[DW-1] ^ b[DW-1]);
      zero <= (a == '0);
    end else if (busy) begin
      if (cnt < 6'd32) begin
        if (!diff[DW]) rem <= diff[DW-1:0];
        else           rem <= {rem[DW-2:0], quo[DW-1]};
        quo <= {quo[DW-2:0], ~diff[DW]};
        cnt <= cnt + 6'd1;
      end else begin
        res  <= zero ? '0 : (neg ? word_t'(-quo) : quo);
        busy <= 1'b0;
      end
    end
  end
  assign y = res;
endmodule
