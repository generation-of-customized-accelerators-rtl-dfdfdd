// lpa_in_regs: input registers of the accelerator.
//
// The host's communication routine sends operands one by one; they are
// written to consecutive registers starting from register 0 after clear.
// The registers are read-only for the datapath: every FU input multiplexer
// may take any of them, for values of the first iteration and for loop
// constants.
module lpa_in_regs
  import lpa_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,   // restart writing at register 0
  input  logic  wr,      // store wdata in the next register
  input  word_t wdata,
  output word_t q [N],
  output logic [$clog2(N+1)-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (wr && count < ($clog2(N+1))'(N)) begin
      q[count[$clog2(N)-1:0]] <= wdata;
      count <= count + 1'b1;
    end
  end
endmodule
