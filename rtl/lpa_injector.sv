// lpa_injector: transparent migration of loops to the accelerator.
//
// Watches the host's instruction address bus.  When a fetch address equals
// the start address of an accelerated loop, the instruction returned by
// memory in the next cycle is replaced by an absolute branch to that loop's
// communication routine (host instruction "brai", 0xB808_0000 | address,
// so routine addresses must be below 64 KiB), and the loop's command word
// is sent to the accelerator with a one-cycle cmd_valid.  With enable low
// the injector is transparent.
//
// The routine ends with a jump back to the loop start, where the host runs
// the last iteration itself.  This implementation lets the first fetch of
// the same loop start after a trigger pass unchanged for that purpose, and
// re-arms after it.
module lpa_injector
  import lpa_pkg::*;
  import lpa_inst_pkg::*;
#(
  parameter int unsigned NMB = 5,
  parameter word_t       MB_ADDR [NMB] = '{32'h0000_0100, 32'h0000_0200, 32'h0000_0300,
                                           32'h0000_0400, 32'h0000_0500},
  parameter word_t       CR_ADDR [NMB] = '{32'h0000_1000, 32'h0000_1100, 32'h0000_1200,
                                           32'h0000_1300, 32'h0000_1400},
  parameter cmd_t        CMD     [NMB] = '{loop_cmd(0), loop_cmd(1), loop_cmd(2), loop_cmd(3),
                                           loop_cmd(4)}
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  logic  i_fetch,    // host fetches i_addr this cycle
  input  word_t i_addr,
  input  word_t mem_rdata,  // instruction from memory (cycle after fetch)
  output word_t i_rdata,    // instruction delivered to the host
  output logic  cmd_valid,
  output cmd_t  cmd
);
  localparam int unsigned IW = (NMB > 1) ? $clog2(NMB) : 1;
  logic          hit, hit_q;
  logic [IW-1:0] idx, idx_q;
  logic [NMB-1:0] skip;     // let the return jump pass once

  always_comb begin
    hit = 1'b0;
    idx = '0;
    for (int k = 0; k < NMB; k++)
      if (enable && i_fetch && i_addr == MB_ADDR[k] && !hit) begin
        hit = 1'b1;
        idx = IW'(k);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_q <= 1'b0;
      idx_q <= '0;
      skip  <= '0;
    end else begin
      hit_q <= hit && !skip[idx];
      idx_q <= idx;
      if (hit) skip[idx] <= ~skip[idx];
    end
  end

  assign i_rdata   = hit_q ? (32'hB808_0000 | {16'd0, CR_ADDR[idx_q][15:0]}) : mem_rdata;
  assign cmd_valid = hit_q;
  assign cmd       = CMD[idx_q];
endmodule
