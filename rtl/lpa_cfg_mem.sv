// lpa_cfg_mem: configuration memory of the accelerator instance.
//
// Local distributed memory with one configuration word per time step and
// one word sequence per accelerated loop (prolog, steady state, epilog).
// The contents are computed at elaboration from the instance's
// single-iteration schedules by lpa_inst_pkg::cfg_word().  Read is
// asynchronous, as distributed memory is, so the word at addr controls the
// datapath in the same cycle.
module lpa_cfg_mem
  import lpa_inst_pkg::*;
(
  input  logic [CAW-1:0] addr,
  output cfg_word_t      word
);
  cfg_word_t rom [CDEPTH];
  for (genvar i = 0; i < CDEPTH; i++) begin : g_rom
    localparam cfg_word_t W = cfg_word(i);
    assign rom[i] = W;
  end
  assign word = rom[addr];
endmodule
