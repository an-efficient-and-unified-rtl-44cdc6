// hqc_param_rom: read-only table of the per-parameter-set constants (ring
// size p, number of 128-bit words ceil(p/128), weights w and w_r = w_e,
// Reed-Solomon length and dimension, correction capacity t, Reed-Muller
// multiplicity m). The global controller reads it once per operation and
// loads the counters of the functional units from it, which is how one
// datapath serves HQC-128, HQC-192 and HQC-256. Combinational lookup.
module hqc_param_rom
  import hqc_pkg::*;
(
  input  sec_t    sec,
  output params_t prm
);
  always_comb prm = get_params(sec);
endmodule
