// rs_syndrome: Horner evaluation of the received Reed-Solomon word at the
// roots alpha^1 .. alpha^(2t_max) of the generator polynomials.
//
// One received symbol per cycle enters on sym, highest degree r_{n-1}
// first. Register j (0-based) holds S_{j+1} and is updated as
// S <= S * alpha^(j+1) + r. The three HQC codes share these roots, so every
// multiplier has a fixed constant operand and is the same for all parameter
// sets (the document's syndrome figure). After n_e symbols, synd[j] holds
// S_{j+1}; registers above 2t are simply ignored by the next stage.
// clear zeroes all registers; the result is valid the cycle after the last
// symbol.
module rs_syndrome
  import hqc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       valid,
  input  logic [7:0] sym,
  output logic [7:0] synd [TWO_T_MAX]
);

  logic [7:0] s_q [TWO_T_MAX];

  // Constant alpha powers, one per register.
  localparam gtab_t ATAB = gf_alpha_tab();
  logic [7:0] apow [TWO_T_MAX];
  always_comb
    for (int j = 0; j < TWO_T_MAX; j++) apow[j] = ATAB[j + 1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < TWO_T_MAX; j++) s_q[j] <= '0;
    end else if (clear) begin
      for (int j = 0; j < TWO_T_MAX; j++) s_q[j] <= '0;
    end else if (valid) begin
      for (int j = 0; j < TWO_T_MAX; j++) s_q[j] <= gf_mul(s_q[j], apow[j]) ^ sym;
    end
  end

  assign synd = s_q;

endmodule
