// rs_ecsee: Chien search and error evaluation for the unified Reed-Solomon
// decoder.
//
// Registers Lambda_k and Omega_k are loaded on start and multiplied every
// cycle by the constant alpha^-k, so in cycle i they hold the terms of
// Lambda(alpha^-i) and Omega(alpha^-i). The Lambda terms are summed in two
// halves, even and odd powers; their sum is Lambda(alpha^-i) and a zero
// marks an error in symbol i. Because Lambda'(x) = Lambda_odd(x) / x, the
// odd half also serves as the derivative; Forney's formula in its textbook
// form reads
//   Y_i = Omega(X^-1) * X^-1 / Lambda_odd(X^-1),  X^-1 = alpha^-i,
// so the same evaluation feeds both searches, as in the document's eCSEE
// figure. The evaluator delivered by the riBM array is a scaled form of
// Omega, Omega_h(x); with it the error value becomes
//   Y_i = Omega_h(X^-1) * X^-(2t+1) / Lambda_odd(X^-1),
// and a running factor register z, multiplied each cycle by alpha^-(2t+1),
// supplies the power of X. The field inverse is a 256-entry table built at
// elaboration from alpha powers.
//
// Timing: start, then positions i = 0 .. n_e-1 are produced one per cycle
// on err_valid/err_pos/err_val (err_hit set where an error was found).
// done pulses with the last position; fail is then set if the number of
// roots differs from the degree of Lambda (uncorrectable word).
module rs_ecsee
  import hqc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  sec_t       sec,
  input  logic [7:0] lambda [T_MAX + 1],
  input  logic [7:0] omega  [T_MAX],
  output logic       err_valid,
  output logic       err_hit,
  output logic [6:0] err_pos,
  output logic [7:0] err_val,
  output logic       done,
  output logic       fail
);

  typedef logic [255:0][7:0] tab_t;
  function automatic tab_t gen_inv();
    tab_t r;
    logic [7:0] a, b;
    r = '0;
    a = 8'h01;
    b = 8'h01;
    for (int e = 0; e < 255; e++) begin
      r[a] = b;                  // (alpha^e)^-1 = alpha^-e
      a = gf_mul(a, 8'h02);
      b = gf_mul(b, 8'h8E);      // alpha^-1
    end
    return r;
  endfunction
  localparam tab_t  INV  = gen_inv();
  localparam gtab_t ATAB = gf_alpha_tab();

  logic [7:0] lam [T_MAX + 1];
  logic [7:0] om  [T_MAX];
  logic [7:0] z;
  logic [6:0] pos, ne_q;
  logic       run;
  logic [5:0] deg_q, roots;
  logic [7:0] zstep;

  logic [7:0] ev, od, omv, y;
  always_comb begin
    ev = '0; od = '0; omv = '0;
    for (int k = 0; k <= T_MAX; k++)
      if (k[0]) od ^= lam[k]; else ev ^= lam[k];
    for (int k = 0; k < T_MAX; k++) omv ^= om[k];
    y = gf_mul(gf_mul(omv, z), INV[od]);
  end

  logic [7:0] ainv [T_MAX + 1];
  always_comb
    for (int k = 0; k <= T_MAX; k++) ainv[k] = ATAB[(255 - k) % 255];

  logic [5:0] deg_in;
  always_comb begin
    deg_in = '0;
    for (int k = 0; k <= T_MAX; k++) if (lambda[k] != 8'h00) deg_in = 6'(k);
  end

  wire hit = run && ((ev ^ od) == 8'h00);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= T_MAX; k++) lam[k] <= '0;
      for (int k = 0; k < T_MAX; k++) om[k] <= '0;
      z <= 8'h01; zstep <= 8'h01; pos <= '0; ne_q <= '0; run <= 1'b0; deg_q <= '0; roots <= '0;
      err_valid <= 1'b0; err_hit <= 1'b0; err_pos <= '0; err_val <= '0; done <= 1'b0; fail <= 1'b0;
    end else begin
      err_valid <= 1'b0;
      done      <= 1'b0;
      if (start) begin
        lam   <= lambda;
        om    <= omega;
        z     <= 8'h01;
        unique case (sec)
          HQC192:  zstep <= ATAB[255 - 33];
          HQC256:  zstep <= ATAB[255 - 59];
          default: zstep <= ATAB[255 - 31];
        endcase
        pos   <= '0;
        ne_q  <= get_params(sec).ne;
        deg_q <= deg_in;
        roots <= '0;
        run   <= 1'b1;
        fail  <= 1'b0;
      end else if (run) begin
        for (int k = 0; k <= T_MAX; k++) lam[k] <= gf_mul(lam[k], ainv[k]);
        for (int k = 0; k < T_MAX; k++) om[k] <= gf_mul(om[k], ainv[k]);
        z         <= gf_mul(z, zstep);
        err_valid <= 1'b1;
        err_hit   <= hit;
        err_pos   <= pos;
        err_val   <= hit ? y : 8'h00;
        roots     <= roots + 6'(hit);
        pos       <= pos + 7'd1;
        if (pos == ne_q - 7'd1) begin
          run  <= 1'b0;
          done <= 1'b1;
          fail <= ((roots + 6'(hit)) != deg_q);
        end
      end
    end
  end

endmodule
