// rs_epibma: inversionless, parallel Berlekamp-Massey key-equation solver
// for the unified Reed-Solomon decoder.
//
// The array of processing elements follows the reformulated inversionless
// Berlekamp-Massey recursion (riBM): discrepancy registers delta_i and
// auxiliary registers theta_i (the m_a / m_b pair of each PE), a scalar
// gamma and a signed counter k. On start the PEs are preset from the
// syndromes: delta_i = theta_i = S_{i+1} for i < 2t, a one at position 3t,
// zero symbols everywhere else, so PEs beyond the selected code are inert.
// Each of the 2t following cycles computes
//   delta_i <= gamma * delta_{i+1} - delta_0 * theta_i
//   if (delta_0 != 0 && k >= 0) { theta_i <= delta_{i+1}; gamma <= delta_0; k <= -k-1 }
//   else                        { k <= k + 1 }
// after which Lambda_i = delta_{t+i} (i = 0..t) and the error evaluator
// Omega_i = delta_i (i = 0..t-1). The document presets 2t_max + 1 PEs of
// an enhanced variant; this design uses 3t_max + 1 PEs of the plain riBM so
// that Omega comes out of the same array; the latency is 2t cycles. done
// pulses when lambda/omega are valid; they hold until the next start.
module rs_epibma
  import hqc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  sec_t       sec,
  input  logic [7:0] synd   [TWO_T_MAX],
  output logic       done,
  output logic [7:0] lambda [T_MAX + 1],
  output logic [7:0] omega  [T_MAX]
);

  localparam int NPE = 3 * T_MAX + 1;   // 88

  logic [7:0] delta [NPE];
  logic [7:0] theta [NPE];
  logic [7:0] gamma;
  logic signed [7:0] kk;
  logic [5:0] cnt;
  logic       run;
  sec_t       sec_q;
  logic [5:0] t_sel;

  assign t_sel = get_params(sec_q).t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPE; i++) begin delta[i] <= '0; theta[i] <= '0; end
      gamma <= 8'h01; kk <= '0; cnt <= '0; run <= 1'b0; done <= 1'b0; sec_q <= HQC128;
    end else begin
      done <= 1'b0;
      if (start) begin
        int t2;
        t2 = 2 * int'(get_params(sec).t);
        sec_q <= sec;
        for (int i = 0; i < NPE; i++) begin
          logic [7:0] v;
          v = (i < t2) ? synd[i] : ((i == 3 * int'(get_params(sec).t)) ? 8'h01 : 8'h00);
          delta[i] <= v;
          theta[i] <= v;
        end
        gamma <= 8'h01;
        kk    <= '0;
        cnt   <= 6'(t2);
        run   <= 1'b1;
      end else if (run) begin
        logic upd;
        upd = (delta[0] != 8'h00) && !kk[7];
        for (int i = 0; i < NPE; i++) begin
          logic [7:0] nxt;
          nxt = (i + 1 < NPE) ? delta[i+1] : 8'h00;
          delta[i] <= gf_mul(gamma, nxt) ^ gf_mul(delta[0], theta[i]);
          if (upd) theta[i] <= nxt;
        end
        if (upd) begin
          gamma <= delta[0];
          kk    <= -kk - 8'sd1;
        end else begin
          kk    <= kk + 8'sd1;
        end
        if (cnt == 6'd1) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt - 6'd1;
      end
    end
  end

  // Output selection: Lambda starts at PE t of the selected code.
  always_comb begin
    for (int i = 0; i <= T_MAX; i++) begin
      int idx;
      idx = int'(t_sel) + i;
      lambda[i] = (i <= int'(t_sel) && idx < NPE) ? delta[idx] : 8'h00;
    end
    for (int i = 0; i < T_MAX; i++)
      omega[i] = (i < int'(t_sel)) ? delta[i] : 8'h00;
  end

endmodule
