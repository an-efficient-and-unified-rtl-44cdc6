// rs_encoder: unified systematic Reed-Solomon encoder for the three shortened
// HQC codes RS-S1 [46,16,31], RS-S2 [56,24,33] and RS-S3 [90,32,59].
//
// A single LFSR of 2*t_max = 58 byte registers divides x^(n-k) u(x) by the
// generator polynomial g(x). The per-stage multiplier constant is picked
// from the three generator polynomials by the parameter-set select, and the
// feedback symbol is tapped from register 2t-1 of the selected code, so the
// lower 2t registers form the LFSR of that code. This is the structure of
// the document's LFSR figure; the coefficient values are expanded at
// elaboration from g(x) = (x - a)(x - a^2)...(x - a^2t).
//
// Interface: pulse start with sec; then k_e message symbols are accepted on
// in_sym (highest degree u_{k-1} first) with a valid/ready handshake and are
// passed to out_sym unchanged; afterwards the 2t parity symbols are shifted
// out, highest degree first. out_last marks the final parity symbol. The
// output stream is therefore c_{n-1} ... c_0. One symbol per cycle when the
// consumer is ready: k_e cycles to absorb the message, 2t to drain parity.
module rs_encoder
  import hqc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  sec_t       sec,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_sym,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_sym,
  output logic       out_last,
  output logic       busy
);

  localparam int N = TWO_T_MAX;

  typedef enum logic [1:0] {IDLE, MSG, PAR} state_t;
  state_t      state;
  sec_t        sec_q;
  logic [7:0]  lfsr [N];
  logic [5:0]  cnt;
  params_t     prm;

  assign prm = get_params(sec_q);

  // Generator coefficients of the three codes; stage i of code c uses
  // coefficient i, which is 0 above 2t (the leading 1 is the feedback path).
  localparam gpoly_t G1 = rs_gen_poly(30);
  localparam gpoly_t G2 = rs_gen_poly(32);
  localparam gpoly_t G3 = rs_gen_poly(58);

  logic [7:0] G [3][N];
  always_comb begin
    for (int i = 0; i < N; i++) begin
      G[0][i] = (i < 30) ? G1[i] : 8'h00;
      G[1][i] = (i < 32) ? G2[i] : 8'h00;
      G[2][i] = G3[i];
    end
  end

  logic [7:0] tap;
  logic [7:0] fb;
  logic       shift;
  always_comb begin
    unique case (sec_q)
      HQC192:  tap = lfsr[31];
      HQC256:  tap = lfsr[57];
      default: tap = lfsr[29];
    endcase
    fb = (state == MSG) ? (in_sym ^ tap) : 8'h00;
  end

  assign in_ready  = (state == MSG) && out_ready;
  assign out_valid = (state == MSG) ? in_valid : (state == PAR);
  assign out_sym   = (state == MSG) ? in_sym : tap;
  assign out_last  = (state == PAR) && (cnt == 6'd1);
  assign busy      = (state != IDLE);
  assign shift     = (state == MSG) ? (in_valid && out_ready) : ((state == PAR) && out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      sec_q <= HQC128;
      cnt   <= '0;
      for (int i = 0; i < N; i++) lfsr[i] <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          sec_q <= sec;
          state <= MSG;
          cnt   <= get_params(sec).ke;
          for (int i = 0; i < N; i++) lfsr[i] <= '0;
        end
        MSG: if (shift) begin
          for (int i = N - 1; i >= 1; i--) lfsr[i] <= lfsr[i-1] ^ gf_mul(fb, G[sec_q][i]);
          lfsr[0] <= gf_mul(fb, G[sec_q][0]);
          if (cnt == 6'd1) begin
            state <= PAR;
            cnt   <= {prm.t[4:0], 1'b0};
          end else begin
            cnt <= cnt - 6'd1;
          end
        end
        PAR: if (shift) begin
          for (int i = N - 1; i >= 1; i--) lfsr[i] <= lfsr[i-1];
          lfsr[0] <= 8'h00;
          if (cnt == 6'd1) state <= IDLE;
          cnt <= cnt - 6'd1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
