// hqc_pkg: types, constants and arithmetic helpers shared by the HQC.KEM
// accelerator.
//
// The three HQC parameter sets (HQC-128, HQC-192, HQC-256) are selected at
// run time with a sec_t value. The per-set constants (ring size p, weights,
// Reed-Solomon and Reed-Muller code sizes) are the values of the HQC parameter
// table; memory word counts are derived from them for B = 128-bit words.
// GF(2^8) arithmetic uses the field polynomial y^8 + y^4 + y^3 + y^2 + 1
// (0x11D) with primitive element alpha = y, as the HQC Reed-Solomon codes do.
// The Reed-Solomon generator polynomial coefficients are not stored as a
// table: rs_gen_coef() expands g(x) = (x - a)(x - a^2)...(x - a^2t) at
// elaboration time.
package hqc_pkg;

  // Memory word width B and the 64-bit stream width used between units.
  localparam int unsigned B       = 128;
  localparam int unsigned SW      = 64;
  localparam int unsigned LOG2B   = 7;

  // Largest values over the three parameter sets.
  localparam int unsigned P_MAX     = 57637;
  localparam int unsigned WORDS_MAX = (P_MAX + B - 1) / B;   // 451
  localparam int unsigned W_MAX     = 149;                   // max(w, we, wr)
  localparam int unsigned NE_MAX    = 90;                    // RS code length
  localparam int unsigned KE_MAX    = 32;                    // RS code dimension
  localparam int unsigned T_MAX     = 29;                    // RS correction capacity
  localparam int unsigned TWO_T_MAX = 2 * T_MAX;             // 58
  localparam int unsigned RM_MULT_MAX = 5;

  typedef enum logic [1:0] {
    HQC128 = 2'd0,
    HQC192 = 2'd1,
    HQC256 = 2'd2
  } sec_t;

  // Constants of one parameter set.
  typedef struct packed {
    logic [15:0] p;         // ring size, polynomial length in bits
    logic [9:0]  words;     // ceil(p / B) memory words of a dense polynomial
    logic [7:0]  w;         // weight of x, y
    logic [7:0]  wr;        // weight of r_a, r_b, e (w_e = w_r)
    logic [6:0]  ne;        // RS code length n_e (symbols)
    logic [5:0]  ke;        // RS code dimension k_e (message bytes)
    logic [5:0]  t;         // RS correction capacity
    logic [2:0]  rm_mult;   // Reed-Muller duplication factor m
  } params_t;

  function automatic params_t get_params(sec_t s);
    params_t r;
    unique case (s)
      HQC192:  r = '{p:16'd35851, words:10'd281, w:8'd100, wr:8'd114, ne:7'd56, ke:6'd24, t:6'd16, rm_mult:3'd5};
      HQC256:  r = '{p:16'd57637, words:10'd451, w:8'd131, wr:8'd149, ne:7'd90, ke:6'd32, t:6'd29, rm_mult:3'd5};
      default: r = '{p:16'd17669, words:10'd139, w:8'd66,  wr:8'd75,  ne:7'd46, ke:6'd16, t:6'd15, rm_mult:3'd3};
    endcase
    return r;
  endfunction

  // ---------------------------------------------------------------- GF(2^8)
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r;
    logic [7:0] aa;
    r  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r = r ^ aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1D : 8'h00);
    end
    return r;
  endfunction

  // alpha^e for any integer exponent (reduced mod 255).
  function automatic logic [7:0] gf_alpha_pow(int e);
    logic [7:0] r;
    int ee;
    ee = e % 255;
    if (ee < 0) ee += 255;
    r = 8'h01;
    for (int i = 0; i < ee; i++) r = gf_mul(r, 8'h02);
    return r;
  endfunction

  // Table of alpha^e for e = 0..254 (entry 255 repeats alpha^0), built
  // incrementally so it is cheap to evaluate as a constant.
  typedef logic [255:0][7:0] gtab_t;
  function automatic gtab_t gf_alpha_tab();
    gtab_t      r;
    logic [7:0] a;
    a = 8'h01;
    for (int e = 0; e < 256; e++) begin
      r[e] = a;
      a = gf_mul(a, 8'h02);
    end
    return r;
  endfunction

  // Multiplicative inverse (a^254); inverse of 0 returns 0.
  function automatic logic [7:0] gf_inv(logic [7:0] a);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < 254; i++) r = gf_mul(r, a);
    return r;
  endfunction

  // All coefficients of g(x) = prod_{j=1..2t} (x - alpha^j); entry i is the
  // coefficient of x^i.
  typedef logic [TWO_T_MAX:0][7:0] gpoly_t;
  function automatic gpoly_t rs_gen_poly(int two_t);
    gpoly_t     g;
    logic [7:0] a;
    g    = '0;
    g[0] = 8'h01;
    a    = 8'h01;
    for (int j = 1; j <= two_t; j++) begin
      a = gf_mul(a, 8'h02);
      for (int k = TWO_T_MAX; k >= 1; k--) g[k] = g[k-1] ^ gf_mul(g[k], a);
      g[0] = gf_mul(g[0], a);
    end
    return g;
  endfunction

  // Coefficient i (0..2t) of the same polynomial.
  function automatic logic [7:0] rs_gen_coef(int two_t, int i);
    gpoly_t g;
    g = rs_gen_poly(two_t);
    return g[i];
  endfunction

endpackage
