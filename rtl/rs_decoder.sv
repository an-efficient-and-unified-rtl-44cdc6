// rs_decoder: unified Reed-Solomon decoder for the three shortened HQC codes.
//
// Chains the Horner syndrome unit, the inversionless Berlekamp-Massey array
// and the Chien search / error evaluation unit. The received word enters
// one symbol per cycle, highest degree r_{n-1} first, and is kept in a
// register file of n_e_max symbols while the syndromes accumulate. The key
// equation solver then runs for 2t cycles and the Chien search for n_e
// cycles, XOR-ing each error value into the stored word. Decoding always
// runs the full schedule, whether or not the syndromes are zero, so its
// duration depends only on the parameter set.
//
// Interface: pulse start with sec, then present n_e symbols with in_valid.
// done pulses when msg[0..k_e-1] (the k_e systematic message symbols,
// msg[i] = c_{2t+i}) are valid; fail reports an uncorrectable word.
// Latency after the last symbol: 2t + n_e + 3 cycles.
module rs_decoder
  import hqc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  sec_t       sec,
  input  logic       in_valid,
  input  logic [7:0] in_sym,
  output logic       done,
  output logic       fail,
  output logic [7:0] msg [KE_MAX]
);

  typedef enum logic [2:0] {IDLE, RECV, BM0, BM, CS} state_t;
  state_t     state;
  sec_t       sec_q;
  logic [7:0] r [NE_MAX];
  logic [6:0] cnt;
  params_t    prm;
  assign prm = get_params(sec_q);

  logic [7:0] synd [TWO_T_MAX];
  logic       bm_done;
  logic [7:0] lambda [T_MAX + 1];
  logic [7:0] omega  [T_MAX];
  logic       ev, eh, cs_done, cs_fail;
  logic [6:0] ep;
  logic [7:0] eval;

  rs_syndrome u_synd (
    .clk, .rst_n, .clear(start), .valid(state == RECV && in_valid), .sym(in_sym), .synd
  );

  rs_epibma u_bm (
    .clk, .rst_n, .start(state == BM0), .sec(sec_q), .synd, .done(bm_done), .lambda, .omega
  );

  rs_ecsee u_cs (
    .clk, .rst_n, .start(state == BM && bm_done), .sec(sec_q), .lambda, .omega,
    .err_valid(ev), .err_hit(eh), .err_pos(ep), .err_val(eval), .done(cs_done), .fail(cs_fail)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; sec_q <= HQC128; cnt <= '0; done <= 1'b0; fail <= 1'b0;
      for (int i = 0; i < NE_MAX; i++) r[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          sec_q <= sec;
          cnt   <= get_params(sec).ne - 7'd1;
          state <= RECV;
        end
        RECV: if (in_valid) begin
          r[cnt] <= in_sym;
          if (cnt == 7'd0) state <= BM0;
          cnt <= cnt - 7'd1;
        end
        BM0: state <= BM;
        BM:  if (bm_done) state <= CS;
        CS: begin
          if (ev && eh) r[ep] <= r[ep] ^ eval;
          if (cs_done) begin
            state <= IDLE;
            done  <= 1'b1;
            fail  <= cs_fail;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb
    for (int i = 0; i < KE_MAX; i++) begin
      int idx;
      idx = 2 * int'(prm.t) + i;
      msg[i] = (i < int'(prm.ke) && idx < NE_MAX) ? r[idx] : 8'h00;
    end

endmodule
