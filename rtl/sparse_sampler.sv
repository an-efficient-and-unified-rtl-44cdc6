// sparse_sampler: constant-time sampler of a fixed-weight polynomial
// (w distinct positions in 0..p-1), stored as a list of 16-bit indices.
//
// It consumes exactly w 32-bit pseudorandom values r_i (32*w bits) from the
// CSPRNG stream. Each value goes through the pipelined divider to form the
// candidate position s_i = i + (r_i mod (p - i)). When all w candidates are
// back, a fix-up pass runs from i = w-2 down to 0: if any later candidate
// equals s_i, s_i is replaced by i. This is the constant-time fixed-weight
// algorithm the HQC specification adopted; one position is checked per
// cycle against all later ones in parallel. Finally the list is written to
// the sparse-polynomial memory, eight indices per 128-bit word (index i in
// bits [16*(i%8) +: 16] of word base + i/8, unused slots zero).
//
// Interface: start with p, weight w and base; 32-bit values arrive on
// rnd_valid/rnd_data/rnd_ready. done pulses after the last write. Timing:
// w + 32 cycles to draw and reduce, w - 1 cycles of fix-up, ceil(w/8)
// write cycles; no dependence on the values drawn.
module sparse_sampler
  import hqc_pkg::*;
#(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   p,
  input  logic [7:0]    weight,
  input  logic [AW-1:0] base,
  input  logic          rnd_valid,
  output logic          rnd_ready,
  input  logic [31:0]   rnd_data,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [127:0]  wdata,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {IDLE, DRAW, DEDUP, WRITE, FIN} state_t;
  state_t        state;
  logic [15:0]   p_q;
  logic [7:0]    w_q, issued, got, i;
  logic [AW-1:0] base_q;
  logic [15:0]   sup [W_MAX];
  logic [4:0]    wk;

  logic          mv;
  logic [15:0]   rem;
  logic [7:0]    mtag;

  assign rnd_ready = (state == DRAW) && (issued < w_q);
  wire   fire      = rnd_valid && rnd_ready;

  mod_pipe #(.TW(8)) u_mod (
    .clk, .rst_n, .in_valid(fire), .dividend(rnd_data), .divisor(p_q - 16'(issued)),
    .in_tag(issued), .out_valid(mv), .remainder(rem), .out_tag(mtag)
  );

  logic found;
  always_comb begin
    found = 1'b0;
    for (int j = 0; j < W_MAX; j++)
      if (j > int'(i) && j < int'(w_q) && sup[j] == sup[i]) found = 1'b1;
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; p_q <= '0; w_q <= '0; issued <= '0; got <= '0; i <= '0; base_q <= '0; wk <= '0;
      we <= 1'b0; waddr <= '0; wdata <= '0; done <= 1'b0;
      for (int j = 0; j < W_MAX; j++) sup[j] <= '0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          p_q <= p; w_q <= weight; base_q <= base;
          issued <= '0; got <= '0;
          for (int j = 0; j < W_MAX; j++) sup[j] <= '0;
          state <= DRAW;
        end
        DRAW: begin
          if (fire) issued <= issued + 8'd1;
          if (mv) begin
            sup[mtag] <= 16'(mtag) + rem;
            got <= got + 8'd1;
            if (got + 8'd1 == w_q) begin
              state <= (w_q > 8'd1) ? DEDUP : WRITE;
              i     <= w_q - 8'd2;
              wk    <= '0;
            end
          end
        end
        DEDUP: begin
          if (found) sup[i] <= 16'(i);
          if (i == 8'd0) begin
            state <= WRITE;
            wk    <= '0;
          end
          i <= i - 8'd1;
        end
        WRITE: begin
          we    <= 1'b1;
          waddr <= base_q + AW'(wk);
          for (int q = 0; q < 8; q++) begin
            int k;
            k = 8 * int'(wk) + q;
            wdata[16*q +: 16] <= (k < int'(w_q) && k < W_MAX) ? sup[k] : 16'h0000;
          end
          if ((8 * (int'(wk) + 1)) >= int'(w_q)) state <= FIN;
          wk <= wk + 5'd1;
        end
        FIN: begin
          state <= IDLE;
          done  <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
