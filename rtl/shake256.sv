// shake256: SHAKE256 extendable-output function (Keccak-f[1600], rate 1088
// bits = 17 lanes) with 64-bit absorb and squeeze streams. It serves as the
// CSPRNG seed expander and as HASH-G / HASH-K of the accelerator; callers
// append the one-byte domain separator (0x02, 0x03, 0x04) to their data.
//
// Absorb: after start, words arrive on in_valid/in_data (byte k of the word
// is message byte 8*i+k) with in_ready. The last word carries in_last and
// in_bytes (1..8 valid bytes, low bytes first); a word with in_bytes = 0
// and in_last ends the message on a word boundary. Every 17 lanes, and after
// padding (0x1F ... 0x80), the permutation runs for 24 cycles, one round per
// cycle. Squeeze: out_valid/out_data/out_ready deliver output lanes in
// order, the permutation running again after every 17 lanes, so the stream
// is unbounded. start may be given at any time and restarts the sponge.
// The document uses a third-party high-performance SHAKE256 core; this
// iterative core is this design's own, with the same function.
module shake256 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_data,
  input  logic [3:0]  in_bytes,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [63:0] out_data
);

  typedef enum logic [2:0] {IDLE, ABSORB, PERM_A, PAD, PERM_S, SQUEEZE} state_t;
  state_t      state;
  logic [63:0] st [25];
  logic [63:0] nx [25];
  logic [4:0]  rnd;
  logic [4:0]  lane;
  logic [7:0]  padpos;      // byte position of the 0x1F pad byte
  logic        pad_pending; // padding still to be applied after a full block

  keccak_round u_round (.a_in(st), .rnd(rnd), .a_out(nx));

  assign in_ready  = (state == ABSORB);
  assign out_valid = (state == SQUEEZE);
  assign out_data  = st[lane];

  function automatic logic [63:0] byte_mask(logic [3:0] n);
    logic [63:0] m;
    for (int k = 0; k < 8; k++) m[8*k +: 8] = (k < int'(n)) ? 8'hFF : 8'h00;
    return m;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; rnd <= '0; lane <= '0; padpos <= '0; pad_pending <= 1'b0;
      for (int i = 0; i < 25; i++) st[i] <= '0;
    end else if (start) begin
      state <= ABSORB; rnd <= '0; lane <= '0; pad_pending <= 1'b0;
      for (int i = 0; i < 25; i++) st[i] <= '0;
    end else begin
      unique case (state)
        IDLE: ;
        ABSORB: if (in_valid) begin
          logic [3:0] nb;
          nb = in_last ? in_bytes : 4'd8;
          st[lane] <= st[lane] ^ (in_data & byte_mask(nb));
          if (in_last) begin
            if (lane == 5'd16 && nb == 4'd8) begin
              pad_pending <= 1'b1;
              padpos      <= 8'd0;
              state       <= PERM_A;
            end else begin
              padpos <= {lane, 3'b000} + 8'(nb);
              state  <= PAD;
            end
            lane <= '0;
          end else if (lane == 5'd16) begin
            lane  <= '0;
            state <= PERM_A;
          end else begin
            lane <= lane + 5'd1;
          end
        end
        PERM_A: begin
          st  <= nx;
          rnd <= rnd + 5'd1;
          if (rnd == 5'd23) begin
            rnd   <= '0;
            state <= pad_pending ? PAD : ABSORB;
          end
        end
        PAD: begin
          st[padpos[7:3]][8*padpos[2:0] +: 8] <= st[padpos[7:3]][8*padpos[2:0] +: 8] ^ 8'h1F
                                                  ^ ((padpos == 8'd135) ? 8'h80 : 8'h00);
          if (padpos != 8'd135) st[16][63:56] <= st[16][63:56] ^ 8'h80;
          pad_pending <= 1'b0;
          state       <= PERM_S;
        end
        PERM_S: begin
          st  <= nx;
          rnd <= rnd + 5'd1;
          if (rnd == 5'd23) begin
            rnd   <= '0;
            lane  <= '0;
            state <= SQUEEZE;
          end
        end
        SQUEEZE: if (out_ready) begin
          if (lane == 5'd16) begin
            lane  <= '0;
            state <= PERM_S;
          end else begin
            lane <= lane + 5'd1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
