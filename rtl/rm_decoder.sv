// rm_decoder: maximum-likelihood decoder for the duplicated first-order
// Reed-Muller code (RM(1,7) repeated m = 3 or 5 times).
//
// 1. De-duplication: the m 128-bit copies arrive one per cycle and are
//    summed bit by bit into 128 small counters (0..m).
// 2. Fast Hadamard transform: seven butterfly stages, one per cycle, on
//    11-bit signed values; afterwards 64*m is subtracted from entry 0, which
//    makes the transform that of the +/-1 form of the word.
// 3. Peak search: a comparator tree of pairwise maxima of |value|, one tree
//    level per cycle, keeping the lower index on ties.
// The decoded byte is the peak index in bits 6:0 and, in bit 7, whether the
// peak value is positive.
// Interface: start with the multiplicity mult, then mult words on
// in_valid/in_word; done pulses with out_byte 14 cycles after the last
// copy (7 transform stages, 7 tree levels). One codeword at a time (busy while working).
module rm_decoder (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [2:0]   mult,
  input  logic         in_valid,
  input  logic [127:0] in_word,
  output logic         busy,
  output logic         done,
  output logic [7:0]   out_byte
);

  typedef logic signed [10:0] val_t;
  typedef enum logic [1:0] {IDLE, ACC, HAD, TREE} state_t;

  state_t     state;
  logic [2:0] mult_q, got;
  logic [2:0] cnt;
  val_t       v   [128];
  logic [6:0] idx [64];     // winners' indices after each tree level

  function automatic val_t absv(val_t a);
    return a[10] ? -a : a;
  endfunction

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; mult_q <= '0; got <= '0; cnt <= '0; done <= 1'b0;
      for (int i = 0; i < 128; i++) v[i] <= '0;
      for (int i = 0; i < 64; i++) idx[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          mult_q <= mult;
          got    <= '0;
          state  <= ACC;
          for (int i = 0; i < 128; i++) v[i] <= '0;
        end
        ACC: if (in_valid) begin
          for (int i = 0; i < 128; i++) v[i] <= v[i] + val_t'(in_word[i]);
          got <= got + 3'd1;
          if (got + 3'd1 == mult_q) begin
            state <= HAD;
            cnt   <= '0;
          end
        end
        HAD: begin
          // butterfly stage cnt: pairs (i, i + 2^cnt)
          for (int i = 0; i < 128; i++) begin
            int h;
            h = 1 << cnt;
            if ((i & h) == 0) begin
              v[i]     <= v[i] + v[i + h];
              v[i + h] <= v[i] - v[i + h];
            end
          end
          if (cnt == 3'd6) begin
            state <= TREE;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 3'd1;
          end
        end
        TREE: begin
          if (cnt == 3'd0) begin
            // first level also applies the constant correction to entry 0
            for (int i = 0; i < 64; i++) begin
              val_t a, b;
              a = (i == 0) ? v[0] - val_t'(64 * int'(mult_q)) : v[2*i];
              b = v[2*i+1];
              if (absv(b) > absv(a)) begin v[i] <= b; idx[i] <= 7'(2*i+1); end
              else                   begin v[i] <= a; idx[i] <= 7'(2*i); end
            end
          end else begin
            // levels 1..6 combine at most 32 pairs
            for (int i = 0; i < 32; i++) begin
              if (i < (64 >> cnt)) begin
                if (absv(v[2*i+1]) > absv(v[2*i])) begin v[i] <= v[2*i+1]; idx[i] <= idx[2*i+1]; end
                else                               begin v[i] <= v[2*i];   idx[i] <= idx[2*i];   end
              end
            end
          end
          if (cnt == 3'd6) begin
            state <= IDLE;
            done  <= 1'b1;
          end
          cnt <= cnt + 3'd1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Result of the last tree level is in v[0], idx[0].
  assign out_byte = {~v[0][10] && (v[0] != '0), idx[0]};

endmodule
