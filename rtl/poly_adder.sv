// poly_adder: polynomial addition in R = F2[x]/(x^p - 1).
//
// Two modes, chosen by flip:
//  * dense + dense (flip = 0): n words are read from region A (and region B
//    when use_b is set) and dst[k] = A[k] ^ B[k] (or a copy of A[k]) is
//    written; one word per cycle, done n + 4 cycles after start.
//  * sparse + dense (flip = 1): for each of the n 16-bit indices of the
//    sparse operand (read through port B from b_base), the dense word at
//    dst_base + index[15:7] is read through port A, bit index[6:0] is
//    inverted and the word written back. Two consecutive indices may hit the
//    same word (a read-after-write dependence), so, as in the document, the
//    indices are handled strictly one after another: 3 cycles per index.
// Ports A and B are synchronous read ports (data one cycle after the
// address); the write port is registered. done pulses after the last write.
module poly_adder #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          flip,
  input  logic          use_b,
  input  logic [AW-1:0] a_base,
  input  logic [AW-1:0] b_base,
  input  logic [AW-1:0] dst_base,
  input  logic [9:0]    n,
  output logic [AW-1:0] ra_addr,
  input  logic [127:0]  ra_data,
  output logic [AW-1:0] rb_addr,
  input  logic [127:0]  rb_data,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [127:0]  wdata,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {IDLE, XRUN, FRD, FIDX, FWR, FIN} state_t;
  state_t        state;
  logic          use_b_q;
  logic [AW-1:0] a_q, b_q, d_q;
  logic [9:0]    n_q, k;
  logic          pend;        // a dense+dense read is returning
  logic [9:0]    pk;          // word index of that read
  logic [15:0]   idx;

  assign busy = (state != IDLE);

  always_comb begin
    ra_addr = a_q + AW'(k);
    rb_addr = b_q + AW'(k);
    if (state == FRD)  rb_addr = b_q + AW'(k >> 3);
    if (state == FIDX) ra_addr = d_q + AW'(rb_data[16*k[2:0] + 7 +: 9]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; use_b_q <= 1'b0; a_q <= '0; b_q <= '0; d_q <= '0; n_q <= '0; k <= '0;
      pend <= 1'b0; pk <= '0; idx <= '0; we <= 1'b0; waddr <= '0; wdata <= '0; done <= 1'b0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          use_b_q <= use_b; a_q <= a_base; b_q <= b_base; d_q <= dst_base; n_q <= n; k <= '0;
          pend    <= 1'b0;
          state   <= (n == '0) ? FIN : (flip ? FRD : XRUN);
        end
        XRUN: begin
          pend <= (k < n_q);
          pk   <= k;
          if (k < n_q) k <= k + 10'd1;
          if (pend) begin
            we    <= 1'b1;
            waddr <= d_q + AW'(pk);
            wdata <= ra_data ^ (use_b_q ? rb_data : '0);
          end
          if (!(k < n_q) && !pend) state <= FIN;
        end
        FRD:  state <= FIDX;
        FIDX: begin
          idx   <= rb_data[16*k[2:0] +: 16];
          state <= FWR;
        end
        FWR: begin
          we    <= 1'b1;
          waddr <= d_q + AW'(idx[15:7]);
          wdata <= ra_data ^ (128'd1 << idx[6:0]);
          k     <= k + 10'd1;
          state <= (k + 10'd1 == n_q) ? FIN : FRD;
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
