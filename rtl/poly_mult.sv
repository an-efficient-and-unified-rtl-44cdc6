// poly_mult: sparse-by-dense polynomial multiplier in R = F2[x]/(x^p - 1).
//
// Shift-and-add: the product is the XOR, over the w indices s of the sparse
// operand, of the dense operand rotated by s positions. L indices are
// processed together, each by its own read port into the dense operand
// memory, and the L rotated words are XOR-ed into one word of the
// accumulator per cycle, through a single accumulator read port and write
// port. The reduction mod x^p - 1 is done on the fly: word k of
// rot(a, s) holds bits a[(x0 + 128k + b) mod p] with x0 = (p - s) mod p, so
// each lane reads the dense operand as a cyclic bit stream starting at bit
// x0, wrapping from the partial last word (p mod 128 valid bits) to word 0.
// A lane keeps a 640-bit realignment buffer: each cycle it appends the word
// it read at the current fill level (the barrel shift) and, once four words
// are buffered, hands out 128 bits. Indices beyond the weight (when L does
// not divide w) are masked out. The last result word is masked to p mod 128
// bits. The first group writes the accumulator without reading it, so it
// need not be cleared.
//
// Memory ports (synchronous read, data one cycle after the address):
// d_addr[L] into the dense memory (word addresses d_base + j), s_addr into
// the sparse memory (eight 16-bit indices per word, index i in bits
// [16*(i%8) +: 16] of word s_base + i/8), a_raddr/a_waddr into the
// accumulator (a_base + k). Timing: ceil(w/L) * (words + 7) + 1 cycles from
// start to done; the document's figure is w * words / L.
module poly_mult
  import hqc_pkg::*;
#(
  parameter int unsigned L  = 4,
  parameter int unsigned AW = 11
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  sec_t            sec,
  input  logic [7:0]      nidx,
  input  logic [AW-1:0]   d_base,
  input  logic [AW-1:0]   s_base,
  input  logic [AW-1:0]   a_base,
  output logic            busy,
  output logic            done,
  output logic [AW-1:0]   d_addr  [L],
  input  logic [B-1:0]    d_rdata [L],
  output logic [AW-1:0]   s_addr,
  input  logic [B-1:0]    s_rdata,
  output logic [AW-1:0]   a_raddr,
  input  logic [B-1:0]    a_rdata,
  output logic            a_we,
  output logic [AW-1:0]   a_waddr,
  output logic [B-1:0]    a_wdata
);

  localparam int BW = 5 * B;

  typedef enum logic [2:0] {IDLE, SREAD, SWAIT, RUN, FIN} state_t;
  state_t      state;
  params_t     prm;
  sec_t        sec_q;
  logic [7:0]  nidx_q;
  logic [7:0]  g;           // first index of the current group
  logic [10:0] t;           // cycle within the group
  logic        first_grp;
  logic        vld   [L];
  logic [9:0]  ptr   [L];
  logic [6:0]  off   [L];
  logic [9:0]  rd_w  [L];   // word index of the read returning this cycle
  logic [BW-1:0] buff [L];
  logic [9:0]  cnt   [L];
  logic [AW-1:0] d_base_q, s_base_q, a_base_q;

  assign prm  = get_params(sec_q);
  assign busy = (state != IDLE);

  wire [9:0]  last_w = prm.words - 10'd1;
  wire [7:0]  rbits  = 8'(prm.p - {last_w, 7'd0});   // 1..128 valid bits in the last word
  wire        emit   = (state == RUN) && (t >= 11'd5) && (t < 11'(prm.words) + 11'd5);
  wire [9:0]  k_out  = 10'(t - 11'd5);

  function automatic logic [B-1:0] low_mask(logic [7:0] n);
    logic [B-1:0] m;
    for (int b = 0; b < B; b++) m[b] = (b < int'(n));
    return m;
  endfunction

  // Per-lane start position x0 = (p - s) mod p.
  function automatic logic [15:0] start_bit(logic [15:0] s, logic [15:0] p);
    return (s == 16'd0) ? 16'd0 : (p - s);
  endfunction

  // Read addresses: word t of the cyclic stream for each lane.
  always_comb
    for (int q = 0; q < L; q++) d_addr[q] = d_base_q + AW'(ptr[q]);

  assign s_addr  = s_base_q + AW'(g >> 3);
  assign a_raddr = a_base_q + AW'(t - 11'd4);

  // XOR of the lanes' output words
  logic [B-1:0] sum;
  always_comb begin
    sum = '0;
    for (int q = 0; q < L; q++) if (vld[q]) sum ^= buff[q][B-1:0];
    if (k_out == last_w) sum &= low_mask(rbits);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; sec_q <= HQC128; nidx_q <= '0; g <= '0; t <= '0; first_grp <= 1'b0;
      d_base_q <= '0; s_base_q <= '0; a_base_q <= '0; done <= 1'b0;
      a_we <= 1'b0; a_waddr <= '0; a_wdata <= '0;
      for (int q = 0; q < L; q++) begin
        vld[q] <= 1'b0; ptr[q] <= '0; off[q] <= '0; rd_w[q] <= '0;
        buff[q] <= '0; cnt[q] <= '0;
      end
    end else begin
      done <= 1'b0;
      a_we <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          sec_q    <= sec;
          nidx_q   <= nidx;
          d_base_q <= d_base;
          s_base_q <= s_base;
          a_base_q <= a_base;
          g        <= '0;
          first_grp <= 1'b1;
          state    <= SREAD;
        end
        SREAD: state <= SWAIT;   // s_addr presented, data next cycle
        SWAIT: begin
          for (int q = 0; q < L; q++) begin
            logic [15:0] s, x0;
            int lanei;
            lanei = (int'(g) + q) % 8;
            s  = s_rdata[16*lanei +: 16];
            x0 = start_bit(s, prm.p);

            vld[q]  <= (int'(g) + q) < int'(nidx_q);
            ptr[q]  <= x0[15:7];
            off[q]  <= x0[6:0];
            rd_w[q] <= x0[15:7];
            buff[q] <= '0;
            cnt[q]  <= '0;
          end
          t     <= '0;
          state <= RUN;
        end
        RUN: begin
          for (int q = 0; q < L; q++) begin
            // next read pointer (cyclic over the dense operand words)
            ptr[q] <= (ptr[q] == last_w) ? 10'd0 : ptr[q] + 10'd1;
            if (t >= 11'd1) begin
              logic [B-1:0]  dat;
              logic [7:0]    nv;
              logic [9:0]    c0;
              logic [BW-1:0] base;
              dat = d_rdata[q];
              nv  = (rd_w[q] == last_w) ? rbits : 8'd128;
              dat = dat & low_mask(nv);
              if (t == 11'd1) begin
                dat = dat >> off[q];
                nv  = nv - {1'b0, off[q]};
              end
              base = emit ? (buff[q] >> B) : buff[q];
              c0   = emit ? (cnt[q] - 10'd128) : cnt[q];
              buff[q] <= base | (BW'(dat) << c0);
              cnt[q]  <= c0 + 10'(nv);
              rd_w[q] <= (rd_w[q] == last_w) ? 10'd0 : rd_w[q] + 10'd1;
            end
          end
          if (emit) begin
            a_we    <= 1'b1;
            a_waddr <= a_base_q + AW'(k_out);
            a_wdata <= (first_grp ? '0 : a_rdata) ^ sum;
          end
          t <= t + 11'd1;
          if (t == 11'(prm.words) + 11'd4) begin
            first_grp <= 1'b0;
            if (int'(g) + int'(L) >= int'(nidx_q)) state <= FIN;
            else begin
              g     <= g + 8'(L);
              state <= SREAD;
            end
          end
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
