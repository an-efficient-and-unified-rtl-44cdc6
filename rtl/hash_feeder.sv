// hash_feeder: streams the concatenation of up to four byte strings held in
// memory, followed by a one-byte domain separator, into the SHAKE256 absorb
// port. It is how the controller realises CSPRNG(seed) (separator 0x02),
// HASH-G (0x03) and HASH-K (0x04) on the shared SHAKE unit.
//
// Segment i is seg_bytes[i] bytes starting at byte 0 of word seg_base[i]
// of memory seg_mem[i] (byte j of a 128-bit word is bits [8j +: 8]). The
// feeder reads each word once through a single read port, whose memory is
// selected by cur_mem, and packs bytes into 64-bit lanes, one byte per
// cycle, stalling while SHAKE is not ready. The last lane carries
// in_last and its byte count. done pulses when it has been accepted.
module hash_feeder #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [2:0]    nseg,
  input  logic [2:0]    seg_mem   [4],
  input  logic [AW-1:0] seg_base  [4],
  input  logic [15:0]   seg_bytes [4],
  input  logic [7:0]    domain,
  output logic [2:0]    cur_mem,
  output logic [AW-1:0] rd_addr,
  input  logic [127:0]  rd_data,
  output logic          sh_valid,
  input  logic          sh_ready,
  output logic [63:0]   sh_data,
  output logic [3:0]    sh_bytes,
  output logic          sh_last,
  output logic          busy,
  output logic          done
);

  typedef enum logic [3:0] {IDLE, NEXT, RD, WT, EMIT, PUSH, DOM, FINAL, FIN} state_t;
  state_t        state, ret;
  logic [2:0]    nseg_q, s;
  logic [2:0]    mem_q   [4];
  logic [AW-1:0] base_q  [4];
  logic [15:0]   len_q   [4];
  logic [7:0]    dom_q;
  logic [15:0]   b;
  logic [127:0]  word;
  logic [63:0]   pbuf;
  logic [3:0]    pc;

  assign cur_mem  = mem_q[s[1:0]];
  assign rd_addr  = base_q[s[1:0]] + AW'(b >> 4);
  assign busy     = (state != IDLE);
  assign sh_valid = (state == PUSH) || (state == FINAL);
  assign sh_data  = pbuf;
  assign sh_bytes = pc;
  assign sh_last  = (state == FINAL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; ret <= IDLE; nseg_q <= '0; s <= '0; dom_q <= '0; b <= '0; word <= '0;
      pbuf <= '0; pc <= '0; done <= 1'b0;
      for (int i = 0; i < 4; i++) begin mem_q[i] <= '0; base_q[i] <= '0; len_q[i] <= '0; end
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          nseg_q <= nseg; mem_q <= seg_mem; base_q <= seg_base; len_q <= seg_bytes; dom_q <= domain;
          s <= '0; b <= '0; pbuf <= '0; pc <= '0;
          state <= NEXT;
        end
        NEXT: begin   // at the start of segment s (b = 0)
          if (s == nseg_q)              state <= DOM;
          else if (len_q[s[1:0]] == 0)  s <= s + 3'd1;
          else                          state <= RD;
        end
        RD: state <= WT;
        WT: begin
          word  <= rd_data;
          state <= EMIT;
        end
        EMIT: begin
          state_t nx;
          pbuf[8*pc[2:0] +: 8] <= word[8*b[3:0] +: 8];
          pc <= pc + 4'd1;
          b  <= b + 16'd1;
          if (b + 16'd1 == len_q[s[1:0]]) begin
            nx = NEXT;
            s  <= s + 3'd1;
            b  <= '0;
          end else if (b[3:0] == 4'hF) begin
            nx = RD;
          end else begin
            nx = EMIT;
          end
          if (pc == 4'd7) begin
            state <= PUSH;
            ret   <= nx;
          end else begin
            state <= nx;
          end
        end
        PUSH: if (sh_ready) begin
          pc    <= '0;
          pbuf  <= '0;
          state <= ret;
        end
        DOM: begin
          pbuf[8*pc[2:0] +: 8] <= dom_q;
          pc    <= pc + 4'd1;
          state <= FINAL;
        end
        FINAL: if (sh_ready) state <= FIN;
        FIN: begin
          state <= IDLE;
          done  <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
