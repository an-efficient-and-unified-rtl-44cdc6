// rsrm_encoder: concatenated Reed-Solomon / duplicated Reed-Muller encoder.
//
// Reads the k_e message bytes from memory (byte j at bits [8*(j%16) +: 8]
// of word msg_base + j/16), highest index first, and feeds them to the
// unified RS encoder. Every RS output symbol c_i (message symbols first,
// then parity, i from n_e-1 down to 0) is expanded by the RM(1,7) encoder
// into a 128-bit codeword, which is written m times (m = 3 or 5) as words
// cw_base + i*m .. cw_base + i*m + m-1. The result is the n_e * 128 * m-bit
// codeword of the concatenated code in the layout the ciphertext uses.
// The two stages work byte by byte, as the document notes for the encoder.
// Interface: start with sec and the two base addresses; done pulses after
// the last write. Timing: about (3 + m) cycles per message symbol and
// (2 + m) per parity symbol.
module rsrm_encoder
  import hqc_pkg::*;
#(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  sec_t          sec,
  input  logic [AW-1:0] msg_base,
  input  logic [AW-1:0] cw_base,
  output logic [AW-1:0] rd_addr,
  input  logic [127:0]  rd_data,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [127:0]  wdata,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {IDLE, MRD, MWT, SEND, RME, WR, PAR, FIN} state_t;
  state_t        state;
  sec_t          sec_q;
  params_t       prm;
  logic [AW-1:0] mb_q, cb_q;
  logic [5:0]    j;        // message byte index
  logic [6:0]    bi;       // RS symbol index of the block being written
  logic [2:0]    c;        // copy counter
  logic [7:0]    byte_q, sym_q;
  logic          msg_phase;

  assign prm  = get_params(sec_q);
  assign busy = (state != IDLE);
  assign rd_addr = mb_q + AW'(j >> 4);

  // RS encoder
  logic       rs_start, rs_in_valid, rs_in_ready, rs_out_valid, rs_out_ready, rs_last, rs_busy;
  logic [7:0] rs_out;
  assign rs_start     = (state == IDLE) && start;
  assign rs_in_valid  = (state == SEND);
  assign rs_out_ready = (state == SEND) || (state == PAR);

  rs_encoder u_rs (
    .clk, .rst_n, .start(rs_start), .sec, .in_valid(rs_in_valid), .in_ready(rs_in_ready),
    .in_sym(byte_q), .out_valid(rs_out_valid), .out_ready(rs_out_ready), .out_sym(rs_out),
    .out_last(rs_last), .busy(rs_busy)
  );

  // RM encoder
  logic         rm_valid;
  logic [127:0] rm_cw;
  rm_encoder u_rm (
    .clk, .rst_n, .in_valid(state == RME), .in_byte(sym_q), .out_valid(rm_valid), .out_cw(rm_cw)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; sec_q <= HQC128; mb_q <= '0; cb_q <= '0; j <= '0; bi <= '0; c <= '0;
      byte_q <= '0; sym_q <= '0; msg_phase <= 1'b0; we <= 1'b0; waddr <= '0; wdata <= '0; done <= 1'b0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          sec_q <= sec; mb_q <= msg_base; cb_q <= cw_base;
          j     <= get_params(sec).ke - 6'd1;
          bi    <= get_params(sec).ne - 7'd1;
          msg_phase <= 1'b1;
          state <= MRD;
        end
        MRD: state <= MWT;
        MWT: begin
          byte_q <= rd_data[8*j[3:0] +: 8];
          state  <= SEND;
        end
        SEND: if (rs_in_ready) begin   // message symbol passes straight through
          sym_q <= rs_out;
          state <= RME;
        end
        PAR: if (rs_out_valid) begin
          sym_q <= rs_out;
          state <= RME;
        end
        RME: begin
          c     <= '0;
          state <= WR;
        end
        WR: begin
          we    <= 1'b1;
          waddr <= cb_q + AW'(int'(bi) * int'(prm.rm_mult) + int'(c));
          wdata <= rm_cw;
          c     <= c + 3'd1;
          if (c + 3'd1 == prm.rm_mult) begin
            bi <= bi - 7'd1;
            if (bi == 7'd0) begin
              state <= FIN;
            end else if (msg_phase && j != 6'd0) begin
              j     <= j - 6'd1;
              state <= MRD;
            end else begin
              msg_phase <= 1'b0;
              state     <= PAR;
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
