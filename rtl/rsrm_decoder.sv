// rsrm_decoder: concatenated decoder, duplicated Reed-Muller first, then
// Reed-Solomon.
//
// For i = n_e-1 down to 0 it reads the m copies of RM block i (words
// cw_base + i*m ..), lets the RM decoder recover symbol r_i and passes it to
// the unified RS decoder (which wants the highest degree first). The RS
// decoder needs the whole word, so the two stages cannot overlap, as the
// document points out. Finally the k_e message bytes are written to memory
// at msg_base, sixteen bytes per word (unused bytes zero), and fail tells
// whether the RS decoder found the word uncorrectable.
// Interface: start with sec and bases; done pulses after the last write,
// with fail valid. Timing: n_e * (m + 17) cycles for the RM stage, then
// 2t + n_e + 3 for the RS stage and 2 word writes.
module rsrm_decoder
  import hqc_pkg::*;
#(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  sec_t          sec,
  input  logic [AW-1:0] cw_base,
  input  logic [AW-1:0] msg_base,
  output logic [AW-1:0] rd_addr,
  input  logic [127:0]  rd_data,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [127:0]  wdata,
  output logic          busy,
  output logic          done,
  output logic          fail
);

  typedef enum logic [2:0] {IDLE, RMS, RDW, RMW, RSW, WRM, FIN} state_t;
  state_t        state;
  sec_t          sec_q;
  params_t       prm;
  logic [AW-1:0] cb_q, mb_q;
  logic [6:0]    bi;
  logic [2:0]    c;
  logic          rdv;      // a copy is returning from memory this cycle
  logic [1:0]    wk;

  assign prm     = get_params(sec_q);
  assign busy    = (state != IDLE);
  assign rd_addr = cb_q + AW'(int'(bi) * int'(prm.rm_mult) + int'(c));

  logic       rm_busy, rm_done;
  logic [7:0] rm_byte;
  rm_decoder u_rm (
    .clk, .rst_n, .start(state == RMS), .mult(prm.rm_mult), .in_valid(rdv), .in_word(rd_data),
    .busy(rm_busy), .done(rm_done), .out_byte(rm_byte)
  );

  logic       rs_done, rs_fail;
  logic [7:0] rs_msg [KE_MAX];
  rs_decoder u_rs (
    .clk, .rst_n, .start(state == IDLE && start), .sec, .in_valid(state == RMW && rm_done),
    .in_sym(rm_byte), .done(rs_done), .fail(rs_fail), .msg(rs_msg)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; sec_q <= HQC128; cb_q <= '0; mb_q <= '0; bi <= '0; c <= '0; rdv <= 1'b0; wk <= '0;
      we <= 1'b0; waddr <= '0; wdata <= '0; done <= 1'b0; fail <= 1'b0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      rdv  <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          sec_q <= sec; cb_q <= cw_base; mb_q <= msg_base;
          bi    <= get_params(sec).ne - 7'd1;
          state <= RMS;
        end
        RMS: begin             // start the RM decoder for block bi
          c     <= '0;
          state <= RDW;
        end
        RDW: begin             // issue the m reads
          rdv <= 1'b1;
          c   <= c + 3'd1;
          if (c + 3'd1 == prm.rm_mult) state <= RMW;
        end
        RMW: if (rm_done) begin
          c <= '0;
          if (bi == 7'd0) state <= RSW;
          else begin
            bi    <= bi - 7'd1;
            state <= RMS;
          end
        end
        RSW: if (rs_done) begin
          fail  <= rs_fail;
          wk    <= '0;
          state <= WRM;
        end
        WRM: begin
          we    <= 1'b1;
          waddr <= mb_q + AW'(wk);
          for (int q = 0; q < 16; q++) begin
            int k;
            k = 16 * int'(wk) + q;
            wdata[8*q +: 8] <= (k < KE_MAX) ? rs_msg[k] : 8'h00;
          end
          wk <= wk + 2'd1;
          if (wk == 2'd1) state <= FIN;
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
