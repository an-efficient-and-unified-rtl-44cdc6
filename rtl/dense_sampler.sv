// dense_sampler: turns the SHAKE256 output stream into a dense bit string
// of nbits bits written to memory as 128-bit words (bit i of the string is
// bit i%128 of word base + i/128; bits past nbits in the last word are
// cleared). Two 64-bit stream lanes make one word, low lane first. It
// samples the dense polynomial h (nbits = p) and also stores the 512-bit
// digests theta and K, which the document's schedule draws as dense
// samplers too. Interface: start with nbits and base; done pulses after the
// last write, ceil(nbits/128) words at up to one lane per cycle.
module dense_sampler #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   nbits,
  input  logic [AW-1:0] base,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [63:0]   in_data,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [127:0]  wdata,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {IDLE, RUN, FIN} state_t;
  state_t        state;
  logic [15:0]   nb_q;
  logic [AW-1:0] base_q;
  logic [9:0]    wk, nwords;
  logic          half;
  logic [63:0]   lo;

  assign in_ready = (state == RUN);
  assign busy     = (state != IDLE);

  function automatic logic [127:0] low_mask(logic [7:0] n);
    logic [127:0] m;
    for (int b = 0; b < 128; b++) m[b] = (b < int'(n)) || (n == 8'd0);
    return m;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; nb_q <= '0; base_q <= '0; wk <= '0; nwords <= '0; half <= 1'b0; lo <= '0;
      we <= 1'b0; waddr <= '0; wdata <= '0; done <= 1'b0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          nb_q   <= nbits;
          base_q <= base;
          nwords <= 10'((32'(nbits) + 32'd127) >> 7);
          wk     <= '0;
          half   <= 1'b0;
          state  <= RUN;
        end
        RUN: if (in_valid) begin
          if (!half) begin
            lo   <= in_data;
            half <= 1'b1;
          end else begin
            half  <= 1'b0;
            we    <= 1'b1;
            waddr <= base_q + AW'(wk);
            wdata <= {in_data, lo} & ((wk == nwords - 10'd1) ? low_mask(nb_q[6:0]) : '1);
            wk    <= wk + 10'd1;
            if (wk == nwords - 10'd1) state <= FIN;
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
