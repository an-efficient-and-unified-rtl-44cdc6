// mem_compare: compares two regions of 128-bit words, read one word pair
// per cycle through two memory read ports, and reports whether any word
// differs. In decapsulation it checks the re-encrypted ciphertext against
// the received one; it always reads all n words (constant time).
// Interface: start with the two base addresses and the count n; done
// pulses n + 2 cycles later with differ valid (held until the next start).
module mem_compare #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base_a,
  input  logic [AW-1:0] base_b,
  input  logic [AW-1:0] n,
  output logic [AW-1:0] addr_a,
  output logic [AW-1:0] addr_b,
  input  logic [127:0]  rdata_a,
  input  logic [127:0]  rdata_b,
  output logic          busy,
  output logic          done,
  output logic          differ
);
  logic [AW-1:0] i, n_q, ba, bb;
  logic          run, chk_v, last_v;

  assign addr_a = ba + i;
  assign addr_b = bb + i;
  assign busy   = run || chk_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i <= '0; n_q <= '0; ba <= '0; bb <= '0; run <= 1'b0; chk_v <= 1'b0; last_v <= 1'b0;
      done <= 1'b0; differ <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        ba <= base_a; bb <= base_b; n_q <= n; i <= '0;
        run <= (n != '0); differ <= 1'b0; chk_v <= 1'b0; last_v <= 1'b0;
        if (n == '0) done <= 1'b1;
      end else begin
        chk_v  <= run;
        last_v <= run && (i == n_q - 1'b1);
        if (run) begin
          if (i == n_q - 1'b1) run <= 1'b0;
          i <= i + 1'b1;
        end
        if (chk_v && (rdata_a != rdata_b)) differ <= 1'b1;
        if (last_v) done <= 1'b1;
      end
    end
  end
endmodule
