// rm_encoder: first-order Reed-Muller RM(1,7) [128, 8, 64] encoder.
//
// Codeword bit j (0..127) of message byte m is
//   m[7] ^ (m[0] & j[0]) ^ (m[1] & j[1]) ^ ... ^ (m[6] & j[6]),
// the HQC generator matrix. Following the document's optimisation, the
// product is built as four 32-bit words: one word from the rows for j[4:0]
// and the constant row, and the other three words by XOR-ing that word
// with the all-ones rows selected by m[5] and m[6], so only 32-bit
// selections and XOR banks are needed. The duplication into m copies is done
// by the caller (rsrm_encoder), which writes the word m times.
// Timing: one byte per cycle, codeword registered one cycle after in_valid.
module rm_encoder (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [7:0]   in_byte,
  output logic         out_valid,
  output logic [127:0] out_cw
);

  logic [31:0] w0, w1, w2, w3;
  always_comb begin
    w0 = {32{in_byte[7]}}
       ^ ({32{in_byte[0]}} & 32'hAAAAAAAA)
       ^ ({32{in_byte[1]}} & 32'hCCCCCCCC)
       ^ ({32{in_byte[2]}} & 32'hF0F0F0F0)
       ^ ({32{in_byte[3]}} & 32'hFF00FF00)
       ^ ({32{in_byte[4]}} & 32'hFFFF0000);
    w1 = w0 ^ {32{in_byte[5]}};
    w2 = w0 ^ {32{in_byte[6]}};
    w3 = w1 ^ {32{in_byte[6]}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cw    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_cw <= {w3, w2, w1, w0};
    end
  end

endmodule
