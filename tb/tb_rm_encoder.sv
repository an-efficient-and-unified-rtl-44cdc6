// tb_rm_encoder: encodes all 256 bytes and compares every codeword bit
// with the RM(1,7) definition bit_j = m7 ^ XOR_k (m_k & j_k), evaluated
// here bit by bit; checks the one-cycle latency.
module tb_rm_encoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [7:0] in_byte;
  logic [127:0] out_cw;
  int checks = 0, failures = 0;
  rm_encoder dut (.*);
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; in_byte = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int m = 0; m < 256; m++) begin
      logic [127:0] exp;
      for (int j = 0; j < 128; j++) begin
        logic b;
        b = m[7];
        for (int k = 0; k < 7; k++) b ^= m[k] & j[k];
        exp[j] = b;
      end
      in_valid = 1; in_byte = 8'(m);
      @(negedge clk);
      in_valid = 0;
      chk(out_valid, "valid after one cycle");
      chk(out_cw == exp, $sformatf("codeword of %02x", m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
