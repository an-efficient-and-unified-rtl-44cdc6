// tb_shake256: checks the SHAKE256 core against published-reference output
// values for five messages (empty, "abc", 0..135, 0..199, 135 x 0x5A),
// covering a message ending exactly on a block boundary, one spanning two
// blocks and padding in the last byte of the block. For each, squeezed
// bytes 0..31 and 136..143 (after the second permutation) are compared,
// and the squeeze latency of a one-block message is checked (1 pad cycle
// plus 24 rounds).
module tb_shake256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, in_valid, in_ready, in_last, out_valid, out_ready;
  logic [63:0] in_data, out_data;
  logic [3:0] in_bytes;
  int checks = 0, failures = 0;
  shake256 dut (.*);
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected: 32 bytes from offset 0, then 8 bytes from offset 136
  logic [255:0] exp_a [5] = '{
    256'h46b9dd2b0ba88d13233b3feb743eeb243fcd52ea62b81b82b50c27646ed5762f,
    256'h483366601360a8771c6863080cc4114d8db44530f8f1e1ee4f94ea37e78b5739,
    256'hb7ff4073b3f5a8eabd6e17705ca7f6761a31058f9df781a6a47e3a3063b9d67a,
    256'h4ee1ca03272b05d3bfb1e1c79a967f823b9fc5e4bb3987b1ba9e9cb5afb07a5e,
    256'hf4b5e56a7f1ca41de8b337f7534afe2050d0c5ffa2308458828e7a033bff65d3};
  logic [63:0] exp_b [5] = '{64'h943b6aec468a2d62, 64'hcf0ea610eeff1a58, 64'hbe06d83195c8892a,
                             64'h4a80fa3692d02a03, 64'hef3a3818ce860ab5};
  int lens [5] = '{0, 3, 136, 200, 135};

  function automatic logic [7:0] msg_byte(int t, int i);
    case (t)
      1: return (i == 0) ? 8'h61 : (i == 1) ? 8'h62 : 8'h63;
      2, 3: return 8'(i);
      default: return 8'h5A;
    endcase
  endfunction

  initial begin
    start = 0; in_valid = 0; in_last = 0; in_data = 0; in_bytes = 0; out_ready = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      int n, i, lat;
      logic [7:0] got [144];
      n = lens[t];
      start = 1; @(negedge clk); start = 0;
      i = 0;
      do begin
        int nb;
        nb = (n - i > 8) ? 8 : n - i;
        in_data = '0;
        for (int k = 0; k < nb; k++) in_data[8*k +: 8] = msg_byte(t, i + k);
        in_bytes = 4'(nb);
        in_last = (i + nb >= n);
        in_valid = 1;
        @(posedge clk); while (!in_ready) @(posedge clk);
        @(negedge clk);
        i += 8;
      end while (i < n);
      in_valid = 0; in_last = 0;
      lat = 0;
      while (!out_valid) begin @(negedge clk); lat++; end
      if (n < 136) chk(lat == 25, $sformatf("squeeze latency %0d", lat));
      out_ready = 1;
      for (int w = 0; w < 18; w++) begin
        while (!out_valid) @(negedge clk);
        for (int k = 0; k < 8; k++) got[8*w + k] = out_data[8*k +: 8];
        @(negedge clk);
      end
      out_ready = 0;
      for (int k = 0; k < 32; k++) chk(got[k] == exp_a[t][255 - 8*k -: 8], $sformatf("msg %0d byte %0d", t, k));
      for (int k = 0; k < 8; k++) chk(got[136 + k] == exp_b[t][63 - 8*k -: 8], $sformatf("msg %0d byte %0d", t, 136 + k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
