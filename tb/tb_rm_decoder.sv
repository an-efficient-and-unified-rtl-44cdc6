// tb_rm_decoder: builds duplicated RM(1,7) codewords (m = 3 and 5) from the
// bit-level definition, flips a random number of bits well inside the
// correction radius (fewer than 32*m), feeds the m copies and checks the
// decoded byte and the latency of 15 cycles after the last copy.
module tb_rm_decoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, in_valid, busy, done;
  logic [2:0] mult;
  logic [127:0] in_word;
  logic [7:0] out_byte;
  int checks = 0, failures = 0;
  rm_decoder dut (.*);
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [127:0] cw [5];
    start = 0; in_valid = 0; in_word = 0; mult = 3;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 200; rep++) begin
      logic [7:0] m;
      int nflip, lat, mm;
      mm = (rep % 2) ? 5 : 3;
      m = (rep < 2) ? 8'(rep * 255) : 8'($urandom);
      for (int c = 0; c < mm; c++)
        for (int j = 0; j < 128; j++) begin
          logic b;
          b = m[7];
          for (int k = 0; k < 7; k++) b ^= m[k] & j[k];
          cw[c][j] = b;
        end
      nflip = (rep < 2) ? 0 : $urandom_range(mm * 20);
      for (int f = 0; f < nflip; f++) begin
        int c, j;
        c = $urandom_range(mm - 1); j = $urandom_range(127);
        cw[c][j] = ~cw[c][j];
      end
      mult = 3'(mm);
      start = 1; @(negedge clk); start = 0;
      for (int c = 0; c < mm; c++) begin in_valid = 1; in_word = cw[c]; @(negedge clk); end
      in_valid = 0;
      lat = 0;
      while (!done) begin @(negedge clk); lat++; end
      chk(out_byte == m, $sformatf("decode %02x got %02x (flips %0d)", m, out_byte, nflip));
      chk(lat == 14, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
