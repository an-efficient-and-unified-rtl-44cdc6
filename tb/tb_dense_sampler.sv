// tb_dense_sampler: checks that a stream of 64-bit lanes becomes a packed
// bit string in memory (two lanes per word, low lane first), that bits past
// nbits in the last word are cleared, that no word past the end is written,
// that whole words are consumed (two lanes per word, the unused part of
// the last lane is dropped), and that without stalls
// the sampler needs one cycle per lane plus a small fixed overhead. Sizes
// are the three p values and the 512-bit digests.
module tb_dense_sampler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int AW = 11;
  logic start, in_valid, in_ready, we, busy, done;
  logic [15:0] nbits;
  logic [AW-1:0] base, waddr;
  logic [63:0] in_data;
  logic [127:0] wdata;
  logic [127:0] mem [1024];
  int checks = 0, failures = 0;

  dense_sampler #(.AW(AW)) dut (.*);
  always_ff @(posedge clk) if (we) mem[waddr[9:0]] <= wdata;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes [5] = '{17669, 35851, 57637, 512, 128 * 3 + 1};
    logic [63:0] lanes [1000];
    int nb, nl, taken, cyc, stalls, ovh0, nwords;
    bit ok, stall_mode;
    start = 0; in_valid = 0; in_data = 0; nbits = 0; base = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 10; it++) begin
      nb = sizes[it % 5]; nwords = (nb + 127) / 128; nl = 2 * nwords;
      stall_mode = it >= 5;
      for (int i = 0; i < 1000; i++) mem[i] = {4{32'hA5A5_A5A5}};
      for (int i = 0; i < nl + 4; i++) lanes[i] = {$urandom, $urandom};
      @(negedge clk);
      nbits = 16'(nb); base = AW'(16); start = 1;
      @(negedge clk); start = 0;
      taken = 0; cyc = 1; stalls = 0;
      while (!done) begin
        in_valid = !stall_mode || ($urandom % 3 != 0);
        in_data  = lanes[taken];
        if (!in_valid) stalls++;
        @(posedge clk);
        if (in_valid && in_ready) taken++;
        @(negedge clk);
        cyc++;
      end
      in_valid = 0;
      @(negedge clk);
      chk(taken == nl, $sformatf("lanes consumed %0d expected %0d", taken, nl));
      ok = 1;
      for (int b = 0; b < nwords * 128; b++) begin
        logic bit_exp;
        bit_exp = (b < nb) ? lanes[b / 64][b % 64] : 1'b0;
        if (mem[16 + b / 128][b % 128] !== bit_exp) ok = 0;
      end
      chk(ok, $sformatf("bit string of %0d bits", nb));
      chk(mem[16 + nwords] == {4{32'hA5A5_A5A5}} && mem[15] == {4{32'hA5A5_A5A5}}, "no write outside");
      if (!stall_mode) begin
        if (it == 0) ovh0 = cyc - nl;
        chk(ovh0 >= 0 && ovh0 <= 4, $sformatf("overhead %0d", ovh0));
        chk(cyc - nl == ovh0, $sformatf("cycles %0d for %0d lanes", cyc, nl));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
