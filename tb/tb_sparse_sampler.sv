// tb_sparse_sampler: checks the fixed-weight sampler for all three sets and
// all weights used (w, w_r). Random 32-bit values are supplied with random
// stalls; a reference model applies the same constant-time algorithm
// (s_i = i + r_i mod (p - i), then the backward fix-up replacing repeated
// positions by i). The written index list must match the model, contain w
// distinct positions below p, leave unused slots zero, and the sampler must
// take exactly w values. The time from start to done, less stall cycles,
// must equal the documented w + 32 + (w - 1) + ceil(w/8) plus a small fixed
// overhead.
module tb_sparse_sampler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int AW = 11;
  logic start, rnd_valid, rnd_ready, we, busy, done;
  logic [15:0] p;
  logic [7:0] weight;
  logic [AW-1:0] base, waddr;
  logic [31:0] rnd_data;
  logic [127:0] wdata;
  logic [127:0] mem [64];
  int checks = 0, failures = 0;

  sparse_sampler #(.AW(AW)) dut (.*);
  always_ff @(posedge clk) if (we) mem[waddr[5:0]] <= wdata;

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
    int pp [3] = '{17669, 35851, 57637};
    int ww [6] = '{66, 75, 100, 114, 131, 149};
    logic [31:0] r [150];
    int s [150];
    int taken, cyc, stalls, w, pv, base_v, ovh0;
    bit ok;
    start = 0; rnd_valid = 0; rnd_data = 0; p = 0; weight = 0; base = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 18; it++) begin
      pv = pp[(it % 6) / 2]; w = ww[it % 6]; base_v = 8 * (it % 3);
      for (int i = 0; i < 64; i++) mem[i] = '0;
      for (int i = 0; i < w; i++) begin
        r[i] = $urandom;
        if (it % 4 == 3) r[i] = $urandom % 8;   // small values: many collisions
      end
      // model
      for (int i = 0; i < w; i++) s[i] = i + int'(r[i] % 32'(pv - i));
      for (int i = w - 2; i >= 0; i--)
        for (int j = i + 1; j < w; j++) if (s[j] == s[i]) begin s[i] = i; break; end
      @(negedge clk);
      p = 16'(pv); weight = 8'(w); base = AW'(base_v); start = 1;
      @(negedge clk); start = 0;
      taken = 0; cyc = 1; stalls = 0;
      while (!done) begin
        rnd_valid = (taken < w + 5) && ($urandom % 3 != 0);
        rnd_data  = (taken < w) ? r[taken] : 32'hDEAD_BEEF;
        if (!rnd_valid && taken < w) stalls++;
        @(posedge clk);
        if (rnd_valid && rnd_ready) taken++;
        @(negedge clk);
        cyc++;
      end
      rnd_valid = 0;
      chk(taken == w, $sformatf("consumed %0d values for w=%0d", taken, w));
      ok = 1;
      for (int i = 0; i < w; i++) if (int'(mem[base_v + i / 8][16 * (i % 8) +: 16]) != s[i]) ok = 0;
      chk(ok, $sformatf("index list matches model (p=%0d w=%0d)", pv, w));
      ok = 1;
      for (int i = 0; i < w; i++) begin
        if (s[i] >= pv) ok = 0;
        for (int j = 0; j < i; j++) if (s[i] == s[j]) ok = 0;
      end
      chk(ok, "positions distinct and below p");
      ok = 1;
      for (int i = w; i < 8 * ((w + 7) / 8); i++) if (mem[base_v + i / 8][16 * (i % 8) +: 16] != 0) ok = 0;
      chk(ok, "unused slots zero");
      if (it == 0) ovh0 = (cyc - stalls) - (w + 32 + w - 1 + (w + 7) / 8);
      chk(ovh0 >= 0 && ovh0 <= 6, $sformatf("fixed overhead %0d", ovh0));
      chk((cyc - stalls) - (w + 32 + w - 1 + (w + 7) / 8) == ovh0,
          $sformatf("cycle count %0d (stalls %0d) for w=%0d", cyc, stalls, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
