// tb_poly_mult: checks the sparse-by-dense multiplier for all three
// parameter sets against a bit-level model of the cyclic product
// c_i = XOR_{j + s = i mod p} a_j, using random dense operands and random
// sparse index sets (weights w and w_r, so L both divides and does not
// divide the weight, and index 0 is included). The memories are modelled
// here with one-cycle read latency. It also checks the cycle count
// ceil(w/L) * (words + 7) + 2 from the start pulse to done.
module tb_poly_mult;
  import hqc_pkg::*;
  localparam int L = 4;
  localparam int AW = 11;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, a_we;
  sec_t sec;
  logic [7:0] nidx;
  logic [AW-1:0] d_base, s_base, a_base, s_addr, a_raddr, a_waddr;
  logic [AW-1:0] d_addr [L];
  logic [B-1:0]  d_rdata [L];
  logic [B-1:0]  s_rdata, a_rdata, a_wdata;
  int checks = 0, failures = 0;

  logic [B-1:0] dmem [2048];
  logic [B-1:0] smem [64];
  logic [B-1:0] amem [1024];
  always_ff @(posedge clk) begin
    for (int q = 0; q < L; q++) d_rdata[q] <= dmem[d_addr[q]];
    s_rdata <= smem[s_addr[5:0]];
    a_rdata <= amem[a_raddr[9:0]];
    if (a_we) amem[a_waddr[9:0]] <= a_wdata;
  end

  poly_mult #(.L(L), .AW(AW)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit a [57637];
  bit c [57637];
  int sp [160];
  initial begin
    start = 0; sec = HQC128; nidx = 0; d_base = 0; s_base = 0; a_base = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      int p, words, w, cyc, bad;
      params_t pr;
      sec = sec_t'(rep % 3);
      pr = get_params(sec);
      p = pr.p; words = pr.words;
      w = (rep < 3) ? pr.w : pr.wr;
      d_base = (rep < 3) ? 0 : 512; a_base = (rep < 3) ? 0 : 512; s_base = 16;
      for (int i = 0; i < p; i++) a[i] = $urandom_range(1);
      for (int k = 0; k < words; k++)
        for (int b = 0; b < B; b++) dmem[d_base + k][b] = (k * B + b < p) ? a[k * B + b] : 1'b0;
      for (int k = 0; k < w; k++) sp[k] = (k == 0) ? 0 : (k == 1) ? p - 1 : $urandom_range(p - 1);
      for (int k = 0; k < 32; k++) smem[16 + k] = '0;
      for (int k = 0; k < w; k++) smem[16 + k / 8][16 * (k % 8) +: 16] = 16'(sp[k]);
      for (int k = 0; k < words; k++) amem[a_base + k] = {4{32'hDEADBEEF}};
      for (int i = 0; i < p; i++) c[i] = 0;
      for (int k = 0; k < w; k++)
        for (int j = 0; j < p; j++) if (a[j]) begin
          int i;
          i = j + sp[k]; if (i >= p) i -= p;
          c[i] ^= 1'b1;
        end
      nidx = 8'(w);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc == ((w + L - 1) / L) * (words + 7) + 2, $sformatf("cycles %0d", cyc));
      bad = 0;
      for (int k = 0; k < words; k++)
        for (int b = 0; b < B; b++) begin
          bit e;
          e = (k * B + b < p) ? c[k * B + b] : 1'b0;
          if (amem[a_base + k][b] != e) bad++;
        end
      chk(bad == 0, $sformatf("product sec %0d w %0d: %0d wrong bits", rep % 3, w, bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
