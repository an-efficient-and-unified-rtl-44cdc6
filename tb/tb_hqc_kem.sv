// tb_hqc_kem: end-to-end test of the HQC.KEM accelerator at its default
// size. For each of HQC-128, HQC-192 and HQC-256 it loads random seeds
// (phi, gamma, sigma), a message and a salt through the host port and runs:
//   key generation   - checks s = h*y + x against a bit-level model built
//                      from the h, y, x the accelerator left in memory;
//   encapsulation    - checks u = h*r_b + r_a the same way;
//   decapsulation    - of the genuine ciphertext: the shared key must equal
//                      the encapsulated one and rejection must not fire;
//   decapsulation    - of a ciphertext with one flipped bit of v: rejection
//                      must fire and the key must differ.
// Every mechanism (each primitive, each set, the arithmetic checks, both
// decapsulation outcomes) is counted; one that never happened is a failure.
// Cycle counts of each primitive are checked against lower bounds set by the
// multiplier schedule and against a generous upper bound.
module tb_hqc_kem;
  import hqc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done, reject, host_we;
  logic [1:0]   op;
  sec_t         sec;
  logic [2:0]   host_mem;
  logic [10:0]  host_addr;
  logic [127:0] host_wdata, host_rdata;

  hqc_kem dut (.*);

  int checks = 0, failures = 0;
  int n_keygen = 0, n_encap = 0, n_accept = 0, n_reject = 0, n_sarith = 0, n_uarith = 0;
  int n_set [3] = '{0, 0, 0};

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hwrite(int m, int a, logic [127:0] d);
    @(negedge clk);
    host_mem = 3'(m); host_addr = 11'(a); host_wdata = d; host_we = 1;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic hread(int m, int a, output logic [127:0] d);
    @(negedge clk);
    host_mem = 3'(m); host_addr = 11'(a); host_we = 0;
    @(posedge clk); #1;
    d = host_rdata;
  endtask

  task automatic run(int o, output int cyc);
    @(negedge clk);
    op = 2'(o); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  // polynomial helpers on bit arrays of the largest size
  bit poly_h [P_MAX];
  bit poly_r [P_MAX];

  task automatic read_dense(int base, int p, ref bit dst [P_MAX]);
    logic [127:0] d;
    for (int w = 0; w < (p + 127) / 128; w++) begin
      hread(0, base + w, d);
      for (int b = 0; b < 128; b++) if (w * 128 + b < p) dst[w * 128 + b] = d[b];
    end
  endtask

  task automatic read_sparse(int base, int wt, ref int idx [150]);
    logic [127:0] d;
    for (int i = 0; i < wt; i++) begin
      if (i % 8 == 0) hread(2, base + i / 8, d);
      idx[i] = int'(d[16 * (i % 8) +: 16]);
    end
  endtask

  // res = h * a + b (a, b sparse) mod x^p - 1; compare with dense at dbase
  task automatic check_product(int p, int wt, int hbase, int abase, int bbase, int dbase,
                               string what, output bit ok);
    int ia [150], ib [150];
    bit distinct;
    read_dense(hbase, p, poly_h);
    read_sparse(abase, wt, ia);
    read_sparse(bbase, wt, ib);
    distinct = 1;
    for (int i = 0; i < wt; i++) begin
      if (ia[i] >= p || ib[i] >= p) distinct = 0;
      for (int j = 0; j < i; j++) if (ia[i] == ia[j] || ib[i] == ib[j]) distinct = 0;
    end
    chk(distinct, {what, ": sparse supports distinct and in range"});
    for (int k = 0; k < p; k++) poly_r[k] = 0;
    for (int j = 0; j < wt; j++) begin
      int s;
      s = ia[j];
      for (int k = 0; k < p; k++) begin
        poly_r[s] ^= poly_h[k];
        s++;
        if (s == p) s = 0;
      end
    end
    for (int j = 0; j < wt; j++) poly_r[ib[j]] ^= 1'b1;
    read_dense(dbase, p, poly_h);
    ok = 1;
    for (int k = 0; k < p; k++) if (poly_r[k] != poly_h[k]) ok = 0;
    chk(ok, {what, ": product matches model"});
  endtask

  initial begin
    logic [127:0] d, k1 [4], k2 [4], k3 [4];
    int cyc, lo, p, wds, w, wr, vw;
    bit ok, same;
    start = 0; op = 0; sec = HQC128; host_mem = 0; host_addr = 0; host_we = 0; host_wdata = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      sec = sec_t'(s);
      p   = (s == 0) ? 17669 : (s == 1) ? 35851 : 57637;
      w   = (s == 0) ? 66 : (s == 1) ? 100 : 131;
      wr  = (s == 0) ? 75 : (s == 1) ? 114 : 149;
      vw  = (s == 0) ? 46 * 3 : (s == 1) ? 56 * 5 : 90 * 5;
      wds = (p + 127) / 128;
      // seeds: phi @0..2, gamma @4..6, sigma @8..9, m @10..11, salt @12
      for (int a = 0; a < 13; a++) hwrite(4, a, {$urandom, $urandom, $urandom, $urandom});

      // ---- key generation
      run(0, cyc);
      lo = ((w + 3) / 4) * (wds + 7);
      $display("sec %0d keygen %0d cycles", s, cyc);
      chk(cyc > lo && cyc < 40 * lo, $sformatf("keygen cycles %0d", cyc));
      n_keygen++;
      check_product(p, w, 0, 0, 32, 512, "s = h*y + x", ok);
      if (ok) n_sarith++;

      // ---- encapsulation
      run(1, cyc);
      lo = 2 * ((wr + 3) / 4) * (wds + 7);
      $display("sec %0d encap %0d cycles", s, cyc);
      chk(cyc > lo && cyc < 40 * lo, $sformatf("encap cycles %0d", cyc));
      n_encap++;
      for (int a = 0; a < 4; a++) hread(4, 18 + a, k1[a]);
      check_product(p, wr, 0, 64, 128, 1024, "u = h*r_b + r_a", ok);
      if (ok) n_uarith++;
      // place the received v where decapsulation expects it
      for (int a = 0; a < vw; a++) begin hread(3, a, d); hwrite(3, 512 + a, d); end

      // ---- decapsulation of the genuine ciphertext
      run(2, cyc);
      lo = 3 * ((wr + 3) / 4) * (wds + 7);
      $display("sec %0d decap %0d cycles", s, cyc);
      chk(cyc > lo && cyc < 40 * lo, $sformatf("decap cycles %0d", cyc));
      for (int a = 0; a < 4; a++) hread(4, 18 + a, k2[a]);
      same = 1;
      for (int a = 0; a < 4; a++) if (k1[a] != k2[a]) same = 0;
      chk(same, "decapsulated key equals encapsulated key");
      chk(!reject, "genuine ciphertext accepted");
      if (same && !reject) n_accept++;
      // recovered message equals m
      for (int a = 0; a < 2; a++) begin
        logic [127:0] m0, m1;
        hread(4, 10 + a, m0); hread(4, 22 + a, m1);
        if (a == 0 || s > 0) chk(m0 == m1 || (s == 1 && a == 1 && m0[63:0] == m1[63:0]),
                                 "decoded message equals m");
      end

      // ---- decapsulation of a tampered ciphertext (one bit of v flipped)
      hread(3, 512 + 7, d);
      hwrite(3, 512 + 7, d ^ (128'h1 << (s * 5 + 3)));
      run(2, cyc);
      for (int a = 0; a < 4; a++) hread(4, 18 + a, k3[a]);
      same = 1;
      for (int a = 0; a < 4; a++) if (k1[a] != k3[a]) same = 0;
      chk(reject, "tampered ciphertext rejected");
      chk(!same, "tampered ciphertext gives a different key");
      if (reject && !same) n_reject++;
      n_set[s]++;
    end
    chk(n_keygen > 0, "mechanism: key generation");
    chk(n_encap > 0, "mechanism: encapsulation");
    chk(n_accept > 0, "mechanism: decapsulation accept");
    chk(n_reject > 0, "mechanism: implicit rejection");
    chk(n_sarith > 0, "mechanism: key-generation arithmetic");
    chk(n_uarith > 0, "mechanism: encapsulation arithmetic");
    for (int s = 0; s < 3; s++) chk(n_set[s] > 0, $sformatf("mechanism: parameter set %0d", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
