// tb_rs_epibma: checks the key-equation solver. For each parameter set a
// random error pattern of nu <= t symbols is built, its syndromes are
// computed here directly, and after the solver finishes (2t cycles after
// start) the test checks that Lambda has degree nu, Lambda_0 != 0, and
// Lambda(alpha^-i) = 0 exactly at the error positions i.
module tb_rs_epibma;
  import hqc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done;
  sec_t sec;
  logic [7:0] synd [TWO_T_MAX];
  logic [7:0] lambda [T_MAX + 1];
  logic [7:0] omega [T_MAX];
  int checks = 0, failures = 0;

  rs_epibma dut (.*);

  function automatic logic [7:0] m8(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 7; i >= 0; i--) begin
      r = {r[6:0], 1'b0} ^ (r[7] ? 8'h1D : 8'h00);
      if (b[i]) r ^= a;
    end
    return r;
  endfunction
  function automatic logic [7:0] apow(int e);
    logic [7:0] a = 1;
    e = ((e % 255) + 255) % 255;
    for (int q = 0; q < e; q++) a = m8(a, 2);
    return a;
  endfunction
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] e [90];
    int ne, tt, nu, cyc, deg;
    start = 0; sec = HQC128;
    for (int j = 0; j < TWO_T_MAX; j++) synd[j] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 15; rep++) begin
      int s;
      s = rep % 3;
      ne = (s == 0) ? 46 : (s == 1) ? 56 : 90;
      tt = (s == 0) ? 15 : (s == 1) ? 16 : 29;
      nu = (rep < 3) ? tt : $urandom_range(tt);
      for (int i = 0; i < 90; i++) e[i] = 0;
      for (int k = 0; k < nu; k++) begin
        int p;
        do p = $urandom_range(ne - 1); while (e[p] != 0);
        e[p] = 8'($urandom_range(255, 1));
      end
      for (int j = 1; j <= TWO_T_MAX; j++) begin
        logic [7:0] acc = 0;
        acc = 0;
        for (int i = 0; i < ne; i++) if (e[i] != 0) acc ^= m8(e[i], apow(i * j));
        synd[j-1] = (j <= 2 * tt) ? acc : 8'($urandom);
      end
      sec = sec_t'(s);
      start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc == 2 * tt, $sformatf("latency %0d", cyc));
      deg = 0;
      for (int k = 0; k <= T_MAX; k++) if (lambda[k] != 0) deg = k;
      chk(deg == nu, $sformatf("degree %0d vs %0d", deg, nu));
      chk(lambda[0] != 0, "Lambda_0");
      for (int i = 0; i < ne; i++) begin
        logic [7:0] v, x;
        v = 0;
        for (int k = 0; k <= T_MAX; k++) v ^= m8(lambda[k], apow(-i * k));
        chk((v == 0) == (e[i] != 0), $sformatf("root at %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
