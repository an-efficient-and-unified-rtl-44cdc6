// tb_rs_ecsee: checks the Chien search / error evaluation unit. Error
// patterns of up to t symbols are injected, their syndromes computed here
// and turned into Lambda and Omega by the key-equation solver; the unit
// under test must then report, position by position (n_e cycles), exactly
// the injected positions and values, and keep fail clear. A directly
// driven Lambda = 1 + x (one error at position 0) is accepted without fail.
module tb_rs_ecsee;
  import hqc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bm_start, bm_done, cs_start;
  sec_t sec;
  logic [7:0] synd [TWO_T_MAX];
  logic [7:0] lambda [T_MAX + 1];
  logic [7:0] omega [T_MAX];
  logic [7:0] lam_in [T_MAX + 1];
  logic [7:0] om_in [T_MAX];
  logic use_bm;
  logic err_valid, err_hit, done, fail;
  logic [6:0] err_pos;
  logic [7:0] err_val;
  int checks = 0, failures = 0;

  rs_epibma u_bm (.clk, .rst_n, .start(bm_start), .sec, .synd, .done(bm_done), .lambda, .omega);
  always_comb begin
    for (int k = 0; k <= T_MAX; k++) lam_in[k] = use_bm ? lambda[k] : ((k == 0 || k == 1) ? 8'h01 : 8'h00);
    for (int k = 0; k < T_MAX; k++) om_in[k] = use_bm ? omega[k] : 8'h00;
  end
  rs_ecsee dut (.clk, .rst_n, .start(cs_start), .sec, .lambda(lam_in), .omega(om_in),
                .err_valid, .err_hit, .err_pos, .err_val, .done, .fail);

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
    int ne, tt, nu, npos;
    bm_start = 0; cs_start = 0; sec = HQC128; use_bm = 1;
    for (int j = 0; j < TWO_T_MAX; j++) synd[j] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 12; rep++) begin
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
        logic [7:0] acc;
        acc = 0;
        for (int i = 0; i < ne; i++) if (e[i] != 0) acc ^= m8(e[i], apow(i * j));
        synd[j-1] = acc;
      end
      sec = sec_t'(s);
      bm_start = 1; @(negedge clk); bm_start = 0;
      while (!bm_done) @(negedge clk);
      cs_start = 1; @(negedge clk); cs_start = 0;
      npos = 0;
      while (1) begin
        if (err_valid) begin
          chk(err_pos == 7'(npos), "position order");
          chk(err_hit == (e[npos] != 0), $sformatf("hit at %0d", npos));
          chk(err_val == e[npos], $sformatf("value at %0d: %h vs %h", npos, err_val, e[npos]));
          npos++;
        end
        if (done) break;
        @(negedge clk);
      end
      chk(npos == ne, "n_e positions");
      chk(!fail, "fail flag clear");
    end
    // Lambda = 1 + x has its single root at alpha^0, i.e. position 0.
    use_bm = 0; sec = HQC128;
    cs_start = 1; @(negedge clk); cs_start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    chk(!fail, "root at position 0 accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
