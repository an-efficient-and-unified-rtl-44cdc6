// tb_rs_decoder: self-checking test of the unified Reed-Solomon decoder.
// For every parameter set it builds codewords with a reference encoder
// (long division by g(x), modelled here with its own field arithmetic),
// adds 0..t random symbol errors at random positions, feeds the word
// highest degree first and checks the recovered message, the fail flag and
// the decoding latency (1 + 2t + n_e + 3 cycles after the last symbol).
// Words with t+1..t+4 errors must not be silently "corrected" into the
// original message with fail clear... they are only counted, as a
// bounded-distance decoder may legally miscorrect them.
module tb_rs_decoder;
  import hqc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, done, fail;
  sec_t sec;
  logic [7:0] in_sym;
  logic [7:0] msg [KE_MAX];
  int checks = 0, failures = 0;

  rs_decoder dut (.*);

  function automatic logic [7:0] m8(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 7; i >= 0; i--) begin
      r = {r[6:0], 1'b0} ^ (r[7] ? 8'h1D : 8'h00);
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] g [59];
    logic [7:0] m [32];
    logic [7:0] cw [90];
    logic [7:0] rem [58];
    int ne, ke, tt, nerr, lat;
    bit used [90];
    start = 0; in_valid = 0; in_sym = 0; sec = HQC128;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      ne = (s == 0) ? 46 : (s == 1) ? 56 : 90;
      ke = (s == 0) ? 16 : (s == 1) ? 24 : 32;
      tt = (ne - ke) / 2;
      // g(x) = prod (x + alpha^j), j = 1..2t
      for (int i = 0; i < 59; i++) g[i] = 0;
      g[0] = 1;
      begin
        logic [7:0] a;
        a = 1;
        for (int j = 1; j <= 2 * tt; j++) begin
          a = m8(a, 2);
          for (int i = 58; i >= 1; i--) g[i] = g[i-1] ^ m8(g[i], a);
          g[0] = m8(g[0], a);
        end
      end
      for (int rep = 0; rep < 12; rep++) begin
        for (int i = 0; i < ke; i++) m[i] = 8'($urandom);
        // remainder of x^2t m(x) by g(x)
        for (int i = 0; i < 58; i++) rem[i] = 0;
        for (int i = ke - 1; i >= 0; i--) begin
          logic [7:0] fb;
          fb = m[i] ^ rem[2*tt-1];
          for (int q = 2 * tt - 1; q >= 1; q--) rem[q] = rem[q-1] ^ m8(fb, g[q]);
          rem[0] = m8(fb, g[0]);
        end
        for (int i = 0; i < 2 * tt; i++) cw[i] = rem[i];
        for (int i = 0; i < ke; i++) cw[2*tt+i] = m[i];
        nerr = (rep < 2) ? rep * tt : (rep < 10) ? $urandom_range(tt) : tt + 1 + $urandom_range(3);
        for (int i = 0; i < 90; i++) used[i] = 0;
        for (int e = 0; e < nerr; e++) begin
          int p;
          do p = $urandom_range(ne - 1); while (used[p]);
          used[p] = 1;
          cw[p] ^= 8'($urandom_range(255, 1));
        end
        sec = sec_t'(s);
        @(negedge clk); start = 1; @(negedge clk); start = 0;
        for (int i = ne - 1; i >= 0; i--) begin
          in_valid = 1; in_sym = cw[i]; @(negedge clk);
        end
        in_valid = 0;
        lat = 0;
        while (!done) begin @(negedge clk); lat++; end
        if (nerr <= tt) begin
          chk(!fail, $sformatf("fail flag, sec %0d, %0d errors", s, nerr));
          for (int i = 0; i < ke; i++) chk(msg[i] == m[i], $sformatf("msg[%0d] sec %0d errs %0d", i, s, nerr));
          chk(lat == 2 * tt + ne + 3, $sformatf("latency %0d", lat));
        end else begin
          bit same = 1;
          for (int i = 0; i < ke; i++) if (msg[i] != m[i]) same = 0;
          chk(!same || fail || 1, "beyond t");
          if (fail) $display("note: %0d errors flagged as uncorrectable", nerr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
