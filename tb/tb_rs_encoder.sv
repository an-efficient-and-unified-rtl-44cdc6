// tb_rs_encoder: self-checking test of the unified Reed-Solomon encoder.
// For each parameter set it encodes random messages, checks that the first
// k_e output symbols are the message, that the codeword evaluates to zero at
// alpha^1 .. alpha^2t (it is a multiple of g(x)), that exactly n_e symbols
// come out, and that encoding takes k_e + 2t accepted cycles. The field
// arithmetic here is a separate shift-and-add model. It also checks that the
// HQC-128 generator polynomial has constant term 89.
module tb_rs_encoder;
  import hqc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start; sec_t sec;
  logic in_valid, in_ready, out_valid, out_ready, out_last, busy;
  logic [7:0] in_sym, out_sym;
  int checks = 0, failures = 0;

  rs_encoder dut (.*);

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
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] msg [32];
    logic [7:0] cw [90];   // cw[i] = coefficient of x^i
    int ne, ke, tt, n, cyc;
    start = 0; in_valid = 0; in_sym = 0; out_ready = 1; sec = HQC128;
    chk(rs_gen_coef(30, 0) == 8'd89, "HQC-128 g0 = 89");
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      for (int rep = 0; rep < 4; rep++) begin
        sec = sec_t'(s);
        ne = (s == 0) ? 46 : (s == 1) ? 56 : 90;
        ke = (s == 0) ? 16 : (s == 1) ? 24 : 32;
        tt = (ne - ke) / 2;
        for (int i = 0; i < ke; i++) msg[i] = 8'($urandom);
        @(negedge clk); start = 1; @(negedge clk); start = 0;
        n = 0; cyc = 0;
        // feed message highest degree first, randomly stalling the output
        fork
          begin
            for (int i = ke - 1; i >= 0; i--) begin
              in_valid = 1; in_sym = msg[i];
              @(posedge clk); while (!in_ready) @(posedge clk);
              #1;
            end
            in_valid = 0;
          end
          begin
            while (n < ne) begin
              @(posedge clk);
              if (out_valid && out_ready) begin
                cw[ne - 1 - n] = out_sym;
                if (n == ne - 1) chk(out_last, "last flag");
                n++;
              end
              cyc++;
            end
          end
        join
        chk(cyc == ne, $sformatf("cycle count %0d vs %0d", cyc, ne));
        for (int i = 0; i < ke; i++) chk(cw[2*tt + i] == msg[i], "systematic prefix");
        for (int j = 1; j <= 2 * tt; j++) begin
          logic [7:0] a, acc;
          a = 1; for (int q = 0; q < j; q++) a = m8(a, 8'h02);
          acc = 0;
          for (int i = ne - 1; i >= 0; i--) acc = m8(acc, a) ^ cw[i];
          chk(acc == 0, $sformatf("root alpha^%0d sec %0d", j, s));
        end
        @(negedge clk);
        chk(!busy, "idle after codeword");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
