// tb_rs_syndrome: feeds random 90-symbol words (highest degree first) into
// the Horner syndrome unit and compares every register with a direct
// evaluation r(alpha^j) = sum r_i alpha^(i*j) done with a separate field
// model. Also checks that a cleared unit holds zeros.
module tb_rs_syndrome;
  import hqc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, valid;
  logic [7:0] sym;
  logic [7:0] synd [TWO_T_MAX];
  int checks = 0, failures = 0;

  rs_syndrome dut (.*);

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
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] r [90];
    clear = 0; valid = 0; sym = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 5; rep++) begin
      int n;
      n = (rep % 3 == 0) ? 46 : (rep % 3 == 1) ? 56 : 90;
      for (int i = 0; i < n; i++) r[i] = 8'($urandom);
      clear = 1; @(negedge clk); clear = 0;
      for (int j = 0; j < TWO_T_MAX; j++) chk(synd[j] == 0, "cleared");
      for (int i = n - 1; i >= 0; i--) begin valid = 1; sym = r[i]; @(negedge clk); end
      valid = 0; @(negedge clk);
      for (int j = 1; j <= TWO_T_MAX; j++) begin
        logic [7:0] a, x, acc;
        a = 1; for (int q = 0; q < j; q++) a = m8(a, 2);
        x = 1; acc = 0;
        for (int i = 0; i < n; i++) begin acc ^= m8(r[i], x); x = m8(x, a); end
        chk(synd[j-1] == acc, $sformatf("S%0d", j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
