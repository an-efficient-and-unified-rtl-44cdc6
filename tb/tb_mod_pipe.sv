// tb_mod_pipe: checks the pipelined modular reducer. One random
// (dividend, divisor) pair enters per cycle (with idle gaps); each result
// must come out exactly 32 cycles later with its tag and equal
// dividend % divisor. Divisors cover the ranges p - i that the sparse
// sampler uses for all three parameter sets, plus small values.
module tb_mod_pipe;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [31:0] dividend;
  logic [15:0] divisor, remainder;
  logic [7:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  logic [15:0] exp_r [256];
  int sent_at [256];
  int cyc = 0;

  mod_pipe #(.TW(8)) dut (.*);
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    if (rst_n && out_valid) begin
      chk(remainder == exp_r[out_tag], $sformatf("remainder tag %0d", out_tag));
      chk(cyc - sent_at[out_tag] == 32, $sformatf("latency %0d", cyc - sent_at[out_tag]));
    end

  initial begin
    int p [3] = '{17669, 35851, 57637};
    in_valid = 0; dividend = 0; divisor = 1; in_tag = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      dividend = $urandom;
      divisor  = (i % 5 == 0) ? 16'(1 + $urandom % 300) : 16'(p[i % 3] - $urandom % 150);
      if (i % 97 == 0) dividend = 32'hFFFF_FFFF;
      in_tag   = 8'(i);
      exp_r[8'(i)] = 16'(dividend % 32'(divisor));
      sent_at[8'(i)] = cyc;
    end
    @(negedge clk); in_valid = 0;
    repeat (40) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
