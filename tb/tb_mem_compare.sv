// tb_mem_compare: checks the memory comparator on two modelled synchronous
// memories. Equal regions must report no difference; a single flipped bit
// anywhere (first word, last word, middle) must be found; a difference just
// outside the compared range must be ignored. done must come n + 2 cycles
// after start.
module tb_mem_compare;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int AW = 11;
  logic start, busy, done, differ;
  logic [AW-1:0] base_a, base_b, n, addr_a, addr_b;
  logic [127:0] rdata_a, rdata_b;
  logic [127:0] ma [2048], mb [2048];
  int checks = 0, failures = 0;

  mem_compare #(.AW(AW)) dut (.*);
  always_ff @(posedge clk) begin rdata_a <= ma[addr_a]; rdata_b <= mb[addr_b]; end

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

  task automatic run(int ba, int bb, int len, bit expd);
    int cyc;
    @(negedge clk);
    base_a = AW'(ba); base_b = AW'(bb); n = AW'(len); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == len + 2, $sformatf("latency %0d for n=%0d", cyc, len));
    chk(differ == expd, $sformatf("differ=%0d expected %0d (a=%0d b=%0d n=%0d)", differ, expd, ba, bb, len));
  endtask

  initial begin
    int len, ba, bb, k, bt;
    start = 0; base_a = 0; base_b = 0; n = 0;
    for (int i = 0; i < 2048; i++) begin ma[i] = {$urandom, $urandom, $urandom, $urandom}; mb[i] = ma[i]; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      len = 1 + $urandom % 450; ba = $urandom % 1000; bb = ba;
      run(ba, bb, len, 0);
      k = (it % 3 == 0) ? 0 : (it % 3 == 1) ? len - 1 : $urandom % len;
      bt = $urandom % 128;
      mb[bb + k][bt] = ~mb[bb + k][bt];
      run(ba, bb, len, 1);
      mb[bb + k] = ma[ba + k];
      mb[bb + len] ^= 128'h1;
      run(ba, bb, len, 0);
      mb[bb + len] = ma[ba + len];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
