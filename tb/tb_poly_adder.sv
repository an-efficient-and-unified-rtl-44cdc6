// tb_poly_adder: checks the polynomial adder in its three uses: word-wise
// XOR of two dense operands (v + truncated product), copy of one operand
// (product into the public-key or ciphertext region) and in-place addition
// of a sparse polynomial given as an index list (repeated indices, several
// in one word and indices in the last bit of a word included). Results are
// compared with a model; word modes must take n + 4 cycles from the start cycle to done and the index
// mode 3 cycles per index plus a small fixed overhead.
module tb_poly_adder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int AW = 11;
  logic start, flip, use_b, we, busy, done;
  logic [AW-1:0] a_base, b_base, dst_base, ra_addr, rb_addr, waddr;
  logic [9:0] n;
  logic [127:0] ra_data, rb_data, wdata;
  logic [127:0] ma [2048], mb [2048], model [2048];
  int checks = 0, failures = 0;

  poly_adder #(.AW(AW)) dut (.*);
  // A and the destination are the same memory (in-place update); B is separate
  always_ff @(posedge clk) begin
    ra_data <= ma[ra_addr];
    rb_data <= mb[rb_addr];
    if (we) ma[waddr] <= wdata;
  end

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

  task automatic run(bit f, bit ub, int ba, int bb, int bd, int len, output int cyc);
    @(negedge clk);
    flip = f; use_b = ub; a_base = AW'(ba); b_base = AW'(bb); dst_base = AW'(bd); n = 10'(len);
    start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int len, cyc, ovh0, idx [150], nw;
    bit ok;
    start = 0; flip = 0; use_b = 0; a_base = 0; b_base = 0; dst_base = 0; n = 0;
    for (int i = 0; i < 2048; i++) begin ma[i] = {$urandom, $urandom, $urandom, $urandom}; mb[i] = {$urandom, $urandom, $urandom, $urandom}; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 6; it++) begin
      // XOR: dst(1000..) = A(0..) ^ B(100..)
      len = (it % 3 == 0) ? 139 : (it % 3 == 1) ? 280 : 451;
      for (int i = 0; i < 2048; i++) model[i] = ma[i];
      for (int i = 0; i < len; i++) model[1000 + i] = ma[i] ^ mb[100 + i];
      run(0, 1, 0, 100, 1000, len, cyc);
      chk(cyc == len + 4, $sformatf("xor cycles %0d for %0d words", cyc, len));
      ok = 1; for (int i = 0; i < 2048; i++) if (ma[i] != model[i]) ok = 0;
      chk(ok, "xor result and nothing else changed");
      // copy: dst(1500..) = A(0..)
      for (int i = 0; i < len; i++) model[1500 + i] = ma[i];
      run(0, 0, 0, 0, 1500, len, cyc);
      chk(cyc == len + 4, $sformatf("copy cycles %0d", cyc));
      ok = 1; for (int i = 0; i < 2048; i++) if (ma[i] != model[i]) ok = 0;
      chk(ok, "copy result");
      // flip: add sparse index list (in B at 40..) into A at 500..
      nw = 75 + it * 15;
      for (int i = 0; i < nw; i++) begin
        idx[i] = $urandom % 17669;
        if (i % 10 == 1) idx[i] = idx[i - 1];           // repeated index
        if (i % 10 == 2) idx[i] = (idx[i - 1] & ~127) | ((idx[i - 1] + 5) & 127); // same word
        if (i % 10 == 3) idx[i] = 127 + 128 * ($urandom % 100);
        idx[i] = idx[i] % 17669;
      end
      for (int w = 0; w < 19; w++) mb[40 + w] = '0;
      for (int i = 0; i < nw; i++) mb[40 + i / 8][16 * (i % 8) +: 16] = 16'(idx[i]);
      for (int i = 0; i < nw; i++) model[500 + idx[i] / 128][idx[i] % 128] ^= 1'b1;
      run(1, 0, 500, 40, 500, nw, cyc);
      if (it == 0) ovh0 = cyc - 3 * nw;
      chk(ovh0 >= 0 && ovh0 <= 4, $sformatf("flip overhead %0d", ovh0));
      chk(cyc - 3 * nw == ovh0, $sformatf("flip cycles %0d for %0d indices", cyc, nw));
      ok = 1; for (int i = 0; i < 2048; i++) if (ma[i] != model[i]) ok = 0;
      chk(ok, "sparse addition result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
