// tb_rsrm_encoder: checks the concatenated RS / duplicated RM encoder for
// all three sets. From the codeword written to memory it recovers each RM
// block's symbol (bit 0 of RM(1,7) is the constant term, bit 2^k adds
// message bit k), re-encodes it with an independent RM model and requires
// the block and all m copies to match. The symbol sequence must then be a
// Reed-Solomon codeword: message bytes in positions 2t..n_e-1 and zero at
// alpha^1..alpha^2t (field model independent of the design). The run time
// must stay within the documented per-symbol budget.
module tb_rsrm_encoder;
  import hqc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int AW = 11;
  logic start, we, busy, done;
  sec_t sec;
  logic [AW-1:0] msg_base, cw_base, rd_addr, waddr;
  logic [127:0] rd_data, wdata;
  logic [127:0] mem [2048];
  int checks = 0, failures = 0;

  rsrm_encoder #(.AW(AW)) dut (.*);
  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
    if (we) mem[waddr] <= wdata;
  end

  function automatic logic [7:0] m8(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 7; i >= 0; i--) begin
      r = {r[6:0], 1'b0} ^ (r[7] ? 8'h1D : 8'h00);
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  function automatic logic [127:0] rm(logic [7:0] s);
    logic [127:0] c;
    for (int j = 0; j < 128; j++) begin
      logic b;
      b = s[7];
      for (int k = 0; k < 7; k++) b ^= s[k] & j[k];
      c[j] = b;
    end
    return c;
  endfunction

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

  initial begin
    logic [7:0] msg [32], sym [90];
    int ne, ke, tt, mm, cyc;
    bit ok;
    start = 0; sec = HQC128; msg_base = 0; cw_base = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 9; it++) begin
      int s;
      s = it % 3;
      ne = (s == 0) ? 46 : (s == 1) ? 56 : 90;
      ke = (s == 0) ? 16 : (s == 1) ? 24 : 32;
      mm = (s == 0) ? 3 : 5;
      tt = (ne - ke) / 2;
      for (int i = 0; i < 2048; i++) mem[i] = '0;
      for (int i = 0; i < ke; i++) begin
        msg[i] = 8'($urandom);
        mem[4 + i / 16][8 * (i % 16) +: 8] = msg[i];
      end
      @(negedge clk);
      sec = sec_t'(s); msg_base = 4; cw_base = 100; start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc <= ke * (4 + mm) + 2 * tt * (3 + mm) + 20, $sformatf("cycles %0d", cyc));
      ok = 1;
      for (int i = 0; i < ne; i++) begin
        logic [127:0] blk;
        blk = mem[100 + i * mm];
        sym[i][7] = blk[0];
        for (int k = 0; k < 7; k++) sym[i][k] = blk[1 << k] ^ blk[0];
        for (int c = 0; c < mm; c++) if (mem[100 + i * mm + c] != rm(sym[i])) ok = 0;
      end
      chk(ok, "every block is an RM(1,7) codeword, repeated m times");
      chk(mem[100 + ne * mm] == '0 && mem[99] == '0, "no write outside the codeword");
      ok = 1;
      for (int i = 0; i < ke; i++) if (sym[2 * tt + i] != msg[i]) ok = 0;
      chk(ok, "RS message symbols in place");
      for (int j = 1; j <= 2 * tt; j++) begin
        logic [7:0] a, acc;
        a = 1;
        for (int q = 0; q < j; q++) a = m8(a, 8'h02);
        acc = 0;
        for (int i = ne - 1; i >= 0; i--) acc = m8(acc, a) ^ sym[i];
        chk(acc == 0, $sformatf("RS root alpha^%0d", j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
