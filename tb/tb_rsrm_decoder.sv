// tb_rsrm_decoder: round-trip test of the concatenated decoder. The
// encoder produces a codeword in the modelled memory; the testbench adds
// noise and the decoder must return the message:
//   - random bit errors in every RM block (well inside the RM capacity);
//   - additionally up to t RM blocks replaced by garbage (symbol errors the
//     RS stage must correct);
//   - more than t garbage blocks, where the RS stage must report failure.
// The decoding time must match the
// budget n_e (m + 17) + 2t + n_e within a small fixed overhead.
module tb_rsrm_decoder;
  import hqc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int AW = 11;
  logic e_start, e_we, e_busy, e_done;
  logic d_start, d_we, d_busy, d_done, fail;
  sec_t sec;
  logic [AW-1:0] e_ra, e_wa, d_ra, d_wa;
  logic [127:0] e_rd, e_wd, d_rd, d_wd;
  logic [127:0] mem [2048];
  int checks = 0, failures = 0;

  rsrm_encoder #(.AW(AW)) enc (.clk, .rst_n, .start(e_start), .sec, .msg_base(11'd4), .cw_base(11'd100),
    .rd_addr(e_ra), .rd_data(e_rd), .we(e_we), .waddr(e_wa), .wdata(e_wd), .busy(e_busy), .done(e_done));
  rsrm_decoder #(.AW(AW)) dut (.clk, .rst_n, .start(d_start), .sec, .cw_base(11'd100), .msg_base(11'd8),
    .rd_addr(d_ra), .rd_data(d_rd), .we(d_we), .waddr(d_wa), .wdata(d_wd), .busy(d_busy), .done(d_done),
    .fail);
  always_ff @(posedge clk) begin
    e_rd <= mem[e_ra];
    d_rd <= mem[d_ra];
    if (e_we) mem[e_wa] <= e_wd;
    if (d_we) mem[d_wa] <= d_wd;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] msg [32];
    int ne, ke, tt, mm, cyc, nbad, ovh0, budget, b;
    bit ok;
    e_start = 0; d_start = 0; sec = HQC128;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ovh0 = -1;
    for (int it = 0; it < 12; it++) begin
      int s, mode;
      s = it % 3; mode = (it / 3) % 4;
      ne = (s == 0) ? 46 : (s == 1) ? 56 : 90;
      ke = (s == 0) ? 16 : (s == 1) ? 24 : 32;
      mm = (s == 0) ? 3 : 5;
      tt = (ne - ke) / 2;
      for (int i = 0; i < 2048; i++) mem[i] = '0;
      for (int i = 0; i < ke; i++) begin
        msg[i] = 8'($urandom);
        mem[4 + i / 16][8 * (i % 16) +: 8] = msg[i];
      end
      mem[8] = {4{32'hFFFF_FFFF}}; mem[9] = {4{32'hFFFF_FFFF}};
      @(negedge clk); sec = sec_t'(s); e_start = 1;
      @(negedge clk); e_start = 0;
      while (!e_done) @(negedge clk);
      // noise
      for (int w = 0; w < ne * mm; w++)
        for (int e = 0; e < 12; e++) begin b = $urandom % 128; mem[100 + w][b] = ~mem[100 + w][b]; end
      nbad = (mode == 0) ? 0 : (mode == 1) ? tt : (mode == 2) ? tt / 2 : tt + 3;
      for (int k = 0; k < nbad; k++) begin
        int blk;
        blk = (k * 11 + it) % ne;
        for (int c = 0; c < mm; c++) mem[100 + blk * mm + c] = ~mem[100 + blk * mm + c];
      end
      @(negedge clk); d_start = 1;
      @(negedge clk); d_start = 0; cyc = 1;
      while (!d_done) begin @(negedge clk); cyc++; end
      budget = ne * (mm + 17) + 2 * tt + ne;
      if (ovh0 < 0) ovh0 = cyc - budget;
      chk(ovh0 >= 0 && ovh0 <= 12, $sformatf("overhead %0d", ovh0));
      chk(cyc - budget == ovh0, $sformatf("cycles %0d budget %0d", cyc, budget));
      ok = 1;
      for (int i = 0; i < ke; i++) if (mem[8 + i / 16][8 * (i % 16) +: 8] != msg[i]) ok = 0;
      for (int i = ke; i < 32; i++) if (mem[8 + i / 16][8 * (i % 16) +: 8] != 0) ok = 0;
      if (mode == 3) begin
        chk(fail || !ok, "too many symbol errors: failure or wrong message");
        chk(fail, "too many symbol errors reported");
      end else begin
        chk(!fail, $sformatf("no failure with %0d symbol errors", nbad));
        chk(ok, $sformatf("message recovered with %0d symbol errors", nbad));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
