// tb_hqc_sram: checks the multi-port synchronous memory. Random writes are
// mirrored in a model; two read ports read random addresses each cycle and
// the data must equal the model one cycle later (and not be visible in the
// same cycle as the address). A write and a read of the same address in one
// cycle must return the old contents.
module tb_hqc_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int D = 64, AW = 6;
  logic [AW-1:0]  raddr [2];
  logic [127:0]   rdata [2];
  logic           we;
  logic [AW-1:0]  waddr;
  logic [127:0]   wdata;
  logic [127:0]   model [D];
  int checks = 0, failures = 0;

  hqc_sram #(.DEPTH(D), .NR(2)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] exp0, exp1;
    we = 0; waddr = 0; wdata = 0; raddr[0] = 0; raddr[1] = 0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = {$urandom, $urandom, $urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      raddr[0] = AW'($urandom); raddr[1] = AW'($urandom);
      exp0 = model[raddr[0]]; exp1 = model[raddr[1]];
      we = $urandom % 2; waddr = (it % 3 == 0) ? raddr[0] : AW'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk); #1;
      chk(rdata[0] == exp0, "port 0 read after one cycle (old data on collision)");
      chk(rdata[1] == exp1, "port 1 read after one cycle");
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
