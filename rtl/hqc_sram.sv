// hqc_sram: on-chip memory of 128-bit words with NR synchronous read ports
// and one write port, as used for the five memories of the accelerator.
// Read data appears one cycle after the address (block-RAM timing); a read
// of the address being written returns the old word. The document gives
// the word width (B = 128) and the number of memories, not their depth or
// port count: DEPTH and NR are set by the top level for each memory.
module hqc_sram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned NR    = 1,
  parameter int unsigned W     = 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr [NR],
  output logic [W-1:0]  rdata [NR],
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    for (int i = 0; i < NR; i++) rdata[i] <= mem[raddr[i]];
  end

endmodule
