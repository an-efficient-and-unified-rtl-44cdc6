// mod_pipe: pipelined remainder of a 32-bit dividend by a 16-bit divisor,
// computed with the restoring shift-and-subtract algorithm, one iteration
// per pipeline stage (32 stages), as the document chose so that the divider
// never limits the clock frequency. A new operand pair can enter every
// cycle; the remainder leaves 32 cycles later with the tag it came with.
module mod_pipe #(
  parameter int unsigned TW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [31:0]   dividend,
  input  logic [15:0]   divisor,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output logic [15:0]   remainder,
  output logic [TW-1:0] out_tag
);

  logic          v   [33];
  logic [31:0]   a   [33];   // dividend bits still to be shifted in
  logic [16:0]   r   [33];
  logic [15:0]   d   [33];
  logic [TW-1:0] tg  [33];

  assign v[0]  = in_valid;
  assign a[0]  = dividend;
  assign r[0]  = '0;
  assign d[0]  = divisor;
  assign tg[0] = in_tag;

  for (genvar s = 0; s < 32; s++) begin : g_stage
    logic [16:0] sh;
    logic [16:0] nr;
    always_comb begin
      sh = {r[s][15:0], a[s][31]};
      nr = (sh >= {1'b0, d[s]}) ? (sh - {1'b0, d[s]}) : sh;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[s+1] <= 1'b0; a[s+1] <= '0; r[s+1] <= '0; d[s+1] <= '0; tg[s+1] <= '0;
      end else begin
        v[s+1]  <= v[s];
        a[s+1]  <= {a[s][30:0], 1'b0};
        r[s+1]  <= nr;
        d[s+1]  <= d[s];
        tg[s+1] <= tg[s];
      end
    end
  end

  assign out_valid = v[32];
  assign remainder = r[32][15:0];
  assign out_tag   = tg[32];

endmodule
