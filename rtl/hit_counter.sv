// hit_counter: one hit-count (result-merging) FPGA of the CPM.
//
// The 8 CP chips deliver 16 hit words per tick, one per chip half. For each
// of its N_THR threshold sets this block counts how many of the N_IN words
// have that bit set and saturates the count at 7, giving a 3-bit multiplicity.
// The N_THR counts are latched and sent to a Common Merger Module together
// with one odd-parity bit over them (the 25th bit for N_THR = 8).
// The CPM has two of these: thresholds 0-7 and 8-15.
// Timing: one register; hits of tick t appear on counts/parity in tick t+1.
module hit_counter #(
  parameter int unsigned N_THR = 8,
  parameter int unsigned N_IN  = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_THR-1:0]       hits [N_IN],
  output logic [N_THR-1:0][2:0]  counts,
  output logic                   parity
);
  logic [N_THR-1:0][2:0] sum;

  always_comb begin
    for (int t = 0; t < N_THR; t++) begin
      int unsigned n;
      n = 0;
      for (int i = 0; i < N_IN; i++) n += 32'(hits[i][t]);
      sum[t] = (n > 7) ? 3'd7 : 3'(n);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      counts <= '0;
      parity <= 1'b1;
    end else begin
      counts <= sum;
      parity <= ~^sum;
    end
  end
endmodule
