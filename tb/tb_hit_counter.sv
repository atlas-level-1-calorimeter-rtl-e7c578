// Testbench for hit_counter: random hit words (sparse and dense) are summed
// by a reference model; counts must saturate at 7 and the parity bit must
// make the 25 output bits odd. Latency one tick.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_hit_counter;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  `WATCHDOG(clk, 5000)
  logic [7:0] hits [16];
  logic [7:0][2:0] counts;
  logic parity;
  int n_sat = 0;
  hit_counter #(.N_THR(8), .N_IN(16)) dut (.clk, .rst_n, .hits, .counts, .parity);

  initial begin
    logic [7:0][2:0] exp;
    for (int i = 0; i < 16; i++) hits[i] = 0;
    repeat (2) @(posedge clk); rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++)
        hits[i] = (n % 3 == 0) ? 8'($urandom) : ($urandom_range(0, 5) == 0 ? 8'($urandom) : 8'h00);
      for (int t = 0; t < 8; t++) begin
        int c;
        c = 0;
        for (int i = 0; i < 16; i++) c += hits[i][t];
        if (c > 7) begin c = 7; n_sat++; end
        exp[t] = 3'(c);
      end
      @(negedge clk);
      `CHECK(counts == exp, $sformatf("counts %h exp %h", counts, exp))
      `CHECK(^{parity, counts} == 1'b1, "odd parity over 25 bits")
    end
    `CHECK(n_sat > 0, "saturation exercised")
    `TB_FINISH
  end
endmodule
