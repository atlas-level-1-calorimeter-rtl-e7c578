// Testbench for bcmux_decoder. Random tower pairs that obey the BC-mux rule
// (a non-zero tower is always followed by a zero) are encoded by the
// behavioural Pre-processor model and decoded; the towers must come back
// exactly, three ticks after the crossing (one for the encoder, two for the
// decoder). Then single words are corrupted: the decoder must flag the parity
// error and deliver zeros. A masked channel must read as zeros.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_bcmux_decoder;
  import cpm_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic [7:0] a, b, ta, tb_o;
  link_word_t enc_word, word;
  logic mask = 0, perr, corrupt = 0;
  logic [7:0] hist_a [$], hist_b [$];
  int n_case7 = 0, n_case8 = 0, n_same = 0;

  bcmux_encoder_model u_enc (.clk, .rst_n, .a, .b, .word(enc_word));
  assign word = corrupt ? link_word_t'(enc_word ^ 10'h001) : enc_word;
  bcmux_decoder dut (.clk, .rst_n, .word, .mask, .tower_a(ta), .tower_b(tb_o), .par_err(perr));

  logic [7:0] pa, pb;
  initial begin
    a = 0; b = 0; pa = 0; pb = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // towers of crossing i, obeying the zero-after-non-zero rule
      a = (pa == 0 && $urandom_range(0, 2) == 0) ? 8'($urandom_range(1, 255)) : 8'd0;
      b = (pb == 0 && $urandom_range(0, 2) == 0) ? 8'($urandom_range(1, 255)) : 8'd0;
      if (pa != 0 && b != 0) n_case7++;
      if (pb != 0 && a != 0 && pa == 0) n_case8++;
      if (a != 0 && b != 0) n_same++;
      pa = a; pb = b;
      hist_a.push_back(a); hist_b.push_back(b);
      // decoded crossing i-3 is visible now
      if (hist_a.size() > 3) begin
        `CHECK(ta == hist_a[hist_a.size()-4] && tb_o == hist_b[hist_b.size()-4],
               $sformatf("tick %0d towers %0d/%0d exp %0d/%0d", i, ta, tb_o,
                         hist_a[hist_a.size()-4], hist_b[hist_b.size()-4]))
        `CHECK(!perr, "no parity error expected")
      end
    end
    `CHECK(n_case7 > 10 && n_case8 > 10 && n_same > 10, "all BC-mux cases exercised")
    // parity errors
    @(negedge clk); a = 8'd77; b = 0;
    @(negedge clk); a = 0; b = 0; corrupt = 1;   // encoder word of the 77 now on the wire
    @(negedge clk); corrupt = 0;
    @(negedge clk);
    // the corrupted word was sampled two edges ago: error flag and zero towers now
    `CHECK(ta == 0 && tb_o == 0, "corrupted pair zeroed")
    @(negedge clk);
    `CHECK(ta == 0 && tb_o == 0, "following crossing clean")
    // the flag is registered with the zeroed output
    corrupt = 1; @(negedge clk); corrupt = 0;
    `CHECK(perr == 1'b1, "parity error flagged");
    @(negedge clk);
    `CHECK(perr == 1'b0, "parity error flag clears");
    // masked channel
    mask = 1; a = 8'd55;
    @(negedge clk); a = 0;
    repeat (3) begin @(negedge clk); `CHECK(ta == 0 && tb_o == 0 && !perr, "masked channel reads zero") end
    `TB_FINISH
  end
endmodule
