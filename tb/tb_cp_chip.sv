// Testbench for cp_chip. 42 behavioural BC-mux encoders (2 layers x 3 pair
// rows x 7 eta columns) feed the chip's 5-line and 3-line stream buses with
// random cluster patterns that obey the BC-mux rule. Threshold sets (with
// random tau selection) are loaded through the register port. Checked
// against the reference model in cpm_ref_pkg:
//   - the 16 hit bits of each half, four ticks after the stream words;
//   - RoI read-out: each en_readout slice, scrolled out on the two RoI
//     streams, holds the RoI word (hits, saturation, position, error) of the
//     crossing offset ticks earlier;
//   - a corrupted stream word sets its bit in the error map and the error
//     counter, sets `error` and the RoI error bit; reads clear the map and
//     counter; a masked pair reads as zero towers;
//   - register read-back of thresholds, tau selection, offset and mask.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_cp_chip;
  import cpm_pkg::*;
  import cpm_ref_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  logic [7:0] ta [2][3][7], tbv [2][3][7];
  link_word_t enc [2][3][7];
  bus5_t in5 [2][3][3];
  bus3_t in3 [2][3];
  logic [N_THR-1:0] hits [2];
  logic error, add_reset = 0, en_readout = 0, load_shift = 0, roi_fifo_empty;
  logic [1:0] roi_sr;
  logic [6:0] reg_addr = 0;
  logic reg_we = 0, reg_re = 0;
  logic [15:0] reg_wdata = 0, reg_rdata;
  int corrupt_idx = -1;   // pair index l*21+p*7+e whose word is corrupted

  for (genvar l = 0; l < 2; l++)
    for (genvar p = 0; p < 3; p++)
      for (genvar e = 0; e < 7; e++) begin : g_enc
        bcmux_encoder_model u_enc (.clk, .rst_n, .a(ta[l][p][e]), .b(tbv[l][p][e]), .word(enc[l][p][e]));
      end

  function automatic link_word_t wsel(int l, int p, int e);
    return (corrupt_idx == l*21 + p*7 + e) ? link_word_t'(enc[l][p][e] ^ 10'h010) : enc[l][p][e];
  endfunction
  always_comb
    for (int l = 0; l < 2; l++)
      for (int p = 0; p < 3; p++) begin
        bus5_t t;
        t = pack_bus5(ZERO_WORD, wsel(l, p, 0));
        in3[l][p] = t[4:2];
        for (int g = 0; g < 3; g++) in5[l][p][g] = pack_bus5(wsel(l, p, 1 + 2*g), wsel(l, p, 2 + 2*g));
      end

  cp_chip dut (.clk, .rst_n, .in5, .in3, .hits, .error, .add_reset, .en_readout, .load_shift,
    .roi_sr, .roi_fifo_empty, .reg_addr, .reg_we, .reg_re, .reg_wdata, .reg_rdata);

  thr_set_t thr [16];
  logic [41:0] mask = 0;
  int cyc = 0;
  roi_word_t exp_roi [int][2];
  bit prev_nz [2][3][7];
  int n_hit_halves = 0, n_multi = 0, n_sat = 0, n_tau = 0, n_slices = 0;

  task automatic reg_write(input int addr, input int data);
    @(negedge clk); cyc++;
    reg_addr = 7'(addr); reg_wdata = 16'(data); reg_we = 1;
    @(negedge clk); cyc++;
    reg_we = 0;
  endtask

  task automatic reg_read(input int addr, output logic [15:0] d);
    @(negedge clk); cyc++;
    reg_addr = 7'(addr); reg_re = 1; #1 d = reg_rdata;
    @(negedge clk); cyc++;
    reg_re = 0;
  endtask

  // Drive one crossing of random clusters and record the expected result
  task automatic crossing(input int density);
    grid_t em, had;
    @(negedge clk); cyc++;
    for (int p = 0; p < 20; p++) for (int e = 0; e < 7; e++) begin em[p][e] = 0; had[p][e] = 0; end
    repeat ($urandom_range(0, density)) begin
      int cp, ce;
      cp = $urandom_range(0, 5); ce = $urandom_range(0, 6);
      em[cp][ce] = $urandom_range(0, 9) == 0 ? 255 : $urandom_range(5, 120);
      if (cp < 5) em[cp+1][ce] = $urandom_range(0, 40);
      if (ce < 6) em[cp][ce+1] = $urandom_range(0, 20);
      had[cp][ce] = $urandom_range(0, 3) == 0 ? $urandom_range(0, 60) : 0;
    end
    for (int l = 0; l < 2; l++)
      for (int p = 0; p < 3; p++)
        for (int e = 0; e < 7; e++) begin
          bit zero;
          zero = prev_nz[l][p][e] || mask[l*21 + p*7 + e];
          if (zero) begin
            if (l == 0) begin em[2*p][e] = 0; em[2*p+1][e] = 0; end
            else begin had[2*p][e] = 0; had[2*p+1][e] = 0; end
          end
          ta[l][p][e]  = 8'(l == 0 ? em[2*p][e] : had[2*p][e]);
          tbv[l][p][e] = 8'(l == 0 ? em[2*p+1][e] : had[2*p+1][e]);
          prev_nz[l][p][e] = (ta[l][p][e] != 0 || tbv[l][p][e] != 0) && !mask[l*21 + p*7 + e];
        end
    for (int h = 0; h < 2; h++) begin
      int nw;
      exp_roi[cyc][h] = half_roi(em, had, 0, h, thr, nw);
      if (nw > 0) n_hit_halves++;
      if (nw > 1) n_multi++;
      if (exp_roi[cyc][h].sat) n_sat++;
      for (int s = 8; s < 16; s++) if (thr[s].tau && exp_roi[cyc][h].hits[s]) n_tau++;
    end
  endtask

  // Each crossing's hits must appear five edges after it is driven
  always @(negedge clk) begin
    if (exp_roi.exists(cyc - 5) && corrupt_idx < 0) begin
      for (int h = 0; h < 2; h++)
        `CHECK(hits[h] == exp_roi[cyc - 5][h].hits,
               $sformatf("half %0d hits %h exp %h (crossing %0d)", h, hits[h], exp_roi[cyc - 5][h].hits, cyc - 5))
    end
  end

  int offset = 12;
  task automatic roi_readout(input int n);
    repeat (n) begin
      int t0;
      logic [19:0] got [2];
      roi_word_t e [2];
      crossing(4);
      t0 = cyc;
      en_readout = 1; crossing(4); en_readout = 0;
      crossing(4);
      load_shift = 1; crossing(4); load_shift = 0;
      for (int k = 0; k < 20; k++) begin
        got[0][k] = roi_sr[0]; got[1][k] = roi_sr[1];
        crossing(4);
      end
      // roi word of tick t0 - offset belongs to the crossing driven 5 ticks earlier
      if (exp_roi.exists(t0 - offset - 5)) begin
        e = exp_roi[t0 - offset - 5];
        n_slices++;
        `CHECK(got[0] == e[0] && got[1] == e[1],
               $sformatf("RoI slice %h %h exp %h %h", got[0], got[1], e[0], e[1]))
      end
    end
  endtask

  initial begin
    logic [15:0] d;
    for (int l = 0; l < 2; l++) for (int p = 0; p < 3; p++) for (int e = 0; e < 7; e++) begin
      ta[l][p][e] = 0; tbv[l][p][e] = 0; prev_nz[l][p][e] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 16; s++) begin
      thr[s].tau     = (s >= 8) && (s % 3 != 0);
      thr[s].clus    = 12'($urandom_range(5, 150));
      thr[s].emiso   = (s % 4 == 0) ? 12'($urandom_range(0, 30)) : 12'hFFF;
      thr[s].hadiso  = (s % 4 == 1) ? 12'($urandom_range(0, 20)) : 12'hFFF;
      thr[s].hadcore = (s % 4 == 2) ? 12'($urandom_range(0, 20)) : 12'hFFF;
      reg_write(4*s + 0, thr[s].clus);
      reg_write(4*s + 1, thr[s].emiso);
      reg_write(4*s + 2, thr[s].hadiso);
      reg_write(4*s + 3, thr[s].hadcore);
    end
    begin
      logic [7:0] ts;
      for (int s = 8; s < 16; s++) ts[s-8] = thr[s].tau;
      reg_write(7'h40, ts);
      reg_read(7'h40, d); `CHECK(d == {8'h00, ts}, "tau_sel readback")
    end
    reg_read(4*5 + 1, d); `CHECK(d == 16'(thr[5].emiso), "threshold readback")
    reg_write(7'h41, offset);
    reg_read(7'h41, d); `CHECK(d == 16'(offset), "offset readback")
    @(negedge clk); cyc++; add_reset = 1; @(negedge clk); cyc++; add_reset = 0;
    // hits with sparse and dense clusters
    repeat (3000) crossing(3);
    repeat (1000) crossing(8);
    // RoI read-out
    roi_readout(80);
    // mask pair 12 (em, pair-row 1, eta 5) and 30 (had, pair-row 1, eta 2)
    mask[12] = 1; mask[30] = 1;
    reg_write(7'h42, 16'h1000); reg_write(7'h43, 16'h4000);
    repeat (6) crossing(0);
    reg_read(7'h43, d); `CHECK(d == 16'h4000, "mask readback")
    repeat (2000) crossing(6);
    mask = 0; reg_write(7'h42, 0); reg_write(7'h43, 0);
    repeat (6) crossing(0);
    // parity errors
    reg_read(7'h48, d); `CHECK(d == 0, "no errors in map")
    reg_read(7'h4B, d); `CHECK(d == 0, "no errors counted")
    `CHECK(!error, "error output low")
    foreach (exp_roi[k]) ;
    begin
      int idx [3] = '{3, 20, 37};
      foreach (idx[i]) begin
        @(negedge clk); cyc++; corrupt_idx = idx[i];
        @(negedge clk); cyc++; corrupt_idx = -1;
        repeat (6) begin @(negedge clk); cyc++; end
      end
      reg_read(7'h48, d); `CHECK(d == 16'h0008, $sformatf("error map low %h", d))
      reg_read(7'h49, d); `CHECK(d == 16'h0010, $sformatf("error map mid %h", d))
      reg_read(7'h4A, d); `CHECK(d == 16'h0020, $sformatf("error map high %h", d))
      `CHECK(error, "error output set")
      reg_read(7'h4B, d); `CHECK(d == 3, $sformatf("error count %0d", d))
      reg_read(7'h48, d); `CHECK(d == 0, "error map cleared by read")
      reg_read(7'h4B, d); `CHECK(d == 0, "error count cleared by read")
      reg_read(7'h49, d); reg_read(7'h4A, d);
      repeat (2) begin @(negedge clk); cyc++; end
      `CHECK(!error, "error output clears")
    end
    // RoI error bit: corrupt a word and read out the matching slice
    begin
      int w;
      logic [19:0] got;
      @(negedge clk); cyc++; corrupt_idx = 9; w = cyc;
      @(negedge clk); cyc++; corrupt_idx = -1;
      while (cyc < w + 4 + offset) begin @(negedge clk); cyc++; end
      en_readout = 1; @(negedge clk); cyc++; en_readout = 0;
      @(negedge clk); cyc++;
      load_shift = 1; @(negedge clk); cyc++; load_shift = 0;
      for (int k = 0; k < 20; k++) begin got[k] = roi_sr[0]; @(negedge clk); cyc++; end
      `CHECK(got[19] == 1'b1, "RoI error bit set for the corrupted crossing")
    end
    $display("hit_halves=%0d multi_window=%0d sat=%0d tau_hits=%0d slices=%0d",
             n_hit_halves, n_multi, n_sat, n_tau, n_slices);
    `CHECK(n_multi == 0, "declustering leaves at most one window per half")
    `CHECK(n_hit_halves > 100 && n_sat > 10 && n_tau > 10 && n_slices > 50, "mechanisms exercised")
    `TB_FINISH
  end
endmodule
