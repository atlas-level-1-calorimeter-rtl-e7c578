// Testbench for cluster_window. A reference model written independently of
// the RTL (integer sums over rectangles of towers) computes, for random
// windows and random threshold sets, the e/gamma and tau cluster tests, the
// isolation tests, the local-maximum (declustering) test including ties
// with each neighbour, the saturation flag and the RoI cluster sum.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_cluster_window;
  import cpm_pkg::*;
  `TB_COUNTERS
  localparam int NT = 16;
  logic [7:0] em [4][4], had [4][4];
  thr_set_t thr [NT];
  logic [NT-1:0] hits;
  logic is_max, sat;
  logic [SUM_W-1:0] roi_sum;

  cluster_window #(.NT(NT)) dut (.em, .had, .thr, .hits, .is_max, .sat, .roi_sum);

  // E_T summed over both layers (sel 3), em (1) or had (2) over a rectangle
  function automatic int rect(int p0, int e0, int np, int ne, int sel);
    int s = 0;
    for (int p = p0; p < p0 + np; p++)
      for (int e = e0; e < e0 + ne; e++) begin
        if (sel[0]) s += em[p][e];
        if (sel[1]) s += had[p][e];
      end
    return s;
  endfunction

  int n_max = 0, n_tie_win = 0, n_tie_lose = 0, n_tau_hit = 0, n_eg_hit = 0, n_sat = 0, n_iso_veto = 0;

  task automatic check_one();
    int core, emring, hadring, hcore, c;
    bit ref_max, tie;
    bit [NT-1:0] ref_hits;
    #1;
    core = rect(1, 1, 2, 2, 3);
    ref_max = 1; tie = 0;
    for (int dp = -1; dp <= 1; dp++)
      for (int de = -1; de <= 1; de++)
        if (dp != 0 || de != 0) begin
          int nb;
          bit strict;
          nb = rect(1 + dp, 1 + de, 2, 2, 3);
          strict = (dp == 1) || (dp == 0 && de == 1);
          if (nb == core) tie = 1;
          if (strict ? !(core > nb) : !(core >= nb)) ref_max = 0;
        end
    emring  = rect(0, 0, 4, 4, 1) - rect(1, 1, 2, 2, 1);
    hadring = rect(0, 0, 4, 4, 2) - rect(1, 1, 2, 2, 2);
    hcore   = rect(1, 1, 2, 2, 2);
    for (int s = 0; s < NT; s++) begin
      bit clus, iso;
      clus = 0;
      for (int k = 0; k < 4; k++) begin
        // k: lower row, upper row, left column, right column
        c = (k < 2) ? rect(1 + k, 1, 1, 2, 1) : rect(1, k - 1, 2, 1, 1);
        if (thr[s].tau) c += hcore;
        if (c > int'(thr[s].clus)) clus = 1;
      end
      iso = emring <= int'(thr[s].emiso) && hadring <= int'(thr[s].hadiso)
         && (thr[s].tau || hcore <= int'(thr[s].hadcore));
      if (clus && !iso) n_iso_veto++;
      ref_hits[s] = ref_max && clus && iso;
      if (ref_hits[s]) begin if (thr[s].tau) n_tau_hit++; else n_eg_hit++; end
    end
    if (ref_max) n_max++;
    if (tie) begin if (ref_max) n_tie_win++; else n_tie_lose++; end
    `CHECK(is_max == ref_max, $sformatf("is_max %0d exp %0d", is_max, ref_max))
    `CHECK(hits == ref_hits, $sformatf("hits %h exp %h", hits, ref_hits))
    `CHECK(int'(roi_sum) == core, "roi sum")
    begin
      bit rs = 0;
      for (int p = 1; p < 3; p++) for (int e = 1; e < 3; e++)
        if (em[p][e] == 8'hFF || had[p][e] == 8'hFF) rs = 1;
      if (rs) n_sat++;
      `CHECK(sat == rs, "saturation flag")
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int mode, maxv;
      mode = n % 4;
      maxv = (mode == 0) ? 3 : (mode == 1) ? 20 : 255;
      for (int p = 0; p < 4; p++)
        for (int e = 0; e < 4; e++) begin
          em[p][e]  = 8'($urandom_range(0, maxv));
          had[p][e] = 8'($urandom_range(0, (mode == 3) ? 255 : maxv / 2));
        end
      if (mode == 2) begin        // isolated peak in the core
        for (int p = 0; p < 4; p++) for (int e = 0; e < 4; e++) begin
          em[p][e] = 8'($urandom_range(0, 2)); had[p][e] = 8'($urandom_range(0, 1));
        end
        em[1 + $urandom_range(0, 1)][1 + $urandom_range(0, 1)] = 8'($urandom_range(10, 255));
      end
      for (int s = 0; s < NT; s++) begin
        thr[s].tau     = (s >= 8) && $urandom_range(0, 1);
        thr[s].clus    = 12'($urandom_range(0, (mode == 0) ? 8 : 300));
        thr[s].emiso   = 12'($urandom_range(0, 40));
        thr[s].hadiso  = 12'($urandom_range(0, 40));
        thr[s].hadcore = 12'($urandom_range(0, 30));
        if ($urandom_range(0, 3) == 0) begin
          thr[s].emiso = 12'hFFF; thr[s].hadiso = 12'hFFF; thr[s].hadcore = 12'hFFF;
        end
      end
      check_one();
    end
    $display("max=%0d tie_win=%0d tie_lose=%0d eg_hits=%0d tau_hits=%0d sat=%0d iso_veto=%0d",
             n_max, n_tie_win, n_tie_lose, n_eg_hit, n_tau_hit, n_sat, n_iso_veto);
    `CHECK(n_tie_win > 0 && n_tie_lose > 0 && n_tau_hit > 0 && n_eg_hit > 0 && n_sat > 0 && n_iso_veto > 0,
           "all cases exercised")
    `TB_FINISH
  end
endmodule
