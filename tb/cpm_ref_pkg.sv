// cpm_ref_pkg: reference model of the cluster algorithms used by the CP chip
// and module-level testbenches. It works on a plain integer tower grid
// (20 phi rows x 7 eta columns) and is written independently of the RTL:
// sums are taken over rectangles of towers, and the local-maximum rule is
// written as a table of neighbour comparisons.
package cpm_ref_pkg;
  import cpm_pkg::*;

  typedef int grid_t [20][7];

  typedef struct {
    bit [15:0] hits;
    bit        is_max;
    bit        sat;
  } win_res_t;

  // sum of em (sel bit 0) and/or had (sel bit 1) over a rectangle
  function automatic int rect(const ref grid_t em, const ref grid_t had,
                              input int p0, input int e0, input int np, input int ne, input int sel);
    int s = 0;
    for (int p = p0; p < p0 + np; p++)
      for (int e = e0; e < e0 + ne; e++) begin
        if (sel[0]) s += em[p][e];
        if (sel[1]) s += had[p][e];
      end
    return s;
  endfunction

  // Window whose 4x4 corner (lowest phi, lowest eta) is grid tower (p0, e0)
  function automatic win_res_t window(const ref grid_t em, const ref grid_t had,
                                      input int p0, input int e0, input thr_set_t thr [16]);
    win_res_t r;
    int core, emring, hadring, hcore, c;
    core = rect(em, had, p0 + 1, e0 + 1, 2, 2, 3);
    r.is_max = 1;
    for (int dp = -1; dp <= 1; dp++)
      for (int de = -1; de <= 1; de++)
        if (dp != 0 || de != 0) begin
          int nb;
          bit strict;
          nb = rect(em, had, p0 + 1 + dp, e0 + 1 + de, 2, 2, 3);
          strict = (dp == 1) || (dp == 0 && de == 1);
          if (strict ? !(core > nb) : !(core >= nb)) r.is_max = 0;
        end
    emring  = rect(em, had, p0, e0, 4, 4, 1) - rect(em, had, p0 + 1, e0 + 1, 2, 2, 1);
    hadring = rect(em, had, p0, e0, 4, 4, 2) - rect(em, had, p0 + 1, e0 + 1, 2, 2, 2);
    hcore   = rect(em, had, p0 + 1, e0 + 1, 2, 2, 2);
    r.sat = 0;
    for (int p = p0 + 1; p < p0 + 3; p++)
      for (int e = e0 + 1; e < e0 + 3; e++)
        if (em[p][e] == 255 || had[p][e] == 255) r.sat = 1;
    for (int s = 0; s < 16; s++) begin
      bit clus, iso;
      clus = 0;
      for (int k = 0; k < 4; k++) begin
        c = (k < 2) ? rect(em, had, p0 + 1 + k, e0 + 1, 1, 2, 1)
                    : rect(em, had, p0 + 1, e0 + k - 1, 2, 1, 1);
        if (thr[s].tau) c += hcore;
        if (c > int'(thr[s].clus)) clus = 1;
      end
      iso = emring <= int'(thr[s].emiso) && hadring <= int'(thr[s].hadiso)
         && (thr[s].tau || hcore <= int'(thr[s].hadcore));
      r.hits[s] = r.is_max && clus && iso;
    end
    return r;
  endfunction

  // RoI word of one CP chip half. The chip's region starts at grid phi row
  // prow; half h covers reference eta columns 1+2h and 2+2h.
  function automatic roi_word_t half_roi(const ref grid_t em, const ref grid_t had,
                                         input int prow, input int h, input thr_set_t thr [16],
                                         output int n_windows_hit);
    roi_word_t r;
    bit found = 0;
    r = '0;
    n_windows_hit = 0;
    for (int k = 0; k < 4; k++) begin
      win_res_t w;
      w = window(em, had, prow + 1 + k / 2, 2 * h + k % 2, thr);
      if (w.hits != 0) begin
        n_windows_hit++;
        if (!found) begin r.loc = 2'(k); r.sat = w.sat; found = 1; end
        r.hits |= w.hits;
      end
    end
    return r;
  endfunction
endpackage
