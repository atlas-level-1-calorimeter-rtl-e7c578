// cluster_window: the e/gamma and tau/hadron algorithms for one 4x4 window.
//
// The window holds 4x4 towers in each of the em and hadronic layers, indexed
// [phi][eta] with [0][0] at (-phi,-eta). The 2x2 core is [1..2][1..2] and the
// reference tower is [1][1]; the other 12 towers form the isolation ring.
// Sums formed:
//   - four trigger clusters: the 1x2 and 2x1 pairs of em core towers
//     (e/gamma); for tau each em pair plus the 2x2 hadronic core;
//   - em ring isolation, hadronic ring isolation and the hadronic core sum;
//   - the RoI cluster: the 2x2 em+had sum of the core, and the same sum for
//     the eight overlapping 2x2 positions around it.
// A threshold set is passed when a trigger cluster exceeds its cluster
// threshold and no isolation sum exceeds its isolation threshold (the hadronic
// core is an isolation condition for e/gamma only). Sets marked tau use the
// tau clusters. The window then reports the passed sets only if its RoI
// cluster is a local maximum: greater than the neighbours at +phi and the +eta
// neighbour on the same row, and at least equal to the neighbours at -phi and
// the -eta neighbour on the same row. That asymmetry makes exactly one of two
// equal neighbouring clusters win.
// Purely combinational; the CP chip places registers around it.
module cluster_window
  import cpm_pkg::*;
#(
  parameter int unsigned NT = N_THR
) (
  input  logic [ET_W-1:0] em  [4][4],
  input  logic [ET_W-1:0] had [4][4],
  input  thr_set_t        thr [NT],
  output logic [NT-1:0]   hits,
  output logic            is_max,
  output logic            sat,
  output logic [SUM_W-1:0] roi_sum
);
  logic [SUM_W-1:0] pair_em [4];
  logic [SUM_W-1:0] had_core, em_ring, had_ring;
  logic [SUM_W-1:0] roi [3][3];   // 2x2 em+had sums, [dphi+1][deta+1]
  logic [NT-1:0]    pass;

  always_comb begin
    pair_em[0] = SUM_W'(em[1][1]) + SUM_W'(em[1][2]);  // lower row
    pair_em[1] = SUM_W'(em[2][1]) + SUM_W'(em[2][2]);  // upper row
    pair_em[2] = SUM_W'(em[1][1]) + SUM_W'(em[2][1]);  // left column
    pair_em[3] = SUM_W'(em[1][2]) + SUM_W'(em[2][2]);  // right column
    had_core   = SUM_W'(had[1][1]) + SUM_W'(had[1][2]) + SUM_W'(had[2][1]) + SUM_W'(had[2][2]);

    em_ring  = '0;
    had_ring = '0;
    for (int p = 0; p < 4; p++)
      for (int e = 0; e < 4; e++)
        if (p == 0 || p == 3 || e == 0 || e == 3) begin
          em_ring  += SUM_W'(em[p][e]);
          had_ring += SUM_W'(had[p][e]);
        end

    for (int dp = 0; dp < 3; dp++)
      for (int de = 0; de < 3; de++)
        roi[dp][de] = SUM_W'(em[dp][de])   + SUM_W'(em[dp][de+1])
                    + SUM_W'(em[dp+1][de]) + SUM_W'(em[dp+1][de+1])
                    + SUM_W'(had[dp][de])  + SUM_W'(had[dp][de+1])
                    + SUM_W'(had[dp+1][de]) + SUM_W'(had[dp+1][de+1]);
    roi_sum = roi[1][1];

    // strictly greater than the +phi row and the +eta neighbour,
    // at least equal to the -phi row and the -eta neighbour
    is_max = (roi[1][1] >  roi[2][0]) && (roi[1][1] >  roi[2][1]) && (roi[1][1] >  roi[2][2])
          && (roi[1][1] >  roi[1][2])
          && (roi[1][1] >= roi[0][0]) && (roi[1][1] >= roi[0][1]) && (roi[1][1] >= roi[0][2])
          && (roi[1][1] >= roi[1][0]);

    sat = (em[1][1] == '1) || (em[1][2] == '1) || (em[2][1] == '1) || (em[2][2] == '1)
       || (had[1][1] == '1) || (had[1][2] == '1) || (had[2][1] == '1) || (had[2][2] == '1);

    for (int s = 0; s < NT; s++) begin
      logic clus_ok, iso_ok;
      clus_ok = 1'b0;
      for (int k = 0; k < 4; k++) begin
        logic [SUM_W-1:0] c;
        c = thr[s].tau ? pair_em[k] + had_core : pair_em[k];
        if (c > thr[s].clus) clus_ok = 1'b1;
      end
      iso_ok = (em_ring <= thr[s].emiso) && (had_ring <= thr[s].hadiso)
            && (thr[s].tau || (had_core <= thr[s].hadcore));
      pass[s] = clus_ok && iso_ok;
    end
    hits = is_max ? pass : '0;
  end
endmodule
