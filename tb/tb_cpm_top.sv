// Module-level testbench for cpm_top at its default (full) size.
//
// 140 behavioural BC-mux encoders drive the module: 80 for its own links
// (2 layers x 10 Serialisers x 4 links) and 60 standing in for the
// neighbouring modules' fan-in (eta column -1 on the 3-line buses, eta
// columns 4 and 5 on the 5-line buses, delayed one tick as a neighbour's
// Serialiser would). Random cluster patterns that obey the BC-mux rule are
// generated on the 20 x 7 tower grid of each layer, and the reference model
// (cpm_ref_pkg) predicts every CP chip half. All set-up goes through VME--
// cycles, as on a real module. Checked:
//   - CMM outputs: per-threshold counts of the 16 chip halves, saturating at
//     7, with odd parity, six ticks after the link words;
//   - fan-out buses to the neighbours;
//   - DAQ and RoI read-out through the G-link retiming FIFOs: every slice of
//     every L1A, field by field (towers, hit counts, RoI words, BCN, parity);
//   - parity errors reach the Serialiser and CP chip error registers;
//   - a ROC reset in mid read-out gives an EF error that flush and clear fix;
//   - dropped L1As, DAV dead time, VME hold-off during TTC commands, LEDs.
// At the end it prints how many times each mechanism was exercised.
`timescale 1ps/1ps
`include "tb_util.svh"
module tb_cpm_top;
  import cpm_pkg::*;
  import cpm_ref_pkg::*;
  `TB_COUNTERS
  logic clk40 = 0, clk_xtal = 0, rst_n = 0;
  always #12475 clk40 = ~clk40;       // 40.08 MHz TTC clock
  always #12500 clk_xtal = ~clk_xtal; // 40.00 MHz G-link crystal
  `WATCHDOG(clk40, 120000)

  // ---------------- DUT ----------------
  link_word_t link_word [2][10][4];
  logic [3:0] link_lock [2][10];
  bus3_t fi_m [2][10], fo_p [2][10];
  bus5_t fi_p [2][10], fo_m [2][10];
  logic l1a = 0, bcntres = 0, rstldcnt = 0, ttc_cmd_valid = 0;
  logic [7:0] ttc_cmd = 0, ttc_cmd_out;
  logic ttc_cmd_out_valid;
  logic [24:0] cmm_lo, cmm_hi;
  logic [19:0] daq_tx_data, roi_tx_data;
  logic daq_tx_dav_n, roi_tx_dav_n;
  logic [5:0] geoadd = 6'd9;
  logic [23:1] vme_a = 0;
  logic [15:0] vme_d_in = 0, vme_d_out;
  logic vme_d_oe, vme_ds_n = 1, vme_write_n = 1, vme_dtack_n;
  logic [3:0] glink_status = 4'h3;
  logic [1:0] glink_pll_err = 0;
  logic [7:0] can_status = 0, cp_dll_lock = 8'hFF, led_cp_err;
  logic [19:0] ser_dll_lock = '1, ser_sync_done = '1, led_link_loss;
  logic [6:0] control;
  logic [1:0] can_control;
  logic [15:0] led_hit;
  logic led_l1a, led_vme, daq_ef_error, roi_ef_error;

  cpm_top dut (.*);

  // ---------------- stimulus: encoders ----------------
  // column 0: eta -1 (neighbour), 1..4: own links 0..3, 5..6: eta 4, 5 (neighbour)
  logic [7:0] ea [2][10][7], eb [2][10][7];
  link_word_t ew [2][10][7], ew_d [2][10][7];
  int corrupt_l = -1, corrupt_s = 0, corrupt_c = 0;

  for (genvar l = 0; l < 2; l++)
    for (genvar s = 0; s < 10; s++)
      for (genvar c = 0; c < 7; c++) begin : g_enc
        bcmux_encoder_model u_enc (.clk(clk40), .rst_n, .a(ea[l][s][c]), .b(eb[l][s][c]), .word(ew[l][s][c]));
      end

  always @(posedge clk40) ew_d <= ew;    // neighbour Serialiser register

  always_comb
    for (int l = 0; l < 2; l++)
      for (int s = 0; s < 10; s++) begin
        bus5_t t;
        for (int c = 0; c < 4; c++)
          link_word[l][s][c] = (corrupt_l == l && corrupt_s == s && corrupt_c == c)
                             ? link_word_t'(ew[l][s][c+1] ^ 10'h001) : ew[l][s][c+1];
        t = pack_bus5(ZERO_WORD, ew_d[l][s][0]);
        fi_m[l][s] = t[4:2];
        fi_p[l][s] = pack_bus5(ew_d[l][s][5], ew_d[l][s][6]);
      end

  int cyc = 0;
  always @(posedge clk40) cyc <= cyc + 1;

  // ---------------- reference ----------------
  thr_set_t thr [16];
  logic [49:0] exp_cmm [int];          // {hi, lo} count bits of a crossing
  logic [15:0][19:0] exp_roi [int];    // RoI words, field 2c+h
  logic [19:0][79:0] exp_ser [int];    // Serialiser slices, field 2s+l
  bit prev_nz [2][10][7];
  int check_from = 1 << 30;            // first crossing whose CMM output is checked
  int n_cross = 0, n_hit_halves = 0, n_declust = 0, n_sat7 = 0, n_same = 0, n_next = 0;

  // Density (clusters per crossing) and maximum E_T of the generator
  int density = 0, maxe = 1;
  bit gen_on = 0;
  always @(negedge clk40) if (gen_on) gen_crossing();

  function automatic void gen_crossing();
    grid_t em, had;
    for (int p = 0; p < 20; p++) for (int e = 0; e < 7; e++) begin em[p][e] = 0; had[p][e] = 0; end
    repeat ($urandom_range(0, density)) begin
      int cp, ce;
      cp = $urandom_range(0, 19); ce = $urandom_range(0, 6);
      em[cp][ce] = $urandom_range(0, 15) == 0 ? 255 : $urandom_range(1, maxe);
      if (cp < 19 && $urandom_range(0, 1)) em[cp+1][ce] = $urandom_range(0, maxe / 3);
      if (ce < 6 && $urandom_range(0, 1)) em[cp][ce+1] = $urandom_range(0, maxe / 4);
      if ($urandom_range(0, 2) == 0) had[cp][ce] = $urandom_range(0, maxe / 2);
    end
    for (int l = 0; l < 2; l++)
      for (int s = 0; s < 10; s++)
        for (int c = 0; c < 7; c++) begin
          if (prev_nz[l][s][c]) begin
            if (l == 0) begin em[2*s][c] = 0; em[2*s+1][c] = 0; end
            else        begin had[2*s][c] = 0; had[2*s+1][c] = 0; end
          end
          ea[l][s][c] = 8'(l == 0 ? em[2*s][c] : had[2*s][c]);
          eb[l][s][c] = 8'(l == 0 ? em[2*s+1][c] : had[2*s+1][c]);
          prev_nz[l][s][c] = ea[l][s][c] != 0 || eb[l][s][c] != 0;
          if (ea[l][s][c] != 0 && eb[l][s][c] != 0) n_same++;
          else if (eb[l][s][c] != 0) n_next++;
        end
    // expected results of this crossing
    begin
      int cnt [16];
      logic [47:0] cb;
      for (int t = 0; t < 16; t++) cnt[t] = 0;
      for (int c = 0; c < 8; c++)
        for (int h = 0; h < 2; h++) begin
          roi_word_t r;
          int nw;
          r = half_roi(em, had, 2 * c, h, thr, nw);
          exp_roi[cyc][2*c + h] = 20'(r);
          if (r.hits != 0) n_hit_halves++;
          for (int t = 0; t < 16; t++) cnt[t] += r.hits[t];
          // windows that pass some threshold set apart from the local-maximum test
          for (int k = 0; k < 4; k++) begin
            win_res_t w;
            w = window(em, had, 2 * c + 1 + k / 2, 2 * h + k % 2, thr);
            if (!w.is_max && rect(em, had, 2 * c + 2 + k / 2, 2 * h + k % 2 + 1, 2, 2, 3) > 0) n_declust++;
          end
        end
      for (int t = 0; t < 16; t++) begin
        if (cnt[t] > 7) begin cnt[t] = 7; n_sat7++; end
        cb[3*t +: 3] = 3'(cnt[t]);
      end
      exp_cmm[cyc] = {2'b00, cb};
      for (int l = 0; l < 2; l++)
        for (int s = 0; s < 10; s++)
          for (int c = 0; c < 4; c++) begin
            exp_ser[cyc][2*s + l][20*c +: 10]      = {2'b00, ea[l][s][c+1]};
            exp_ser[cyc][2*s + l][20*c + 10 +: 10] = {2'b00, eb[l][s][c+1]};
          end
    end
    n_cross++;
  endfunction

  // let n crossings go by with the given generator settings
  task automatic crossing(input int d, input int m, input int n = 1);
    density = d; maxe = m;
    repeat (n) @(negedge clk40);
  endtask

  // CMM outputs: crossing driven in tick i is on the outputs in tick i+7
  int n_cmm_checked = 0;
  always @(negedge clk40) begin
    int i;
    i = cyc - 7;
    if (i >= check_from && exp_cmm.exists(i)) begin
      logic [47:0] e;
      e = exp_cmm[i][47:0];
      `CHECK(cmm_lo[23:0] == e[23:0] && cmm_hi[23:0] == e[47:24],
             $sformatf("CMM counts lo %h hi %h exp %h %h (crossing %0d)", cmm_lo[23:0], cmm_hi[23:0], e[23:0], e[47:24], i))
      `CHECK(^cmm_lo == 1'b1 && ^cmm_hi == 1'b1, "CMM odd parity")
      n_cmm_checked++;
    end
  end

  // fan-out: the own link words of the previous tick
  link_word_t lw_d [2][10][4];
  always @(posedge clk40) lw_d <= link_word;
  int n_fo = 0;
  always @(negedge clk40) if (rst_n && cyc > 10 && cyc % 7 == 0) begin
    for (int l = 0; l < 2; l++)
      for (int s = 0; s < 10; s++) begin
        bus5_t y;
        y = pack_bus5(lw_d[l][s][2], lw_d[l][s][3]);
        `CHECK(fo_m[l][s] == pack_bus5(lw_d[l][s][0], lw_d[l][s][1]) && fo_p[l][s] == y[4:2], "fan-out buses")
      end
    n_fo++;
  end

  // ---------------- read-out reference ----------------
  localparam int SER_OFF = 10, HIT_OFF = 6, CP_OFF = 7;
  int nsl = 1, bcr_cyc = 0, busy_until = 0;
  logic [19:0][83:0] daq_q [$];
  logic [15:0][21:0] roi_q [$];
  int n_l1a = 0, n_drop = 0, n_multi = 0;
  bit ro_skip = 0;

  task automatic send_l1a();
    @(negedge clk40);
    l1a = 1;
    if (cyc <= busy_until) n_drop++;
    else begin
      int b;
      b = (cyc - bcr_cyc - 1) & 12'hFFF;
      for (int j = 0; j < nsl; j++) begin
        int x;
        logic [19:0][83:0] d;
        logic [15:0][21:0] r;
        logic [47:0] cb;
        x = cyc + 1 + j - SER_OFF - 3;
        cb = exp_cmm.exists(x) ? exp_cmm[x][47:0] : 48'h0;
        for (int f = 0; f < 20; f++) begin
          d[f][79:0]  = exp_ser.exists(x) ? exp_ser[x][f] : 80'h0;
          d[f][82:80] = (f < 16) ? cb[3*f +: 3] : 3'(b >> (3 * (f - 16)));
          d[f][83]    = ~^d[f][82:0];
        end
        for (int f = 0; f < 16; f++) begin
          r[f][19:0] = exp_roi.exists(x) ? exp_roi[x][f] : 20'h0;
          r[f][20]   = (f < 12) ? b[f] : 1'b0;
          r[f][21]   = ~^r[f][20:0];
        end
        daq_q.push_back(d);
        roi_q.push_back(r);
      end
      if (nsl > 1) n_multi++;
      busy_until = cyc + nsl;
      n_l1a++;
    end
    @(negedge clk40);
    l1a = 0;
  endtask

  // G-link receivers: split each frame (run of DAV words) into slices
  int n_daq_sl = 0, n_roi_sl = 0, n_daq_frames = 0, n_gap_ok = 0;
  logic [19:0][83:0] daq_rx;
  logic [15:0][21:0] roi_rx;
  int daq_bit = 0, roi_bit = 0;
  always @(posedge clk_xtal) if (rst_n) begin
    #1;
    if (!daq_tx_dav_n) begin
      for (int f = 0; f < 20; f++) daq_rx[f][daq_bit] = daq_tx_data[f];
      daq_bit++;
      if (daq_bit == 84) begin
        daq_bit = 0;
        n_daq_sl++;
        if (!ro_skip) begin
          if (daq_q.size() == 0) `CHECK(0, "unexpected DAQ slice")
          else begin
            logic [19:0][83:0] e;
            e = daq_q.pop_front();
            for (int f = 0; f < 20; f++)
              `CHECK(daq_rx[f] == e[f], $sformatf("DAQ field %0d got %h exp %h", f, daq_rx[f], e[f]))
          end
        end
      end
    end else begin
      if (!ro_skip) `CHECK(daq_bit == 0, "DAQ frame ended inside a slice")
      daq_bit = 0;
    end
    if (!roi_tx_dav_n) begin
      for (int f = 0; f < 16; f++) roi_rx[f][roi_bit] = roi_tx_data[f];
      `CHECK(roi_tx_data[19:16] == 0, "RoI fields 16..19 low")
      roi_bit++;
      if (roi_bit == 22) begin
        roi_bit = 0;
        n_roi_sl++;
        if (!ro_skip) begin
          if (roi_q.size() == 0) `CHECK(0, "unexpected RoI slice")
          else begin
            logic [15:0][21:0] e;
            e = roi_q.pop_front();
            for (int f = 0; f < 16; f++)
              `CHECK(roi_rx[f] == e[f], $sformatf("RoI field %0d got %h exp %h", f, roi_rx[f], e[f]))
          end
        end
      end
    end else begin
      if (!ro_skip) `CHECK(roi_bit == 0, "RoI frame ended inside a slice")
      roi_bit = 0;
    end
  end

  // DAV dead time on the DAQ link (40 MHz side, MinDAV = 3)
  int low_run = 0;
  bit seen = 0;
  always @(negedge clk40) if (rst_n) begin
    if (dut.daq_dav) begin
      if (seen && low_run > 0) begin
        `CHECK(low_run >= 3, $sformatf("DAQ DAV low only %0d ticks", low_run))
        n_gap_ok++;
      end
      low_run = 0; seen = 1;
    end else low_run++;
  end

  // ---------------- VME ----------------
  task automatic vme(input bit write, input logic [18:0] off, input logic [15:0] wd,
                     output logic [15:0] rd, output int wait_ticks);
    bit ack;
    @(negedge clk40);
    vme_a = {1'b1, geoadd[3:0], off[18:1]}; vme_write_n = !write; vme_d_in = wd;
    @(negedge clk40);
    vme_ds_n = 0;
    ack = 0; wait_ticks = 0;
    while (wait_ticks < 60 && !ack) begin
      @(negedge clk40); wait_ticks++;
      if (!vme_dtack_n) ack = 1;
    end
    rd = vme_d_out;
    vme_ds_n = 1;
    `CHECK(ack, $sformatf("VME cycle at %h acknowledged", off))
    repeat (3) @(negedge clk40);
  endtask
  task automatic vw(input logic [18:0] off, input int d);
    logic [15:0] rd; int w;
    vme(1, off, 16'(d), rd, w);
  endtask
  task automatic vr(input logic [18:0] off, output logic [15:0] rd);
    int w;
    vme(0, off, 0, rd, w);
  endtask

  task automatic program_module();
    logic [7:0] ts;
    for (int s = 0; s < 16; s++) begin
      vw(19'h06800 + 2 * (4*s + 0), thr[s].clus);
      vw(19'h06800 + 2 * (4*s + 1), thr[s].emiso);
      vw(19'h06800 + 2 * (4*s + 2), thr[s].hadiso);
      vw(19'h06800 + 2 * (4*s + 3), thr[s].hadcore);
    end
    for (int s = 8; s < 16; s++) ts[s-8] = thr[s].tau;
    vw(19'h06800 + 2 * 7'h40, ts);
    vw(19'h06800 + 2 * 7'h41, CP_OFF);
    vw(19'h0B000 + 2 * 2, SER_OFF);
    vw(19'h03000 + 2 * 1, HIT_OFF);
  endtask

  task automatic idle(int n);
    crossing(0, 1, n);
  endtask

  task automatic drain();
    int n = 0;
    density = 0;
    while ((daq_q.size() > 0 || roi_q.size() > 0) && n < 30000) begin @(negedge clk40); n++; end
    repeat (50) @(negedge clk40);
  endtask

  int n_perr = 0, n_ef = 0, n_flush = 0, n_holdoff = 0;

  initial begin
    logic [15:0] rd;
    for (int l = 0; l < 2; l++) for (int s = 0; s < 10; s++) begin
      link_lock[l][s] = 4'hF;
      for (int c = 0; c < 7; c++) begin ea[l][s][c] = 0; eb[l][s][c] = 0; prev_nz[l][s][c] = 0; end
    end
    for (int s = 0; s < 16; s++) begin
      thr[s].tau     = (s >= 8) && (s % 2 == 1);
      thr[s].clus    = 12'((s == 0 || s == 9) ? 2 : $urandom_range(5, 120));
      thr[s].emiso   = (s % 4 == 0 && s != 0) ? 12'($urandom_range(0, 30)) : 12'hFFF;
      thr[s].hadiso  = (s % 4 == 1 && s != 9) ? 12'($urandom_range(0, 20)) : 12'hFFF;
      thr[s].hadcore = (s % 4 == 2) ? 12'($urandom_range(0, 20)) : 12'hFFF;
    end
    repeat (4) @(negedge clk40);
    rst_n = 1;
    gen_on = 1;
    repeat (4) @(negedge clk40);
    vr(19'h00, rd); `CHECK(rd == 16'd2418, "module type")
    vr(19'h06, rd); `CHECK(rd == 16'h0013 && control == 7'h13, "control register reset value")
    program_module();
    vr(19'h06800 + 2 * 7'h41, rd); `CHECK(rd == CP_OFF, "CP chip offset read back (broadcast read)")
    vr(19'h0C000 + 19'h1000 * 13 + 2 * 2, rd); `CHECK(rd == SER_OFF, "Serialiser 13 offset read back")
    @(negedge clk40); bcntres = 1; bcr_cyc = cyc; @(negedge clk40); bcntres = 0;
    @(negedge clk40); rstldcnt = 1; @(negedge clk40); rstldcnt = 0;
    idle(10);
    check_from = cyc + 1;

    // ---- real-time path: sparse, medium and dense events, with L1As ----
    for (int n = 0; n < 1500; n++) begin
      crossing(n < 500 ? 3 : (n < 1000 ? 10 : 30), n < 1000 ? 150 : 60);
      if (n % 37 == 20) begin
        send_l1a();
      end
    end
    // ---- several slices per L1A, some L1As too close together ----
    nsl = 3; vw(19'h03000, nsl); vw(19'h03800, nsl);
    for (int n = 0; n < 800; n++) begin
      crossing(8, 120);
      if (n % 61 == 30) send_l1a();
      if (n % 183 == 40) begin send_l1a(); send_l1a(); end
    end
    drain();
    `CHECK(daq_q.size() == 0 && roi_q.size() == 0, $sformatf("read-out incomplete: %0d DAQ, %0d RoI slices left", daq_q.size(), roi_q.size()))
    vr(19'h03000 + 2 * 5, rd); `CHECK(rd[2] == (n_drop > 0), "DAQ ROC l1a_dropped status")
    vr(19'h03800 + 2 * 5, rd); `CHECK(rd[2] == (n_drop > 0) && rd[1] == 0, "RoI ROC status")

    // ---- parity error on Serialiser 3, em, link 1 ----
    vr(19'h0C, rd); `CHECK(rd == 0, "no Serialiser parity errors yet")
    @(negedge clk40); corrupt_l = 0; corrupt_s = 3; corrupt_c = 1;
    @(negedge clk40); corrupt_l = -1;
    check_from = cyc + 20;
    idle(10);
    vr(19'h0C, rd); `CHECK(rd == 16'h0008, $sformatf("Serialiser parity error register %h", rd))
    vr(19'h28, rd); `CHECK(rd == 16'h000E, $sformatf("CP chip error register %h", rd))
    `CHECK(led_cp_err == 8'h0E, "CP error LEDs")
    vr(19'h0C000 + 19'h1000 * 6 + 2 * 4, rd); `CHECK(rd == 1, "Serialiser error counter of link 1")
    n_perr++;
    for (int c = 1; c <= 3; c++) begin
      vr(19'h07000 + 19'h800 * c + 2 * 7'h4B, rd); `CHECK(rd == 1, "CP chip error counter")
      vr(19'h07000 + 19'h800 * c + 2 * 7'h48, rd);
      vr(19'h07000 + 19'h800 * c + 2 * 7'h49, rd);
      vr(19'h07000 + 19'h800 * c + 2 * 7'h4A, rd);
    end
    idle(3);
    vr(19'h28, rd); `CHECK(rd == 0, "CP chip errors cleared by reading the maps")
    vw(19'h0B000, 1);           // clear the Serialiser counters
    vr(19'h0C, rd); `CHECK(rd == 0, "Serialiser errors cleared")

    // ---- link loss ----
    link_lock[1][7] = 4'b1011;
    idle(4);
    vr(19'h22, rd); `CHECK(rd == 16'h0080, $sformatf("link loss H register %h", rd))
    `CHECK(led_link_loss == 20'h1 << 15, "link loss LED")
    link_lock[1][7] = 4'hF;

    // ---- VME hold-off while TTC commands are in the pipeline ----
    begin
      int w_free, w_busy;
      logic [15:0] r2;
      vme(0, 19'h03000, 0, r2, w_free);
      fork
        begin @(negedge clk40); ttc_cmd_valid = 1; ttc_cmd = 8'h5A; repeat (25) @(negedge clk40); ttc_cmd_valid = 0; end
        begin repeat (2) @(negedge clk40); vme(0, 19'h03000, 0, r2, w_busy); end
      join
      `CHECK(w_busy > w_free + 15, $sformatf("device read held off (%0d vs %0d ticks)", w_busy, w_free))
      if (w_busy > w_free + 15) n_holdoff++;
    end

    // ---- EF error: reset the DAQ ROC in the middle of a long read-out ----
    idle(50);
    nsl = 20; vw(19'h03000, nsl); vw(19'h03800, 1); nsl = 20;
    ro_skip = 1;
    send_l1a();
    idle(300);
    vw(19'h08, 16'h0040);       // pulse bit 6: DAQ ROC reset
    idle(5);
    `CHECK(daq_ef_error, "EF error after the DAQ ROC lost its FIFO")
    if (daq_ef_error) n_ef++;
    vw(19'h03000 + 2 * 6, 1);   // flush
    idle(40);
    `CHECK(dut.ser_ef == '1, $sformatf("flush emptied all Serialiser FIFOs (%h)", dut.ser_ef))
    if (dut.ser_ef == '1) n_flush++;
    vw(19'h03000 + 2 * 6, 2);   // clear errors
    idle(3);
    `CHECK(!daq_ef_error, "EF error cleared")
    idle(1200);
    daq_q.delete(); roi_q.delete();
    ro_skip = 0;
    nsl = 1;
    vw(19'h03000 + 2 * 1, HIT_OFF); vw(19'h03800, 1);
    @(negedge clk40); rstldcnt = 1; bcntres = 1; bcr_cyc = cyc; @(negedge clk40); rstldcnt = 0; bcntres = 0;
    idle(150);
    busy_until = 0;
    for (int n = 0; n < 300; n++) begin
      crossing(10, 120);
      if (n % 50 == 10) send_l1a();
    end
    drain();
    `CHECK(daq_q.size() == 0 && roi_q.size() == 0, "read-out after recovery complete")
    `CHECK(led_l1a && led_vme && led_hit != 0, "front-panel LEDs lit")

    $display("MECHANISMS crossings=%0d cmm_checks=%0d hit_halves=%0d declustered=%0d count_saturated=%0d",
             n_cross, n_cmm_checked, n_hit_halves, n_declust, n_sat7);
    $display("MECHANISMS bcmux_same=%0d bcmux_single_b=%0d l1a=%0d multi_slice_l1a=%0d l1a_dropped=%0d",
             n_same, n_next, n_l1a, n_multi, n_drop);
    $display("MECHANISMS daq_slices=%0d roi_slices=%0d dav_gaps=%0d parity_errors=%0d ef_errors=%0d flushes=%0d vme_holdoffs=%0d fanout_checks=%0d",
             n_daq_sl, n_roi_sl, n_gap_ok, n_perr, n_ef, n_flush, n_holdoff, n_fo);
    `CHECK(n_hit_halves > 100 && n_declust > 100 && n_sat7 > 0 && n_multi > 0 && n_drop > 0 &&
           n_gap_ok > 10 && n_perr > 0 && n_ef > 0 && n_flush > 0 && n_holdoff > 0 && n_same > 0,
           "every mechanism exercised")
    `TB_FINISH
  end
endmodule

