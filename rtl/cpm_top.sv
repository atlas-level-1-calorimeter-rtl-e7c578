// cpm_top: the Cluster Processor Module.
//
// The module finds isolated electron/photon and tau candidates in a 16x4
// (phi x eta) array of trigger-tower windows, counts them per threshold set
// for the Common Merger Modules, and reads out its inputs (DAQ) and its
// candidates (RoI) after a Level-1 Accept.
//
// Real-time path: 80 link words per tick (layer em/had x 10 Serialisers V,
// A..H, W x 4 links) enter 20 serialiser blocks. Each Serialiser's X bus (eta
// columns 0-1) goes to the CP chips and is the fan-out to the -eta neighbour;
// lines 2..4 of its Y bus (eta column 3) are the fan-out to the +eta
// neighbour. CP chip c (A..H = 0..7) takes phi pair-rows from Serialisers c,
// c+1 and c+2 (its own Serialiser is c+1): for each pair-row the own-module X
// and Y buses (eta 1-4), the +eta neighbour's fan-in bus (eta 5-6) and the
// -eta neighbour's 3-line fan-in (eta 0). The 16 hit words (chip c, half h is
// word 2c+h) go to two hit_counter blocks, thresholds 0-7 (to the CMM in the
// JMM slot) and 8-15 (SMM slot), each 24 count bits plus odd parity.
//
// Read-out: daq_roc drives the Serialiser sequencers (field 2s+layer) and
// pipelines the 48 hit-count bits; roi_roc drives the CP chip sequencers
// (field 2c+h). Each ROC output crosses to the crystal clock in a
// glink_retime_fifo feeding a G-link transmitter (outside this RTL).
// vme_controller gives VME-- access to all registers; pulse-register bits 2,
// 3, 5 and 6 reset the Serialisers, CP chips, RoI ROC and DAQ ROC for one
// tick. Front-panel indications are stretched by led_stretcher.
// One 40 MHz clock is used for all real-time logic (the two TTC deskew
// clocks differ only in phase); clk_xtal is the read-out link clock.
// Hit latency: link word of crossing i in tick i, CMM outputs for crossing i
// in tick i+6 (Serialiser 1, CP chip 4, hit counter 1).
module cpm_top
  import cpm_pkg::*;
#(
  parameter int unsigned STRETCH = 8_000_000
) (
  input  logic        clk40,
  input  logic        clk_xtal,
  input  logic        rst_n,
  // Pre-processor links, after the LVDS de-serialisers
  input  link_word_t  link_word [2][10][4],   // [layer][Serialiser][link]
  input  logic [3:0]  link_lock [2][10],
  // backplane fan-in and fan-out
  input  bus3_t       fi_m [2][10],   // from the -eta neighbour (its +eta fan-out)
  input  bus5_t       fi_p [2][10],   // from the +eta neighbour (its -eta fan-out)
  output bus5_t       fo_m [2][10],   // to the -eta neighbour
  output bus3_t       fo_p [2][10],   // to the +eta neighbour
  // TTC
  input  logic        l1a,
  input  logic        bcntres,
  input  logic        rstldcnt,
  input  logic        ttc_cmd_valid,
  input  logic [7:0]  ttc_cmd,
  output logic        ttc_cmd_out_valid,
  output logic [7:0]  ttc_cmd_out,
  // Common Merger Modules: {parity, 8 x 3-bit counts}
  output logic [24:0] cmm_lo,
  output logic [24:0] cmm_hi,
  // read-out G-links (clk_xtal domain)
  output logic [19:0] daq_tx_data,
  output logic        daq_tx_dav_n,
  output logic [19:0] roi_tx_data,
  output logic        roi_tx_dav_n,
  // VME--
  input  logic [5:0]  geoadd,
  input  logic [23:1] vme_a,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  input  logic        vme_ds_n,
  input  logic        vme_write_n,
  output logic        vme_dtack_n,
  // status from parts outside this RTL
  input  logic [3:0]  glink_status,
  input  logic [1:0]  glink_pll_err,
  input  logic [7:0]  can_status,
  input  logic [19:0] ser_dll_lock,
  input  logic [19:0] ser_sync_done,
  input  logic [7:0]  cp_dll_lock,
  output logic [6:0]  control,
  output logic [1:0]  can_control,
  // front panel
  output logic [19:0] led_link_loss,
  output logic [15:0] led_hit,
  output logic [7:0]  led_cp_err,
  output logic        led_l1a,
  output logic        led_vme,
  // read-out monitoring
  output logic        daq_ef_error,
  output logic        roi_ef_error
);
  // ---------------- resets from the pulse register ----------------
  logic [7:0] pulse;
  logic       rst_ser_n, rst_cp_n, rst_roi_n, rst_daq_n;
  assign rst_ser_n = rst_n && !pulse[2];
  assign rst_cp_n  = rst_n && !pulse[3];
  assign rst_roi_n = rst_n && !pulse[5];
  assign rst_daq_n = rst_n && !pulse[6];

  // ---------------- local bus ----------------
  logic [10:0] lb_addr;
  logic [15:0] lb_wdata, daq_rdata, roi_rdata;
  logic        lb_we, lb_re, sel_daq, sel_roi;
  logic [7:0]  sel_cp;
  logic [19:0] sel_ser;
  logic [15:0] cp_rdata [8];
  logic [15:0] ser_rdata [20];

  // ---------------- Serialisers ----------------
  bus5_t      bus_x [2][10], bus_y [2][10];
  logic [19:0] ser_perr, ser_lloss, ser_bits, ser_ef;
  logic       daq_add_reset, daq_en, daq_load;

  for (genvar l = 0; l < 2; l++) begin : g_ser_l
    for (genvar s = 0; s < 10; s++) begin : g_ser
      serialiser u_ser (
        .clk(clk40), .rst_n(rst_ser_n), .din(link_word[l][s]), .link_lock(link_lock[l][s]),
        .bus_x(bus_x[l][s]), .bus_y(bus_y[l][s]),
        .parity_error(ser_perr[2*s+l]), .link_loss(ser_lloss[2*s+l]),
        .add_reset(daq_add_reset), .en_readout(daq_en), .load_shift(daq_load),
        .daq_sr(ser_bits[2*s+l]), .daq_fifo_empty(ser_ef[2*s+l]),
        .reg_addr(lb_addr[2:0]), .reg_we(lb_we && sel_ser[2*s+l]), .reg_wdata(lb_wdata),
        .reg_rdata(ser_rdata[2*s+l])
      );
      assign fo_m[l][s] = bus_x[l][s];
      assign fo_p[l][s] = bus_y[l][s][4:2];
    end
  end

  // ---------------- CP chips ----------------
  logic [N_THR-1:0] cp_hits [8][2];
  logic [7:0]       cp_err, cp_ef;
  logic [15:0]      cp_bits;
  logic             roi_add_reset, roi_en, roi_load;

  for (genvar c = 0; c < 8; c++) begin : g_cp
    bus5_t in5 [2][3][3];
    bus3_t in3 [2][3];
    logic [N_THR-1:0] h [2];
    for (genvar l = 0; l < 2; l++) begin : g_l
      for (genvar p = 0; p < 3; p++) begin : g_p
        assign in5[l][p][0] = bus_x[l][c+p];
        assign in5[l][p][1] = bus_y[l][c+p];
        assign in5[l][p][2] = fi_p[l][c+p];
        assign in3[l][p]    = fi_m[l][c+p];
      end
    end
    cp_chip u_cp (
      .clk(clk40), .rst_n(rst_cp_n), .in5, .in3, .hits(h), .error(cp_err[c]),
      .add_reset(roi_add_reset), .en_readout(roi_en), .load_shift(roi_load),
      .roi_sr(cp_bits[2*c +: 2]), .roi_fifo_empty(cp_ef[c]),
      .reg_addr(lb_addr[6:0]), .reg_we(lb_we && sel_cp[c]), .reg_re(lb_re && sel_cp[c]),
      .reg_wdata(lb_wdata), .reg_rdata(cp_rdata[c])
    );
    assign cp_hits[c][0] = h[0];
    assign cp_hits[c][1] = h[1];
  end

  // ---------------- result merging ----------------
  logic [7:0]      hits_lo [16], hits_hi [16];
  logic [7:0][2:0] cnt_lo, cnt_hi;
  logic            par_lo, par_hi;

  always_comb
    for (int i = 0; i < 16; i++) begin
      hits_lo[i] = cp_hits[i/2][i%2][7:0];
      hits_hi[i] = cp_hits[i/2][i%2][15:8];
    end

  hit_counter #(.N_THR(8), .N_IN(16)) u_hc_lo (
    .clk(clk40), .rst_n, .hits(hits_lo), .counts(cnt_lo), .parity(par_lo));
  hit_counter #(.N_THR(8), .N_IN(16)) u_hc_hi (
    .clk(clk40), .rst_n, .hits(hits_hi), .counts(cnt_hi), .parity(par_hi));

  assign cmm_lo = {par_lo, cnt_lo};
  assign cmm_hi = {par_hi, cnt_hi};

  // ---------------- read-out controllers ----------------
  logic [19:0] daq_data, roi_data;
  logic        daq_dav, roi_dav;
  logic [11:0] bcn;

  daq_roc u_daq (
    .clk(clk40), .rst_n(rst_daq_n), .l1a, .bcntres, .rstldcnt,
    .hit_counts({cnt_hi, cnt_lo}),
    .add_reset(daq_add_reset), .en_readout(daq_en), .load_shift(daq_load),
    .ser_bits, .ser_ef, .link_data(daq_data), .link_dav(daq_dav), .ef_error(daq_ef_error), .bcn,
    .reg_addr(lb_addr[2:0]), .reg_we(lb_we && sel_daq), .reg_wdata(lb_wdata), .reg_rdata(daq_rdata)
  );

  roi_roc u_roi (
    .clk(clk40), .rst_n(rst_roi_n), .l1a, .bcntres, .rstldcnt,
    .add_reset(roi_add_reset), .en_readout(roi_en), .load_shift(roi_load),
    .cp_bits, .cp_ef, .link_data(roi_data), .link_dav(roi_dav), .ef_error(roi_ef_error),
    .reg_addr(lb_addr[2:0]), .reg_we(lb_we && sel_roi), .reg_wdata(lb_wdata), .reg_rdata(roi_rdata)
  );

  glink_retime_fifo #(.W(20), .DEPTH(16)) u_daq_link (
    .wr_clk(clk40), .wr_rst_n(rst_n), .wr_data(daq_data), .wr_dav(daq_dav),
    .rd_clk(clk_xtal), .rd_rst_n(rst_n), .tx_data(daq_tx_data), .tx_dav_n(daq_tx_dav_n), .overflow()
  );
  glink_retime_fifo #(.W(20), .DEPTH(16)) u_roi_link (
    .wr_clk(clk40), .wr_rst_n(rst_n), .wr_data(roi_data), .wr_dav(roi_dav),
    .rd_clk(clk_xtal), .rd_rst_n(rst_n), .tx_data(roi_tx_data), .tx_dav_n(roi_tx_dav_n), .overflow()
  );

  // ---------------- VME controller ----------------
  logic       vme_access;
  logic [4:0] hc_rev [2];
  assign hc_rev[0] = 5'd1;
  assign hc_rev[1] = 5'd1;

  vme_controller u_vme (
    .clk(clk40), .rst_n, .geoadd, .vme_a, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_ds_n,
    .vme_write_n, .vme_dtack_n, .vme_access,
    .status_in(glink_status), .ser_perr, .ser_lloss, .ser_dlock(ser_dll_lock),
    .ser_sync_done, .cp_err, .cp_dlock(cp_dll_lock), .glink_pll_err, .can_status, .hc_rev,
    .control, .pulse, .can_control,
    .ttc_cmd_valid, .ttc_cmd, .ttc_cmd_out_valid, .ttc_cmd_out,
    .lb_addr, .lb_wdata, .lb_we, .lb_re, .sel_daq, .sel_roi, .sel_cp, .sel_ser,
    .daq_rdata, .roi_rdata, .cp_rdata, .ser_rdata
  );

  // ---------------- front panel ----------------
  logic [25:0] led_in, led_out;
  logic [15:0] hit_any;
  always_comb
    for (int t = 0; t < 8; t++) begin
      hit_any[t]   = (cnt_lo[t] != 0);
      hit_any[8+t] = (cnt_hi[t] != 0);
    end
  assign led_in = {vme_access, l1a, cp_err, hit_any};

  led_stretcher #(.N(26), .STRETCH(STRETCH)) u_led (
    .clk(clk40), .rst_n, .in(led_in), .led(led_out));

  assign led_hit       = led_out[15:0];
  assign led_cp_err    = led_out[23:16];
  assign led_l1a       = led_out[24];
  assign led_vme       = led_out[25];
  assign led_link_loss = ser_lloss;

endmodule
