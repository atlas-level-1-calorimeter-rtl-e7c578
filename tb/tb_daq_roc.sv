// Testbench for daq_roc. Twenty read-out sequencers (short 8-bit slices so
// the test runs quickly) stand in for the Serialisers; each is fed a known
// function of the tick number, and so is the 48-bit hit-count input, so every
// bit sent on the DAQ link can be predicted. Checked against a reference:
//   - each accepted L1A gives NSLICES slices; field f of a slice carries the
//     Serialiser data of tick t-offset, then 3 bits (hit count f of tick
//     t-HITOFFSET, or BCN bits for fields 16..19), then odd parity;
//   - the BCN counter, BCNOFFSET and BCntRes;
//   - DAV stays high through the slices of one L1A and stays low for at
//     least MinDAVLength ticks between L1As;
//   - an L1A during slice requests is dropped and flagged;
//   - add_reset every 128 ticks, realigned by RstLdCnt;
//   - a FIFO empty-flag mismatch sets ef_error; flush empties the external
//     FIFOs; the clear pulse clears the flags; register read-back.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_daq_roc;
  `TB_COUNTERS
  localparam int SL = 8, FL = SL + 4;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  `WATCHDOG(clk, 300000)

  logic l1a = 0, bcntres = 0, rstldcnt = 0;
  logic [47:0] hit_counts;
  logic add_reset, en_readout, load_shift;
  logic [19:0] ser_bits, ser_ef;
  logic [19:0] link_data;
  logic link_dav, ef_error;
  logic [11:0] bcn;
  logic [2:0] reg_addr = 0;
  logic reg_we = 0;
  logic [15:0] reg_wdata = 0, reg_rdata;
  logic extra_en = 0;
  int cyc = 0;
  localparam int SER_OFF = 20;

  function automatic logic [SL-1:0] ser_data(int s, int t);
    return SL'(t * 7 + s * 13 + (t >> 3));
  endfunction
  function automatic logic [47:0] hit_data(int t);
    return {16'(t * 5 + 3), 16'(t ^ 16'h5a5a), 16'(t * 3 + 1)};
  endfunction

  always_comb hit_counts = hit_data(cyc);

  for (genvar s = 0; s < 20; s++) begin : g_ser
    logic [SL-1:0] d;
    assign d = ser_data(s, cyc);
    readout_sequencer #(.WIDTH(SL), .NSTREAM(1), .PIPE_DEPTH(128), .FIFO_DEPTH(128)) u_seq (
      .clk, .rst_n, .din(d), .offset(7'(SER_OFF)), .add_reset,
      .en_readout(en_readout || (s == 5 && extra_en)), .load_shift,
      .sr_out(ser_bits[s]), .fifo_empty(ser_ef[s]), .fifo_overflow()
    );
  end

  daq_roc #(.NSER(20), .SLICE_LEN(SL)) dut (.clk, .rst_n, .l1a, .bcntres, .rstldcnt, .hit_counts,
    .add_reset, .en_readout, .load_shift, .ser_bits, .ser_ef, .link_data, .link_dav, .ef_error,
    .bcn, .reg_addr, .reg_we, .reg_wdata, .reg_rdata);

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference ----------------
  logic [19:0][FL-1:0] exp_q [$];   // expected slices, 20 fields each
  bit            last_q [$];
  int nsl = 1, hit_off = 0, min_dav = 3, bcn_off = 0, busy_until = 0, bcr_cyc = 0;
  int n_l1a = 0, n_drop = 0, n_multi = 0, n_gap = 0, n_slices_rx = 0, n_ar = 0;

  function automatic int exp_bcn(int c);
    return (bcn_off + c - bcr_cyc - 1) & 12'hFFF;
  endfunction

  // called in the cycle the L1A is driven
  task automatic expect_l1a(int t);
    int b;
    b = exp_bcn(t);
    for (int j = 0; j < nsl; j++) begin
      logic [19:0][FL-1:0] f;
      int te;
      logic [47:0] h;
      te = t + 1 + j;
      h = hit_data(te - (hit_off == 0 ? 128 : hit_off));
      for (int s = 0; s < 20; s++) begin
        logic [2:0] ib;
        ib = (s < 16) ? h[3*s +: 3] : 3'(b >> (3 * (s - 16)));
        f[s][SL-1:0]  = ser_data(s, te - SER_OFF);
        f[s][SL +: 3] = ib;
        f[s][FL-1]    = ~^f[s][FL-2:0];
      end
      exp_q.push_back(f);
      last_q.push_back(j == nsl - 1);
    end
    if (nsl > 1) n_multi++;
  endtask

  task automatic send_l1a();
    @(negedge clk);
    l1a = 1;
    if (cyc <= busy_until) n_drop++;
    else begin
      expect_l1a(cyc);
      busy_until = cyc + nsl;
      n_l1a++;
    end
    @(negedge clk);
    l1a = 0;
  endtask

  task automatic reg_write(input int addr, input int data);
    @(negedge clk);
    reg_addr = 3'(addr); reg_wdata = 16'(data); reg_we = 1;
    @(negedge clk);
    reg_we = 0;
  endtask

  // ---------------- link monitor ----------------
  logic [FL-1:0] rx [20];
  int bitn = 0, low_run = 0, in_l1a = 0, gap_req = 0;
  bit seen_dav = 0;
  always @(negedge clk) if (rst_n) begin
    if (link_dav) begin
      if (seen_dav && low_run > 0 && bitn == 0) begin
        n_gap++;
        `CHECK(low_run >= gap_req, $sformatf("DAV low for %0d ticks, MinDAV %0d", low_run, min_dav))
      end
      low_run = 0; seen_dav = 1;
      for (int s = 0; s < 20; s++) rx[s][bitn] = link_data[s];
      bitn++;
      if (bitn == FL) begin
        bitn = 0;
        n_slices_rx++;
        if (exp_q.size() == 0) `CHECK(0, "unexpected slice on the link")
        else begin
          logic [19:0][FL-1:0] e;
          bit last;
          e = exp_q.pop_front(); last = last_q.pop_front();
          for (int s = 0; s < 20; s++)
            `CHECK(rx[s] == e[s], $sformatf("slice field %0d got %h exp %h", s, rx[s], e[s]))
          in_l1a = !last;
        end
      end
    end else begin
      `CHECK(bitn == 0 && in_l1a == 0, "DAV dropped inside an L1A's slices")
      if (low_run == 0) gap_req = min_dav;   // MinDAV in force when DAV fell
      low_run++;
      `CHECK(link_data == 0, "link data zero while DAV low")
    end
  end

  // add_reset spacing
  int last_ar = -1;
  bit ar_expect_rld = 0;
  always @(negedge clk) if (rst_n && add_reset) begin
    if (last_ar >= 0 && !ar_expect_rld) `CHECK(cyc - last_ar == 128, $sformatf("add_reset spacing %0d", cyc - last_ar))
    ar_expect_rld = 0;
    last_ar = cyc;
    n_ar++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    reg_addr = 0; #1 `CHECK(reg_rdata == 1, "NSLICES resets to 1");
    reg_addr = 2; #1 `CHECK(reg_rdata == 3, "MinDAV resets to 3");
    reg_addr = 4; #1 `CHECK(reg_rdata == 1, "control resets to 01");
    // BCntRes with an offset
    bcn_off = 5; reg_write(3, bcn_off);
    @(negedge clk); bcntres = 1; bcr_cyc = cyc; @(negedge clk); bcntres = 0;
    repeat (10) @(negedge clk);
    `CHECK(bcn == 12'(exp_bcn(cyc)), $sformatf("BCN %0d exp %0d", bcn, exp_bcn(cyc)))
    hit_off = 14; reg_write(1, hit_off);
    @(negedge clk); rstldcnt = 1; ar_expect_rld = 1; @(negedge clk); rstldcnt = 0;
    repeat (140) @(negedge clk);
    // single-slice L1As at random spacing
    repeat (60) begin send_l1a(); repeat ($urandom_range(10, 60)) @(negedge clk); end
    // several slices, longer dead time
    nsl = 3; reg_write(0, nsl);
    min_dav = 9; reg_write(2, min_dav);
    repeat (40) begin send_l1a(); repeat ($urandom_range(2, 80)) @(negedge clk); end
    // a second L1A while the first one's slices are still requested
    repeat (300) @(negedge clk);
    send_l1a(); send_l1a();
    nsl = 5; reg_write(0, nsl);
    repeat (40) begin send_l1a(); repeat ($urandom_range(20, 140)) @(negedge clk); end
    while (exp_q.size() > 0) @(negedge clk);
    repeat (20) @(negedge clk);
    reg_addr = 5; #1 `CHECK(reg_rdata[2] == (n_drop > 0), "l1a_dropped status");
    `CHECK(reg_rdata[1] == 0, "no ef_error so far");
    `CHECK(exp_q.size() == 0, $sformatf("%0d slices never arrived", exp_q.size()))
    // clear the dropped flag, then a long read-out of 40 slices
    reg_write(6, 2);
    reg_addr = 5; #1 `CHECK(reg_rdata[2] == 0, "clear pulse clears l1a_dropped");
    nsl = 40; reg_write(0, nsl);
    send_l1a();
    while (exp_q.size() > 0) @(negedge clk);
    repeat (20) @(negedge clk);
    `CHECK(exp_q.size() == 0, "long read-out complete")
    // FIFO mismatch: an extra slice in one Serialiser
    @(negedge clk); extra_en = 1; @(negedge clk); extra_en = 0;
    repeat (3) @(negedge clk);
    `CHECK(ef_error, "ef_error set on FIFO mismatch")
    reg_write(6, 1);              // flush
    repeat (10) @(negedge clk);
    `CHECK(ser_ef == '1, "flush empties the external FIFOs")
    reg_write(6, 2);
    repeat (2) @(negedge clk);
    `CHECK(!ef_error, "ef_error cleared")
    // L1As are ignored when control bit 0 is off
    reg_write(4, 0);
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    repeat (100) @(negedge clk);
    `CHECK(!link_dav && exp_q.size() == 0 && bitn == 0, "L1A ignored while disabled")
    reg_write(4, 1);
    nsl = 1; reg_write(0, nsl);
    repeat (5) begin send_l1a(); repeat (30) @(negedge clk); end
    repeat (200) @(negedge clk);
    `CHECK(exp_q.size() == 0, "all slices received")
    $display("l1a=%0d dropped=%0d multi=%0d gaps=%0d slices=%0d add_resets=%0d",
             n_l1a, n_drop, n_multi, n_gap, n_slices_rx, n_ar);
    `CHECK(n_drop > 0 && n_multi > 0 && n_gap > 50 && n_ar > 10, "mechanisms exercised")
    `TB_FINISH
  end
endmodule
