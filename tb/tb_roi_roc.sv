// Testbench for roi_roc. Eight read-out sequencers with two 20-bit streams
// each stand in for the CP chips and are fed a known function of the tick
// number, so the RoI link output can be predicted bit by bit. Checked:
//   - each accepted L1A gives NSLICES slices; field 2c+h carries the RoI word
//     of chip c, half h, from tick t-offset, then BCN bit f (fields 0..11,
//     zero on 12..15), then odd parity; fields 16..19 stay low;
//   - DAV continuity inside an L1A and the MinDAVLength gap;
//   - dropped L1As, ef_error on a FIFO mismatch, flush, clear;
//   - NSLICES, BCNOFFSET and control register read-back.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_roi_roc;
  `TB_COUNTERS
  localparam int SL = 20, FL = SL + 2;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  `WATCHDOG(clk, 300000)

  logic l1a = 0, bcntres = 0, rstldcnt = 0;
  logic add_reset, en_readout, load_shift;
  logic [15:0] cp_bits;
  logic [7:0] cp_ef;
  logic [19:0] link_data;
  logic link_dav, ef_error;
  logic [2:0] reg_addr = 0;
  logic reg_we = 0;
  logic [15:0] reg_wdata = 0, reg_rdata;
  logic extra_en = 0;
  int cyc = 0;
  localparam int CP_OFF = 9;

  function automatic logic [SL-1:0] roi_data(int f, int t);
    return SL'(t * 11 + f * 4099 + (t << 9));
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  for (genvar c = 0; c < 8; c++) begin : g_cp
    logic [2*SL-1:0] d;
    logic [1:0] sr;
    assign d = {roi_data(2*c + 1, cyc), roi_data(2*c, cyc)};
    readout_sequencer #(.WIDTH(2*SL), .NSTREAM(2), .PIPE_DEPTH(128), .FIFO_DEPTH(128)) u_seq (
      .clk, .rst_n, .din(d), .offset(7'(CP_OFF)), .add_reset,
      .en_readout(en_readout || (c == 3 && extra_en)), .load_shift,
      .sr_out(sr), .fifo_empty(cp_ef[c]), .fifo_overflow()
    );
    assign cp_bits[2*c +: 2] = sr;
  end

  roi_roc dut (.clk, .rst_n, .l1a, .bcntres, .rstldcnt, .add_reset, .en_readout, .load_shift,
    .cp_bits, .cp_ef, .link_data, .link_dav, .ef_error, .reg_addr, .reg_we, .reg_wdata, .reg_rdata);

  logic [15:0][FL-1:0] exp_q [$];
  bit last_q [$];
  int nsl = 1, min_dav = 3, bcn_off = 0, busy_until = 0, bcr_cyc = 0;
  int n_l1a = 0, n_drop = 0, n_multi = 0, n_gap = 0, n_slices_rx = 0;

  task automatic send_l1a();
    @(negedge clk);
    l1a = 1;
    if (cyc <= busy_until) n_drop++;
    else begin
      int b;
      b = (bcn_off + cyc - bcr_cyc - 1) & 12'hFFF;
      for (int j = 0; j < nsl; j++) begin
        logic [15:0][FL-1:0] f;
        for (int s = 0; s < 16; s++) begin
          f[s][SL-1:0] = roi_data(s, cyc + 1 + j - CP_OFF);
          f[s][SL]     = (s < 12) ? b[s] : 1'b0;
          f[s][FL-1]   = ~^f[s][FL-2:0];
        end
        exp_q.push_back(f);
        last_q.push_back(j == nsl - 1);
      end
      if (nsl > 1) n_multi++;
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

  logic [15:0][FL-1:0] rx;
  int bitn = 0, low_run = 0, in_l1a = 0, gap_req = 0;
  bit seen_dav = 0;
  always @(negedge clk) if (rst_n) begin
    `CHECK(link_data[19:16] == 0, "fields 16..19 low")
    if (link_dav) begin
      if (seen_dav && low_run > 0 && bitn == 0) begin
        n_gap++;
        `CHECK(low_run >= gap_req, $sformatf("DAV low for %0d ticks", low_run))
      end
      low_run = 0; seen_dav = 1;
      for (int s = 0; s < 16; s++) rx[s][bitn] = link_data[s];
      bitn++;
      if (bitn == FL) begin
        bitn = 0;
        n_slices_rx++;
        if (exp_q.size() == 0) `CHECK(0, "unexpected slice")
        else begin
          logic [15:0][FL-1:0] e;
          bit last;
          e = exp_q.pop_front(); last = last_q.pop_front();
          for (int s = 0; s < 16; s++)
            `CHECK(rx[s] == e[s], $sformatf("field %0d got %h exp %h", s, rx[s], e[s]))
          in_l1a = !last;
        end
      end
    end else begin
      `CHECK(bitn == 0 && in_l1a == 0, "DAV dropped inside an L1A's slices")
      if (low_run == 0) gap_req = min_dav;   // MinDAV in force when DAV fell
      low_run++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    reg_addr = 0; #1 `CHECK(reg_rdata == 1, "NSLICES resets to 1");
    bcn_off = 77; reg_write(3, bcn_off);
    reg_addr = 3; #1 `CHECK(reg_rdata == 77, "BCNOFFSET readback");
    @(negedge clk); bcntres = 1; bcr_cyc = cyc; @(negedge clk); bcntres = 0;
    @(negedge clk); rstldcnt = 1; @(negedge clk); rstldcnt = 0;
    repeat (140) @(negedge clk);
    repeat (80) begin send_l1a(); repeat ($urandom_range(5, 50)) @(negedge clk); end
    while (exp_q.size() > 0) @(negedge clk);
    nsl = 2; reg_write(0, nsl);
    min_dav = 12; reg_write(2, min_dav);
    repeat (60) begin send_l1a(); repeat ($urandom_range(5, 90)) @(negedge clk); end
    send_l1a(); send_l1a();
    while (exp_q.size() > 0) @(negedge clk);
    repeat (20) @(negedge clk);
    reg_addr = 5; #1 `CHECK(reg_rdata[2] == 1 && reg_rdata[1] == 0 && reg_rdata[0] == 1, $sformatf("status %h", reg_rdata));
    // whole-pipeline read-out
    nsl = 128; reg_write(0, nsl);
    send_l1a();
    while (exp_q.size() > 0) @(negedge clk);
    repeat (20) @(negedge clk);
    // FIFO mismatch, flush, clear
    @(negedge clk); extra_en = 1; @(negedge clk); extra_en = 0;
    repeat (3) @(negedge clk);
    `CHECK(ef_error, "ef_error set")
    reg_write(6, 1);
    repeat (30) @(negedge clk);
    `CHECK(cp_ef == 8'hFF, "flush empties the CP chip FIFOs")
    `CHECK(!link_dav, "flush sends nothing")
    reg_write(6, 2);
    repeat (2) @(negedge clk);
    `CHECK(!ef_error, "ef_error cleared")
    reg_addr = 5; #1 `CHECK(reg_rdata[2] == 0, "l1a_dropped cleared");
    nsl = 1; reg_write(0, nsl);
    repeat (10) begin send_l1a(); repeat (40) @(negedge clk); end
    while (exp_q.size() > 0) @(negedge clk);
    $display("l1a=%0d dropped=%0d multi=%0d gaps=%0d slices=%0d", n_l1a, n_drop, n_multi, n_gap, n_slices_rx);
    `CHECK(n_drop > 0 && n_multi > 0 && n_gap > 50 && n_slices_rx > 300, "mechanisms exercised")
    `TB_FINISH
  end
endmodule
