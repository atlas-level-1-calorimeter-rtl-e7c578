// Testbench for vme_controller. A VME-- master task runs single D16 cycles
// (address and data set up, DS0* low, wait for DTACK*, DS0* high). Simple
// register-file models answer on the local bus for the DAQ ROC, RoI ROC,
// 8 CP chips and 20 Serialisers. Checked:
//   - module ID, status and the E/H layer registers built from per-device
//     flags; control reset value and read-back; one-tick pulse bits;
//   - writes and reads of every device window, CP chip and Serialiser
//     broadcast writes, broadcast read from the first device;
//   - no DTACK* for another geographical address or above offset 0x20000,
//     zero from unused locations;
//   - device accesses wait while TTC commands are in the pipeline, ID reads
//     do not; the TTC pipeline delays commands by TTC_PIPE ticks.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_vme_controller;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  `WATCHDOG(clk, 200000)

  logic [5:0] geoadd = 6'd5;
  logic [23:1] vme_a = 0;
  logic [15:0] vme_d_in = 0, vme_d_out;
  logic vme_d_oe, vme_ds_n = 1, vme_write_n = 1, vme_dtack_n, vme_access;
  logic [3:0] status_in = 4'h9;
  logic [19:0] ser_perr, ser_lloss, ser_dlock, ser_sync_done;
  logic [7:0] cp_err, cp_dlock, can_status = 8'h5A;
  logic [1:0] glink_pll_err = 2'b10;
  logic [4:0] hc_rev [2];
  logic [6:0] control;
  logic [7:0] pulse;
  logic [1:0] can_control;
  logic ttc_cmd_valid = 0;
  logic [7:0] ttc_cmd = 0;
  logic ttc_cmd_out_valid;
  logic [7:0] ttc_cmd_out;
  logic [10:0] lb_addr;
  logic [15:0] lb_wdata;
  logic lb_we, lb_re, sel_daq, sel_roi;
  logic [7:0] sel_cp;
  logic [19:0] sel_ser;
  logic [15:0] daq_rdata, roi_rdata, cp_rdata [8], ser_rdata [20];

  vme_controller #(.MODULE_TYPE(16'd2418), .SERIAL_NO(8'd7), .TTC_PIPE(3)) dut (.*);

  // device models: 64 words each
  logic [15:0] daq_m [64], roi_m [64], cp_m [8][64], ser_m [20][64];
  always @(posedge clk) if (lb_we) begin
    if (sel_daq) daq_m[lb_addr[5:0]] <= lb_wdata;
    if (sel_roi) roi_m[lb_addr[5:0]] <= lb_wdata;
    for (int c = 0; c < 8; c++)  if (sel_cp[c])  cp_m[c][lb_addr[5:0]]  <= lb_wdata;
    for (int s = 0; s < 20; s++) if (sel_ser[s]) ser_m[s][lb_addr[5:0]] <= lb_wdata;
  end
  always_comb begin
    daq_rdata = daq_m[lb_addr[5:0]];
    roi_rdata = roi_m[lb_addr[5:0]];
    for (int c = 0; c < 8; c++)  cp_rdata[c]  = cp_m[c][lb_addr[5:0]];
    for (int s = 0; s < 20; s++) ser_rdata[s] = ser_m[s][lb_addr[5:0]];
  end

  logic [7:0] pulse_seen;
  int pulse_ticks = 0;
  always @(posedge clk) if (rst_n && pulse != 0) begin pulse_seen = pulse; pulse_ticks++; end

  // one VME-- cycle; ack = 0 if no DTACK* within 40 ticks
  task automatic vme(input bit write, input logic [23:0] addr, input logic [15:0] wd,
                     output logic [15:0] rd, output bit ack, output int wait_ticks);
    @(negedge clk);
    vme_a = addr[23:1]; vme_write_n = !write; vme_d_in = wd;
    @(negedge clk);
    vme_ds_n = 0;
    ack = 0; wait_ticks = 0;
    while (wait_ticks < 40 && !ack) begin
      @(negedge clk); wait_ticks++;
      if (!vme_dtack_n) ack = 1;
    end
    rd = vme_d_oe ? vme_d_out : 16'hxxxx;
    vme_ds_n = 1;
    repeat (4) @(negedge clk);
    `CHECK(vme_dtack_n == 1 && vme_d_oe == 0, "DTACK and data released after DS")
  endtask

  function automatic logic [23:0] mod_addr(input logic [18:0] off);
    return {1'b1, geoadd[3:0], off};
  endfunction

  logic [15:0] rd;
  bit ack;
  int wt, n_holdoff = 0, n_dev = 0;

  task automatic wr_chk(input logic [18:0] off, input logic [15:0] d);
    vme(1, mod_addr(off), d, rd, ack, wt);
    `CHECK(ack, $sformatf("write to %h acknowledged", off))
  endtask
  task automatic rd_chk(input logic [18:0] off, input logic [15:0] exp);
    vme(0, mod_addr(off), 0, rd, ack, wt);
    `CHECK(ack && rd === exp, $sformatf("read %h got %h exp %h", off, rd, exp))
  endtask

  function automatic logic [9:0] lay(input logic [19:0] v, input int l);
    logic [9:0] r;
    for (int s = 0; s < 10; s++) r[s] = v[2*s + l];
    return r;
  endfunction

  initial begin
    ser_perr = 20'h8_1234; ser_lloss = 20'hF_000F; ser_dlock = 20'hA_AAAA; ser_sync_done = 20'h5_5555;
    cp_err = 8'h81; cp_dlock = 8'hFE; hc_rev[0] = 5'd3; hc_rev[1] = 5'd4;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // module registers
    rd_chk(19'h00, 16'd2418);
    rd_chk(19'h02, {4'd1, 4'd2, 8'd7});
    rd_chk(19'h04, 16'h0009);
    rd_chk(19'h06, 16'h0013);
    `CHECK(control == 7'h13, "control output reset value")
    wr_chk(19'h06, 16'h0055);
    rd_chk(19'h06, 16'h0055);
    `CHECK(control == 7'h55, "control output follows register")
    wr_chk(19'h08, 16'h0024);
    `CHECK(pulse_seen == 8'h24 && pulse_ticks == 1, "pulse bits last one tick")
    rd_chk(19'h08, 16'h0000);
    rd_chk(19'h0C, {6'h0, lay(ser_perr, 0)});
    rd_chk(19'h0E, {6'h0, lay(ser_perr, 1)});
    rd_chk(19'h10, 16'h005A);
    wr_chk(19'h12, 16'h0002);
    rd_chk(19'h12, 16'h0002);
    `CHECK(can_control == 2'b10, "CAN control output")
    rd_chk(19'h20, {6'h0, lay(ser_lloss, 0)});
    rd_chk(19'h22, {6'h0, lay(ser_lloss, 1)});
    rd_chk(19'h24, {6'h0, lay(ser_dlock, 0)});
    rd_chk(19'h26, {6'h0, lay(ser_dlock, 1)});
    rd_chk(19'h28, 16'h0081);
    rd_chk(19'h2A, 16'h00FE);
    rd_chk(19'h2C, 16'h0002);
    rd_chk(19'h30, 16'h0003);
    rd_chk(19'h32, 16'h0004);
    rd_chk(19'h40, {6'h0, lay(ser_sync_done, 0)});
    rd_chk(19'h42, {6'h0, lay(ser_sync_done, 1)});
    rd_chk(19'h1000, 16'h0000);      // unused location
    // devices
    wr_chk(19'h03000 + 2*3, 16'hD003); rd_chk(19'h03000 + 2*3, 16'hD003);
    wr_chk(19'h03800 + 2*5, 16'hB005); rd_chk(19'h03800 + 2*5, 16'hB005);
    `CHECK(daq_m[3] == 16'hD003 && roi_m[5] == 16'hB005, "ROC registers written")
    for (int c = 0; c < 8; c++) wr_chk(19'(32'h07000 + 32'h800 * c + 2*c), 16'hC000 + 16'(c));
    for (int c = 0; c < 8; c++) rd_chk(19'(32'h07000 + 32'h800 * c + 2*c), 16'hC000 + 16'(c));
    for (int s = 0; s < 20; s++) wr_chk(19'(32'h0C000 + 32'h1000 * s + 2*(s % 7)), 16'h5000 + 16'(s));
    for (int s = 0; s < 20; s++) rd_chk(19'(32'h0C000 + 32'h1000 * s + 2*(s % 7)), 16'h5000 + 16'(s));
    for (int s = 0; s < 20; s++) `CHECK(ser_m[s][s % 7] == 16'h5000 + 16'(s), "Serialiser model written")
    n_dev = 8 + 8 + 20 + 20 + 4;
    // broadcasts
    wr_chk(19'h06800 + 2*40, 16'hBCBC);
    for (int c = 0; c < 8; c++) `CHECK(cp_m[c][40] == 16'hBCBC, "CP broadcast write")
    cp_m[0][41] = 16'h1111; cp_m[1][41] = 16'h2222;
    rd_chk(19'h06800 + 2*41, 16'h1111);
    wr_chk(19'h0B000 + 2*50, 16'h5E5E);
    for (int s = 0; s < 20; s++) `CHECK(ser_m[s][50] == 16'h5E5E, "Serialiser broadcast write")
    // not addressed
    vme(0, {1'b1, 4'd6, 19'h00000}, 0, rd, ack, wt);
    `CHECK(!ack, "other geographical address: no DTACK")
    vme(0, {1'b0, geoadd[3:0], 19'h00000}, 0, rd, ack, wt);
    `CHECK(!ack, "A23 low: no DTACK")
    vme(0, mod_addr(19'h20000), 0, rd, ack, wt);
    `CHECK(!ack, "offset 0x20000: no DTACK")
    rd_chk(19'h00, 16'd2418);        // still working
    // TTC hold-off
    begin
      int wt_free, wt_busy;
      vme(1, mod_addr(19'h03000 + 2*9), 16'h0099, rd, ack, wt_free);
      fork
        begin
          @(negedge clk); ttc_cmd_valid = 1; ttc_cmd = 8'hA7;
          repeat (20) @(negedge clk);
          ttc_cmd_valid = 0;
        end
        begin
          repeat (3) @(negedge clk);
          vme(1, mod_addr(19'h03000 + 2*10), 16'h00AA, rd, ack, wt_busy);
        end
      join
      `CHECK(ack && daq_m[10] == 16'h00AA, "held-off write completes")
      `CHECK(wt_busy > wt_free + 10, $sformatf("device write waited for TTC (%0d vs %0d ticks)", wt_busy, wt_free))
      if (wt_busy > wt_free + 10) n_holdoff++;
      fork
        begin
          @(negedge clk); ttc_cmd_valid = 1;
          repeat (20) @(negedge clk);
          ttc_cmd_valid = 0;
        end
        begin
          int wt_id;
          repeat (3) @(negedge clk);
          vme(0, mod_addr(19'h00), 0, rd, ack, wt_id);
          `CHECK(ack && rd == 16'd2418 && wt_id <= wt_free, "ID read bypasses the TTC hold-off")
        end
      join
    end
    // TTC pipeline delay
    begin
      int t_in, t_out;
      repeat (10) @(negedge clk); ttc_cmd_valid = 1; ttc_cmd = 8'h3C; t_in = 0;
      @(negedge clk); ttc_cmd_valid = 0;
      t_out = 1;
      while (!ttc_cmd_out_valid && t_out < 10) begin @(negedge clk); t_out++; end
      `CHECK(t_out == 3 && ttc_cmd_out == 8'h3C, $sformatf("TTC pipeline delay %0d", t_out))
    end
    $display("device accesses=%0d holdoffs=%0d", n_dev, n_holdoff);
    `TB_FINISH
  end
endmodule
