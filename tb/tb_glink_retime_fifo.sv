// Testbench for glink_retime_fifo. The write clock runs at 40.08 MHz and the
// read clock at 40.00 MHz, as on the module (a third phase uses equal
// clocks). Frames of consecutive DAV words with counting data are written
// with idle gaps between them. Checked: every DAV word arrives exactly once
// and in order, the words of a frame leave back to back (no idle inside a
// frame), idle words carry zero data, and the FIFO never overflows even
// though the write clock is faster.
`timescale 1ps/1ps
`include "tb_util.svh"
module tb_glink_retime_fifo;
  `TB_COUNTERS
  logic wr_clk = 0, rd_clk = 0, rst_n = 0;
  int wr_half = 12475, rd_half = 12500;
  always #(wr_half) wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;
  `WATCHDOG(rd_clk, 200000)

  logic [19:0] wr_data = 0, tx_data;
  logic wr_dav = 0, tx_dav_n, overflow;
  glink_retime_fifo #(.W(20), .DEPTH(16)) dut (.wr_clk, .wr_rst_n(rst_n), .wr_data, .wr_dav,
    .rd_clk, .rd_rst_n(rst_n), .tx_data, .tx_dav_n, .overflow);

  int next_exp = 1, n_words = 0, n_frames = 0, n_written = 0;
  bit in_frame = 0;
  int frame_left = 0;
  int frame_end [$];   // data value of the last word of each frame

  always @(posedge rd_clk) if (rst_n) begin
    #1;
    if (!tx_dav_n) begin
      `CHECK(tx_data == 20'(next_exp), $sformatf("word %0d exp %0d", tx_data, next_exp))
      next_exp = int'(tx_data) + 1;
      n_words++;
      if (frame_end.size() > 0 && int'(tx_data) == frame_end[0]) begin
        void'(frame_end.pop_front()); in_frame = 0; n_frames++;
      end else in_frame = 1;
    end else begin
      `CHECK(!in_frame, "idle word inside a frame")
      `CHECK(tx_data == 0, "idle word carries zero data")
    end
  end

  task automatic write_frames(int n);
    repeat (n) begin
      int len;
      len = $urandom_range(1, 90);
      for (int i = 0; i < len; i++) begin
        @(negedge wr_clk);
        wr_dav = 1; n_written++; wr_data = 20'(n_written);
        if (i == len - 1) frame_end.push_back(n_written);
      end
      @(negedge wr_clk); wr_dav = 0; wr_data = 0;
      repeat ($urandom_range(3, 60)) @(negedge wr_clk);
    end
  endtask

  initial begin
    repeat (4) @(negedge rd_clk);
    rst_n = 1;
    repeat (30) @(negedge wr_clk);
    write_frames(150);
    wr_half = 12500;                  // equal clocks
    write_frames(100);
    wr_half = 12475;
    write_frames(100);
    repeat (100) @(negedge rd_clk);
    `CHECK(n_words == n_written, $sformatf("received %0d of %0d words", n_words, n_written))
    `CHECK(!overflow, "no overflow")
    $display("frames=%0d words=%0d", n_frames, n_words);
    `TB_FINISH
  end
endmodule
