// Testbench for readout_sequencer (pipeline RAM + FIFO + shift register).
// The data written each tick is the tick number, so every slice that comes
// out of the shift registers names the tick it was taken from. A reference
// queue predicts which tick each en_readout returns (tick - offset, or
// tick - 128 for offset 0), when the FIFO becomes non-empty, what each
// load_shift scrolls out on the two bit-streams (zeros when empty), the
// effect of add_reset with a new offset, and the overflow flag.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_readout_sequencer;
  `TB_COUNTERS
  localparam int W = 16, NS = 2, SL = W / NS, FD = 16;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  `WATCHDOG(clk, 20000)

  logic [W-1:0] din = 0;
  logic [6:0]   offset = 7'd10;
  logic add_reset = 0, en_readout = 0, load_shift = 0;
  logic [NS-1:0] sr_out;
  logic fifo_empty, fifo_overflow;

  readout_sequencer #(.WIDTH(W), .NSTREAM(NS), .PIPE_DEPTH(128), .FIFO_DEPTH(FD)) dut (
    .clk, .rst_n, .din, .offset, .add_reset, .en_readout, .load_shift,
    .sr_out, .fifo_empty, .fifo_overflow
  );

  int cyc = 0;
  int q_val[$], q_rdy[$];
  logic [W-1:0] exp_word;
  int bitidx = 99, n_loads = 0, n_empty_loads = 0, n_slices = 0;
  int valid_from = 0;       // first tick whose read address holds valid data

  // One tick of the test: check the shift output, then drive the inputs.
  task automatic step(input bit en, input bit ld, input bit ar);
    @(negedge clk);
    cyc++;
    if (bitidx < SL) begin
      for (int s = 0; s < NS; s++)
        `CHECK(sr_out[s] == exp_word[s*SL + bitidx],
               $sformatf("stream %0d bit %0d exp word %h", s, bitidx, exp_word))
      bitidx++;
    end
    `CHECK(fifo_empty == !(q_rdy.size() > 0 && q_rdy[0] <= cyc), "fifo_empty matches model")
    din = W'(cyc);
    en_readout = en; add_reset = ar;
    load_shift = ld && bitidx >= SL;
    if (en) begin
      if (q_val.size() < FD) begin
        q_val.push_back(offset == 0 ? cyc - 128 : cyc - int'(offset));
        q_rdy.push_back(cyc + 2);
      end
      n_slices++;
    end
    if (load_shift) begin
      n_loads++;
      if (q_rdy.size() > 0 && q_rdy[0] <= cyc) begin
        exp_word = W'(q_val.pop_front()); void'(q_rdy.pop_front());
      end else begin
        exp_word = '0; n_empty_loads++;
      end
      bitidx = 0;
    end
  endtask

  task automatic run_phase(input int n);
    int burst = 0;
    for (int i = 0; i < n; i++) begin
      bit en, ld;
      if (burst == 0 && $urandom_range(0, 30) == 0 && cyc >= valid_from && q_val.size() < FD - 6)
        burst = $urandom_range(1, 5);
      en = burst > 0;
      if (burst > 0) burst--;
      ld = $urandom_range(0, 3) == 0;
      step(en, ld, 1'b0);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;               // first write of tick 1 goes to address 0
    valid_from = 200;
    run_phase(3000);
    // New offset with an add_reset at an arbitrary tick
    step(0, 0, 0);
    offset = 7'd37;
    step(0, 0, 1);
    valid_from = cyc + 130;
    run_phase(3000);
    // Offset 0: the read address equals the write address (oldest data)
    offset = 7'd0;
    step(0, 0, 1);
    valid_from = cyc + 130;
    run_phase(3000);
    // Drain, then overflow the FIFO with one long burst
    repeat (40) step(0, 1, 0);
    `CHECK(fifo_overflow == 0, "no overflow so far")
    repeat (FD + 4) step(1, 0, 0);
    repeat (3) step(0, 0, 0);
    `CHECK(fifo_overflow == 1, "overflow flag set after over-long burst")
    repeat (FD + 2) begin step(0, 1, 0); repeat (SL) step(0, 0, 0); end
    `CHECK(n_loads > 100 && n_empty_loads > 5 && n_slices > 100, "mechanisms exercised")
    $display("loads=%0d empty_loads=%0d slices=%0d", n_loads, n_empty_loads, n_slices);
    `TB_FINISH
  end
endmodule
