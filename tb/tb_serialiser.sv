// Testbench for the Serialiser. Four behavioural BC-mux encoders drive the
// four links with random tower pairs that obey the BC-mux rule. Checked:
//   - both 5-line buses carry the (masked) link words one tick later;
//   - DAQ read-out: with a programmed offset, each en_readout slice scrolled
//     out of the shift register holds the decoded towers of the crossing
//     offset+3 ticks earlier and the link-loss bits of that crossing's word;
//     link_lock is toggled at random during read-out;
//   - a masked channel sends zero words and reads out zero towers;
//   - corrupted words increment the per-channel error counter, which
//     saturates at 255, raises parity_error and is cleared by the control
//     register; link_loss and the status register follow link_lock.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_serialiser;
  import cpm_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  `WATCHDOG(clk, 100000)

  logic [7:0] a [4], b [4], pa [4], pb [4];
  link_word_t enc [4], din [4];
  logic [3:0] corrupt = 0, link_lock = 4'hF;
  bus5_t bus_x, bus_y;
  logic parity_error, link_loss;
  logic add_reset = 0, en_readout = 0, load_shift = 0, daq_sr, daq_fifo_empty;
  logic [2:0] reg_addr = 0;
  logic reg_we = 0;
  logic [15:0] reg_wdata = 0, reg_rdata;

  for (genvar c = 0; c < 4; c++) begin : g_enc
    bcmux_encoder_model u_enc (.clk, .rst_n, .a(a[c]), .b(b[c]), .word(enc[c]));
    assign din[c] = corrupt[c] ? link_word_t'(enc[c] ^ 10'h004) : enc[c];
  end

  serialiser dut (.clk, .rst_n, .din, .link_lock, .bus_x, .bus_y, .parity_error, .link_loss,
    .add_reset, .en_readout, .load_shift, .daq_sr, .daq_fifo_empty,
    .reg_addr, .reg_we, .reg_wdata, .reg_rdata);

  // reference history, indexed by tick
  int cyc = 0;
  logic [79:0] exp_tw [int];    // towers of crossing i, ordered as in the slice
  logic [3:0]  lock_h [int];
  logic [3:0]  mask = 0;
  link_word_t  din_prev [4];
  int n_slices = 0, n_lloss_bits = 0, n_nonzero = 0;

  task automatic reg_write(input int addr, input int data);
    reg_addr = 3'(addr); reg_wdata = 16'(data); reg_we = 1;
    tick(0); reg_we = 0;
  endtask

  // One tick: check the buses, then drive new towers (BC-mux rule obeyed)
  task automatic tick(input bit rnd);
    @(negedge clk);
    cyc++;
    if (rst_n) begin
      `CHECK(bus_x == pack_bus5(mask_s[0] ? ZERO_WORD : din_prev[0], mask_s[1] ? ZERO_WORD : din_prev[1]), "bus_x")
      `CHECK(bus_y == pack_bus5(mask_s[2] ? ZERO_WORD : din_prev[2], mask_s[3] ? ZERO_WORD : din_prev[3]), "bus_y")
    end
    for (int c = 0; c < 4; c++) begin
      if (!rnd || pa[c] != 0 || pb[c] != 0 || $urandom_range(0, 2) == 0) begin
        a[c] = 0; b[c] = 0;
      end else begin
        a[c] = $urandom_range(0, 1) ? 8'($urandom) : 8'h00;
        b[c] = $urandom_range(0, 1) ? 8'($urandom) : 8'h00;
      end
      pa[c] = a[c]; pb[c] = b[c];
      exp_tw[cyc][20*c +: 20] = mask[c] ? 20'h0 : {2'b00, b[c], 2'b00, a[c]};
    end
    lock_h[cyc] = link_lock;
  endtask

  // the words and mask in force at each clock edge
  logic [3:0] mask_s = 0;
  always @(posedge clk) begin
    for (int c = 0; c < 4; c++) din_prev[c] <= din[c];
    mask_s <= mask;
  end

  // Read one slice: en_readout now, then scroll it out and compare
  task automatic read_slice(input int offset);
    logic [79:0] got, exp;
    int t0;
    t0 = cyc;
    en_readout = 1;
    tick(1);
    en_readout = 0;
    tick(1);
    load_shift = 1;
    tick(1);
    load_shift = 0;
    for (int k = 0; k < 80; k++) begin
      got[k] = daq_sr;
      tick(1);
    end
    exp = exp_tw[t0 - offset - 3];
    for (int c = 0; c < 4; c++) begin
      logic ll;
      ll = !lock_h[t0 - offset - 2][c];
      exp[20*c + 9] = ll; exp[20*c + 19] = ll;
      if (ll) n_lloss_bits++;
    end
    if (exp != 0) n_nonzero++;
    n_slices++;
    `CHECK(got == exp, $sformatf("DAQ slice %h exp %h", got, exp))
  endtask

  initial begin
    for (int c = 0; c < 4; c++) begin a[c] = 0; b[c] = 0; pa[c] = 0; pb[c] = 0; din_prev[c] = ZERO_WORD; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // read-out offset 20, then realign the pipeline
    reg_write(2, 20);
    reg_addr = 0; #1 `CHECK(reg_rdata == 0, "control reads zero");
    reg_addr = 2; #1 `CHECK(reg_rdata == 20, "offset readback");
    add_reset = 1; tick(0); add_reset = 0;
    repeat (150) tick(1);
    // random link_lock toggling during read-out
    fork
      begin
        repeat (60) begin
          repeat ($urandom_range(20, 200)) @(negedge clk);
          link_lock[$urandom_range(0, 3)] = $urandom_range(0, 3) != 0;
        end
      end
      begin
        repeat (40) begin
          read_slice(20);
          repeat ($urandom_range(0, 5)) tick(1);
        end
      end
    join_any
    disable fork;
    link_lock = 4'hF;
    repeat (4) tick(1);
    `CHECK(!link_loss, "link_loss clear with all locked")
    link_lock[1] = 0; repeat (3) tick(1);
    `CHECK(link_loss, "link_loss set");
    reg_addr = 7; #1 `CHECK(reg_rdata[1] == 1, "status link_loss bit");
    link_lock = 4'hF;
    // mask channel 2
    reg_addr = 1; reg_wdata = 16'h4; reg_we = 1; tick(1); reg_we = 0; mask = 4'b0100;
    repeat (130) tick(1);
    reg_addr = 1; #1 `CHECK(reg_rdata == 16'h4, "mask readback");
    repeat (20) read_slice(20);
    reg_write(1, 0); mask = 0;
    // parity errors: 5 on channel 0, 300 on channel 3
    repeat (10) tick(1);
    `CHECK(!parity_error, "no parity error yet")
    repeat (5) begin corrupt[0] = 1; tick(0); corrupt[0] = 0; tick(0); end
    corrupt[3] = 1; repeat (300) tick(0); corrupt[3] = 0;
    repeat (4) tick(0);
    reg_addr = 3; #1 `CHECK(reg_rdata == 5, $sformatf("ch0 error count %0d", reg_rdata));
    reg_addr = 4; #1 `CHECK(reg_rdata == 0, "ch1 error count");
    reg_addr = 6; #1 `CHECK(reg_rdata == 255, "ch3 error count saturates");
    `CHECK(parity_error, "parity_error output set")
    reg_addr = 7; #1 `CHECK(reg_rdata[0] == 1, "status parity bit");
    reg_write(0, 1);
    repeat (2) tick(0);
    reg_addr = 3; #1 `CHECK(reg_rdata == 0, "counter cleared");
    `CHECK(!parity_error, "parity_error cleared")
    $display("slices=%0d nonzero=%0d lloss_bits=%0d", n_slices, n_nonzero, n_lloss_bits);
    `CHECK(n_nonzero > 30 && n_lloss_bits > 0, "read-out exercised")
    `TB_FINISH
  end
endmodule
