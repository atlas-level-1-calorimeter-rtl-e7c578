// serialiser: the Serialiser FPGA, which spreads the data of one link cable.
//
// It receives four link words per tick, one per LVDS link, covering 2x4
// towers (phi x eta): channels 0 and 1 are eta columns 0 and 1 (the X or
// -eta half), channels 2 and 3 are columns 2 and 3 (the Y or +eta half).
// Each half re-serialises its two words onto a 5-line bus of 160 MBaud
// streams (layout in cpm_pkg). On the board each bus goes to up to three CP
// chips and to the backplane; all copies carry the same data, so one bus per
// half is brought out and the module wires the copies. The -eta fan-out is the
// whole X bus, the +eta fan-out lines 2..4 of the Y bus.
//
// Monitoring: each channel has a saturating 8-bit parity-error counter;
// `parity_error` is high while any counter is non-zero, `link_loss` is the OR
// of the four link-lost indications. A masked channel is sent on as zero
// words. For DAQ read-out the four pairs are BC-mux decoded into 8 towers,
// each tagged with its link's parity-error and link-loss bits, and the 80-bit
// slice enters a readout_sequencer (tower k = 2*channel + (0 for A, 1 for B)
// occupies bits [10k+9:10k] = {link_loss, parity_error, E_T}).
//
// Register port (word addresses): 0 control (bit 0 clears the error
// counters, write only), 1 channel mask [3:0], 2 read-out offset [6:0],
// 3..6 error counters of channels 0..3, 7 status {link_loss, parity_error}.
// Timing: link word in tick t is on the buses in tick t+1; the towers of the
// crossing whose first word is in tick t enter the read-out pipeline in tick
// t+2, together with the parity-error and link-loss bits of tick t. Reset is synchronous, active low.
module serialiser
  import cpm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  link_word_t  din [4],
  input  logic [3:0]  link_lock,
  output bus5_t       bus_x,
  output bus5_t       bus_y,
  output logic        parity_error,
  output logic        link_loss,
  // DAQ read-out, driven by the DAQ ROC
  input  logic        add_reset,
  input  logic        en_readout,
  input  logic        load_shift,
  output logic        daq_sr,
  output logic        daq_fifo_empty,
  // register port
  input  logic [2:0]  reg_addr,
  input  logic        reg_we,
  input  logic [15:0] reg_wdata,
  output logic [15:0] reg_rdata
);
  logic [3:0]      mask;
  logic [6:0]      ro_offset;
  logic [7:0]      err_cnt [4];
  link_word_t      w [4];
  logic [ET_W-1:0] ta [4], tb [4];
  logic [3:0]      perr_d, perr_q, lloss_q, lloss_q2;
  logic [79:0]     slice;

  always_comb
    for (int c = 0; c < 4; c++) w[c] = mask[c] ? ZERO_WORD : din[c];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_x        <= pack_bus5(ZERO_WORD, ZERO_WORD);
      bus_y        <= pack_bus5(ZERO_WORD, ZERO_WORD);
      link_loss    <= 1'b0;
      lloss_q      <= '0;
      lloss_q2     <= '0;
      perr_q       <= '0;
      parity_error <= 1'b0;
    end else begin
      bus_x        <= pack_bus5(w[0], w[1]);
      bus_y        <= pack_bus5(w[2], w[3]);
      lloss_q      <= ~link_lock;
      lloss_q2     <= lloss_q;
      perr_q       <= perr_d;
      link_loss    <= |(~link_lock);
      parity_error <= (err_cnt[0] != 0) || (err_cnt[1] != 0) || (err_cnt[2] != 0) || (err_cnt[3] != 0);
    end
  end

  for (genvar c = 0; c < 4; c++) begin : g_ch
    bcmux_decoder u_dec (
      .clk, .rst_n, .word(w[c]), .mask(1'b0),
      .tower_a(ta[c]), .tower_b(tb[c]), .par_err(perr_d[c])
    );
    always_ff @(posedge clk) begin
      if (!rst_n || (reg_we && reg_addr == 3'd0 && reg_wdata[0])) err_cnt[c] <= '0;
      else if (perr_d[c] && err_cnt[c] != 8'hFF) err_cnt[c] <= err_cnt[c] + 1'b1;
    end
  end

  always_comb
    for (int c = 0; c < 4; c++) begin
      slice[20*c +: 10]      = {lloss_q2[c], perr_q[c], ta[c]};
      slice[20*c + 10 +: 10] = {lloss_q2[c], perr_q[c], tb[c]};
    end

  readout_sequencer #(.WIDTH(80), .NSTREAM(1), .PIPE_DEPTH(PIPE_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_ro (
    .clk, .rst_n, .din(slice), .offset(ro_offset), .add_reset, .en_readout, .load_shift,
    .sr_out(daq_sr), .fifo_empty(daq_fifo_empty), .fifo_overflow()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mask      <= '0;
      ro_offset <= '0;
    end else if (reg_we) begin
      if (reg_addr == 3'd1) mask      <= reg_wdata[3:0];
      if (reg_addr == 3'd2) ro_offset <= reg_wdata[6:0];
    end
  end

  always_comb begin
    case (reg_addr)
      3'd1:    reg_rdata = {12'h000, mask};
      3'd2:    reg_rdata = {9'h000, ro_offset};
      3'd3:    reg_rdata = {8'h00, err_cnt[0]};
      3'd4:    reg_rdata = {8'h00, err_cnt[1]};
      3'd5:    reg_rdata = {8'h00, err_cnt[2]};
      3'd6:    reg_rdata = {8'h00, err_cnt[3]};
      3'd7:    reg_rdata = {14'h0000, link_loss, parity_error};
      default: reg_rdata = '0;
    endcase
  end
endmodule
