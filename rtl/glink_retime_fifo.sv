// glink_retime_fifo: moves read-out link words from the 40.08 MHz TTC clock
// to the 40.00 MHz crystal clock that drives the G-link transmitter.
//
// A dual-clock FIFO with Gray-coded pointers synchronised through two
// flip-flops in each direction. Every word with DAV set is written; an idle
// word (DAV clear) is written only while the FIFO is less than half full,
// which absorbs the slightly faster write clock by dropping idle words
// between frames. The read side outputs the next word each tick and an idle
// word (zero data, DAV clear) when the FIFO is empty. With the write clock at
// least as fast as the read clock the FIFO never runs dry inside a frame.
// Outputs: data and active-low DAV* for the transmitter, registered on
// rd_clk. Each side has its own synchronous active-low reset.
module glink_retime_fifo #(
  parameter int unsigned W     = 20,
  parameter int unsigned DEPTH = 16
) (
  input  logic         wr_clk,
  input  logic         wr_rst_n,
  input  logic [W-1:0] wr_data,
  input  logic         wr_dav,
  input  logic         rd_clk,
  input  logic         rd_rst_n,
  output logic [W-1:0] tx_data,
  output logic         tx_dav_n,
  output logic         overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W:0]  mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w, wbin_next, rbin_next, level;
  logic        full, empty, do_write;

  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  assign rbin_w    = g2b(rgray_w2);
  assign level     = wbin - rbin_w;
  assign full      = (level == (AW+1)'(DEPTH));
  assign do_write  = !full && (wr_dav || (level < (AW+1)'(DEPTH/2)));
  assign wbin_next = wbin + 1'b1;

  always_ff @(posedge wr_clk) begin
    if (do_write) mem[wbin[AW-1:0]] <= {wr_dav, wr_data};
  end

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_write) begin
        wbin  <= wbin_next;
        wgray <= wbin_next ^ (wbin_next >> 1);
      end
      if (full && wr_dav) overflow <= 1'b1;
    end
  end

  // ---------------- read side ----------------
  assign empty     = (rgray == wgray_r2);
  assign rbin_next = rbin + 1'b1;

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      tx_data  <= '0;
      tx_dav_n <= 1'b1;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (empty) begin
        tx_data  <= '0;
        tx_dav_n <= 1'b1;
      end else begin
        tx_data  <= mem[rbin[AW-1:0]][W-1:0];
        tx_dav_n <= !mem[rbin[AW-1:0]][W];
        rbin     <= rbin_next;
        rgray    <= rbin_next ^ (rbin_next >> 1);
      end
    end
  end
endmodule
