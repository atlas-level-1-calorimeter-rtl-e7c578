// roc_core: the part shared by the DAQ and RoI read-out controllers (ROCs).
//
// Trigger side: a 12-bit bunch-crossing counter is reloaded with bcn_offset
// by BCntRes and counts every tick. A Level-1 Accept latches the counter and
// holds en_readout high for `nslices` ticks (1..255), which makes every
// external read-out sequencer copy that many pipeline slices into its FIFO.
// For each of those ticks the ROC pushes the latched BCN, tagged with a
// last-slice flag, into its own BCN FIFO one tick later, in step with the
// external FIFOs. An L1A that arrives while slices are still being requested
// is not accepted and sets the sticky l1a_dropped flag. add_reset, the reset
// of every pipeline address counter, is pulsed every PIPE_DEPTH ticks and
// realigned by the TTC RstLdCnt signal.
//
// Link side: whenever the BCN FIFO holds a slice the ROC pulses load_shift,
// which loads all external shift registers and pops its own FIFO; it then
// sends, on each of the NF bit-fields of the read-out link, EXT_LEN bits
// relayed (re-timed by one register) from the external shift registers,
// INT_LEN bits of its own data (int_slice, sampled at the load), and one
// odd-parity bit over the EXT_LEN+INT_LEN bits of that field. Slices of one
// L1A follow back to back with DAV held high; after the last one DAV stays low
// for at least min_dav ticks. With `flush` requested and its own FIFO empty,
// the ROC pulses load_shift until all external FIFOs are empty, sending
// nothing. ef_error (sticky) is set whenever an external FIFO empty flag, or
// int_ef, differs from its own.
// Timing: load_shift in tick t; bit k of a field is on link_data in tick
// t+2+k; the parity bit in tick t+2+EXT_LEN+INT_LEN.
module roc_core #(
  parameter int unsigned NF         = 20,
  parameter int unsigned NEF        = 20,
  parameter int unsigned EXT_LEN    = 80,
  parameter int unsigned INT_LEN    = 3,
  parameter int unsigned PIPE_DEPTH = 128,
  parameter int unsigned FIFO_DEPTH = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  // TTC
  input  logic               l1a,
  input  logic               bcntres,
  input  logic               rstldcnt,
  // configuration
  input  logic               enable,
  input  logic [7:0]         nslices,
  input  logic [6:0]         min_dav,
  input  logic [6:0]         bcn_offset,
  input  logic               flush,
  input  logic               clear_err,
  // external sequencers
  output logic               add_reset,
  output logic               en_readout,
  output logic               load_shift,
  input  logic [NF-1:0]      ext_bits,
  input  logic [NEF-1:0]     ext_ef,
  input  logic               int_ef,
  // internal data
  input  logic [INT_LEN-1:0] int_slice [NF],
  output logic [11:0]        bcn_head,
  output logic [11:0]        bcn,
  // read-out link
  output logic [NF-1:0]      link_data,
  output logic               link_dav,
  // status
  output logic               own_empty,
  output logic               ef_error,
  output logic               l1a_dropped
);
  localparam int unsigned TOTAL = EXT_LEN + INT_LEN + 1;
  localparam int unsigned PW    = $clog2(TOTAL);
  localparam int unsigned AW    = $clog2(PIPE_DEPTH);

  typedef enum logic [1:0] {IDLE, XMIT, DEAD} state_t;

  // ---------------- trigger side ----------------
  logic [7:0]    slices_left;
  logic [11:0]   bcn_latch;
  logic          push_q;
  logic [12:0]   entry_q, head;
  logic [AW-1:0] rst_ctr;
  logic          own_full, own_ovf;
  logic [$clog2(FIFO_DEPTH):0] own_count;

  assign en_readout = (slices_left != 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bcn         <= '0;
      bcn_latch   <= '0;
      slices_left <= '0;
      push_q      <= 1'b0;
      entry_q     <= '0;
      rst_ctr     <= '0;
      add_reset   <= 1'b0;
      l1a_dropped <= 1'b0;
    end else begin
      bcn <= bcntres ? 12'(bcn_offset) : bcn + 1'b1;
      if (slices_left != 0) begin
        slices_left <= slices_left - 1'b1;
        if (l1a && enable) l1a_dropped <= 1'b1;
      end else if (l1a && enable) begin
        slices_left <= (nslices == 0) ? 8'd1 : nslices;
        bcn_latch   <= bcn;
      end
      if (clear_err) l1a_dropped <= 1'b0;
      push_q  <= en_readout;
      entry_q <= {slices_left == 8'd1, bcn_latch};
      rst_ctr   <= rstldcnt ? '0 : rst_ctr + 1'b1;
      add_reset <= rstldcnt || (rst_ctr == AW'(PIPE_DEPTH-1));
    end
  end

  sync_fifo #(.WIDTH(13), .DEPTH(FIFO_DEPTH)) u_bcn_fifo (
    .clk, .rst_n, .push(push_q), .din(entry_q), .pop(load_shift),
    .dout(head), .empty(own_empty), .full(own_full), .overflow(own_ovf), .count(own_count)
  );
  assign bcn_head = head[11:0];

  // ---------------- link side ----------------
  state_t             state;
  logic [PW-1:0]      pos;
  logic [6:0]         dead_cnt;
  logic               cur_last, flushing;
  logic [INT_LEN-1:0] int_hold [NF];
  logic [NF-1:0]      par_acc, bit_now;
  logic               start, cont, flush_load;
  logic [INT_LEN-1:0] int_sh;

  always_comb begin
    start      = (state == IDLE) && !own_empty;
    cont       = (state == XMIT) && (pos == PW'(TOTAL-1)) && !cur_last && !own_empty;
    flush_load = (state == IDLE) && own_empty && flushing && !(&ext_ef);
    load_shift = start || cont || flush_load;
    int_sh     = '0;
    for (int f = 0; f < NF; f++) begin
      if (pos < PW'(EXT_LEN))                bit_now[f] = ext_bits[f];
      else if (pos < PW'(EXT_LEN + INT_LEN)) begin
        int_sh     = int_hold[f] >> (pos - PW'(EXT_LEN));
        bit_now[f] = int_sh[0];
      end
      else                                   bit_now[f] = ~par_acc[f];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      pos       <= '0;
      dead_cnt  <= '0;
      cur_last  <= 1'b0;
      flushing  <= 1'b0;
      par_acc   <= '0;
      link_data <= '0;
      link_dav  <= 1'b0;
      ef_error  <= 1'b0;
      for (int f = 0; f < NF; f++) int_hold[f] <= '0;
    end else begin
      if (flush) flushing <= 1'b1;
      else if (flushing && own_empty && (&ext_ef)) flushing <= 1'b0;

      if ((ext_ef != {NEF{own_empty}}) || (int_ef != own_empty)) ef_error <= 1'b1;
      else if (clear_err) ef_error <= 1'b0;

      if (start || cont) begin
        cur_last <= head[12];
        for (int f = 0; f < NF; f++) int_hold[f] <= int_slice[f];
      end

      case (state)
        IDLE: begin
          link_data <= '0;
          link_dav  <= 1'b0;
          if (start) begin
            state <= XMIT;
            pos   <= '0;
          end
        end
        XMIT: begin
          link_data <= bit_now;
          link_dav  <= 1'b1;
          par_acc   <= (pos == '0) ? bit_now : (par_acc ^ bit_now);
          if (pos == PW'(TOTAL-1)) begin
            pos <= '0;
            if (!cont) begin
              state    <= DEAD;
              dead_cnt <= '0;
            end
          end else begin
            pos <= pos + 1'b1;
          end
        end
        default: begin  // DEAD
          link_data <= '0;
          link_dav  <= 1'b0;
          dead_cnt  <= dead_cnt + 1'b1;
          if (dead_cnt >= min_dav) state <= IDLE;
        end
      endcase
    end
  end

  // L1As may not ask for more slices than the FIFOs can hold
  a_no_ovf: assert property (@(posedge clk) disable iff (!rst_n) !own_ovf);

endmodule
