// bcmux_decoder: undoes the bunch-crossing multiplexing of one tower-pair link.
//
// The Pre-processor sends the two towers A and B of a pair on one link. The
// first non-zero tower goes out first (A if both are non-zero) with the flag
// naming the tower (0 = A, 1 = B). The next word carries the other tower, its
// flag now saying whether it belongs to the same bunch crossing as the first
// (0) or to the following one (1). A zero word ends the sequence. The decoder
// is a two-state machine (expect first word / expect second word) that
// rebuilds A and B for every bunch crossing.
//
// Each word is checked for odd parity. On an error the pair is zeroed for the
// crossings the word could belong to and the state machine restarts, because
// a corrupted flag means the error cannot be pinned to one tower. A masked
// channel is read as a stream of zero words.
//
// Timing: the word of crossing i is sampled at the end of tick i; the towers
// of crossing i are on tower_a/tower_b during tick i+2 (two registers: the
// decoder must see word i+1 before crossing i is complete). par_err is
// registered with the towers it zeroed. Reset is synchronous, active low.
module bcmux_decoder
  import cpm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  link_word_t      word,
  input  logic            mask,      // 1: ignore this channel
  output logic [ET_W-1:0] tower_a,
  output logic [ET_W-1:0] tower_b,
  output logic            par_err
);

  logic            second_q;          // a first word has been seen
  logic            first_b_q;         // the first word carried tower B
  logic [ET_W-1:0] cur_a_q, cur_b_q;  // towers of the crossing of the last word

  logic [ET_W-1:0] out_a, out_b, nxt_a, nxt_b;
  logic            nxt_second, nxt_first_b, perr;
  link_word_t      w;

  always_comb begin
    w           = mask ? ZERO_WORD : word;
    perr        = !parity_ok(w);
    out_a       = cur_a_q;
    out_b       = cur_b_q;
    nxt_a       = '0;
    nxt_b       = '0;
    nxt_second  = 1'b0;
    nxt_first_b = first_b_q;
    if (perr) begin
      out_a = '0;
      out_b = '0;
    end else if (w.et != '0) begin
      if (!second_q) begin
        // first word of a sequence: belongs to this crossing
        if (w.flag) nxt_b = w.et;
        else        nxt_a = w.et;
        nxt_second  = 1'b1;
        nxt_first_b = w.flag;
      end else if (!w.flag) begin
        // second word, same crossing as the first
        if (first_b_q) out_a = w.et;
        else           out_b = w.et;
      end else begin
        // second word, following crossing
        if (first_b_q) nxt_a = w.et;
        else           nxt_b = w.et;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      second_q  <= 1'b0;
      first_b_q <= 1'b0;
      cur_a_q   <= '0;
      cur_b_q   <= '0;
      tower_a   <= '0;
      tower_b   <= '0;
      par_err   <= 1'b0;
    end else begin
      second_q  <= nxt_second;
      first_b_q <= nxt_first_b;
      cur_a_q   <= nxt_a;
      cur_b_q   <= nxt_b;
      tower_a   <= out_a;
      tower_b   <= out_b;
      par_err   <= perr;
    end
  end

endmodule
