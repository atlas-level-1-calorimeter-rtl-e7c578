// bcmux_encoder_model: behavioural model of the Pre-processor BC-mux encoder,
// used only to drive testbenches. Given towers A and B of each crossing it
// produces the 10-bit link word stream: the first non-zero tower goes out
// first (A before B, flag names the tower), the other one on the next crossing
// with flag 0 if it is from the same crossing and 1 if from the following one.
// It relies, like the real scheme, on every non-zero tower being followed by
// a zero. Timing: the word for crossing i is on `word` during tick i+1.
module bcmux_encoder_model
  import cpm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ET_W-1:0] a,
  input  logic [ET_W-1:0] b,
  output link_word_t      word
);
  logic            first_q;     // a first word went out on the last crossing
  logic            first_b_q;   // it carried tower B
  logic            same_q;      // the other tower was non-zero on that crossing too
  logic [ET_W-1:0] other_q;     // that tower

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word <= ZERO_WORD; first_q <= 0; first_b_q <= 0; same_q <= 0; other_q <= 0;
    end else if (first_q) begin
      first_q <= 1'b0;
      if (same_q)                  word <= make_word(1'b0, other_q);
      else if (first_b_q && a != 0) word <= make_word(1'b1, a);
      else if (!first_b_q && b != 0) word <= make_word(1'b1, b);
      else                          word <= ZERO_WORD;
    end else if (a != 0) begin
      word <= make_word(1'b0, a);
      first_q <= 1'b1; first_b_q <= 1'b0; same_q <= (b != 0); other_q <= b;
    end else if (b != 0) begin
      word <= make_word(1'b1, b);
      first_q <= 1'b1; first_b_q <= 1'b1; same_q <= 1'b0; other_q <= '0;
    end else begin
      word <= ZERO_WORD;
    end
  end
endmodule
