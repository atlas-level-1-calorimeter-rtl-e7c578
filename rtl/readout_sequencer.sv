// readout_sequencer: the read-out logic that sits inside every Serialiser and
// CP chip and is driven by a read-out controller (ROC).
//
// Three stages: a PIPE_DEPTH-location pipeline RAM written every tick
// (readout_pipeline), a FIFO that receives one slice per tick while the ROC
// holds en_readout, and a shift register. When the ROC pulses load_shift the
// shift register takes the FIFO head (zeros if the FIFO is empty) and starts
// scrolling it out at once, one bit per tick, LSB first, then zeros. The
// slice is split into NSTREAM equal fields, each scrolled on its own output
// bit, so a device can feed several bit-fields of the read-out link.
// fifo_empty is the FIFO empty flag that the ROC compares with its own.
// Timing: load_shift in tick t puts bit 0 of each field on sr_out in tick t+1
// and bit k in tick t+1+k. Reset is synchronous, active low.
module readout_sequencer #(
  parameter int unsigned WIDTH      = 80,
  parameter int unsigned NSTREAM    = 1,
  parameter int unsigned PIPE_DEPTH = 128,
  parameter int unsigned FIFO_DEPTH = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [WIDTH-1:0]              din,
  input  logic [$clog2(PIPE_DEPTH)-1:0] offset,
  input  logic                          add_reset,
  input  logic                          en_readout,
  input  logic                          load_shift,
  output logic [NSTREAM-1:0]            sr_out,
  output logic                          fifo_empty,
  output logic                          fifo_overflow
);
  localparam int unsigned SLEN = WIDTH / NSTREAM;

  logic [WIDTH-1:0] slice, head;
  logic             slice_valid, full;
  logic [$clog2(FIFO_DEPTH):0] count;
  logic [SLEN-1:0]  sr [NSTREAM];

  readout_pipeline #(.WIDTH(WIDTH), .DEPTH(PIPE_DEPTH)) u_pipe (
    .clk, .rst_n, .din, .offset, .add_reset, .en_readout,
    .slice, .slice_valid
  );

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(slice_valid), .din(slice), .pop(load_shift),
    .dout(head), .empty(fifo_empty), .full, .overflow(fifo_overflow), .count
  );

  always_ff @(posedge clk) begin
    for (int s = 0; s < NSTREAM; s++) begin
      if (!rst_n)          sr[s] <= '0;
      else if (load_shift) sr[s] <= fifo_empty ? '0 : head[s*SLEN +: SLEN];
      else                 sr[s] <= sr[s] >> 1;
    end
  end

  always_comb
    for (int s = 0; s < NSTREAM; s++) sr_out[s] = sr[s][0];

endmodule
