// readout_pipeline: the dual-port RAM pipeline that holds every tick's data
// until a Level-1 Accept may ask for it.
//
// A write address counter writes din into the RAM on every tick. A read
// address counter runs OFFSET locations behind it. Both are reset together by
// add_reset: the write address goes to 0 and the read address to 0 - offset,
// so the read port always points at the data written `offset` ticks earlier
// (offset 0 gives the data of PIPE_DEPTH ticks earlier). While en_readout is
// high, the slice at the read address is copied out: it appears on slice with
// slice_valid high on the following tick, ready to be pushed into a FIFO.
// Holding en_readout for N ticks reads N consecutive slices.
// Timing: en_readout in tick t returns the din of tick t - offset, valid in
// tick t+1. Reset is synchronous, active low.
module readout_pipeline #(
  parameter int unsigned WIDTH = 80,
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [WIDTH-1:0]         din,
  input  logic [$clog2(DEPTH)-1:0] offset,
  input  logic                     add_reset,
  input  logic                     en_readout,
  output logic [WIDTH-1:0]         slice,
  output logic                     slice_valid
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_addr, rd_addr;

  always_ff @(posedge clk) begin
    mem[wr_addr] <= din;
    if (en_readout) slice <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_addr     <= '0;
      rd_addr     <= '0 - offset;
      slice_valid <= 1'b0;
    end else begin
      if (add_reset) begin
        wr_addr <= '0;
        rd_addr <= '0 - offset;
      end else begin
        wr_addr <= wr_addr + 1'b1;
        rd_addr <= rd_addr + 1'b1;
      end
      slice_valid <= en_readout;
    end
  end
endmodule
