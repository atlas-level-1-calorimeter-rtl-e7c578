// daq_roc: the DAQ read-out controller of the CPM.
//
// It controls the read-out sequencers of the 20 Serialisers (add_reset,
// en_readout, load_shift) and relays their 80-bit slices, one Serialiser per
// bit-field, to the 20-bit DAQ G-link. It keeps its own 128-deep pipeline of
// the module's 48 hit-count bits (16 thresholds x 3 bits), read with its own
// offset because the hits are made later than the tower data, and a FIFO of
// those slices. To each field it appends three bits: the hit count of
// threshold f on fields 0..15, BCN bits [3k+2:3k] on field 16+k; then one
// odd-parity bit: 84 bits per field and slice. Up to 5 slices per L1A
// normally, 128 to read a whole pipeline. The slice control is roc_core.
//
// Register port (word addresses, reset values in brackets): 0 NSLICES [1],
// 1 HITOFFSET [0], 2 MinDAVLength [3], 3 BCNOFFSET [0], 4 control [01: bit 0
// accepts L1As], 5 status {l1a_dropped, ef_error, fifo empty} (read only),
// 6 pulses (write only: bit 0 flush external FIFOs, bit 1 clear errors).
// Timing as roc_core; the hit words of tick t are written to the pipeline at
// the end of tick t.
module daq_roc #(
  parameter int unsigned NSER       = 20,
  parameter int unsigned SLICE_LEN  = 80,
  parameter int unsigned PIPE_DEPTH = 128,
  parameter int unsigned FIFO_DEPTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             l1a,
  input  logic             bcntres,
  input  logic             rstldcnt,
  input  logic [47:0]      hit_counts,
  output logic             add_reset,
  output logic             en_readout,
  output logic             load_shift,
  input  logic [NSER-1:0]  ser_bits,
  input  logic [NSER-1:0]  ser_ef,
  output logic [19:0]      link_data,
  output logic             link_dav,
  output logic             ef_error,
  output logic [11:0]      bcn,
  input  logic [2:0]       reg_addr,
  input  logic             reg_we,
  input  logic [15:0]      reg_wdata,
  output logic [15:0]      reg_rdata
);
  logic [7:0]  nslices;
  logic [6:0]  hit_offset, min_dav, bcn_offset;
  logic [1:0]  control;
  logic [47:0] hit_slice, hit_head;
  logic        hit_valid, hit_empty, hit_full, hit_ovf;
  logic [$clog2(FIFO_DEPTH):0] hit_count;
  logic [11:0] bcn_head;
  logic        own_empty, l1a_dropped;
  logic [2:0]  int_slice [20];

  readout_pipeline #(.WIDTH(48), .DEPTH(PIPE_DEPTH)) u_hit_pipe (
    .clk, .rst_n, .din(hit_counts), .offset(hit_offset), .add_reset, .en_readout,
    .slice(hit_slice), .slice_valid(hit_valid)
  );

  sync_fifo #(.WIDTH(48), .DEPTH(FIFO_DEPTH)) u_hit_fifo (
    .clk, .rst_n, .push(hit_valid), .din(hit_slice), .pop(load_shift),
    .dout(hit_head), .empty(hit_empty), .full(hit_full), .overflow(hit_ovf), .count(hit_count)
  );

  always_comb
    for (int f = 0; f < 20; f++)
      int_slice[f] = (f < 16) ? (hit_empty ? 3'b000 : hit_head[3*f +: 3])
                              : bcn_head[3*(f-16) +: 3];

  roc_core #(.NF(20), .NEF(NSER), .EXT_LEN(SLICE_LEN), .INT_LEN(3),
             .PIPE_DEPTH(PIPE_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_core (
    .clk, .rst_n, .l1a, .bcntres, .rstldcnt,
    .enable(control[0]), .nslices, .min_dav, .bcn_offset,
    .flush(reg_we && reg_addr == 3'd6 && reg_wdata[0]),
    .clear_err(reg_we && reg_addr == 3'd6 && reg_wdata[1]),
    .add_reset, .en_readout, .load_shift, .ext_bits(ser_bits), .ext_ef(ser_ef),
    .int_ef(hit_empty), .int_slice, .bcn_head, .bcn,
    .link_data, .link_dav, .own_empty, .ef_error, .l1a_dropped
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nslices    <= 8'd1;
      hit_offset <= '0;
      min_dav    <= 7'd3;
      bcn_offset <= '0;
      control    <= 2'b01;
    end else if (reg_we) begin
      case (reg_addr)
        3'd0: nslices    <= (reg_wdata[7:0] == 0) ? 8'd1 : reg_wdata[7:0];
        3'd1: hit_offset <= reg_wdata[6:0];
        3'd2: min_dav    <= reg_wdata[6:0];
        3'd3: bcn_offset <= reg_wdata[6:0];
        3'd4: control    <= reg_wdata[1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    case (reg_addr)
      3'd0:    reg_rdata = {8'h00, nslices};
      3'd1:    reg_rdata = {9'h000, hit_offset};
      3'd2:    reg_rdata = {9'h000, min_dav};
      3'd3:    reg_rdata = {9'h000, bcn_offset};
      3'd4:    reg_rdata = {14'h0000, control};
      3'd5:    reg_rdata = {13'h0000, l1a_dropped, ef_error, own_empty};
      default: reg_rdata = '0;
    endcase
  end
endmodule
