// roi_roc: the RoI read-out controller of the CPM.
//
// It controls the read-out sequencers of the 8 CP chips and relays their 16
// RoI streams (two per chip, one per chip half; field 2c+h) to bit-fields
// D0..D15 of the RoI G-link; D16..D19 are driven low. It has no pipeline of
// its own, only the BCN FIFO of roc_core. After the 20 bits of each RoI it
// appends BCN bit f on field f (fields 0..11; 0 on fields 12..15) and then one
// odd-parity bit: 22 bits per field and slice. One slice per L1A normally;
// NSLICES up to 128 reads the whole CP chip pipelines.
//
// Register port (word addresses, reset values in brackets): 0 NSLICES [1],
// 2 MinDAVLength [3], 3 BCNOFFSET [0], 4 control [01: bit 0 accepts L1As],
// 5 status {l1a_dropped, ef_error, fifo empty}, 6 pulses (bit 0 flush
// external FIFOs, bit 1 clear errors).
// Timing as roc_core.
module roi_roc #(
  parameter int unsigned NCP        = 8,
  parameter int unsigned SLICE_LEN  = 20,
  parameter int unsigned PIPE_DEPTH = 128,
  parameter int unsigned FIFO_DEPTH = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              l1a,
  input  logic              bcntres,
  input  logic              rstldcnt,
  output logic              add_reset,
  output logic              en_readout,
  output logic              load_shift,
  input  logic [2*NCP-1:0]  cp_bits,
  input  logic [NCP-1:0]    cp_ef,
  output logic [19:0]       link_data,
  output logic              link_dav,
  output logic              ef_error,
  input  logic [2:0]        reg_addr,
  input  logic              reg_we,
  input  logic [15:0]       reg_wdata,
  output logic [15:0]       reg_rdata
);
  logic [7:0]  nslices;
  logic [6:0]  min_dav, bcn_offset;
  logic [1:0]  control;
  logic [11:0] bcn_head, bcn;
  logic        own_empty, l1a_dropped;
  logic        int_slice [2*NCP];
  logic [2*NCP-1:0] core_data;

  always_comb
    for (int f = 0; f < 2*NCP; f++) int_slice[f] = (f < 12) ? bcn_head[f] : 1'b0;

  roc_core #(.NF(2*NCP), .NEF(NCP), .EXT_LEN(SLICE_LEN), .INT_LEN(1),
             .PIPE_DEPTH(PIPE_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_core (
    .clk, .rst_n, .l1a, .bcntres, .rstldcnt,
    .enable(control[0]), .nslices, .min_dav, .bcn_offset,
    .flush(reg_we && reg_addr == 3'd6 && reg_wdata[0]),
    .clear_err(reg_we && reg_addr == 3'd6 && reg_wdata[1]),
    .add_reset, .en_readout, .load_shift, .ext_bits(cp_bits), .ext_ef(cp_ef),
    .int_ef(own_empty), .int_slice, .bcn_head, .bcn,
    .link_data(core_data), .link_dav, .own_empty, .ef_error, .l1a_dropped
  );

  assign link_data = 20'(core_data);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nslices    <= 8'd1;
      min_dav    <= 7'd3;
      bcn_offset <= '0;
      control    <= 2'b01;
    end else if (reg_we) begin
      case (reg_addr)
        3'd0: nslices    <= (reg_wdata[7:0] == 0) ? 8'd1 : reg_wdata[7:0];
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
      3'd2:    reg_rdata = {9'h000, min_dav};
      3'd3:    reg_rdata = {9'h000, bcn_offset};
      3'd4:    reg_rdata = {14'h0000, control};
      3'd5:    reg_rdata = {13'h0000, l1a_dropped, ef_error, own_empty};
      default: reg_rdata = '0;
    endcase
  end
endmodule
