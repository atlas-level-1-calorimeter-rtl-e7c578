// vme_controller: the CPM's VME-- slave and module register block.
//
// VME-- is a D16/A24 subset of VME with only DS0*, Write*, DTACK* and
// SYSRESET: single-cycle word transfers from one master. The module answers
// when A23 is set and A22..A19 equal the four low geographical-address bits;
// within its 512 kbyte block it returns DTACK* for every offset below 0x20000
// (reads of unused locations give zero) and stays silent above.
//
// DS0* is synchronised to the 40 MHz clock. A cycle is decoded two ticks
// after DS0* falls; the access is made in one tick; DTACK* is then held low,
// with the read data driven, until DS0* rises. Accesses that could clash with
// a TTC command (device accesses and control/pulse writes) wait while the TTC
// command pipeline is busy; reads of the ID and status registers bypass it.
// TTC commands enter a TTC_PIPE-stage pipeline and leave it on ttc_cmd_out.
//
// Module registers (byte offsets): 00 ID A, 02 ID B, 04 status, 06 control
// (reset 0x0013), 08 pulse (bits pulse for one tick, read 0), 0C/0E Serialiser
// parity error E/H, 10 CAN status, 12 CAN control, 20/22 link loss E/H, 24/26
// Serialiser DLL lock E/H, 28 CP chip parity error, 2A CP chip DLL lock, 2C
// G-link PLL error, 2E display revision, 30/32 hit-count FPGA revisions,
// 40/42 Serialiser SYNC_DONE E/H. Bit s of an E/H register is Serialiser s
// (V, A..H, W) of that layer; device arrays are indexed 2*s + layer.
// Device windows (byte offsets, one shared local bus, word address lb_addr):
// 03000 DAQ ROC, 03800 RoI ROC, 06800 CP chip broadcast (write to all,
// read chip A), 07000 + 0x800*c CP chip c, 0B000 Serialiser broadcast,
// 0C000 + 0x1000*i Serialiser i.
module vme_controller #(
  parameter logic [15:0] MODULE_TYPE = 16'd2418,
  parameter logic [7:0]  SERIAL_NO   = 8'd0,
  parameter logic [3:0]  PCB_REV     = 4'd2,
  parameter logic [3:0]  FW_REV      = 4'd1,
  parameter logic [9:0]  DISPLAY_REV = 10'd1,
  parameter int unsigned TTC_PIPE    = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [5:0]   geoadd,
  // VME--
  input  logic [23:1]  vme_a,
  input  logic [15:0]  vme_d_in,
  output logic [15:0]  vme_d_out,
  output logic         vme_d_oe,
  input  logic         vme_ds_n,
  input  logic         vme_write_n,
  output logic         vme_dtack_n,
  output logic         vme_access,      // one tick per completed cycle (LED)
  // module state
  input  logic [3:0]   status_in,
  input  logic [19:0]  ser_perr,
  input  logic [19:0]  ser_lloss,
  input  logic [19:0]  ser_dlock,
  input  logic [19:0]  ser_sync_done,
  input  logic [7:0]   cp_err,
  input  logic [7:0]   cp_dlock,
  input  logic [1:0]   glink_pll_err,
  input  logic [7:0]   can_status,
  input  logic [4:0]   hc_rev [2],
  output logic [6:0]   control,
  output logic [7:0]   pulse,
  output logic [1:0]   can_control,
  // TTC command pipeline
  input  logic         ttc_cmd_valid,
  input  logic [7:0]   ttc_cmd,
  output logic         ttc_cmd_out_valid,
  output logic [7:0]   ttc_cmd_out,
  // local bus to the FPGAs
  output logic [10:0]  lb_addr,
  output logic [15:0]  lb_wdata,
  output logic         lb_we,
  output logic         lb_re,
  output logic         sel_daq,
  output logic         sel_roi,
  output logic [7:0]   sel_cp,
  output logic [19:0]  sel_ser,
  input  logic [15:0]  daq_rdata,
  input  logic [15:0]  roi_rdata,
  input  logic [15:0]  cp_rdata [8],
  input  logic [15:0]  ser_rdata [20]
);
  typedef enum logic [2:0] {IDLE, DECODE, ACCESS, ACK, WAIT_REL} state_t;
  typedef enum logic [2:0] {T_NONE, T_REG, T_DAQ, T_ROI, T_CP, T_SER} target_t;

  state_t      state;
  logic        ds_s1, ds_s2;
  logic [18:0] off;          // byte offset in the module block
  logic        wr, hit, need_arb, bcast;
  logic [15:0] wdata, rdata, reg_rd;
  target_t     target;
  logic [2:0]  cp_idx;
  logic [4:0]  ser_idx;
  logic [TTC_PIPE-1:0] ttc_v;
  logic [7:0]  ttc_d [TTC_PIPE];
  logic        ttc_busy;

  // ---------------- TTC command pipeline ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ttc_v <= '0;
      for (int i = 0; i < TTC_PIPE; i++) ttc_d[i] <= '0;
    end else begin
      ttc_v[0] <= ttc_cmd_valid;
      ttc_d[0] <= ttc_cmd;
      for (int i = 1; i < TTC_PIPE; i++) begin
        ttc_v[i] <= ttc_v[i-1];
        ttc_d[i] <= ttc_d[i-1];
      end
    end
  end
  assign ttc_busy          = |ttc_v || ttc_cmd_valid;
  assign ttc_cmd_out_valid = ttc_v[TTC_PIPE-1];
  assign ttc_cmd_out       = ttc_d[TTC_PIPE-1];

  // ---------------- decode ----------------
  function automatic logic [9:0] layer_bits(input logic [19:0] v, input int l);
    logic [9:0] r;
    for (int s = 0; s < 10; s++) r[s] = v[2*s + l];
    return r;
  endfunction

  always_comb begin
    target  = T_NONE;
    bcast   = 1'b0;
    cp_idx  = '0;
    ser_idx = '0;
    if (off < 19'h00080)                          target = T_REG;
    else if (off >= 19'h03000 && off < 19'h03800) target = T_DAQ;
    else if (off >= 19'h03800 && off < 19'h04000) target = T_ROI;
    else if (off >= 19'h06800 && off < 19'h07000) begin target = T_CP; bcast = 1'b1; end
    else if (off >= 19'h07000 && off < 19'h0B000) begin
      target = T_CP;
      cp_idx = 3'((off - 19'h07000) >> 11);
    end
    else if (off >= 19'h0B000 && off < 19'h0C000) begin target = T_SER; bcast = 1'b1; end
    else if (off >= 19'h0C000 && off < 19'h20000) begin
      target  = T_SER;
      ser_idx = 5'((off - 19'h0C000) >> 12);
    end
    need_arb = (target != T_REG) || (wr && (off == 19'h6 || off == 19'h8));
  end

  always_comb begin
    case (off[6:0])
      7'h00: reg_rd = MODULE_TYPE;
      7'h02: reg_rd = {FW_REV, PCB_REV, SERIAL_NO};
      7'h04: reg_rd = {12'h000, status_in};
      7'h06: reg_rd = {9'h000, control};
      7'h0C: reg_rd = {6'h00, layer_bits(ser_perr, 0)};
      7'h0E: reg_rd = {6'h00, layer_bits(ser_perr, 1)};
      7'h10: reg_rd = {8'h00, can_status};
      7'h12: reg_rd = {14'h0000, can_control};
      7'h20: reg_rd = {6'h00, layer_bits(ser_lloss, 0)};
      7'h22: reg_rd = {6'h00, layer_bits(ser_lloss, 1)};
      7'h24: reg_rd = {6'h00, layer_bits(ser_dlock, 0)};
      7'h26: reg_rd = {6'h00, layer_bits(ser_dlock, 1)};
      7'h28: reg_rd = {8'h00, cp_err};
      7'h2A: reg_rd = {8'h00, cp_dlock};
      7'h2C: reg_rd = {14'h0000, glink_pll_err};
      7'h2E: reg_rd = {6'h00, DISPLAY_REV};
      7'h30: reg_rd = {11'h000, hc_rev[0]};
      7'h32: reg_rd = {11'h000, hc_rev[1]};
      7'h40: reg_rd = {6'h00, layer_bits(ser_sync_done, 0)};
      7'h42: reg_rd = {6'h00, layer_bits(ser_sync_done, 1)};
      default: reg_rd = '0;
    endcase
    case (target)
      T_REG:   rdata = reg_rd;
      T_DAQ:   rdata = daq_rdata;
      T_ROI:   rdata = roi_rdata;
      T_CP:    rdata = cp_rdata[cp_idx];
      T_SER:   rdata = ser_rdata[ser_idx];
      default: rdata = '0;
    endcase
  end

  // local bus strobes, valid in the ACCESS tick
  always_comb begin
    lb_addr  = (target == T_SER) ? off[11:1] : {1'b0, off[10:1]};
    lb_wdata = wdata;
    lb_we    = (state == ACCESS) && wr;
    lb_re    = (state == ACCESS) && !wr;
    sel_daq  = (state == ACCESS) && (target == T_DAQ);
    sel_roi  = (state == ACCESS) && (target == T_ROI);
    sel_cp   = '0;
    sel_ser  = '0;
    if (state == ACCESS && target == T_CP)
      sel_cp  = bcast ? (wr ? 8'hFF : 8'h01) : (8'h01 << cp_idx);
    if (state == ACCESS && target == T_SER)
      sel_ser = bcast ? (wr ? 20'hFFFFF : 20'h00001) : (20'h00001 << ser_idx);
  end

  // ---------------- cycle state machine ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ds_s1       <= 1'b1;
      ds_s2       <= 1'b1;
      state       <= IDLE;
      off         <= '0;
      wr          <= 1'b0;
      hit         <= 1'b0;
      wdata       <= '0;
      vme_d_out   <= '0;
      vme_d_oe    <= 1'b0;
      vme_dtack_n <= 1'b1;
      vme_access  <= 1'b0;
      control     <= 7'b001_0011;
      pulse       <= '0;
      can_control <= '0;
    end else begin
      ds_s1      <= vme_ds_n;
      ds_s2      <= ds_s1;
      pulse      <= '0;
      vme_access <= 1'b0;
      case (state)
        IDLE: if (!ds_s2) begin
          off   <= {vme_a[18:1], 1'b0};
          wr    <= !vme_write_n;
          wdata <= vme_d_in;
          hit   <= vme_a[23] && (vme_a[22:19] == geoadd[3:0]) && (vme_a[18:17] == 2'b00);
          state <= DECODE;
        end
        DECODE: begin
          if (!hit)                      state <= WAIT_REL;
          else if (!(need_arb && ttc_busy)) state <= ACCESS;
        end
        ACCESS: begin
          if (target == T_REG && wr) begin
            case (off[6:0])
              7'h06: control     <= wdata[6:0];
              7'h08: pulse       <= wdata[7:0];
              7'h12: can_control <= wdata[1:0];
              default: ;
            endcase
          end
          vme_d_out   <= wr ? 16'h0000 : rdata;
          vme_d_oe    <= !wr;
          vme_dtack_n <= 1'b0;
          vme_access  <= 1'b1;
          state       <= ACK;
        end
        ACK: if (ds_s2) begin
          vme_dtack_n <= 1'b1;
          vme_d_oe    <= 1'b0;
          state       <= IDLE;
        end
        default: if (ds_s2) state <= IDLE;  // WAIT_REL: not addressed
      endcase
    end
  end
endmodule
