// cp_chip: the Cluster Processor chip, eight algorithm windows of the CPM.
//
// Inputs are 108 stream lines per tick: for each layer (0 = em, 1 = had) and
// each phi pair-row (0 = L at -phi, 1 = M, 2 = N at +phi) three 5-line buses
// carrying eta columns 1-2, 3-4 and 5-6, and one 3-line bus carrying eta
// column 0 (fan-in from the -eta side). That is 42 tower pairs = a 6x7
// (phi x eta) tower region per layer; a pair is two towers adjacent in phi
// (tower A below tower B). Each pair goes through a bcmux_decoder, which
// checks parity and zeroes the pair on an error. Parity errors set a bit in a
// 42-bit error map and increment an error counter once per crossing with any
// error; both clear when read over the register port. The OR of the map is
// the latched `error` output.
//
// The 8 windows have reference towers at phi rows 2-3 and eta columns 1-4 of
// the region (phi row 0 is received but unused). Each half of the chip (eta
// columns 1-2 and 3-4) holds 2x2 windows of which de-clustering lets at most
// one fire; the half reports its 16 hit bits and a 20-bit RoI word (hits,
// saturation, error, 2-bit position) that is pipelined for RoI read-out by a
// readout_sequencer with one output stream per half.
//
// Register port (16-bit, word addresses): 0x00-0x3F threshold set s at 4s:
// cluster, em isolation, hadronic isolation, hadronic core; 0x40 tau-select
// bits of sets 8-15; 0x41 read-out pipeline offset; 0x42-0x44 input mask
// (42 bits); 0x48-0x4A error map (read clears); 0x4B error counter (read
// clears). Registers reset to zero.
// Timing: the stream word of crossing i (tick i) gives hits for crossing i in
// tick i+4: two ticks of BC-mux decoding, one for the window sums, one output
// register. The hit words also feed the read-out pipeline in that tick; the
// RoI error bit of that tick flags a parity error in the tick-i stream words.
module cp_chip
  import cpm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  bus5_t           in5 [2][3][3],   // [layer][pair-row][group]
  input  bus3_t           in3 [2][3],      // [layer][pair-row]
  output logic [N_THR-1:0] hits [2],       // [half]
  output logic            error,
  // RoI read-out, driven by the RoI ROC
  input  logic            add_reset,
  input  logic            en_readout,
  input  logic            load_shift,
  output logic [1:0]      roi_sr,
  output logic            roi_fifo_empty,
  // register port
  input  logic [6:0]      reg_addr,
  input  logic            reg_we,
  input  logic            reg_re,
  input  logic [15:0]     reg_wdata,
  output logic [15:0]     reg_rdata
);
  localparam int unsigned NPAIR = 42;

  // ---------------- registers ----------------
  thr_set_t         thr [N_THR];
  logic [SUM_W-1:0] thr_clus [N_THR], thr_emiso [N_THR], thr_hadiso [N_THR], thr_hadcore [N_THR];
  logic [7:0]       tau_sel;
  logic [6:0]       ro_offset;
  logic [NPAIR-1:0] in_mask, err_map;
  logic [15:0]      err_cnt;

  always_comb
    for (int s = 0; s < N_THR; s++)
      thr[s] = '{tau: (s >= 8) ? tau_sel[s-8] : 1'b0, clus: thr_clus[s], emiso: thr_emiso[s],
                 hadiso: thr_hadiso[s], hadcore: thr_hadcore[s]};

  // ---------------- input unpacking and BC-mux decoding ----------------
  link_word_t      pw   [2][3][7];   // [layer][pair-row][eta]
  logic [ET_W-1:0] ta   [2][3][7], tb [2][3][7];
  logic            perr [2][3][7];
  logic [NPAIR-1:0] perr_vec;

  always_comb begin
    for (int l = 0; l < 2; l++)
      for (int p = 0; p < 3; p++) begin
        pw[l][p][0] = unpack_b3(in3[l][p]);
        for (int g = 0; g < 3; g++) begin
          pw[l][p][1+2*g] = unpack_p0(in5[l][p][g]);
          pw[l][p][2+2*g] = unpack_p1(in5[l][p][g]);
        end
      end
  end

  for (genvar l = 0; l < 2; l++) begin : g_l
    for (genvar p = 0; p < 3; p++) begin : g_p
      for (genvar e = 0; e < 7; e++) begin : g_e
        bcmux_decoder u_dec (
          .clk, .rst_n, .word(pw[l][p][e]), .mask(in_mask[l*21 + p*7 + e]),
          .tower_a(ta[l][p][e]), .tower_b(tb[l][p][e]), .par_err(perr[l][p][e])
        );
        assign perr_vec[l*21 + p*7 + e] = perr[l][p][e];
      end
    end
  end

  // tower grids [phi 0..5][eta 0..6]
  logic [ET_W-1:0] em_t [6][7], had_t [6][7];
  always_comb
    for (int p = 0; p < 3; p++)
      for (int e = 0; e < 7; e++) begin
        em_t[2*p][e]    = ta[0][p][e];
        em_t[2*p+1][e]  = tb[0][p][e];
        had_t[2*p][e]   = ta[1][p][e];
        had_t[2*p+1][e] = tb[1][p][e];
      end

  // ---------------- windows ----------------
  logic [N_THR-1:0]  w_hits [2][4];   // [phi offset][eta index]
  logic              w_sat  [2][4];
  logic              w_max  [2][4];
  logic [SUM_W-1:0]  w_roi  [2][4];
  logic [N_THR-1:0]  w_hits_q [2][4];
  logic              w_sat_q  [2][4];
  logic              any_err_q, any_err_q2;

  for (genvar wp = 0; wp < 2; wp++) begin : g_wp
    for (genvar we = 0; we < 4; we++) begin : g_we
      logic [ET_W-1:0] wem [4][4], whad [4][4];
      always_comb
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            wem[i][j]  = em_t[1+wp+i][we+j];
            whad[i][j] = had_t[1+wp+i][we+j];
          end
      cluster_window u_win (
        .em(wem), .had(whad), .thr, .hits(w_hits[wp][we]), .is_max(w_max[wp][we]),
        .sat(w_sat[wp][we]), .roi_sum(w_roi[wp][we])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      any_err_q  <= 1'b0;
      any_err_q2 <= 1'b0;
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 4; b++) begin
          w_hits_q[a][b] <= '0;
          w_sat_q[a][b]  <= 1'b0;
        end
    end else begin
      any_err_q  <= |perr_vec;
      any_err_q2 <= any_err_q;
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 4; b++) begin
          w_hits_q[a][b] <= w_hits[a][b];
          w_sat_q[a][b]  <= w_sat[a][b] && w_max[a][b];
        end
    end
  end

  // ---------------- halves ----------------
  roi_word_t roi_c [2];
  roi_word_t roi_q [2];
  always_comb begin
    for (int h = 0; h < 2; h++) begin
      roi_c[h] = '0;
      roi_c[h].err = any_err_q2;  // error in the stream words of this crossing
      // de-clustering leaves at most one window per half with hits;
      // the lowest-numbered one is reported if the rule is ever broken
      for (int k = 3; k >= 0; k--) begin
        if (w_hits_q[k[1]][2*h + k[0]] != '0) begin
          roi_c[h].loc = 2'(k);
          roi_c[h].sat = w_sat_q[k[1]][2*h + k[0]];
        end
      end
      for (int k = 0; k < 4; k++) roi_c[h].hits |= w_hits_q[k[1]][2*h + k[0]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      roi_q[0] <= '0;
      roi_q[1] <= '0;
    end else begin
      roi_q <= roi_c;
    end
  end

  assign hits[0] = roi_q[0].hits;
  assign hits[1] = roi_q[1].hits;

  readout_sequencer #(.WIDTH(40), .NSTREAM(2), .PIPE_DEPTH(PIPE_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_ro (
    .clk, .rst_n, .din({roi_q[1], roi_q[0]}), .offset(ro_offset), .add_reset, .en_readout,
    .load_shift, .sr_out(roi_sr), .fifo_empty(roi_fifo_empty), .fifo_overflow()
  );

  // ---------------- register port and error monitoring ----------------
  always_comb begin
    reg_rdata = '0;
    if (reg_addr < 7'h40) begin
      case (reg_addr[1:0])
        2'd0: reg_rdata = 16'(thr_clus[reg_addr[5:2]]);
        2'd1: reg_rdata = 16'(thr_emiso[reg_addr[5:2]]);
        2'd2: reg_rdata = 16'(thr_hadiso[reg_addr[5:2]]);
        default: reg_rdata = 16'(thr_hadcore[reg_addr[5:2]]);
      endcase
    end else begin
      case (reg_addr)
        7'h40: reg_rdata = {8'h00, tau_sel};
        7'h41: reg_rdata = {9'h000, ro_offset};
        7'h42: reg_rdata = in_mask[15:0];
        7'h43: reg_rdata = in_mask[31:16];
        7'h44: reg_rdata = {6'h00, in_mask[41:32]};
        7'h48: reg_rdata = err_map[15:0];
        7'h49: reg_rdata = err_map[31:16];
        7'h4A: reg_rdata = {6'h00, err_map[41:32]};
        7'h4B: reg_rdata = err_cnt;
        default: reg_rdata = '0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < N_THR; s++) begin
        thr_clus[s] <= '0; thr_emiso[s] <= '0; thr_hadiso[s] <= '0; thr_hadcore[s] <= '0;
      end
      tau_sel   <= '0;
      ro_offset <= '0;
      in_mask   <= '0;
      err_map   <= '0;
      err_cnt   <= '0;
      error     <= 1'b0;
    end else begin
      if (reg_we) begin
        if (reg_addr < 7'h40) begin
          case (reg_addr[1:0])
            2'd0: thr_clus[reg_addr[5:2]]    <= reg_wdata[SUM_W-1:0];
            2'd1: thr_emiso[reg_addr[5:2]]   <= reg_wdata[SUM_W-1:0];
            2'd2: thr_hadiso[reg_addr[5:2]]  <= reg_wdata[SUM_W-1:0];
            default: thr_hadcore[reg_addr[5:2]] <= reg_wdata[SUM_W-1:0];
          endcase
        end else begin
          case (reg_addr)
            7'h40: tau_sel          <= reg_wdata[7:0];
            7'h41: ro_offset        <= reg_wdata[6:0];
            7'h42: in_mask[15:0]    <= reg_wdata;
            7'h43: in_mask[31:16]   <= reg_wdata;
            7'h44: in_mask[41:32]   <= reg_wdata[9:0];
            default: ;
          endcase
        end
      end
      // error map: set by parity errors, cleared (16 bits at a time) when read
      for (int i = 0; i < NPAIR; i++) begin
        logic clr;
        clr = reg_re && ((reg_addr == 7'h48 && i < 16) || (reg_addr == 7'h49 && i >= 16 && i < 32)
                      || (reg_addr == 7'h4A && i >= 32));
        if (perr_vec[i])  err_map[i] <= 1'b1;
        else if (clr)     err_map[i] <= 1'b0;
      end
      if (|perr_vec) begin
        if (err_cnt != '1) err_cnt <= err_cnt + 1'b1;
      end else if (reg_re && reg_addr == 7'h4B) begin
        err_cnt <= '0;
      end
      error <= |err_map || |perr_vec;
    end
  end
endmodule
