// cpm_pkg: types and constants shared by the Cluster Processor Module RTL.
//
// A trigger-tower pair travels on one link as a 10-bit word: 8 bits of
// calibrated E_T, one BC-mux flag and one odd-parity bit over the other nine.
// Inside a crate each word is carried on 160 MBaud streams; this RTL models a
// stream as a 4-bit nibble per 40 MHz tick (bit 0 first on the wire), so a
// 5-line bus carries two tower pairs per tick and a 3-line bus one pair.
// Stream layout of a 5-line bus (the choice of this design, consistent with
// the rule that stream 4 is shared and that the +eta fan-out sends lines 2..4):
//   s0 = pair0.et[3:0], s1 = pair0.et[7:4], s2 = pair1.et[3:0],
//   s3 = pair1.et[7:4], s4 = {pair1.par, pair1.flag, pair0.par, pair0.flag}.
// A 3-line bus carries lines 2..4 only, i.e. pair1.
package cpm_pkg;

  localparam int unsigned ET_W    = 8;   // tower E_T bits
  localparam int unsigned N_THR   = 16;  // threshold sets
  localparam int unsigned SUM_W   = 12;  // width of cluster and isolation sums
  localparam int unsigned BCN_W   = 12;  // bunch-crossing number
  localparam int unsigned PIPE_DEPTH = 128;  // read-out pipeline locations
  localparam int unsigned FIFO_DEPTH = 128;  // read-out FIFO locations

  typedef struct packed {
    logic            par;   // odd parity over all ten bits
    logic            flag;  // BC-mux flag
    logic [ET_W-1:0] et;
  } link_word_t;

  typedef logic [3:0] nibble_t;            // one 160 MBaud stream, one tick
  typedef nibble_t [4:0] bus5_t;           // 2x2 towers
  typedef nibble_t [2:0] bus3_t;           // 2x1 towers (lines 2..4 of a bus5_t)

  // One threshold set of the cluster algorithms.
  typedef struct packed {
    logic             tau;     // 1: tau/hadron algorithm (sets 8..15 only)
    logic [SUM_W-1:0] clus;    // trigger-cluster threshold (cluster must exceed it)
    logic [SUM_W-1:0] emiso;   // em ring isolation (sum must not exceed it)
    logic [SUM_W-1:0] hadiso;  // hadronic ring isolation
    logic [SUM_W-1:0] hadcore; // hadronic 2x2 core isolation (e/gamma only)
  } thr_set_t;

  // RoI word of one half CP chip, 20 bits, read out LSB first.
  typedef struct packed {
    logic              err;    // a parity error was seen in this tick's inputs
    logic              sat;    // a core tower of the RoI is saturated (255)
    logic [1:0]        loc;    // {phi offset, eta offset} of the RoI window
    logic [N_THR-1:0]  hits;
  } roi_word_t;

  localparam link_word_t ZERO_WORD = '{par: 1'b1, flag: 1'b0, et: '0};

  function automatic logic parity_ok(input link_word_t w);
    return ^w;  // odd parity: the ten bits hold an odd number of ones
  endfunction

  function automatic link_word_t make_word(input logic flag, input logic [ET_W-1:0] et);
    return '{par: ~^{flag, et}, flag: flag, et: et};
  endfunction

  function automatic bus5_t pack_bus5(input link_word_t p0, input link_word_t p1);
    bus5_t b;
    b[0] = p0.et[3:0];
    b[1] = p0.et[7:4];
    b[2] = p1.et[3:0];
    b[3] = p1.et[7:4];
    b[4] = {p1.par, p1.flag, p0.par, p0.flag};
    return b;
  endfunction

  function automatic link_word_t unpack_p0(input bus5_t b);
    return '{par: b[4][1], flag: b[4][0], et: {b[1], b[0]}};
  endfunction

  function automatic link_word_t unpack_p1(input bus5_t b);
    return '{par: b[4][3], flag: b[4][2], et: {b[3], b[2]}};
  endfunction

  function automatic link_word_t unpack_b3(input bus3_t b);
    return '{par: b[2][3], flag: b[2][2], et: {b[1], b[0]}};
  endfunction

endpackage
