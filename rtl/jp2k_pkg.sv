// jp2k_pkg: types and constants shared by the tier-1 (EBCOT) coder.
//
// Context labels follow the usual JPEG2000 numbering of the 19 MQ contexts:
// 0..8 zero coding, 9..13 sign coding, 14..16 magnitude refinement, 17 run
// length and 18 uniform. A context/decision pair (CX/D) is the unit passed
// from the bit-plane coder to the MQ coder. A column of a stripe can yield at
// most MAX_PAIRS pairs in one pass (cleanup with run mode: 1 RL + 2 UNIFORM +
// 1 sign + 3 x (ZC + SC) = 10).
package jp2k_pkg;

  localparam int unsigned NUM_CX    = 19;
  localparam int unsigned MAX_PAIRS = 10;

  localparam logic [4:0] CX_RL   = 5'd17;
  localparam logic [4:0] CX_UNI  = 5'd18;

  // One context/decision pair.
  typedef struct packed {
    logic [4:0] cx;
    logic       d;
  } cxd_t;

  typedef enum logic [1:0] {
    PASS_SPP = 2'd0,   // significance propagation
    PASS_MRP = 2'd1,   // magnitude refinement
    PASS_CUP = 2'd2    // cleanup
  } pass_e;

  typedef enum logic [1:0] {
    BAND_LL = 2'd0,
    BAND_HL = 2'd1,
    BAND_LH = 2'd2,
    BAND_HH = 2'd3
  } band_e;

  // Everything the pass units need about one 4-sample stripe column.
  // Window rows 0..5 are stripe rows -1..4, window columns 0..2 are the
  // columns left, centre and right of the one being coded. Samples outside
  // the code block read as insignificant.
  typedef struct packed {
    logic [5:0][2:0] sig;    // significance sigma
    logic [5:0][2:0] sgn;    // sign chi (1 = negative)
    logic [3:0]      bit_v;  // magnitude bit of the current bit plane
    logic [3:0]      eta;    // visited in this bit plane
    logic [3:0]      refd;   // sigma': refined at least once
    logic [3:0]      valid;  // row exists inside the code block
  } col_info_t;

  // Result of coding one column in one pass.
  typedef struct packed {
    cxd_t [MAX_PAIRS-1:0] pairs;   // pairs[0] is coded first
    logic [3:0]           npairs;
    logic [3:0]           sig_new;
    logic [3:0]           eta_new;
    logic [3:0]           refd_new;
  } col_result_t;

endpackage
