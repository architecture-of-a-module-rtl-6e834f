// pt_pkg: constants and types shared by the pT-discriminating front-end.
//
// Geometry follows the document: a front-end chip has 640 pixels arranged as
// 160 rows in phi by 4 columns in Z (100 um x ~2 mm pixels), a module carries
// 3 rows of 6 chips on each of its two planes, the per-pixel lookup memory is
// 512 x 1 (addressed by the 3x3 hit pattern), the event memory is 256 bits
// deep (6 us at 40 MHz), and each chip sends a 10+5 bit trigger word per bunch
// crossing.  The Z and phi alignment ranges and the pipeline depths are this
// design's own choices.
package pt_pkg;

  localparam int unsigned N_PHI      = 160;  // pixel rows (phi) per chip
  localparam int unsigned N_Z        = 4;    // pixel columns (Z) per chip
  localparam int unsigned N_PIX      = N_PHI * N_Z;  // 640
  localparam int unsigned PIX_AW     = 10;   // pixel address width (640 < 1024)
  localparam int unsigned LUT_AW     = 9;    // 3x3 pattern -> 512 x 1 lookup memory
  localparam int unsigned LUT_DEPTH  = 1 << LUT_AW;
  localparam int unsigned EVT_DEPTH  = 256;  // 6 us at 40 MHz, rounded up to 2^8
  localparam int unsigned EVT_AW     = 8;
  localparam int unsigned N_NBR      = 8;    // neighbours in a 3x3 window
  localparam int unsigned SER_RATIO  = 4;    // 160 MHz link / 40 MHz bunch clock
  localparam int unsigned ZSH_W      = 3;    // Z alignment shift, 0..7 pixels
  localparam int unsigned PHS_W      = 3;    // signed phi shift width
  localparam int unsigned N_UP_SRC   = 3;    // upper chips feeding one lower chip
  localparam int unsigned FRAME_HDR_W = 8;   // per-module overhead in the trigger frame


  // Pipeline depths (bunch-clock cycles), derived in fe_chip documentation.
  // Upper-plane hit to aligned pattern at the lower pixel's PixelUpIn register,
  // relative to the lower pixel's own registered hit.
  localparam int unsigned MASTER_HIT_DLY = 4;

  // Chip-level trigger word sent to the opto-link every bunch crossing.
  typedef struct packed {
    logic              valid;   // at least one stub in this chip
    logic [3:0]        count;   // number of stubs, saturating at 15
    logic [PIX_AW-1:0] addr;    // address of the lowest-numbered stub pixel
  } trig_word_t;

  // Read-out word (one per hit pixel, then a trailer per event).
  typedef struct packed {
    logic              trailer; // 1: end of event, addr holds the event number
    logic [PIX_AW-1:0] addr;
  } ro_word_t;

  // Neighbour bit positions in the 8-bit neighbour vectors, matching the
  // ordering of the pixel netlist: [7:5] previous Z column rows r-1,r,r+1,
  // [4] same column r-1, [3] same column r+1, [2:0] next Z column r-1,r,r+1.
  function automatic int unsigned pix_index(input int unsigned z, input int unsigned phi);
    return z * N_PHI + phi;
  endfunction

  // Default contents of the lookup memory. Address bit 8 is the pixel itself,
  // bits 7:0 its eight neighbours.
  // Cluster rejection (upper chip): reject when the pixel is hit and more than
  // one neighbour is hit.
  function automatic logic lut_cluster_default(input logic [LUT_AW-1:0] a);
    return a[8] && ($countones(a[7:0]) >= 2);
  endfunction
  // Coincidence (lower chip): any upper-plane hit in the 3x3 window.
  function automatic logic lut_coinc_default(input logic [LUT_AW-1:0] a);
    return |a;
  endfunction

endpackage
