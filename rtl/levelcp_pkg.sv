// levelcp_pkg: types shared by the Level C+ motion-estimation reference front end.
//
// The front end walks the macroblocks (MBs) of a frame in an n-stitched zigzag
// order (HFmVn) and keeps the reference search windows of the MBs being coded in
// an on-chip buffer. This package holds the MB-coordinate width and the record the
// scan generator hands to the rest of the design. An 8-bit MB coordinate covers
// frames up to 4080 pixels on a side with 16x16 MBs (a sizing choice of this
// design; 1280x720 needs 80x45 MBs).
package levelcp_pkg;

  localparam int MB_W   = 8;   // width of an MB column/row index
  localparam int STEP_W = 9;   // width of a vertical-scan step index
  localparam int K_W    = 4;   // width of the row-within-stripe index (n <= 15)

  typedef logic [MB_W-1:0]   mb_idx_t;
  typedef logic [STEP_W-1:0] step_idx_t;
  typedef logic [K_W-1:0]    krow_t;

  // One MB of the coding order, with where it sits in the scan.
  typedef struct packed {
    mb_idx_t   mbx;              // MB column in the frame
    mb_idx_t   mby;              // MB row in the frame
    mb_idx_t   stripe_y;         // first MB row of the stitched stripe
    step_idx_t step;             // vertical-scan step within the stripe
    krow_t     k;                // MB row within the stripe (0 = top)
    logic      first_in_stripe;  // first MB coded in this stripe
    logic      first_in_step;    // first MB of its step
    logic      last_in_step;     // last MB of its step
    logic      last_in_frame;    // last MB of the frame
  } scan_pos_t;

endpackage
