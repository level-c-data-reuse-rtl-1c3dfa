// sw_buffer: on-chip search-window memory for the Level C+ scheme.
//
// Holds, for each of NUM_REF reference frames, a window of BUF_W x BUF_H pixels:
// BUF_W = SR_H + span*N - 1 columns, where span is the number of MB columns the
// MBs of one scan step cover, and BUF_H = SR_V + n*N - 1 rows, the height of n
// stitched MB rows' search ranges. For HF2V2 with N=16 and a [-128,128) range that
// is 287 x 287 pixels per frame, two frames by default (HDTV 720p case). Columns
// are used as a ring: the loader overwrites the oldest N columns with the next N,
// so the horizontal overlap of successive windows is never reloaded. The published scheme
// gives the sizes; the ring organisation, one pixel per access and the address
// order ((ref*BUF_W + col)*BUF_H + row) are this design's choices.
//
// Timing: simple dual port. A write (we) lands at the clock edge; a read (re)
// returns its pixel on rdata one clock later. Reading and writing the same pixel
// in the same clock returns the old value.
module sw_buffer #(
  parameter int NUM_REF = 2,
  parameter int BUF_W   = 287,
  parameter int BUF_H   = 287,
  parameter int PIX_W   = 8,
  localparam int REF_W  = (NUM_REF > 1) ? $clog2(NUM_REF) : 1,
  localparam int COL_W  = $clog2(BUF_W),
  localparam int ROW_W  = $clog2(BUF_H),
  localparam int DEPTH  = NUM_REF * BUF_W * BUF_H,
  localparam int AW     = $clog2(DEPTH)
) (
  input  logic             clk,
  // write port (from the loader)
  input  logic             we,
  input  logic [REF_W-1:0] wref,
  input  logic [COL_W-1:0] wcol,
  input  logic [ROW_W-1:0] wrow,
  input  logic [PIX_W-1:0] wdata,
  // read port (to the motion-estimation engine)
  input  logic             re,
  input  logic [REF_W-1:0] rref,
  input  logic [COL_W-1:0] rcol,
  input  logic [ROW_W-1:0] rrow,
  output logic [PIX_W-1:0] rdata
);

  logic [PIX_W-1:0] mem [DEPTH];

  function automatic logic [AW-1:0] addr_of(input logic [REF_W-1:0] r,
                                            input logic [COL_W-1:0] c,
                                            input logic [ROW_W-1:0] w);
    return AW'((32'(r) * BUF_W + 32'(c)) * BUF_H + 32'(w));
  endfunction

  always_ff @(posedge clk) begin
    if (we) mem[addr_of(wref, wcol, wrow)] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[addr_of(rref, rcol, rrow)];
  end

endmodule
