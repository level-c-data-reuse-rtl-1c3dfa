// levelcp_top: Level C+ reference-data front end for a macroblock motion
// estimation (ME) engine.
//
// The design codes a frame's N x N macroblocks (MBs) in the n-stitched zigzag
// order HFmVn (hfmvn_scan) and keeps every coded MB's full search window, for each
// reference frame, in an on-chip buffer (sw_buffer) filled from external memory by
// sw_loader. Horizontally, successive windows share all but N columns, so each
// scan step loads just N new columns (Level C reuse). Vertically, a loaded column is
// tall enough for the n MB rows of a stripe (SR_V + n*N - 1 pixels), so the
// overlapping part of their search ranges is fetched once instead of n times
// (the Level C+ addition). The external traffic per reference frame is about
// (1 + SR_V/(n*N)) pixels per current pixel, against 1 + SR_V/N for Level C.
//
// Sequencing, per MB taken from the scan generator:
//   1. first MB of a stripe: load the SR_H + N - 1 columns of its window
//      (frame columns -SR_H/2 ... N + SR_H/2 - 2) into ring slots 0 upward;
//      first MB of any later step t with t < W_MB: load the N columns
//      t*N + SR_H/2 - 1 ... t*N + N + SR_H/2 - 2, which replace the oldest N;
//      steps past the right edge only finish lower rows and load nothing;
//      columns are SR_V + n*N - 1 rows tall, or SR_V + r*N - 1 in a last
//      stripe that has only r < n MB rows;
//   2. offer the MB to the ME engine (me_mb_valid/me_mb_ready);
//   3. while the engine works it reads pixels through me_rd_*, addressed by
//      reference frame and by position (dx, dy) inside the MB's own
//      (SR_H+N-1) x (SR_V+N-1) window, whose top-left pixel is frame pixel
//      (mbx*N - SR_H/2, mby*N - SR_V/2); reads return one clock later;
//   4. the engine pulses me_done, and the next MB is taken.
// Loading and ME do not overlap: the buffer holds exactly the columns the MBs of
// one step need (the published sizes), so new columns can only be written once
// the step's MBs are finished. The load/ME alternation, the handshakes and the
// single-pixel read port are this design's choices; the scan order, the buffer
// sizes and what is loaded follow the published Level C+ scheme.
//
// Defaults are the scheme's main case: HF2V2, 16x16 MBs, search range
// [-128,128) in both directions, 1280x720 frames, two reference frames.
module levelcp_top
  import levelcp_pkg::*;
#(
  parameter int N       = 16,     // MB size
  parameter int SR_H    = 256,    // horizontal search range, [-SR_H/2, SR_H/2)
  parameter int SR_V    = 256,    // vertical search range, [-SR_V/2, SR_V/2)
  parameter int M       = 2,      // HFmVn: MBs of the upper row before the vertical scan
  parameter int NSTITCH = 2,      // HFmVn: stitched MB rows (n)
  parameter int FRAME_W = 1280,
  parameter int FRAME_H = 720,
  parameter int NUM_REF = 2,      // reference frames searched
  parameter int PIX_W   = 8,
  localparam int W_MB   = FRAME_W / N,
  localparam int H_MB   = FRAME_H / N,
  localparam int SPAN   = (NSTITCH - 1) * (M - 1) + 1,   // MB columns per scan step
  localparam int BUF_W  = SR_H + SPAN * N - 1,
  localparam int BUF_H  = SR_V + NSTITCH * N - 1,
  localparam int WIN_W  = SR_H + N - 1,
  localparam int WIN_H  = SR_V + N - 1,
  localparam int EXT_AW = $clog2(NUM_REF * FRAME_W * FRAME_H),
  localparam int REF_W  = (NUM_REF > 1) ? $clog2(NUM_REF) : 1,
  localparam int DX_W   = $clog2(WIN_W),
  localparam int DY_W   = $clog2(WIN_H)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,        // begin a frame (while idle)
  output logic               busy,
  output logic               frame_done,   // one-clock pulse after the last MB
  // external memory (reference frames)
  output logic               ext_req_valid,
  input  logic               ext_req_ready,
  output logic [EXT_AW-1:0]  ext_req_addr,
  input  logic               ext_rsp_valid,
  input  logic [PIX_W-1:0]   ext_rsp_data,
  // ME engine: current MB
  output logic               me_mb_valid,
  input  logic               me_mb_ready,
  output mb_idx_t            me_mb_x,
  output mb_idx_t            me_mb_y,
  input  logic               me_done,
  // ME engine: search-window read port
  input  logic               me_rd_en,
  input  logic [REF_W-1:0]   me_rd_ref,
  input  logic [DX_W-1:0]    me_rd_dx,
  input  logic [DY_W-1:0]    me_rd_dy,
  output logic [PIX_W-1:0]   me_rd_data
);

  localparam int P_H   = SR_H / 2;
  localparam int P_V   = SR_V / 2;
  localparam int COL_W = $clog2(BUF_W);
  localparam int ROW_W = $clog2(BUF_H);

  typedef enum logic [2:0] {S_IDLE, S_NEXT, S_LOAD, S_ISSUE, S_ME} state_t;
  state_t state;

  // scan generator
  scan_pos_t pos;
  logic      scan_valid, scan_ready, scan_busy, scan_start;

  hfmvn_scan #(.M(M), .NSTITCH(NSTITCH), .W_MB(W_MB), .H_MB(H_MB)) u_scan (
    .clk, .rst_n,
    .start    (scan_start),
    .busy     (scan_busy),
    .out_valid(scan_valid),
    .out_ready(scan_ready),
    .out      (pos)
  );

  // loader
  logic               ld_cmd_valid, ld_cmd_ready, ld_done;
  logic signed [15:0] ld_col, ld_y0;
  logic [15:0]        ld_ncols, ld_height;
  logic               bw_we;
  logic [REF_W-1:0]   bw_ref;
  logic [COL_W-1:0]   bw_col;
  logic [ROW_W-1:0]   bw_row;
  logic [PIX_W-1:0]   bw_data;

  sw_loader #(
    .N(N), .SR_V(SR_V), .NSTITCH(NSTITCH), .FRAME_W(FRAME_W), .FRAME_H(FRAME_H),
    .NUM_REF(NUM_REF), .BUF_W(BUF_W), .BUF_H(BUF_H), .PIX_W(PIX_W)
  ) u_loader (
    .clk, .rst_n,
    .cmd_valid     (ld_cmd_valid),
    .cmd_ready     (ld_cmd_ready),
    .cmd_new_stripe(pos.first_in_stripe),
    .cmd_col       (ld_col),
    .cmd_ncols     (ld_ncols),
    .cmd_y0        (ld_y0),
    .cmd_height    (ld_height),
    .done          (ld_done),
    .ext_req_valid, .ext_req_ready, .ext_req_addr,
    .ext_rsp_valid, .ext_rsp_data,
    .buf_we   (bw_we),
    .buf_wref (bw_ref),
    .buf_wcol (bw_col),
    .buf_wrow (bw_row),
    .buf_wdata(bw_data)
  );

  // search-window buffer
  logic [COL_W-1:0] rd_col;
  logic [ROW_W-1:0] rd_row;

  sw_buffer #(.NUM_REF(NUM_REF), .BUF_W(BUF_W), .BUF_H(BUF_H), .PIX_W(PIX_W)) u_buf (
    .clk,
    .we   (bw_we),
    .wref (bw_ref),
    .wcol (bw_col),
    .wrow (bw_row),
    .wdata(bw_data),
    .re   (me_rd_en),
    .rref (me_rd_ref),
    .rcol (rd_col),
    .rrow (rd_row),
    .rdata(me_rd_data)
  );

  // Does the MB at the scan head start a step that needs new columns?
  logic need_load;
  assign need_load = pos.first_in_step &&
                     (pos.first_in_stripe || (int'(pos.step) < W_MB));

  always_comb begin
    if (pos.first_in_stripe) begin
      ld_col   = 16'(-P_H);
      ld_ncols = 16'(SR_H + N - 1);
    end else begin
      ld_col   = 16'(int'(pos.step) * N + P_H - 1);
      ld_ncols = 16'(N);
    end
    ld_y0 = 16'(int'(pos.stripe_y) * N - P_V);
    // a last stripe of r < n MB rows needs columns only SR_V + r*N - 1 tall
    if (int'(pos.stripe_y) + NSTITCH > H_MB) ld_height = 16'(SR_V + (H_MB - int'(pos.stripe_y)) * N - 1);
    else                                     ld_height = 16'(BUF_H);
  end

  assign scan_start   = (state == S_IDLE) && start;
  assign ld_cmd_valid = (state == S_NEXT) && scan_valid && need_load;
  assign scan_ready   = (state == S_ME) && me_done;
  assign me_mb_valid  = (state == S_ISSUE);
  assign me_mb_x      = pos.mbx;
  assign me_mb_y      = pos.mby;
  assign busy         = (state != S_IDLE);

  // Window of the current MB: ring slot of its left column, row of its top line.
  logic [COL_W-1:0] base_col;
  logic [ROW_W-1:0] base_row;

  always_comb begin
    int c;
    c = int'(base_col) + int'(me_rd_dx);
    if (c >= BUF_W) c = c - BUF_W;
    rd_col = COL_W'(c);
    rd_row = ROW_W'(int'(base_row) + int'(me_rd_dy));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      frame_done <= 1'b0;
      base_col   <= '0;
      base_row   <= '0;
    end else begin
      frame_done <= 1'b0;
      case (state)
        S_IDLE:  if (start) state <= S_NEXT;
        S_NEXT:  if (scan_valid) begin
                   // the MB's window starts at buffer column mbx*N (slot 0 = column -SR_H/2)
                   base_col <= COL_W'((int'(pos.mbx) * N) % BUF_W);
                   base_row <= ROW_W'(int'(pos.k) * N);
                   if (need_load) state <= (ld_cmd_ready ? S_LOAD : S_NEXT);
                   else           state <= S_ISSUE;
                 end
        S_LOAD:  if (ld_done) state <= S_ISSUE;
        S_ISSUE: if (me_mb_ready) state <= S_ME;
        S_ME:    if (me_done) begin
                   if (pos.last_in_frame) begin
                     state      <= S_IDLE;
                     frame_done <= 1'b1;
                   end else begin
                     state <= S_NEXT;
                   end
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The ME engine may read the buffer only while it owns an MB, when no load runs.
  a_rd_in_me: assert property (@(posedge clk) disable iff (!rst_n)
                               me_rd_en |-> (state == S_ME))
    else $error("levelcp_top: search-window read outside an MB");
  a_scan_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                (state == S_IDLE) |-> !scan_busy)
    else $error("levelcp_top: scan generator running while idle");
  a_done_in_me: assert property (@(posedge clk) disable iff (!rst_n)
                                 me_done |-> (state == S_ME))
    else $error("levelcp_top: me_done without an MB");

endmodule
