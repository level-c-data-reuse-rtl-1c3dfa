// hfmvn_scan: macroblock coding-order generator for the n-stitched zigzag scan HFmVn.
//
// The frame is cut into stripes of NSTITCH MB rows (n). Within a stripe the MBs
// are visited in "steps": in step t, stripe row k holds the MB at column
// x = t - k*(M-1), and the valid MBs of a step are emitted from the top row down.
// Each row therefore trails the row above it by M-1 MBs, so before the lower row
// starts the upper row has already coded M MBs (the "horizontal scan" of HFmVn)
// and afterwards the rows alternate (the "vertical scan"). This keeps the left,
// top and top-right neighbours of every MB ahead of it in the order, with the
// top-right neighbour at least M-1 places earlier (M-2 MBs in between). M=2, NSTITCH=2 is HF2V2
// (two-stage MPEG-4 MB pipeline); M=3 gives HF3V2 (four-stage H.264 pipeline);
// NSTITCH=3/4 give HF2V3/HF2V4. M=1 is the plain stripe scan and M=1, NSTITCH=1
// the raster scan. The order itself follows the published Level C+ scheme; the step/row encoding,
// the handshake and the handling of a last stripe with fewer than NSTITCH rows
// (it is scanned with the rows that remain) are this design's choices.
//
// Interface: a 'start' pulse while idle begins a frame. 'out' is valid while
// 'out_valid' is high and advances on out_valid && out_ready, so one MB per clock
// is produced when the consumer is always ready. 'busy' stays high until the
// last MB of the frame has been taken.
module hfmvn_scan
  import levelcp_pkg::*;
#(
  parameter int M       = 2,    // MBs coded in the upper row before the vertical scan
  parameter int NSTITCH = 2,    // MB rows stitched into one stripe (n)
  parameter int W_MB    = 80,   // frame width in MBs (1280/16)
  parameter int H_MB    = 45    // frame height in MBs (720/16)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output logic      busy,
  output logic      out_valid,
  input  logic      out_ready,
  output scan_pos_t out
);

  logic    active;
  mb_idx_t r0;          // first MB row of the current stripe
  step_idx_t t;        // current step
  krow_t     k;        // current stripe row

  int rows, t_last;
  int    t_next;
  krow_t k_next, k_first_next;
  logic have_k_next, step_done, stripe_done;

  // Is (step tt, row kk) a MB of the frame inside a stripe of nrows rows?
  function automatic logic cell_ok(input int tt, input int kk, input int nrows);
    int xx;
    xx = tt - kk * (M - 1);
    return (kk < nrows) && (xx >= 0) && (xx < W_MB);
  endfunction

  always_comb begin
    rows   = (H_MB - int'(r0) < NSTITCH) ? (H_MB - int'(r0)) : NSTITCH;
    t_last = (W_MB - 1) + (rows - 1) * (M - 1);

    // next valid row below k in the same step
    have_k_next = 1'b0;
    k_next      = '0;
    for (int kk = NSTITCH - 1; kk >= 0; kk--) begin
      if (kk > int'(k) && cell_ok(int'(t), kk, rows)) begin
        have_k_next = 1'b1;
        k_next      = krow_t'(kk);
      end
    end

    // first valid row of the next step
    t_next       = int'(t) + 1;
    k_first_next = '0;
    for (int kk = NSTITCH - 1; kk >= 0; kk--) begin
      if (cell_ok(t_next, kk, rows)) k_first_next = krow_t'(kk);
    end

    step_done   = !have_k_next;
    stripe_done = step_done && (int'(t) == t_last);

    out                 = '0;
    out.mbx             = mb_idx_t'(int'(t) - int'(k) * (M - 1));
    out.mby             = mb_idx_t'(int'(r0) + int'(k));
    out.stripe_y        = r0;
    out.step            = t;
    out.k               = k;
    out.first_in_stripe = (t == '0) && (k == '0);
    out.first_in_step   = !(k != '0 && cell_ok(int'(t), int'(k) - 1, rows));
    out.last_in_step    = step_done;
    out.last_in_frame   = stripe_done && (int'(r0) + rows >= H_MB);
  end

  assign out_valid = active;
  assign busy      = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      r0     <= '0;
      t      <= '0;
      k      <= '0;
    end else if (!active) begin
      if (start) begin
        active <= 1'b1;
        r0     <= '0;
        t      <= '0;
        k      <= '0;
      end
    end else if (out_ready) begin
      if (out.last_in_frame) begin
        active <= 1'b0;
      end else if (stripe_done) begin
        r0 <= mb_idx_t'(int'(r0) + NSTITCH);
        t  <= '0;
        k  <= '0;
      end else if (step_done) begin
        t <= step_idx_t'(t_next);
        k <= k_first_next;
      end else begin
        k <= k_next;
      end
    end
  end

  // Parameter sanity check.
  initial begin
    assert (M >= 1 && NSTITCH >= 1 && NSTITCH < (1 << K_W))
      else $error("hfmvn_scan: unsupported M/NSTITCH");
  end

endmodule
