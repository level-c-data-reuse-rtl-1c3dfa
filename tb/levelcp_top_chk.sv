// levelcp_top_chk: runs one configuration of levelcp_top end to end.
//
// Wires the design to the external-memory model and the ME-engine model, codes
// FRAMES frames and checks, besides what me_model checks for every pixel read:
//  - the external fetch count equals the Level C+ figure, per frame the sum over
//    stripes of (FRAME_W + SR_H - 1) columns x (SR_V + r*N - 1) rows x NUM_REF
//    frames, r being the stripe's MB-row count (n, or fewer in a last stripe);
//  - one frame_done pulse per frame;
//  - that each mechanism of the design occurred: stripe-opening loads, N-column
//    step loads, steps past the right edge that load nothing, a short last stripe
//    (when H_MB is not a multiple of n), reads of clamped edge pixels, reads that
//    wrap around the column ring, external-memory stalls and ME stalls.
module levelcp_top_chk
  import levelcp_pkg::*;
#(
  parameter int N = 4, SR_H = 8, SR_V = 8, M = 2, NSTITCH = 2,
  parameter int FRAME_W = 40, FRAME_H = 20, NUM_REF = 2,
  parameter int FRAMES = 1, SAMPLES = 0, STALL_PCT = 20, MAX_LAT = 4, ME_STALL_PCT = 30
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output longint fetches
);

  localparam int W_MB   = FRAME_W / N;
  localparam int H_MB   = FRAME_H / N;
  localparam int EXT_AW = $clog2(NUM_REF * FRAME_W * FRAME_H);
  localparam int REF_W  = (NUM_REF > 1) ? $clog2(NUM_REF) : 1;
  localparam int DX_W   = $clog2(SR_H + N - 1);
  localparam int DY_W   = $clog2(SR_V + N - 1);

  logic start, busy, frame_done;
  logic ext_req_valid, ext_req_ready, ext_rsp_valid;
  logic [EXT_AW-1:0] ext_req_addr;
  logic [7:0] ext_rsp_data, me_rd_data;
  logic me_mb_valid, me_mb_ready, me_done, me_rd_en;
  mb_idx_t me_mb_x, me_mb_y;
  logic [REF_W-1:0] me_rd_ref;
  logic [DX_W-1:0] me_rd_dx;
  logic [DY_W-1:0] me_rd_dy;

  levelcp_top #(
    .N(N), .SR_H(SR_H), .SR_V(SR_V), .M(M), .NSTITCH(NSTITCH),
    .FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .NUM_REF(NUM_REF), .PIX_W(8)
  ) dut (.*);

  longint req_count, stall_count, clamp_reads, wrap_reads, me_stalls;
  int me_checks, me_failures, mbs;

  ext_mem_model #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .NUM_REF(NUM_REF), .AW(EXT_AW),
                  .STALL_PCT(STALL_PCT), .MAX_LAT(MAX_LAT)) u_mem (
    .clk, .rst_n, .req_valid(ext_req_valid), .req_ready(ext_req_ready), .req_addr(ext_req_addr),
    .rsp_valid(ext_rsp_valid), .rsp_data(ext_rsp_data), .req_count, .stall_count
  );

  me_model #(.N(N), .SR_H(SR_H), .SR_V(SR_V), .M(M), .NSTITCH(NSTITCH), .FRAME_W(FRAME_W),
             .FRAME_H(FRAME_H), .NUM_REF(NUM_REF), .SAMPLES(SAMPLES),
             .ME_STALL_PCT(ME_STALL_PCT)) u_me (
    .clk, .mb_valid(me_mb_valid), .mb_ready(me_mb_ready), .mb_x(me_mb_x), .mb_y(me_mb_y),
    .done(me_done), .rd_en(me_rd_en), .rd_ref(me_rd_ref), .rd_dx(me_rd_dx), .rd_dy(me_rd_dy),
    .rd_data(me_rd_data), .checks(me_checks), .failures(me_failures), .mbs,
    .clamp_reads, .wrap_reads, .stall_cycles(me_stalls)
  );

  // Mechanism counters, observed on the ports. The external fetches made since the
  // previous MB was offered belong to the load of the MB now taken; their number
  // must match the load the HFmVn position of that MB calls for.
  int open_loads = 0, step_loads = 0, noload_steps = 0, short_stripe_mbs = 0, frame_dones = 0;
  int load_errors = 0;
  longint reqs = 0, reqs_at_mb = 0;
  always @(posedge clk) if (rst_n) begin
    if (ext_req_valid && ext_req_ready) reqs++;
    if (me_mb_valid && me_mb_ready) begin
      int x, y, k, t, h;
      longint got, want;
      x = int'(me_mb_x); y = int'(me_mb_y);
      k = y % NSTITCH;
      t = x + k * (M - 1);
      got = reqs - reqs_at_mb;
      h   = SR_V + (((y / NSTITCH) * NSTITCH + NSTITCH > H_MB) ? (H_MB % NSTITCH) : NSTITCH) * N - 1;
      reqs_at_mb = reqs;
      if (x == 0 && k == 0) begin
        want = longint'(SR_H + N - 1) * h * NUM_REF;
        open_loads++;
      end else if ((k == 0 || x + (M - 1) >= W_MB) && t < W_MB) begin
        want = longint'(N) * h * NUM_REF;
        step_loads++;
      end else begin
        want = 0;
        if (k == 0 || x + (M - 1) >= W_MB) noload_steps++;
      end
      if (got != want) begin
        load_errors++;
        if (load_errors < 10)
          $display("FAIL levelcp_top: MB (%0d,%0d) preceded by %0d fetches, expected %0d", x, y, got, want);
      end
      if ((y / NSTITCH) * NSTITCH + NSTITCH > H_MB) short_stripe_mbs++;
    end
    if (frame_done) frame_dones++;
  end

  int own_checks = 0, own_failures = 0;
  task automatic chk(input logic ok, input string what);
    own_checks++;
    if (!ok) begin
      own_failures++;
      $display("FAIL levelcp_top M=%0d n=%0d: %s", M, NSTITCH, what);
    end
  endtask

  assign fetches  = req_count;
  assign checks   = own_checks + me_checks;
  assign failures = own_failures + me_failures;

  initial begin
    longint stripes, expect_req;
    finished = 0; start = 0;
    @(posedge rst_n);
    for (int f = 0; f < FRAMES; f++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      wait (frame_done);
      @(negedge clk);
      chk(!busy, "idle after frame_done");
    end
    repeat (3) @(negedge clk);
    stripes    = longint'((H_MB + NSTITCH - 1) / NSTITCH);
    expect_req = 0;
    for (int sy = 0; sy < H_MB; sy += NSTITCH)
      expect_req += longint'(FRAME_W + SR_H - 1) * NUM_REF *
                    (SR_V + ((H_MB - sy < NSTITCH) ? (H_MB - sy) : NSTITCH) * N - 1);
    expect_req = expect_req * FRAMES;
    chk(req_count == expect_req,
        $sformatf("external fetches %0d, Level C+ figure %0d", req_count, expect_req));
    chk(load_errors == 0, "fetches per MB match its scan position");
    chk(mbs == FRAMES * W_MB * H_MB, $sformatf("%0d MBs coded", mbs));
    chk(frame_dones == FRAMES, "one frame_done per frame");
    chk(open_loads == FRAMES * int'(stripes), "one opening load per stripe");
    chk(step_loads == FRAMES * int'(stripes) * (W_MB - 1), "one N-column load per later step");
    $display("levelcp_top M=%0d n=%0d %0dx%0d SR %0dx%0d: opening loads %0d, step loads %0d, steps without load %0d, short-stripe MBs %0d, clamped reads %0d, ring-wrap reads %0d, memory stalls %0d, ME stalls %0d, fetches %0d",
             M, NSTITCH, FRAME_W, FRAME_H, SR_H, SR_V, open_loads, step_loads, noload_steps,
             short_stripe_mbs, clamp_reads, wrap_reads, stall_count, me_stalls, req_count);
    chk(open_loads > 0, "mechanism: stripe-opening load");
    chk(step_loads > 0, "mechanism: step load");
    chk(noload_steps > 0 || M == 1 || NSTITCH == 1, "mechanism: step past the right edge");
    chk(short_stripe_mbs > 0 || H_MB % NSTITCH == 0, "mechanism: short last stripe");
    chk(clamp_reads > 0, "mechanism: clamped edge pixels");
    chk(wrap_reads > 0, "mechanism: column-ring wrap");
    chk(stall_count > 0 || STALL_PCT == 0, "mechanism: external memory stall");
    chk(me_stalls > 0 || ME_STALL_PCT == 0, "mechanism: ME stall");
    finished = 1;
  end

endmodule
