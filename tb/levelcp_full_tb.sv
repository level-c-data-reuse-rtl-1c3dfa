// levelcp_full_tb: one full frame through levelcp_top at its default parameters.
//
// Default configuration: HF2V2 scan, 16x16 MBs, search range [-128,128) in both
// directions, 1280x720 frames (80 x 45 MBs, so the last of the 23 stripes holds a
// single MB row) and two reference frames. The external memory answers every
// request one clock later. The ME model reads, for every MB and reference frame,
// the four window corners and 12 random window pixels and checks them, and checks
// the HF2V2 coding order. The test also checks that the external fetch count is
// the Level C+ figure, (22 stripes x 287 rows + one single-row stripe x 271
// rows) x (1280+255) columns x 2 frames = 20,215,950 pixels, and prints its ratio to the Level C figure for the same frame (45 MB rows x
// 1535 columns x 271 rows x 2 frames), which should be about 54%.
module levelcp_full_tb
  import levelcp_pkg::*;
;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, frame_done;
  logic ext_req_valid, ext_req_ready, ext_rsp_valid;
  logic [20:0] ext_req_addr;
  logic [7:0] ext_rsp_data, me_rd_data;
  logic me_mb_valid, me_mb_ready, me_done, me_rd_en;
  mb_idx_t me_mb_x, me_mb_y;
  logic [0:0] me_rd_ref;
  logic [8:0] me_rd_dx, me_rd_dy;

  levelcp_top dut (.*);

  longint req_count, stall_count, clamp_reads, wrap_reads, me_stalls;
  int me_checks, me_failures, mbs;

  ext_mem_model #(.FRAME_W(1280), .FRAME_H(720), .NUM_REF(2), .AW(21), .STALL_PCT(0), .MAX_LAT(1)) u_mem (
    .clk, .rst_n, .req_valid(ext_req_valid), .req_ready(ext_req_ready), .req_addr(ext_req_addr),
    .rsp_valid(ext_rsp_valid), .rsp_data(ext_rsp_data), .req_count, .stall_count
  );

  me_model #(.N(16), .SR_H(256), .SR_V(256), .M(2), .NSTITCH(2), .FRAME_W(1280), .FRAME_H(720),
             .NUM_REF(2), .SAMPLES(12), .ME_STALL_PCT(0)) u_me (
    .clk, .mb_valid(me_mb_valid), .mb_ready(me_mb_ready), .mb_x(me_mb_x), .mb_y(me_mb_y),
    .done(me_done), .rd_en(me_rd_en), .rd_ref(me_rd_ref), .rd_dx(me_rd_dx), .rd_dy(me_rd_dy),
    .rd_data(me_rd_data), .checks(me_checks), .failures(me_failures), .mbs,
    .clamp_reads, .wrap_reads, .stall_cycles(me_stalls)
  );

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL levelcp_full: %s", what);
    end
  endtask

  localparam longint LEVEL_CP = (64'd22 * 287 + 271) * 1535 * 2;
  localparam longint LEVEL_C  = 64'd45 * 1535 * 271 * 2;

  longint t0, t1;
  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; t0 = longint'($time);
    @(negedge clk); start = 0;
    wait (frame_done);
    t1 = longint'($time);
    repeat (3) @(negedge clk);
    chk(!busy, "idle after the frame");
    chk(mbs == 3600, $sformatf("%0d MBs coded", mbs));
    chk(req_count == LEVEL_CP, $sformatf("external fetches %0d, Level C+ figure %0d", req_count, LEVEL_CP));
    chk(req_count * 1000 / LEVEL_C >= 535 && req_count * 1000 / LEVEL_C <= 545,
        "fetches are about 54% of Level C");
    chk(clamp_reads > 0 && wrap_reads > 0, "edge clamping and ring wrap exercised");
    $display("full frame: %0d clocks, %0d fetches = %0d.%0d%% of Level C (%0d)", (t1 - t0) / 10,
             req_count, req_count * 100 / LEVEL_C, (req_count * 1000 / LEVEL_C) % 10, LEVEL_C);
    $display("TB_RESULT checks=%0d failures=%0d", checks + me_checks, failures + me_failures);
    $finish;
  end

  initial begin
    repeat (30000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + me_checks, failures + me_failures + 1);
    $finish;
  end

endmodule
