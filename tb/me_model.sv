// me_model: behavioural stand-in for the motion-estimation engine that consumes
// the Level C+ front end, with the checks of the end-to-end tests built in.
//
// For each MB offered on mb_valid it (after a random delay of ME_STALL_PCT
// percent per clock) raises mb_ready, then reads search-window pixels through the
// read port, one per clock, and compares each with the reference frame content at
// the window position: frame pixel (mbx*N - SR_H/2 + dx, mby*N - SR_V/2 + dy),
// clamped to the frame edge. With SAMPLES = 0 it reads the whole
// (SR_H+N-1) x (SR_V+N-1) window of every reference frame; otherwise the four
// corners plus SAMPLES random pixels per frame. It then pulses done.
// It also checks the coding order: every MB of each frame once, sorted by the
// HFmVn key (stripe, step = x + k*(M-1), row k), and left, top and top-right
// neighbours coded earlier, the top-right one at least M-1 MBs earlier (not
// checked for M=1, the plain stripe scan, which codes top-right MBs later).
module me_model
  import levelcp_pkg::*;
  import levelcp_tb_pkg::*;
#(
  parameter int N            = 16,
  parameter int SR_H         = 256,
  parameter int SR_V         = 256,
  parameter int M            = 2,
  parameter int NSTITCH      = 2,
  parameter int FRAME_W      = 1280,
  parameter int FRAME_H      = 720,
  parameter int NUM_REF      = 2,
  parameter int SAMPLES      = 0,
  parameter int ME_STALL_PCT = 0,
  localparam int W_MB  = FRAME_W / N,
  localparam int H_MB  = FRAME_H / N,
  localparam int WIN_W = SR_H + N - 1,
  localparam int WIN_H = SR_V + N - 1,
  localparam int BUF_W = SR_H + ((NSTITCH - 1) * (M - 1) + 1) * N - 1,
  localparam int REF_W = (NUM_REF > 1) ? $clog2(NUM_REF) : 1,
  localparam int DX_W  = $clog2(WIN_W),
  localparam int DY_W  = $clog2(WIN_H)
) (
  input  logic             clk,
  input  logic             mb_valid,
  output logic             mb_ready,
  input  mb_idx_t          mb_x,
  input  mb_idx_t          mb_y,
  output logic             done,
  output logic             rd_en,
  output logic [REF_W-1:0] rd_ref,
  output logic [DX_W-1:0]  rd_dx,
  output logic [DY_W-1:0]  rd_dy,
  input  logic [7:0]       rd_data,
  output int               checks,
  output int               failures,
  output int               mbs,
  output longint           clamp_reads,
  output longint           wrap_reads,
  output longint           stall_cycles
);

  int     order [W_MB][H_MB];
  int     in_frame;
  longint last_key;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL me_model M=%0d n=%0d: %s", M, NSTITCH, what);
    end
  endtask

  function automatic longint key_of(input int x, input int y);
    int k;
    k = y % NSTITCH;
    return 64'(y / NSTITCH) * 1000000 + 64'(x + k * (M - 1)) * 100 + 64'(k);
  endfunction

  task automatic read_px(input int r, input int dx, input int dy, input int x, input int y);
    int fx, fy;
    fx = x * N - SR_H / 2 + dx;
    fy = y * N - SR_V / 2 + dy;
    if (fx < 0 || fx >= FRAME_W || fy < 0 || fy >= FRAME_H) clamp_reads++;
    if ((x * N) % BUF_W + dx >= BUF_W) wrap_reads++;
    rd_en = 1; rd_ref = REF_W'(r); rd_dx = DX_W'(dx); rd_dy = DY_W'(dy);
    @(negedge clk);
    if (rd_data == pix(r, clampi(fx, FRAME_W - 1), clampi(fy, FRAME_H - 1))) checks++;
    else begin
      checks++;
      failures++;
      if (failures < 20)
        $display("FAIL me_model M=%0d n=%0d: MB (%0d,%0d) ref %0d window (%0d,%0d): got %0h want %0h",
                 M, NSTITCH, x, y, r, dx, dy, rd_data,
                 pix(r, clampi(fx, FRAME_W - 1), clampi(fy, FRAME_H - 1)));
    end
  endtask

  task automatic check_order(input int x, input int y);
    chk(x < W_MB && y < H_MB, $sformatf("MB (%0d,%0d) outside the frame", x, y));
    if (x < W_MB && y < H_MB) begin
      chk(order[x][y] < 0, $sformatf("MB (%0d,%0d) coded twice", x, y));
      chk(key_of(x, y) > last_key, $sformatf("MB (%0d,%0d) out of HFmVn order", x, y));
      last_key = key_of(x, y);
      if (x > 0) chk(order[x-1][y] >= 0, "left neighbour coded earlier");
      if (y > 0) chk(order[x][y-1] >= 0, "top neighbour coded earlier");
      if (M >= 2 && y > 0 && x + 1 < W_MB)
        chk(order[x+1][y-1] >= 0 && in_frame - order[x+1][y-1] >= M - 1,
            "top-right neighbour coded early enough");
      order[x][y] = in_frame;
    end
    in_frame++;
    if (in_frame == W_MB * H_MB) begin
      foreach (order[i, j]) chk(order[i][j] >= 0, "every MB of the frame coded");
      foreach (order[i, j]) order[i][j] = -1;
      in_frame = 0;
      last_key = -1;
    end
  endtask

  initial begin
    mb_ready = 0; done = 0; rd_en = 0; rd_ref = '0; rd_dx = '0; rd_dy = '0;
    checks = 0; failures = 0; mbs = 0; clamp_reads = 0; wrap_reads = 0; stall_cycles = 0;
    in_frame = 0; last_key = -1;
    foreach (order[i, j]) order[i][j] = -1;
    forever begin
      @(negedge clk);
      if (mb_valid) begin
        if (ME_STALL_PCT > 0 && int'($urandom % 100) < ME_STALL_PCT) begin
          stall_cycles++;
        end else begin
          int x, y;
          x = int'(mb_x); y = int'(mb_y);
          mb_ready = 1;
          @(negedge clk);
          mb_ready = 0;
          check_order(x, y);
          mbs++;
          for (int r = 0; r < NUM_REF; r++) begin
            if (SAMPLES == 0) begin
              for (int dy = 0; dy < WIN_H; dy++)
                for (int dx = 0; dx < WIN_W; dx++) read_px(r, dx, dy, x, y);
            end else begin
              read_px(r, 0, 0, x, y);
              read_px(r, WIN_W - 1, 0, x, y);
              read_px(r, 0, WIN_H - 1, x, y);
              read_px(r, WIN_W - 1, WIN_H - 1, x, y);
              for (int s = 0; s < SAMPLES; s++)
                read_px(r, int'($urandom % WIN_W), int'($urandom % WIN_H), x, y);
            end
          end
          rd_en = 0;
          done = 1;
          @(negedge clk);
          done = 0;
        end
      end
    end
  end

endmodule
