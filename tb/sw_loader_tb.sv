// sw_loader_tb: self-checking test of the Level C+ column loader.
//
// Small configuration: 4x4 MBs, search range [-4,4), 2-stitched stripes
// (columns 15 pixels tall), a 15-column ring, a 24x16 frame and two reference
// frames. The command list mimics two stripes of an HF2V2 scan: an opening load of
// SR_H+N-1 = 11 columns starting at column -4, then 4-column step loads that run
// past the right frame edge and wrap around the ring, and a second stripe whose
// columns run past the bottom edge, and a one-MB-row last stripe whose columns are
// only SR_V + N - 1 = 11 rows tall. Every buffer write is checked against a
// reference computed from the command: ring slot -> frame column, edge clamping,
// frame content. Also checked: each pixel of a command written exactly once, the
// request count, one 'done' per command, and that with an always-ready memory a
// command takes one clock per pixel plus a fixed few. The memory stalls and
// delays responses at random in the first pass and is ideal in the second.
module sw_loader_tb
  import levelcp_tb_pkg::*;
;

  localparam int N = 4, SR_V = 8, NS = 2, FW = 24, FH = 16, NR = 2;
  localparam int BW = 15, BH = SR_V + NS * N - 1;   // 15 x 15
  localparam int AW = $clog2(NR * FW * FH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL sw_loader: %s", what);
    end
  endtask

  logic               cmd_valid, cmd_ready, cmd_new_stripe, done;
  logic signed [15:0] cmd_col, cmd_y0;
  logic [15:0]        cmd_ncols, cmd_height;
  logic               ext_req_valid, ext_req_ready, ext_rsp_valid;
  logic [AW-1:0]      ext_req_addr;
  logic [7:0]         ext_rsp_data;
  logic               buf_we;
  logic [0:0]         buf_wref;
  logic [3:0]         buf_wcol, buf_wrow;
  logic [7:0]         buf_wdata;
  longint             req_count, stall_count, req_count2, stall_count2;
  logic               pass2;

  sw_loader #(
    .N(N), .SR_V(SR_V), .NSTITCH(NS), .FRAME_W(FW), .FRAME_H(FH), .NUM_REF(NR),
    .BUF_W(BW), .BUF_H(BH), .PIX_W(8)
  ) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_new_stripe, .cmd_col, .cmd_ncols, .cmd_y0, .cmd_height,
    .done, .ext_req_valid, .ext_req_ready, .ext_req_addr, .ext_rsp_valid, .ext_rsp_data,
    .buf_we, .buf_wref, .buf_wcol, .buf_wrow, .buf_wdata
  );

  // two memory models: a slow one (pass 1) and an ideal one (pass 2)
  logic rv1, rr1, rv2, rr2;
  logic [7:0] rd1, rd2;
  ext_mem_model #(.FRAME_W(FW), .FRAME_H(FH), .NUM_REF(NR), .AW(AW), .STALL_PCT(30), .MAX_LAT(6))
    mem1 (.clk, .rst_n, .req_valid(ext_req_valid && !pass2), .req_ready(rr1), .req_addr(ext_req_addr),
          .rsp_valid(rv1), .rsp_data(rd1), .req_count(req_count), .stall_count(stall_count));
  ext_mem_model #(.FRAME_W(FW), .FRAME_H(FH), .NUM_REF(NR), .AW(AW), .STALL_PCT(0), .MAX_LAT(1))
    mem2 (.clk, .rst_n, .req_valid(ext_req_valid && pass2), .req_ready(rr2), .req_addr(ext_req_addr),
          .rsp_valid(rv2), .rsp_data(rd2), .req_count(req_count2), .stall_count(stall_count2));
  assign ext_req_ready = pass2 ? rr2 : rr1;
  assign ext_rsp_valid = pass2 ? rv2 : rv1;
  assign ext_rsp_data  = pass2 ? rd2 : rd1;

  // reference of the current command
  int cur_col0, cur_ncols, cur_y0, cur_h, cur_base, next_base;
  int written [NR][BW][BH];
  int writes, dones;

  always @(posedge clk) begin
    if (rst_n && buf_we) begin
      int r, c, w, off, fx, fy;
      r = int'(buf_wref); c = int'(buf_wcol); w = int'(buf_wrow);
      off = (c - cur_base + BW) % BW;
      fx  = clampi(cur_col0 + off, FW - 1);
      fy  = clampi(cur_y0 + w, FH - 1);
      chk(c < BW && w < BH && r < NR, "write address in range");
      chk(off < cur_ncols, $sformatf("slot %0d outside the command's columns", c));
      chk(w < cur_h, $sformatf("row %0d below the command's column height", w));
      chk(buf_wdata == pix(r, fx, fy),
          $sformatf("pixel ref %0d slot %0d row %0d: got %0h want %0h", r, c, w, buf_wdata, pix(r, fx, fy)));
      if (c < BW && w < BH && r < NR) written[r][c][w]++;
      writes++;
    end
    if (rst_n && done) dones++;
  end

  task automatic run_cmd(input logic ns, input int col0, input int ncols, input int y0,
                         input int h, input logic timed);
    longint t0, t1, rq0;
    int c;
    cur_col0 = col0; cur_ncols = ncols; cur_y0 = y0; cur_h = h;
    cur_base = ns ? 0 : next_base;
    next_base = (cur_base + ncols) % BW;
    foreach (written[a, b, d]) written[a][b][d] = 0;
    writes = 0; dones = 0;
    rq0 = pass2 ? req_count2 : req_count;
    @(negedge clk);
    chk(cmd_ready, "loader idle before a command");
    cmd_valid = 1; cmd_new_stripe = ns; cmd_col = 16'(col0); cmd_ncols = 16'(ncols); cmd_y0 = 16'(y0); cmd_height = 16'(h);
    t0 = longint'($time);
    @(negedge clk);
    cmd_valid = 0;
    c = 0;
    while (!done && c < 100000) begin @(negedge clk); c++; end
    t1 = longint'($time);
    @(negedge clk);
    chk(writes == NR * ncols * h, $sformatf("%0d writes for %0d columns", writes, ncols));
    chk(dones == 1, "one done pulse");
    chk(((pass2 ? req_count2 : req_count) - rq0) == longint'(NR * ncols * h), "request count");
    for (int k = 0; k < ncols; k++)
      for (int r = 0; r < NR; r++)
        for (int w = 0; w < BH; w++)
          chk(written[r][(cur_base + k) % BW][w] == ((w < h) ? 1 : 0), "each pixel written once");
    if (timed)
      chk((t1 - t0) / 10 <= longint'(NR * ncols * h + 3),
          $sformatf("load rate: %0d clocks for %0d pixels", (t1 - t0) / 10, NR * ncols * h));
  endtask

  initial begin
    cmd_valid = 0; cmd_new_stripe = 0; cmd_col = 0; cmd_ncols = 0; cmd_y0 = 0; cmd_height = 0;
    pass2 = 0; next_base = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      pass2 = (p == 1);
      // stripe 0: MB rows 0-1, window top at row -4
      run_cmd(1, -4, 11, -4, BH, pass2);
      for (int t = 1; t < FW / N; t++) run_cmd(0, t * N + 3, 4, -4, BH, pass2);
      // stripe 2 (MB rows 2-3) window top at row 4; rows run past the bottom edge
      run_cmd(1, -4, 11, 4, BH, pass2);
      run_cmd(0, 7, 4, 4, BH, pass2);
      run_cmd(0, 11, 4, 4, BH, pass2);
      // a one-row last stripe: columns SR_V + N - 1 = 11 rows tall
      run_cmd(1, -4, 11, 12, SR_V + N - 1, pass2);
      run_cmd(0, 7, 4, 12, SR_V + N - 1, pass2);
    end
    chk(stall_count > 0, "memory stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
