// levelcp_workloads_tb: the eight Level C+ configurations of the standard
// comparison, each coded for one full frame at its real size.
//
//   D1 720x480, search range [-64,64), 5 reference frames
//   HDTV 1280x720, search range [-128,128), 2 reference frames
// each with the HF2V2, HF3V2, HF2V3 and HF2V4 scans (16x16 MBs).
//
// Every configuration runs through levelcp_top_chk, which checks the coding
// order, sampled window pixels (corners plus two random pixels per MB and
// reference frame) and the exact fetch count. This test also converts the fetch
// count into the external bandwidth at 30 frames/s, in MB/s of 2^20 bytes, and
// requires it to be within 0.05 MB/s of the published figures for the scheme:
//   D1:   288.95, 288.95, 212.04, 181.26
//   HDTV: 578.38, 578.38, 399.20, 332.00
// The eight instances run side by side; the HDTV HF2V2 frame, the longest, takes
// about 20 M clocks.
module levelcp_workloads_tb;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 8;
  logic   fin [NCFG];
  int     c [NCFG], f [NCFG];
  longint fe [NCFG];

  // published bandwidth, in hundredths of MB/s
  localparam int PUB [NCFG] = '{28895, 28895, 21204, 18126, 57838, 57838, 39920, 33200};
  localparam string NAME [NCFG] = '{"D1 HF2V2", "D1 HF3V2", "D1 HF2V3", "D1 HF2V4",
                                    "720p HF2V2", "720p HF3V2", "720p HF2V3", "720p HF2V4"};

  `define WL(I, MM, NN, FW, FH, SR, NR) \
    levelcp_top_chk #(.N(16), .SR_H(SR), .SR_V(SR), .M(MM), .NSTITCH(NN), .FRAME_W(FW), \
                      .FRAME_H(FH), .NUM_REF(NR), .FRAMES(1), .SAMPLES(2), .STALL_PCT(0), \
                      .MAX_LAT(1), .ME_STALL_PCT(0)) \
      u``I (.clk, .rst_n, .finished(fin[I]), .checks(c[I]), .failures(f[I]), .fetches(fe[I]));

  `WL(0, 2, 2, 720, 480, 128, 5)
  `WL(1, 3, 2, 720, 480, 128, 5)
  `WL(2, 2, 3, 720, 480, 128, 5)
  `WL(3, 2, 4, 720, 480, 128, 5)
  `WL(4, 2, 2, 1280, 720, 256, 2)
  `WL(5, 3, 2, 1280, 720, 256, 2)
  `WL(6, 2, 3, 1280, 720, 256, 2)
  `WL(7, 2, 4, 1280, 720, 256, 2)

  `undef WL

  int checks, failures;

  function automatic logic all_done();
    for (int i = 0; i < NCFG; i++) if (!fin[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += c[i];
      failures += f[i];
    end
  endtask

  initial begin
    int own_checks, own_failures;
    own_checks = 0; own_failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    for (int i = 0; i < NCFG; i++) begin
      longint bw;   // hundredths of MB/s, rounded
      bw = (fe[i] * 30 * 100 + 64'd524288) / 64'd1048576;
      $display("%-11s %0d fetches/frame = %0d.%02d MB/s at 30 fps (published %0d.%02d)",
               NAME[i], fe[i], bw / 100, bw % 100, PUB[i] / 100, PUB[i] % 100);
      own_checks++;
      if (bw < longint'(PUB[i]) - 5 || bw > longint'(PUB[i]) + 5) begin
        own_failures++;
        $display("FAIL %s: bandwidth differs from the published figure", NAME[i]);
      end
    end
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks + own_checks, failures + own_failures);
    $finish;
  end

  initial begin
    repeat (30000000) @(posedge clk);
    report();
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
