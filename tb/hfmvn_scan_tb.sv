// hfmvn_scan_tb: self-checking test of the HFmVn coding-order generator.
//
// Runs the scans usually compared (HF2V2, HF3V2, HF2V3, HF2V4), each on a
// small frame whose MB-row count leaves a short last stripe, plus HF2V2 at the
// HDTV 720p size (80 x 45 MBs), and the plain 2-row stripe scan (M=1).
// hfmvn_scan_chk holds the reference model.
module hfmvn_scan_tb;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 6;
  logic fin [NCFG];
  int   c [NCFG], f [NCFG];

  hfmvn_scan_chk #(.M(2), .NSTITCH(2), .W_MB(7),  .H_MB(5))  u0 (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  hfmvn_scan_chk #(.M(3), .NSTITCH(2), .W_MB(8),  .H_MB(5))  u1 (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]));
  hfmvn_scan_chk #(.M(2), .NSTITCH(3), .W_MB(6),  .H_MB(7))  u2 (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]));
  hfmvn_scan_chk #(.M(2), .NSTITCH(4), .W_MB(5),  .H_MB(10)) u3 (.clk, .rst_n, .finished(fin[3]), .checks(c[3]), .failures(f[3]));
  hfmvn_scan_chk #(.M(2), .NSTITCH(2), .W_MB(80), .H_MB(45)) u4 (.clk, .rst_n, .finished(fin[4]), .checks(c[4]), .failures(f[4]));
  hfmvn_scan_chk #(.M(1), .NSTITCH(2), .W_MB(6),  .H_MB(5))  u5 (.clk, .rst_n, .finished(fin[5]), .checks(c[5]), .failures(f[5]));

  int checks, failures;

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += c[i];
      failures += f[i];
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
