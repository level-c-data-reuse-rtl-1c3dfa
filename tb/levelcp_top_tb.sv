// levelcp_top_tb: end-to-end test of the Level C+ front end.
//
// Five reduced configurations (4x4 MBs, small search ranges and frames) of the
// scans usually compared: HF2V2 with two reference frames over two frames,
// HF3V2, HF2V4 with a short last stripe, and HF2V3 with a wider horizontal than
// vertical search range. Every pixel of every search window is read and checked;
// external memory and ME engine stall at random. See levelcp_top_chk.
module levelcp_top_tb;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 5;
  logic fin [NCFG];
  int   c [NCFG], f [NCFG];

  levelcp_top_chk #(.N(4), .SR_H(8),  .SR_V(8), .M(2), .NSTITCH(2), .FRAME_W(40), .FRAME_H(20), .NUM_REF(2), .FRAMES(2))
    u0 (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  levelcp_top_chk #(.N(4), .SR_H(8),  .SR_V(8), .M(3), .NSTITCH(2), .FRAME_W(32), .FRAME_H(24), .NUM_REF(1))
    u1 (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]));
  levelcp_top_chk #(.N(4), .SR_H(8),  .SR_V(8), .M(2), .NSTITCH(4), .FRAME_W(24), .FRAME_H(28), .NUM_REF(1))
    u2 (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]));
  levelcp_top_chk #(.N(4), .SR_H(16), .SR_V(8), .M(2), .NSTITCH(3), .FRAME_W(32), .FRAME_H(20), .NUM_REF(2))
    u3 (.clk, .rst_n, .finished(fin[3]), .checks(c[3]), .failures(f[3]));
  levelcp_top_chk #(.N(4), .SR_H(8),  .SR_V(8), .M(1), .NSTITCH(2), .FRAME_W(24), .FRAME_H(20), .NUM_REF(1))
    u4 (.clk, .rst_n, .finished(fin[4]), .checks(c[4]), .failures(f[4]));

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
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    report();
    $display("all configurations done after %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
