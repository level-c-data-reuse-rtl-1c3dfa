// sw_buffer_tb: self-checking test of the search-window memory.
//
// Fills every pixel of a small 2-frame buffer with random data, then mixes random
// writes and reads against a shadow copy: a read must return, one clock later,
// the last value written (the old one when the same pixel is written in the same
// clock). A second instance at the default HF2V2/HDTV size is spot-checked at its
// first and last addresses and at random ones.
module sw_buffer_tb;

  localparam int NR = 2, BW = 15, BH = 11;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL sw_buffer: %s", what);
    end
  endtask

  // small instance
  logic       we, re;
  logic [0:0] wref, rref;
  logic [3:0] wcol, rcol, wrow, rrow;
  logic [7:0] wdata, rdata;

  sw_buffer #(.NUM_REF(NR), .BUF_W(BW), .BUF_H(BH), .PIX_W(8)) dut (
    .clk, .we, .wref, .wcol, .wrow, .wdata, .re, .rref, .rcol, .rrow, .rdata
  );

  // full-size instance (default parameters)
  logic        we2, re2;
  logic [0:0]  wref2, rref2;
  logic [8:0]  wcol2, rcol2, wrow2, rrow2;
  logic [7:0]  wdata2, rdata2;

  sw_buffer dut2 (
    .clk, .we(we2), .wref(wref2), .wcol(wcol2), .wrow(wrow2), .wdata(wdata2),
    .re(re2), .rref(rref2), .rcol(rcol2), .rrow(rrow2), .rdata(rdata2)
  );

  logic [7:0] shadow [NR][BW][BH];

  initial begin
    we = 0; re = 0; wref = 0; rref = 0; wcol = 0; rcol = 0; wrow = 0; rrow = 0; wdata = 0;
    we2 = 0; re2 = 0; wref2 = 0; rref2 = 0; wcol2 = 0; rcol2 = 0; wrow2 = 0; rrow2 = 0; wdata2 = 0;
    @(negedge clk);
    // fill
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < BW; c++)
        for (int w = 0; w < BH; w++) begin
          we = 1; wref = 1'(r); wcol = 4'(c); wrow = 4'(w); wdata = 8'($urandom);
          shadow[r][c][w] = wdata;
          @(negedge clk);
        end
    we = 0;
    // read everything back
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < BW; c++)
        for (int w = 0; w < BH; w++) begin
          re = 1; rref = 1'(r); rcol = 4'(c); rrow = 4'(w);
          @(negedge clk);
          chk(rdata == shadow[r][c][w], $sformatf("fill readback (%0d,%0d,%0d)", r, c, w));
        end
    // random traffic, reads and writes in the same clock
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] expv;
      int r, c, w;
      re = 1;
      rref = 1'($urandom % NR); rcol = 4'($urandom % BW); rrow = 4'($urandom % BH);
      expv = shadow[rref][rcol][rrow];
      we = ($urandom % 2) == 1;
      if (i % 7 == 0) begin wref = rref; wcol = rcol; wrow = rrow; end
      else begin
        wref = 1'($urandom % NR); wcol = 4'($urandom % BW); wrow = 4'($urandom % BH);
      end
      wdata = 8'($urandom);
      r = int'(wref); c = int'(wcol); w = int'(wrow);
      @(negedge clk);
      if (we) shadow[r][c][w] = wdata;
      chk(rdata == expv, $sformatf("random read %0d", i));
    end
    // a read with re low keeps the last data
    begin
      logic [7:0] held;
      held = rdata;
      re = 0; we = 0; rcol = 4'((rcol + 1) % BW);
      @(negedge clk);
      chk(rdata == held, "rdata held while re is low");
    end
    // default-size instance: corners and random pixels
    for (int i = 0; i < 200; i++) begin
      int r, c, w;
      logic [7:0] v;
      if (i == 0)      begin r = 0; c = 0; w = 0; end
      else if (i == 1) begin r = 1; c = 286; w = 286; end
      else begin r = int'($urandom % 2); c = int'($urandom % 287); w = int'($urandom % 287); end
      v = 8'($urandom);
      we2 = 1; wref2 = 1'(r); wcol2 = 9'(c); wrow2 = 9'(w); wdata2 = v;
      @(negedge clk);
      we2 = 0; re2 = 1; rref2 = 1'(r); rcol2 = 9'(c); rrow2 = 9'(w);
      @(negedge clk);
      re2 = 0;
      chk(rdata2 == v, $sformatf("full-size pixel (%0d,%0d,%0d)", r, c, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
