// hfmvn_scan_chk: drives one hfmvn_scan instance through two frames and checks
// the coding order against the HFmVn definition.
//
// Reference model: MB (x, y) lies in stripe y / NSTITCH at row k = y % NSTITCH and
// is coded in step t = x + k*(M-1); the order must be sorted by (stripe, t, k).
// The checker keeps the position of every emitted MB and requires: every MB
// exactly once; strictly increasing (stripe, t, k) keys; the left, top and
// top-right neighbours coded earlier, the top-right one at least M-1 positions before
// the MB (the side-information rule of the target MB
// pipelines; not for M=1, the stripe scan); correct step/stripe/frame flags. Frame 1 has the consumer always
// ready and must take exactly W_MB*H_MB clocks; frame 2 uses a random ready.
module hfmvn_scan_chk
  import levelcp_pkg::*;
#(
  parameter int M       = 2,
  parameter int NSTITCH = 2,
  parameter int W_MB    = 7,
  parameter int H_MB    = 5
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  logic      start, busy, out_valid, out_ready;
  scan_pos_t out;

  hfmvn_scan #(.M(M), .NSTITCH(NSTITCH), .W_MB(W_MB), .H_MB(H_MB)) dut (
    .clk, .rst_n, .start, .busy, .out_valid, .out_ready, .out
  );

  int order [W_MB][H_MB];     // position in the coding order, -1 = not yet
  int count, cycles, frame;
  longint t_first, t_last;
  longint last_key;
  int last_step, last_stripe;
  logic rand_ready;

  function automatic longint key_of(input int x, input int y);
    int k;
    k = y % NSTITCH;
    return 64'(y / NSTITCH) * 1000000 + 64'(x + k * (M - 1)) * 100 + 64'(k);
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL hfmvn_scan M=%0d n=%0d: %s", M, NSTITCH, what);
    end
  endtask

  assign out_ready = (frame == 0) ? 1'b1 : rand_ready;

  always_ff @(negedge clk) rand_ready <= ($urandom % 3) != 0;

  initial begin
    checks = 0; failures = 0; finished = 0; start = 0; frame = 0;
    @(posedge rst_n);
    for (frame = 0; frame < 2; frame++) begin
      foreach (order[i, j]) order[i][j] = -1;
      count = 0; cycles = 0; last_key = -1; last_step = -1; last_stripe = -1;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (busy) begin
        @(posedge clk);
        if (out_valid && out_ready) begin
          int x, y, k, t;
          if (count == 0) t_first = $time;
          t_last = $time;
          x = int'(out.mbx); y = int'(out.mby);
          k = y % NSTITCH;
          t = x + k * (M - 1);
          chk(x < W_MB && y < H_MB, $sformatf("MB (%0d,%0d) outside frame", x, y));
          if (x < W_MB && y < H_MB) begin
            chk(order[x][y] < 0, $sformatf("MB (%0d,%0d) twice", x, y));
            order[x][y] = count;
            chk(key_of(x, y) > last_key, $sformatf("MB (%0d,%0d) out of order", x, y));
            last_key = key_of(x, y);
            if (x > 0)
              chk(order[x-1][y] >= 0, $sformatf("left of (%0d,%0d) not coded", x, y));
            if (y > 0)
              chk(order[x][y-1] >= 0, $sformatf("top of (%0d,%0d) not coded", x, y));
            if (M >= 2 && y > 0 && x + 1 < W_MB) begin
              chk(order[x+1][y-1] >= 0, $sformatf("top-right of (%0d,%0d) not coded", x, y));
              if (order[x+1][y-1] >= 0)
                chk(count - order[x+1][y-1] >= M - 1,
                    $sformatf("top-right of (%0d,%0d) too recent", x, y));
            end
            chk(int'(out.k) == k && int'(out.step) == t &&
                int'(out.stripe_y) == (y / NSTITCH) * NSTITCH,
                $sformatf("step/row fields of (%0d,%0d)", x, y));
            chk(out.first_in_stripe == (x == 0 && k == 0), "first_in_stripe flag");
            chk(out.first_in_step == !(last_step == t && last_stripe == y / NSTITCH),
                "first_in_step flag");
            last_step = t; last_stripe = y / NSTITCH;
          end
          count++;
          chk(out.last_in_frame == (count == W_MB * H_MB), "last_in_frame flag");
        end
      end
      chk(count == W_MB * H_MB, $sformatf("frame %0d: %0d MBs", frame, count));
      if (frame == 0)
        begin
          cycles = int'((t_last - t_first) / 10) + 1;
          chk(cycles == W_MB * H_MB, $sformatf("one MB per clock: %0d clocks", cycles));
        end
      // last_in_step: the next MB starts a new step (checked via first_in_step
      // of its successor); here only that the final MB closes its step.
      chk(out.last_in_step || count != W_MB * H_MB, "last_in_step at frame end");
    end
    finished = 1;
  end

endmodule
