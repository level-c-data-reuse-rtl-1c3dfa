// sw_loader: Level C+ reference loader.
//
// Copies reference pixels from external memory into the search-window buffer one
// column at a time. A column is normally BUF_H = SR_V + n*N - 1 pixels tall: it
// spans the search ranges of all n MB rows of a stitched stripe, which is where
// the Level C+ scheme saves bandwidth over Level C (one column fetch serves n MB
// rows). A command names the first frame column to load, how many columns, the
// frame row of the window's top edge and the column height (SR_V + r*N - 1 for a
// last stripe of only r < n MB rows). Columns land in the buffer's column ring at the
// slot after the previous command's last column, or at slot 0 when the command
// opens a new stripe. Pixels outside the frame are fetched from the nearest edge
// pixel (coordinates are clamped), so the fetch count per stripe is
// (FRAME_W + SR_H - 1) * height per reference frame, the count the published
// bandwidth figures use. What is loaded follows the published Level C+ scheme; the fetch order
// (column, then reference frame, then row), edge clamping and the handshakes are
// this design's choices.
//
// Interface and timing: a command is taken on cmd_valid && cmd_ready (ready while
// idle). Requests go out on ext_req_* with a valid/ready handshake, at most one
// per clock, and may run ahead of the responses by any amount. Responses must
// come back in request order, one per ext_rsp_valid; each is written to the
// buffer in the same clock. 'done' pulses for one clock after the last write.
// External addresses are ref*FRAME_W*FRAME_H + y*FRAME_W + x, one pixel each.
module sw_loader #(
  parameter int N       = 16,
  parameter int SR_V    = 256,
  parameter int NSTITCH = 2,
  parameter int FRAME_W = 1280,
  parameter int FRAME_H = 720,
  parameter int NUM_REF = 2,
  parameter int BUF_W   = 287,
  parameter int BUF_H   = SR_V + NSTITCH * N - 1,
  parameter int PIX_W   = 8,
  localparam int EXT_AW = $clog2(NUM_REF * FRAME_W * FRAME_H),
  localparam int REF_W  = (NUM_REF > 1) ? $clog2(NUM_REF) : 1,
  localparam int COL_W  = $clog2(BUF_W),
  localparam int ROW_W  = $clog2(BUF_H)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // command
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  logic                    cmd_new_stripe,
  input  logic signed [15:0]      cmd_col,     // first frame column (may be < 0)
  input  logic        [15:0]      cmd_ncols,   // number of columns, >= 1
  input  logic signed [15:0]      cmd_y0,      // frame row of the window top (may be < 0)
  input  logic        [15:0]      cmd_height,  // rows per column, 1 .. BUF_H
  output logic                    done,
  // external memory read
  output logic                    ext_req_valid,
  input  logic                    ext_req_ready,
  output logic [EXT_AW-1:0]       ext_req_addr,
  input  logic                    ext_rsp_valid,
  input  logic [PIX_W-1:0]        ext_rsp_data,
  // buffer write
  output logic                    buf_we,
  output logic [REF_W-1:0]        buf_wref,
  output logic [COL_W-1:0]        buf_wcol,
  output logic [ROW_W-1:0]        buf_wrow,
  output logic [PIX_W-1:0]        buf_wdata
);

  logic                active, issue_done;
  logic signed [15:0]  y0;
  logic [15:0]         height;       // rows per column of this command
  // issue side
  logic signed [15:0]  i_col;
  logic [15:0]         i_cols_left;
  logic [REF_W-1:0]    i_ref;
  logic [ROW_W-1:0]    i_row;
  // response side
  logic [COL_W-1:0]    r_phys;
  logic [15:0]         r_cols_left;
  logic [REF_W-1:0]    r_ref;
  logic [ROW_W-1:0]    r_row;
  logic [COL_W-1:0]    wp;           // ring slot of the next column to load

  function automatic int clampi(input int v, input int hi);
    return (v < 0) ? 0 : ((v > hi) ? hi : v);
  endfunction

  function automatic logic [COL_W-1:0] phys_inc(input logic [COL_W-1:0] p);
    return (32'(p) == BUF_W - 1) ? '0 : p + 1'b1;
  endfunction

  int ax, ay;
  always_comb begin
    ax = clampi(int'(i_col), FRAME_W - 1);
    ay = clampi(int'(y0) + int'(i_row), FRAME_H - 1);
    ext_req_addr = EXT_AW'(int'(i_ref) * FRAME_W * FRAME_H + ay * FRAME_W + ax);
  end

  assign cmd_ready     = !active;
  assign ext_req_valid = active && !issue_done;

  assign buf_we    = active && ext_rsp_valid;
  assign buf_wref  = r_ref;
  assign buf_wcol  = r_phys;
  assign buf_wrow  = r_row;
  assign buf_wdata = ext_rsp_data;

  wire i_last_row = 32'(i_row) == 32'(height) - 1;
  wire i_last_ref = 32'(i_ref) == NUM_REF - 1;
  wire r_last_row = 32'(r_row) == 32'(height) - 1;
  wire r_last_ref = 32'(r_ref) == NUM_REF - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      issue_done  <= 1'b0;
      done        <= 1'b0;
      y0          <= '0;
      height      <= 16'(BUF_H);
      i_col       <= '0;
      i_cols_left <= '0;
      i_ref       <= '0;
      i_row       <= '0;
      r_phys      <= '0;
      r_cols_left <= '0;
      r_ref       <= '0;
      r_row       <= '0;
      wp          <= '0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (cmd_valid) begin
          active      <= 1'b1;
          issue_done  <= 1'b0;
          y0          <= cmd_y0;
          height      <= cmd_height;
          i_col       <= cmd_col;
          i_cols_left <= cmd_ncols;
          i_ref       <= '0;
          i_row       <= '0;
          r_phys      <= cmd_new_stripe ? '0 : wp;
          r_cols_left <= cmd_ncols;
          r_ref       <= '0;
          r_row       <= '0;
        end
      end else begin
        // request side
        if (ext_req_valid && ext_req_ready) begin
          if (!i_last_row) begin
            i_row <= i_row + 1'b1;
          end else begin
            i_row <= '0;
            if (!i_last_ref) begin
              i_ref <= i_ref + 1'b1;
            end else begin
              i_ref       <= '0;
              i_col       <= i_col + 16'sd1;
              i_cols_left <= i_cols_left - 1'b1;
              if (i_cols_left == 16'd1) issue_done <= 1'b1;
            end
          end
        end
        // response side
        if (ext_rsp_valid) begin
          if (!r_last_row) begin
            r_row <= r_row + 1'b1;
          end else begin
            r_row <= '0;
            if (!r_last_ref) begin
              r_ref <= r_ref + 1'b1;
            end else begin
              r_ref       <= '0;
              r_phys      <= phys_inc(r_phys);
              r_cols_left <= r_cols_left - 1'b1;
              if (r_cols_left == 16'd1) begin
                active <= 1'b0;
                done   <= 1'b1;
                wp     <= phys_inc(r_phys);
              end
            end
          end
        end
      end
    end
  end

  // A response may only arrive for a request that was made.
  a_rsp_when_active: assert property (@(posedge clk) disable iff (!rst_n)
                                      ext_rsp_valid |-> active)
    else $error("sw_loader: response while idle");
  a_ncols_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                                    (cmd_valid && cmd_ready) |-> (cmd_ncols != 16'd0))
    else $error("sw_loader: empty command");
  a_height_ok: assert property (@(posedge clk) disable iff (!rst_n)
                                (cmd_valid && cmd_ready) |->
                                (cmd_height != 16'd0 && 32'(cmd_height) <= BUF_H))
    else $error("sw_loader: column height out of range");

endmodule
