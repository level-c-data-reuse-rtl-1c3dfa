// ext_mem_model: behavioural model of the external frame memory read port.
//
// Holds NUM_REF synthetic FRAME_W x FRAME_H reference frames whose pixels are
// levelcp_tb_pkg::pix(ref, x, y) for address ref*FRAME_W*FRAME_H + y*FRAME_W + x.
// Requests are accepted when req_ready is high; req_ready drops at random in
// STALL_PCT percent of clocks. Each request is answered in order, 1 to MAX_LAT
// clocks later (never two answers in one clock). Counts accepted requests and
// refused (stalled) request cycles.
module ext_mem_model
  import levelcp_tb_pkg::*;
#(
  parameter int FRAME_W   = 1280,
  parameter int FRAME_H   = 720,
  parameter int NUM_REF   = 2,
  parameter int AW        = 21,
  parameter int STALL_PCT = 0,
  parameter int MAX_LAT   = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic [AW-1:0] req_addr,
  output logic          rsp_valid,
  output logic [7:0]    rsp_data,
  output longint        req_count,
  output longint        stall_count
);

  typedef struct { logic [7:0] d; longint due; } ent_t;
  ent_t   q[$];
  longint cyc;

  function automatic logic [7:0] data_at(input logic [AW-1:0] a);
    int ai, r, rem;
    ai  = int'(a);
    r   = ai / (FRAME_W * FRAME_H);
    rem = ai % (FRAME_W * FRAME_H);
    return pix(r, rem % FRAME_W, rem / FRAME_W);
  endfunction

  initial begin
    req_ready = 1'b1; rsp_valid = 1'b0; rsp_data = '0;
    req_count = 0; stall_count = 0; cyc = 0;
  end

  always @(negedge clk) req_ready <= (STALL_PCT == 0) || (int'($urandom % 100) >= STALL_PCT);

  always @(posedge clk) begin
    cyc = cyc + 1;
    if (!rst_n) begin
      q.delete();
      rsp_valid <= 1'b0;
    end else begin
      if (req_valid && !req_ready) stall_count = stall_count + 1;
      if (q.size() > 0 && q[0].due <= cyc) begin
        rsp_valid <= 1'b1;
        rsp_data  <= q[0].d;
        void'(q.pop_front());
      end else begin
        rsp_valid <= 1'b0;
      end
      if (req_valid && req_ready) begin
        ent_t e;
        e.d   = data_at(req_addr);
        e.due = cyc + longint'((MAX_LAT > 1) ? int'($urandom % MAX_LAT) : 0);
        if (q.size() > 0 && e.due < q[q.size()-1].due) e.due = q[q.size()-1].due;
        q.push_back(e);
        req_count = req_count + 1;
      end
    end
  end

endmodule
