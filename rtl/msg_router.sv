// msg_router: carries coherence messages between N_CHILD L1 data caches and
// the parent protocol processor.
//
// Upward, it looks at the head of every cache's outgoing message FIFO and
// moves at most one message per cycle into the parent's incoming FIFO.
// Responses win over requests (a response never waits behind a request), and
// among messages of the same kind a round-robin pointer picks the cache
// after the one served last. The router writes the source port number into
// the message's child field, so the parent always knows who sent it.
// Downward, it moves the head of the parent's outgoing FIFO to the incoming
// FIFO of the cache named by the child field, one message per cycle.
//
// Interface: valid/ready on FIFO outputs, valid plus per-kind ready on FIFO
// inputs (see msg_fifo). Timing: purely combinational; a message moves in
// the cycle its source and destination agree. A router between the caches
// and the parent is part of the document's cache hierarchy; the arbitration
// rule is this design's own.
module msg_router
  import mc_pkg::*;
#(
  parameter int unsigned N_CHILD = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // heads of the caches' outgoing FIFOs
  input  logic       c_out_valid [N_CHILD],
  input  cache_msg_t c_out_msg   [N_CHILD],
  output logic       c_out_ready [N_CHILD],
  // the parent's incoming FIFO
  output logic       p_in_valid,
  output cache_msg_t p_in_msg,
  input  logic       p_in_req_ready,
  input  logic       p_in_resp_ready,
  // head of the parent's outgoing FIFO
  input  logic       p_out_valid,
  input  cache_msg_t p_out_msg,
  output logic       p_out_ready,
  // the caches' incoming FIFOs
  output logic       c_in_valid      [N_CHILD],
  output cache_msg_t c_in_msg        [N_CHILD],
  input  logic       c_in_req_ready  [N_CHILD],
  input  logic       c_in_resp_ready [N_CHILD]
);
  localparam int unsigned IW = (N_CHILD > 1) ? $clog2(N_CHILD) : 1;

  logic [IW-1:0] rr_ptr;      // last cache served upward
  logic          up_fire;
  logic [IW-1:0] up_sel;

  // ---- upward: responses first, then requests, round-robin within each
  always_comb begin
    logic found_resp, found_req;
    logic [IW-1:0] sel_resp, sel_req;
    int unsigned k;  // only its low bits reach the index
    found_resp = 1'b0;
    found_req  = 1'b0;
    sel_resp   = '0;
    sel_req    = '0;
    for (int unsigned n = 1; n <= N_CHILD; n++) begin
      k = (int'(rr_ptr) + n) % N_CHILD;
      if (c_out_valid[k] && c_out_msg[k].is_resp && !found_resp) begin
        found_resp = 1'b1;
        sel_resp   = IW'(k);
      end
      if (c_out_valid[k] && !c_out_msg[k].is_resp && !found_req) begin
        found_req = 1'b1;
        sel_req   = IW'(k);
      end
    end
    up_fire = 1'b0;
    up_sel  = '0;
    if (found_resp && p_in_resp_ready) begin
      up_fire = 1'b1;
      up_sel  = sel_resp;
    end else if (!found_resp && found_req && p_in_req_ready) begin
      up_fire = 1'b1;
      up_sel  = sel_req;
    end
    p_in_valid     = up_fire;
    p_in_msg       = c_out_msg[up_sel];
    p_in_msg.child = child_t'(up_sel);
    for (int unsigned i = 0; i < N_CHILD; i++)
      c_out_ready[i] = up_fire && (up_sel == IW'(i));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rr_ptr <= IW'(N_CHILD - 1);
    else if (up_fire) rr_ptr <= up_sel;
  end

  // ---- downward: route by the child field
  always_comb begin
    logic dst_ready;
    dst_ready = 1'b0;
    for (int unsigned i = 0; i < N_CHILD; i++) begin
      c_in_msg[i]   = p_out_msg;
      c_in_valid[i] = 1'b0;
      if (p_out_msg.child == child_t'(i)) begin
        dst_ready = p_out_msg.is_resp ? c_in_resp_ready[i] : c_in_req_ready[i];
        c_in_valid[i] = p_out_valid && dst_ready;
      end
    end
    p_out_ready = p_out_valid && dst_ready;
  end

  a_dst_exists: assert property (@(posedge clk) disable iff (!rst_n)
    p_out_valid |-> (int'(p_out_msg.child) < N_CHILD));
endmodule
