// msg_fifo: coherence message FIFO that lets responses overtake requests.
//
// Two FIFOs sit side by side, one for requests and one for responses. An
// incoming message goes to the one its is_resp bit selects; the output shows
// the oldest response if there is any, otherwise the oldest request. Letting
// responses pass requests is what keeps the MSI protocol free of deadlock: a
// parent blocked on a request can still see the downgrade responses it waits
// for, and a cache can always see the answer to its upgrade request.
//
// Interface: in_valid/in_msg with separate in_req_ready and in_resp_ready
// (so that a sender can decide what to send without a combinational path
// through the FIFO), out_valid/out_msg/out_ready. Timing: one cycle from
// enqueue to the output. The split is the document's message FIFO; the
// depth is this design's own choice.
module msg_fifo
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cache_msg_t in_msg,
  output logic       in_req_ready,
  output logic       in_resp_ready,
  output logic       out_valid,
  output cache_msg_t out_msg,
  input  logic       out_ready
);
  logic       req_ov, resp_ov, req_or, resp_or;
  cache_msg_t req_od, resp_od;

  sync_fifo #(.T(cache_msg_t), .DEPTH(DEPTH)) u_req (
    .clk, .rst_n,
    .in_valid (in_valid && !in_msg.is_resp),
    .in_ready (in_req_ready),
    .in_data  (in_msg),
    .out_valid(req_ov),
    .out_ready(req_or),
    .out_data (req_od)
  );

  sync_fifo #(.T(cache_msg_t), .DEPTH(DEPTH)) u_resp (
    .clk, .rst_n,
    .in_valid (in_valid && in_msg.is_resp),
    .in_ready (in_resp_ready),
    .in_data  (in_msg),
    .out_valid(resp_ov),
    .out_ready(resp_or),
    .out_data (resp_od)
  );

  assign out_valid = resp_ov || req_ov;
  assign out_msg   = resp_ov ? resp_od : req_od;
  assign resp_or   = out_ready && resp_ov;
  assign req_or    = out_ready && !resp_ov;

  a_no_lost_msg: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (in_msg.is_resp ? in_resp_ready : in_req_ready));
endmodule
