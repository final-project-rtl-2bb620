// wide_mem_arb: shares the one WideMem main-memory port among N_PORTS
// clients (the parent protocol processor and the instruction caches).
//
// Each cycle at most one client request is passed on, picked round-robin
// starting after the client served last. For a read, the client's number is
// put in an order queue; main memory answers reads in order, so each answer
// is handed to the client at the head of that queue. Writes get no answer.
// A read is held back while the order queue is full.
//
// Interface: per-client req valid/ready and resp valid/ready, and the same on
// the memory side. Timing: combinational in both directions. The document
// connects its caches to a single WideMem interface but does not say how it
// is shared; this arbiter is this design's own.
module wide_mem_arb
  import mc_pkg::*;
#(
  parameter int unsigned N_PORTS   = 3,
  parameter int unsigned MAX_READS = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      c_req_valid    [N_PORTS],
  input  wide_req_t c_req          [N_PORTS],
  output logic      c_req_ready    [N_PORTS],
  output logic      c_resp_valid   [N_PORTS],
  output line_t     c_resp         [N_PORTS],
  input  logic      c_resp_ready   [N_PORTS],
  output logic      mem_req_valid,
  output wide_req_t mem_req,
  input  logic      mem_req_ready,
  input  logic      mem_resp_valid,
  input  line_t     mem_resp,
  output logic      mem_resp_ready
);
  localparam int unsigned PW = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;
  typedef logic [PW-1:0] port_t;

  port_t rr_ptr;
  port_t sel;
  logic  found;

  logic  oq_in_valid, oq_in_ready, oq_out_valid, oq_out_ready;
  port_t oq_out;

  sync_fifo #(.T(port_t), .DEPTH(MAX_READS)) u_order (
    .clk, .rst_n,
    .in_valid (oq_in_valid),
    .in_ready (oq_in_ready),
    .in_data  (sel),
    .out_valid(oq_out_valid),
    .out_ready(oq_out_ready),
    .out_data (oq_out)
  );

  always_comb begin
    int unsigned k;
    found = 1'b0;
    sel   = '0;
    for (int unsigned n = 1; n <= N_PORTS; n++) begin
      k = (int'(rr_ptr) + n) % N_PORTS;   // only its low bits reach the index
      if (c_req_valid[k] && !found && (c_req[k].wr_en != '0 || oq_in_ready)) begin
        found = 1'b1;
        sel   = PW'(k);
      end
    end
    mem_req_valid = found;
    mem_req       = c_req[sel];
    oq_in_valid   = found && mem_req_ready && (c_req[sel].wr_en == '0);
    for (int unsigned i = 0; i < N_PORTS; i++)
      c_req_ready[i] = found && mem_req_ready && (sel == PW'(i));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rr_ptr <= PW'(N_PORTS - 1);
    else if (found && mem_req_ready) rr_ptr <= sel;
  end

  always_comb begin
    for (int unsigned i = 0; i < N_PORTS; i++) begin
      c_resp[i]       = mem_resp;
      c_resp_valid[i] = mem_resp_valid && oq_out_valid && (oq_out == PW'(i));
    end
    mem_resp_ready = oq_out_valid && c_resp_ready[oq_out];
    oq_out_ready   = mem_resp_valid && mem_resp_ready;
  end

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> oq_out_valid);
endmodule
