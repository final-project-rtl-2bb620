// icache: per-core non-blocking instruction cache.
//
// A direct-mapped, read-only cache of ROWS lines. The core sends word
// addresses and gets the instruction words back in the same order. Accepted
// fetches wait in a queue of QDEPTH entries, and the entry at the head is
// answered as soon as its line is present. A hit that finds the queue empty
// skips it and is answered the cycle after it is accepted. Fetches behind a miss are still accepted,
// and their misses are sent to memory while the first one is outstanding
// (misses under a miss). A row has at most one line read in flight; a
// fetch whose row is already being filled with another line waits for that
// fill to land before it asks for its own. Instructions are never written,
// so the cache takes no part in the data-cache coherence protocol.
//
// Interface: req_valid/req_addr/req_ready, resp_valid/resp_data/resp_ready
// (answers in order, through a 2-entry queue), and a WideMem read port
// whose answers come back in request order. The document gives the
// instruction caches as non-blocking caches in front of main memory; their
// organisation here is this design's own.
module icache
  import mc_pkg::*;
#(
  parameter int unsigned ROWS   = 16,
  parameter int unsigned QDEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  input  addr_t     req_addr,
  output logic      req_ready,
  output logic      resp_valid,
  output data_t     resp_data,
  input  logic      resp_ready,
  output logic      mem_req_valid,
  output wide_req_t mem_req,
  input  logic      mem_req_ready,
  input  logic      mem_resp_valid,
  input  line_t     mem_resp,
  output logic      mem_resp_ready
);
  localparam int unsigned IDX_W = $clog2(ROWS);
  localparam int unsigned TAG_W = ADDR_W - LINE_OFF_W - IDX_W;
  localparam int unsigned QW    = $clog2(QDEPTH);

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  function automatic idx_t idx_of(addr_t a);
    return a[LINE_OFF_W +: IDX_W];
  endfunction
  function automatic tag_t tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  logic  vld   [ROWS];
  tag_t  tags  [ROWS];
  logic  pend  [ROWS];      // a line read for this row is in flight
  line_t lines [ROWS];

  // fetch queue (circular, oldest at q_head)
  addr_t        q_addr [QDEPTH];
  logic         q_asked[QDEPTH];  // its line read has been sent
  logic [QW-1:0] q_head, q_tail;
  logic [QW:0]   q_count;

  // line reads in flight, in order: which row each fills
  logic fl_in_valid, fl_in_ready, fl_out_valid;
  idx_t fl_out;
  tag_t fl_tag_out;
  sync_fifo #(.T(logic [IDX_W+TAG_W-1:0]), .DEPTH(QDEPTH)) u_fills (
    .clk, .rst_n,
    .in_valid (fl_in_valid),
    .in_ready (fl_in_ready),
    .in_data  ({idx_of(mem_req.addr), tag_of(mem_req.addr)}),
    .out_valid(fl_out_valid),
    .out_ready(mem_resp_valid && mem_resp_ready),
    .out_data ({fl_out, fl_tag_out})
  );

  function automatic logic present(addr_t a);
    return vld[idx_of(a)] && tags[idx_of(a)] == tag_of(a);
  endfunction

  // answer queue
  logic  rq_in_valid, rq_in_ready;
  data_t rq_in_data;
  sync_fifo #(.T(data_t), .DEPTH(2)) u_respq (
    .clk, .rst_n,
    .in_valid (rq_in_valid),
    .in_ready (rq_in_ready),
    .in_data  (rq_in_data),
    .out_valid(resp_valid),
    .out_ready(resp_ready),
    .out_data (resp_data)
  );

  // the oldest queued fetch that still needs a line read
  logic          miss_found;
  logic [QW-1:0] miss_i;
  always_comb begin
    logic [QW-1:0] p;
    miss_found = 1'b0;
    miss_i     = '0;
    for (int n = QDEPTH - 1; n >= 0; n--) begin
      p = QW'(q_head + QW'(n));
      if ((QW+1)'(n) < q_count && !q_asked[p] && !present(q_addr[p]) &&
          !pend[idx_of(q_addr[p])]) begin
        miss_found = 1'b1;
        miss_i     = p;
      end
    end
  end

  // A hit that finds the queue empty is answered directly, without passing
  // through the queue.
  logic req_hit, do_direct, do_enq, do_serve;
  assign req_hit        = present(req_addr);
  assign do_serve       = (q_count != 0) && present(q_addr[q_head]) && rq_in_ready;
  assign do_direct      = req_valid && (q_count == 0) && req_hit && rq_in_ready;
  assign req_ready      = (q_count < (QW+1)'(QDEPTH)) && (q_count != 0 || !req_hit || rq_in_ready);
  assign do_enq         = req_valid && req_ready && !do_direct;
  assign rq_in_valid    = do_serve || do_direct;
  assign rq_in_data     = do_direct ? get_word(lines[idx_of(req_addr)], word_sel(req_addr))
                                    : get_word(lines[idx_of(q_addr[q_head])], word_sel(q_addr[q_head]));
  assign mem_req_valid  = miss_found && fl_in_ready;
  assign fl_in_valid    = mem_req_valid && mem_req_ready;
  assign mem_resp_ready = fl_out_valid;

  always_comb begin
    mem_req      = '0;
    mem_req.addr = line_addr(q_addr[miss_i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_head  <= '0;
      q_tail  <= '0;
      q_count <= '0;
      for (int unsigned r = 0; r < ROWS; r++) begin
        vld[r]  <= 1'b0;
        pend[r] <= 1'b0;
      end
    end else begin
      if (do_enq) begin
        q_addr[q_tail]  <= req_addr;
        q_asked[q_tail] <= 1'b0;
        q_tail <= QW'(q_tail + 1'b1);
      end
      if (do_serve) q_head <= QW'(q_head + 1'b1);
      q_count <= q_count + (QW+1)'(do_enq) - (QW+1)'(do_serve);
      if (fl_in_valid) begin
        pend[idx_of(q_addr[miss_i])] <= 1'b1;
        // every queued fetch of this line is covered by the read
        for (int unsigned i = 0; i < QDEPTH; i++)
          if (line_addr(q_addr[i]) == line_addr(q_addr[miss_i])) q_asked[i] <= 1'b1;
      end
      if (mem_resp_valid && mem_resp_ready) begin
        pend[fl_out] <= 1'b0;
        vld[fl_out]  <= 1'b1;
        tags[fl_out] <= fl_tag_out;
        // fetches of the line that was replaced must ask again
        for (int unsigned i = 0; i < QDEPTH; i++)
          if (idx_of(q_addr[i]) == fl_out && tag_of(q_addr[i]) != fl_tag_out) q_asked[i] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (mem_resp_valid && mem_resp_ready) lines[fl_out] <= mem_resp;
  end

  a_resp_room: assert property (@(posedge clk) disable iff (!rst_n)
    rq_in_valid |-> rq_in_ready);
  a_answer_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> fl_out_valid);
endmodule
