// nbcache: non-blocking, MSI-coherent L1 data cache with a store queue, a
// load buffer and load-linked / store-conditional support.
//
// Organisation: ROWS direct-mapped lines of LINE_WORDS words. Each row holds
// a tag, an MSI state, a "waiting for parent" bit and the line.
//
// Requests from the core (nb_req_t) carry a request id; responses
// (nb_resp_t) return that id and may come back out of order.
//  * Load / load-linked: answered at once from the youngest matching store in
//    the store queue (bypass) or from a hit (state S or M). A miss is parked
//    in the load buffer and answered when its line arrives, while later hits
//    keep being served (hit under miss).
//  * Store: written straight into the line when the store queue is empty and
//    the line is in M; otherwise appended to the store queue. Stores get no
//    response.
//  * Store-conditional: checked first against the link address register. No
//    match: dropped, and 0 is queued as its response. Match: handled like a
//    store; if it can be written at once (queue empty, line in M) it also
//    answers 1. A store-conditional that reaches the head of the store queue
//    is checked against the link again before it may write or ask for M:
//    on a mismatch it answers 0, on a write it answers 1. Every
//    store-conditional clears the link when it completes.
//  * The link address register (valid bit + line address) is set when a
//    load-linked returns its value, and cleared when the linked line leaves
//    the cache (replacement or a downgrade to I).
// Coherence: a miss (load needs S, store-queue head needs M) first evicts the
// line in the row if it holds another tag (a response to the parent, with
// the line if it was M), then sends an upgrade request and sets the row's
// wait bit. The parent's grant fills the row. A downgrade request from the
// parent is answered with the new state (and the line if it was M) when the
// row holds that line with more rights, and ignored otherwise.
//
// Scheduling: one action per cycle, in this priority: install a grant,
// answer a load-buffer entry whose line is present, retire the store-queue
// head, answer a downgrade, send an eviction or upgrade request, accept a
// new core request. Serving waiting loads and the store-queue head before a
// downgrade means a granted line is always used once before it is taken
// away, so two caches cannot take a line from each other forever.
//
// Interface: core side req_*/resp_* valid/ready; parent side, the input of
// the outgoing message FIFO (tp_*, with per-kind readies) and the head of
// the incoming message FIFO (fp_*). Timing: a hit or bypass is answered the
// cycle after it is accepted (through a 2-entry response queue).
// The LL/SC behaviour, the store queue with load bypass and the MSI upgrade /
// downgrade behaviour are the document's; the sizes, the direct-mapped
// organisation and the one-action-per-cycle schedule are this design's own.
module nbcache
  import mc_pkg::*;
#(
  parameter int unsigned ROWS     = 16,
  parameter int unsigned SQ_DEPTH = 8,
  parameter int unsigned LB_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // core side
  input  logic       req_valid,
  input  nb_req_t    req,
  output logic       req_ready,
  output logic       resp_valid,
  output nb_resp_t   resp,
  input  logic       resp_ready,
  // to the parent: input of the outgoing message FIFO
  output logic       tp_valid,
  output cache_msg_t tp_msg,
  input  logic       tp_req_ready,
  input  logic       tp_resp_ready,
  // from the parent: head of the incoming message FIFO
  input  logic       fp_valid,
  input  cache_msg_t fp_msg,
  output logic       fp_ready,
  // link address register, for observation
  output logic       link_valid,
  output addr_t      link_line
);
  localparam int unsigned IDX_W = $clog2(ROWS);
  localparam int unsigned TAG_W = ADDR_W - LINE_OFF_W - IDX_W;
  localparam int unsigned SQ_W  = $clog2(SQ_DEPTH);
  localparam int unsigned LB_W  = $clog2(LB_DEPTH);

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  function automatic idx_t idx_of(addr_t a);
    return a[LINE_OFF_W +: IDX_W];
  endfunction
  function automatic tag_t tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  // ---------------------------------------------------------------- storage
  msi_t  st    [ROWS];
  tag_t  tags  [ROWS];
  logic  waitp [ROWS];
  line_t lines [ROWS];

  // store queue (circular)
  logic  sq_sc   [SQ_DEPTH];
  addr_t sq_addr [SQ_DEPTH];
  data_t sq_data [SQ_DEPTH];
  rid_t  sq_rid  [SQ_DEPTH];
  logic [SQ_W-1:0] sq_head, sq_tail;
  logic [SQ_W:0]   sq_count;

  // load buffer
  logic  lb_v    [LB_DEPTH];
  logic  lb_lr   [LB_DEPTH];
  addr_t lb_addr [LB_DEPTH];
  rid_t  lb_rid  [LB_DEPTH];

  // ---------------------------------------------------------------- lookups
  function automatic logic hit_s(addr_t a);
    return tags[idx_of(a)] == tag_of(a) && st[idx_of(a)] != MSI_I;
  endfunction
  function automatic logic hit_m(addr_t a);
    return tags[idx_of(a)] == tag_of(a) && st[idx_of(a)] == MSI_M;
  endfunction
  function automatic logic link_match(addr_t a);
    return link_valid && link_line == line_addr(a);
  endfunction
  function automatic data_t read_word(addr_t a);
    return get_word(lines[idx_of(a)], word_sel(a));
  endfunction

  // response queue
  logic     rq_in_valid, rq_in_ready;
  nb_resp_t rq_in;

  sync_fifo #(.T(nb_resp_t), .DEPTH(2)) u_respq (
    .clk, .rst_n,
    .in_valid (rq_in_valid),
    .in_ready (rq_in_ready),
    .in_data  (rq_in),
    .out_valid(resp_valid),
    .out_ready(resp_ready),
    .out_data (resp)
  );

  // store-queue head
  logic [SQ_W-1:0] h;
  logic sq_empty, sq_full;
  assign h        = sq_head;
  assign sq_empty = (sq_count == 0);
  assign sq_full  = (sq_count == (SQ_W+1)'(SQ_DEPTH));

  // load buffer: an entry whose line is present, one that still needs a
  // request to the parent, and a free slot
  logic lb_srv_found, lb_miss_found, lb_free_found;
  logic [LB_W-1:0] lb_srv_i, lb_miss_i, lb_free_i;
  always_comb begin
    lb_srv_found  = 1'b0;
    lb_miss_found = 1'b0;
    lb_free_found = 1'b0;
    lb_srv_i      = '0;
    lb_miss_i     = '0;
    lb_free_i     = '0;
    for (int i = LB_DEPTH - 1; i >= 0; i--) begin
      if (lb_v[i] && hit_s(lb_addr[i])) begin
        lb_srv_found = 1'b1;
        lb_srv_i     = LB_W'(i);
      end
      if (lb_v[i] && !hit_s(lb_addr[i]) && !waitp[idx_of(lb_addr[i])]) begin
        lb_miss_found = 1'b1;
        lb_miss_i     = LB_W'(i);
      end
      if (!lb_v[i]) begin
        lb_free_found = 1'b1;
        lb_free_i     = LB_W'(i);
      end
    end
  end

  // store-queue search for a load: youngest entry with the same word address
  logic bp_found, bp_is_sc;
  data_t bp_data;
  always_comb begin
    logic [SQ_W-1:0] p;
    bp_found = 1'b0;
    bp_is_sc = 1'b0;
    bp_data  = '0;
    for (int unsigned n = 0; n < SQ_DEPTH; n++) begin
      p = SQ_W'(sq_head + SQ_W'(n));      // oldest first; later matches win
      if ((SQ_W+1)'(n) < sq_count && sq_addr[p][ADDR_W-1:2] == req.addr[ADDR_W-1:2]) begin
        bp_found = 1'b1;
        bp_is_sc = sq_sc[p];
        bp_data  = sq_data[p];
      end
    end
  end

  // ---------------------------------------------------------------- actions

  nbc_act_t act;
  addr_t miss_addr;     // line wanted by a miss action
  msi_t  miss_state;
  logic  miss_valid;

  always_comb begin
    // which miss, if any, may be sent now
    miss_valid = 1'b0;
    miss_addr  = '0;
    miss_state = MSI_S;
    if (lb_miss_found) begin
      miss_valid = 1'b1;
      miss_addr  = lb_addr[lb_miss_i];
      miss_state = MSI_S;
    end else if (!sq_empty && !hit_m(sq_addr[h]) && !waitp[idx_of(sq_addr[h])] &&
                 !(sq_sc[h] && !link_match(sq_addr[h]))) begin
      miss_valid = 1'b1;
      miss_addr  = sq_addr[h];
      miss_state = MSI_M;
    end

    act = NBC_NONE;
    if (fp_valid && fp_msg.is_resp) begin
      act = NBC_FILL;
    end else if (lb_srv_found && rq_in_ready) begin
      act = NBC_LB_SERVE;
    end else if (!sq_empty && sq_sc[h] && !link_match(sq_addr[h]) && rq_in_ready) begin
      act = NBC_SQ_SCFAIL;
    end else if (!sq_empty && hit_m(sq_addr[h]) && (!sq_sc[h] || rq_in_ready)) begin
      act = NBC_SQ_WRITE;
    end else if (fp_valid && !fp_msg.is_resp &&
                 !(tags[idx_of(fp_msg.addr)] == tag_of(fp_msg.addr) &&
                   st[idx_of(fp_msg.addr)] > fp_msg.state)) begin
      act = NBC_DG_IGNORE;
    end else if (fp_valid && !fp_msg.is_resp && tp_resp_ready) begin
      act = NBC_DG;
    end else if (miss_valid && tags[idx_of(miss_addr)] != tag_of(miss_addr) &&
                 st[idx_of(miss_addr)] != MSI_I) begin
      if (tp_resp_ready) act = NBC_EVICT;
    end else if (miss_valid) begin
      if (tp_req_ready) act = NBC_UPREQ;
    end
    if (act == NBC_NONE && req_valid) begin
      unique case (req.op)
        OP_LD, OP_LR: begin
          if (bp_found) begin
            if (!bp_is_sc && rq_in_ready) act = NBC_LD_BYPASS;
          end else if (hit_s(req.addr)) begin
            if (rq_in_ready) act = NBC_LD_HIT;
          end else if (lb_free_found) begin
            act = NBC_LD_MISS;
          end
        end
        OP_ST: begin
          if (sq_empty && hit_m(req.addr)) act = NBC_ST_HIT;
          else if (!sq_full)              act = NBC_ST_ENQ;
        end
        OP_SC: begin
          if (!link_match(req.addr)) begin
            if (rq_in_ready) act = NBC_SC_FAIL;
          end else if (sq_empty && hit_m(req.addr)) begin
            if (rq_in_ready) act = NBC_ST_HIT;
          end else if (!sq_full) begin
            act = NBC_ST_ENQ;
          end
        end
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs
  idx_t ev_idx, fp_idx;
  assign ev_idx = idx_of(miss_addr);
  assign fp_idx = idx_of(fp_msg.addr);

  always_comb begin
    req_ready = act inside {NBC_LD_BYPASS, NBC_LD_HIT, NBC_LD_MISS, NBC_ST_HIT, NBC_ST_ENQ, NBC_SC_FAIL};
    fp_ready  = act inside {NBC_FILL, NBC_DG, NBC_DG_IGNORE};

    rq_in_valid = 1'b0;
    rq_in       = '0;
    unique case (act)
      NBC_LB_SERVE: begin
        rq_in_valid = 1'b1;
        rq_in.data  = read_word(lb_addr[lb_srv_i]);
        rq_in.rid   = lb_rid[lb_srv_i];
      end
      NBC_SQ_WRITE: begin
        rq_in_valid = sq_sc[h];
        rq_in.data  = data_t'(1);
        rq_in.rid   = sq_rid[h];
      end
      NBC_SQ_SCFAIL: begin
        rq_in_valid = 1'b1;
        rq_in.data  = '0;
        rq_in.rid   = sq_rid[h];
      end
      NBC_LD_BYPASS: begin
        rq_in_valid = 1'b1;
        rq_in.data  = bp_data;
        rq_in.rid   = req.rid;
      end
      NBC_LD_HIT: begin
        rq_in_valid = 1'b1;
        rq_in.data  = read_word(req.addr);
        rq_in.rid   = req.rid;
      end
      NBC_ST_HIT: begin
        rq_in_valid = (req.op == OP_SC);
        rq_in.data  = data_t'(1);
        rq_in.rid   = req.rid;
      end
      NBC_SC_FAIL: begin
        rq_in_valid = 1'b1;
        rq_in.data  = '0;
        rq_in.rid   = req.rid;
      end
      default: ;
    endcase

    tp_valid = 1'b0;
    tp_msg   = '0;
    unique case (act)
      NBC_DG: begin
        tp_valid         = 1'b1;
        tp_msg.is_resp   = 1'b1;
        tp_msg.addr      = line_addr(fp_msg.addr);
        tp_msg.state     = fp_msg.state;
        tp_msg.has_data  = (st[fp_idx] == MSI_M);
        tp_msg.data      = lines[fp_idx];
      end
      NBC_EVICT: begin
        tp_valid         = 1'b1;
        tp_msg.is_resp   = 1'b1;
        tp_msg.addr      = {tags[ev_idx], ev_idx, {LINE_OFF_W{1'b0}}};
        tp_msg.state     = MSI_I;
        tp_msg.has_data  = (st[ev_idx] == MSI_M);
        tp_msg.data      = lines[ev_idx];
      end
      NBC_UPREQ: begin
        tp_valid         = 1'b1;
        tp_msg.is_resp   = 1'b0;
        tp_msg.addr      = line_addr(miss_addr);
        tp_msg.state     = miss_state;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < ROWS; r++) begin
        st[r]    <= MSI_I;
        tags[r]  <= '0;
        waitp[r] <= 1'b0;
      end
      for (int unsigned i = 0; i < LB_DEPTH; i++) lb_v[i] <= 1'b0;
      sq_head    <= '0;
      sq_tail    <= '0;
      sq_count   <= '0;
      link_valid <= 1'b0;
      link_line  <= '0;
    end else begin
      unique case (act)
        NBC_FILL: begin
          st[fp_idx]    <= fp_msg.state;
          tags[fp_idx]  <= tag_of(fp_msg.addr);
          waitp[fp_idx] <= 1'b0;
        end
        NBC_LB_SERVE: begin
          lb_v[lb_srv_i] <= 1'b0;
          if (lb_lr[lb_srv_i]) begin
            link_valid <= 1'b1;
            link_line  <= line_addr(lb_addr[lb_srv_i]);
          end
        end
        NBC_SQ_WRITE, NBC_SQ_SCFAIL: begin
          sq_head  <= SQ_W'(sq_head + 1'b1);
          sq_count <= sq_count - 1'b1;
          if (sq_sc[h]) link_valid <= 1'b0;
        end
        NBC_DG: begin
          st[fp_idx] <= fp_msg.state;
          if (fp_msg.state == MSI_I && link_match(fp_msg.addr)) link_valid <= 1'b0;
        end
        NBC_EVICT: begin
          st[ev_idx] <= MSI_I;
          if (link_valid && link_line == {tags[ev_idx], ev_idx, {LINE_OFF_W{1'b0}}})
            link_valid <= 1'b0;
        end
        NBC_UPREQ: begin
          tags[ev_idx]  <= tag_of(miss_addr);
          waitp[ev_idx] <= 1'b1;
        end
        NBC_LD_BYPASS, NBC_LD_HIT: begin
          if (req.op == OP_LR) begin
            link_valid <= 1'b1;
            link_line  <= line_addr(req.addr);
          end
        end
        NBC_LD_MISS: begin
          lb_v[lb_free_i]    <= 1'b1;
          lb_lr[lb_free_i]   <= (req.op == OP_LR);
          lb_addr[lb_free_i] <= req.addr;
          lb_rid[lb_free_i]  <= req.rid;
        end
        NBC_ST_HIT: begin
          if (req.op == OP_SC) link_valid <= 1'b0;
        end
        NBC_ST_ENQ: begin
          sq_sc[sq_tail]   <= (req.op == OP_SC);
          sq_addr[sq_tail] <= req.addr;
          sq_data[sq_tail] <= req.data;
          sq_rid[sq_tail]  <= req.rid;
          sq_tail  <= SQ_W'(sq_tail + 1'b1);
          sq_count <= sq_count + 1'b1;
        end
        NBC_SC_FAIL: link_valid <= 1'b0;
        default: ;
      endcase
    end
  end

  // the line array has a single write port: a fill or one store word
  always_ff @(posedge clk) begin
    if (act == NBC_FILL && fp_msg.has_data)
      lines[fp_idx] <= fp_msg.data;
    else if (act == NBC_SQ_WRITE)
      lines[idx_of(sq_addr[h])] <= put_word(lines[idx_of(sq_addr[h])], word_sel(sq_addr[h]), sq_data[h]);
    else if (act == NBC_ST_HIT)
      lines[idx_of(req.addr)] <= put_word(lines[idx_of(req.addr)], word_sel(req.addr), req.data);
  end

  // ---------------------------------------------------------------- checks
  // memory is only updated by a store-conditional whose link still holds
  a_sc_needs_link: assert property (@(posedge clk) disable iff (!rst_n)
    (act == NBC_SQ_WRITE && sq_sc[h]) |-> link_match(sq_addr[h]));
  // a grant without data only upgrades a line the row already holds
  a_fill_has_line: assert property (@(posedge clk) disable iff (!rst_n)
    (act == NBC_FILL && !fp_msg.has_data) |-> (tags[fp_idx] == tag_of(fp_msg.addr) && st[fp_idx] == MSI_S));
  // a response is only pushed when the response queue has room
  a_respq_room: assert property (@(posedge clk) disable iff (!rst_n)
    rq_in_valid |-> rq_in_ready);
endmodule
