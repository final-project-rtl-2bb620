// ppp: parent protocol processor, the directory that keeps the L1 data caches
// coherent under MSI and owns the path to main memory.
//
// For every child cache and every cache row it records the tag that child
// holds there and the child's MSI state. A line address that does not match
// the recorded tag is in state I for that child. Because every child is a
// direct-mapped cache with the same number of rows, this directory is exact.
//
// Incoming messages are taken from one FIFO that lets responses overtake
// requests (msg_fifo):
//  * A response (a child reporting a downgrade or an eviction) is always
//    taken: the directory entry is updated and, if the response carries a
//    dirty line, the line is written back to main memory.
//  * A request (child c wants line a in state y) is served when every other
//    child's state is compatible with y (y=M needs all others in I; y=S needs
//    no other in M). If c held the line in I the line is read from memory and
//    sent with the grant, otherwise the grant carries no data (an S->M
//    upgrade). If some other child is incompatible, one downgrade request is
//    sent to each such child (to I for y=M, to S for y=S) and the request
//    stays at the head of the FIFO until the responses make it compatible.
// The processor is blocking: one request at a time.
//
// Interface: the head of the incoming FIFO (in_valid/in_msg/in_ready), the
// parent's outgoing FIFO (out_valid/out_msg with per-kind readies) and a
// WideMem port (mem_req_*, mem_resp_*). Timing: a grant without data leaves
// the cycle after the request reaches the head; with data it leaves the cycle
// after memory answers. The MSI rules are the document's protocol; the
// directory organisation and the timing are this design's own.
module ppp
  import mc_pkg::*;
#(
  parameter int unsigned N_CHILD = 2,
  parameter int unsigned ROWS    = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  // incoming messages from the children
  input  logic       in_valid,
  input  cache_msg_t in_msg,
  output logic       in_ready,
  // outgoing messages to the children
  output logic       out_valid,
  output cache_msg_t out_msg,
  input  logic       out_req_ready,
  input  logic       out_resp_ready,
  // WideMem
  output logic       mem_req_valid,
  output wide_req_t  mem_req,
  input  logic       mem_req_ready,
  input  logic       mem_resp_valid,
  input  line_t      mem_resp,
  output logic       mem_resp_ready
);
  localparam int unsigned IDX_W = $clog2(ROWS);
  localparam int unsigned TAG_W = ADDR_W - LINE_OFF_W - IDX_W;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  typedef enum logic [1:0] {
    P_IDLE,      // take responses, evaluate the request at the head
    P_MEM_REQ,   // issue the memory read for a grant with data
    P_MEM_WAIT,  // wait for the line
    P_GRANT      // send the grant with data
  } pstate_t;

  msi_t dir_st  [N_CHILD][ROWS];
  tag_t dir_tag [N_CHILD][ROWS];
  logic [N_CHILD-1:0] dg_sent;   // downgrade already sent for the head request

  pstate_t    ps;
  cache_msg_t cur;               // request being granted with data
  line_t      cur_line;

  function automatic idx_t idx_of(addr_t a);
    return a[LINE_OFF_W +: IDX_W];
  endfunction
  function automatic tag_t tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  // state of child j for the line of the head message
  msi_t child_st [N_CHILD];
  always_comb begin
    for (int unsigned j = 0; j < N_CHILD; j++)
      child_st[j] = (dir_tag[j][idx_of(in_msg.addr)] == tag_of(in_msg.addr))
                    ? dir_st[j][idx_of(in_msg.addr)] : MSI_I;
  end

  // compatibility of the head request with the other children
  logic [N_CHILD-1:0] incompat;
  always_comb begin
    for (int unsigned j = 0; j < N_CHILD; j++) begin
      if (child_t'(j) == in_msg.child)
        incompat[j] = 1'b0;
      else if (in_msg.state == MSI_M)
        incompat[j] = (child_st[j] != MSI_I);
      else
        incompat[j] = (child_st[j] == MSI_M);
    end
  end

  // first incompatible child not yet asked to downgrade
  logic          need_dg;
  logic [CHILD_W-1:0] dg_child;
  always_comb begin
    need_dg  = 1'b0;
    dg_child = '0;
    for (int j = N_CHILD - 1; j >= 0; j--) begin
      if (incompat[j] && !dg_sent[j]) begin
        need_dg  = 1'b1;
        dg_child = child_t'(j);
      end
    end
  end

  localparam int unsigned CW = (N_CHILD > 1) ? $clog2(N_CHILD) : 1;
  logic [CW-1:0] ci;   // requesting / responding child as an array index
  assign ci = CW'(in_msg.child);

  logic req_own_i;
  assign req_own_i = (child_st[ci] == MSI_I);

  // ---- one action per cycle
  ppp_act_t act;

  always_comb begin
    act = PPP_NONE;
    if (ps == P_IDLE && in_valid) begin
      if (in_msg.is_resp) begin
        if (!in_msg.has_data || mem_req_ready) act = PPP_RESP;
      end else if (incompat != '0) begin
        if (need_dg && out_req_ready) act = PPP_DOWNGRADE;
      end else if (req_own_i) begin
        act = PPP_START_READ;
      end else if (out_resp_ready) begin
        act = PPP_GRANT_NODATA;
      end
    end
  end

  always_comb begin
    in_ready       = (act == PPP_RESP) || (act == PPP_GRANT_NODATA) || (act == PPP_START_READ);
    mem_req_valid  = 1'b0;
    mem_req        = '0;
    mem_req.addr   = line_addr(in_msg.addr);
    mem_req.data   = in_msg.data;
    // the write-back is offered whenever a dirty response is at the head, so
    // that mem_req_valid never waits for mem_req_ready
    if (ps == P_IDLE && in_valid && in_msg.is_resp && in_msg.has_data) begin
      mem_req_valid = 1'b1;
      mem_req.wr_en = '1;
    end else if (ps == P_MEM_REQ) begin
      mem_req_valid = 1'b1;
      mem_req.addr  = line_addr(cur.addr);
      mem_req.wr_en = '0;
    end
    mem_resp_ready = (ps == P_MEM_WAIT);

    out_valid = 1'b0;
    out_msg   = '0;
    if (act == PPP_DOWNGRADE) begin
      out_valid        = 1'b1;
      out_msg.is_resp  = 1'b0;
      out_msg.child    = dg_child;
      out_msg.addr     = line_addr(in_msg.addr);
      out_msg.state    = (in_msg.state == MSI_M) ? MSI_I : MSI_S;
    end else if (act == PPP_GRANT_NODATA) begin
      out_valid        = 1'b1;
      out_msg.is_resp  = 1'b1;
      out_msg.child    = in_msg.child;
      out_msg.addr     = line_addr(in_msg.addr);
      out_msg.state    = in_msg.state;
    end else if (ps == P_GRANT && out_resp_ready) begin
      out_valid        = 1'b1;
      out_msg.is_resp  = 1'b1;
      out_msg.child    = cur.child;
      out_msg.addr     = line_addr(cur.addr);
      out_msg.state    = cur.state;
      out_msg.has_data = 1'b1;
      out_msg.data     = cur_line;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ps      <= P_IDLE;
      dg_sent <= '0;
      for (int unsigned j = 0; j < N_CHILD; j++)
        for (int unsigned r = 0; r < ROWS; r++) begin
          dir_st[j][r]  <= MSI_I;
          dir_tag[j][r] <= '0;
        end
    end else begin
      unique case (act)
        PPP_RESP: begin
          dir_st[ci][idx_of(in_msg.addr)]  <= in_msg.state;
          dir_tag[ci][idx_of(in_msg.addr)] <= tag_of(in_msg.addr);
        end
        PPP_DOWNGRADE: dg_sent[CW'(dg_child)] <= 1'b1;
        PPP_GRANT_NODATA, PPP_START_READ: begin
          dir_st[ci][idx_of(in_msg.addr)]  <= in_msg.state;
          dir_tag[ci][idx_of(in_msg.addr)] <= tag_of(in_msg.addr);
          dg_sent <= '0;
        end
        default: ;
      endcase
      unique case (ps)
        P_IDLE:     if (act == PPP_START_READ) ps <= P_MEM_REQ;
        P_MEM_REQ:  if (mem_req_ready) ps <= P_MEM_WAIT;
        P_MEM_WAIT: if (mem_resp_valid) ps <= P_GRANT;
        P_GRANT:    if (out_resp_ready) ps <= P_IDLE;
        default:    ps <= P_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (act == PPP_START_READ) cur <= in_msg;
    if (ps == P_MEM_WAIT && mem_resp_valid) cur_line <= mem_resp;
  end

  // a child only asks for more rights than the directory says it has
  a_upgrade_only: assert property (@(posedge clk) disable iff (!rst_n)
    (ps == P_IDLE && in_valid && !in_msg.is_resp) |-> (child_st[ci] < in_msg.state));
endmodule
