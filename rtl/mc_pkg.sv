// mc_pkg: types and constants shared by the two-core non-blocking cache
// hierarchy.
//
// The core talks to its data cache with nb_req_t / nb_resp_t: an operation
// (load, store, load-linked, store-conditional), a word address, store data
// and a request id that the response carries back so that responses may
// return out of order. Caches and the parent protocol processor exchange
// cache_msg_t coherence messages (MSI upgrade requests, downgrade requests
// and their responses, with an optional whole cache line). Main memory is
// reached through a WideMem port that moves whole lines.
//
// The operation set and the MSI states follow the document; widths (32-bit
// SMIPS addresses and data, 16-word lines, 4-bit request ids) are this
// design's own choices.
package mc_pkg;

  parameter int unsigned ADDR_W     = 32;
  parameter int unsigned DATA_W     = 32;
  parameter int unsigned LINE_WORDS = 16;
  parameter int unsigned LINE_W     = DATA_W * LINE_WORDS;
  parameter int unsigned WORD_OFF_W = $clog2(LINE_WORDS);
  parameter int unsigned LINE_OFF_W = WORD_OFF_W + 2;   // byte offset in a line
  parameter int unsigned RID_W      = 4;
  parameter int unsigned CHILD_W    = 2;                // up to 4 L1 data caches

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [RID_W-1:0]  rid_t;
  typedef logic [CHILD_W-1:0] child_t;

  // Coherence states, ordered so that a larger value grants more rights.
  typedef enum logic [1:0] {
    MSI_I = 2'd0,
    MSI_S = 2'd1,
    MSI_M = 2'd2
  } msi_t;

  typedef enum logic [1:0] {
    OP_LD = 2'd0,   // load
    OP_ST = 2'd1,   // store (no response)
    OP_LR = 2'd2,   // load-linked
    OP_SC = 2'd3    // store-conditional (responds 1 on success, 0 on failure)
  } mem_op_t;

  typedef struct packed {
    mem_op_t op;
    addr_t   addr;
    data_t   data;
    rid_t    rid;
  } nb_req_t;

  typedef struct packed {
    data_t data;
    rid_t  rid;
  } nb_resp_t;

  // One coherence message. is_resp=0: a request (child->parent: upgrade to
  // `state`; parent->child: downgrade to `state`). is_resp=1: a response
  // (child->parent: now at `state`, with the dirty line if has_data;
  // parent->child: granted `state`, with the line if has_data).
  typedef struct packed {
    logic   is_resp;
    child_t child;
    addr_t  addr;
    msi_t   state;
    logic   has_data;
    line_t  data;
  } cache_msg_t;

  // WideMem request: a read when wr_en is all zero, otherwise a write of the
  // enabled words of a whole line. Only reads are answered.
  typedef struct packed {
    logic [LINE_WORDS-1:0] wr_en;
    addr_t                 addr;
    line_t                 data;
  } wide_req_t;

  // Action taken by an L1 data cache in a cycle (see nbcache).
  typedef enum logic [3:0] {
    NBC_NONE,
    NBC_FILL,        // install a grant from the parent
    NBC_LB_SERVE,    // answer a waiting load
    NBC_SQ_WRITE,    // store-queue head writes (store-conditional answers 1)
    NBC_SQ_SCFAIL,   // store-queue head is a store-conditional with a broken link
    NBC_DG,          // answer a downgrade request
    NBC_DG_IGNORE,   // downgrade for a line we no longer hold with more rights
    NBC_EVICT,       // send the row's old line away before a miss request
    NBC_UPREQ,       // upgrade request to the parent
    NBC_LD_BYPASS,   // new load answered from the store queue
    NBC_LD_HIT,      // new load answered from the cache
    NBC_LD_MISS,     // new load parked in the load buffer
    NBC_ST_HIT,      // new store / store-conditional written at once
    NBC_ST_ENQ,      // new store / store-conditional appended to the store queue
    NBC_SC_FAIL      // new store-conditional without a matching link
  } nbc_act_t;

  // Action taken by the parent protocol processor in a cycle (see ppp).
  typedef enum logic [2:0] {
    PPP_NONE,
    PPP_RESP,          // take a child's response (write back dirty data)
    PPP_DOWNGRADE,     // ask an incompatible child to downgrade
    PPP_GRANT_NODATA,  // grant an upgrade without data (S->M)
    PPP_START_READ     // grant that needs the line from memory
  } ppp_act_t;

  function automatic addr_t line_addr(addr_t a);
    return {a[ADDR_W-1:LINE_OFF_W], {LINE_OFF_W{1'b0}}};
  endfunction

  function automatic logic [WORD_OFF_W-1:0] word_sel(addr_t a);
    return a[LINE_OFF_W-1:2];
  endfunction

  function automatic data_t get_word(line_t l, logic [WORD_OFF_W-1:0] w);
    return l[w*DATA_W +: DATA_W];
  endfunction

  function automatic line_t put_word(line_t l, logic [WORD_OFF_W-1:0] w, data_t d);
    line_t r;
    r = l;
    r[w*DATA_W +: DATA_W] = d;
    return r;
  endfunction

endpackage
