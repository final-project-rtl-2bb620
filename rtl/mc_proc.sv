// mc_proc: memory system of a multicore processor built from out-of-order
// cores with non-blocking caches (the "Proc" of the design).
//
// Each of the NUM_CORES cores gets its own instruction cache (icache) and its
// own non-blocking, MSI-coherent L1 data cache with LL/SC support
// (nbcache). The data caches talk to one parent protocol processor (ppp)
// through message FIFOs (msg_fifo, one in each direction per cache and per
// parent) and a message router (msg_router). The parent and the instruction
// caches share the single WideMem main-memory port through wide_mem_arb
// (client 0 is the parent, client 1+c the instruction cache of core c).
//
//   core c --ifetch--> icache[c] --------------------------+
//   core c --ld/st/ll/sc--> nbcache[c] <-> msg_fifo x2 <-> |
//                            msg_router <-> msg_fifo x2 <-> ppp --> wide_mem_arb --> WideMem
//
// The cores themselves and main memory are outside this module: the core
// side of every cache and the WideMem port are brought out as ports.
// Interface: per core, an instruction-fetch port (i_*: word address in,
// instruction word out, in order) and a data port (d_*: nb_req_t in,
// nb_resp_t out, out of order, matched by request id). All ports use
// valid/ready. The link address register of every data cache is also
// brought out. The structure (two cores, non-blocking data caches under one
// parent, instruction caches on the side) follows the document; queue
// depths and cache sizes are this design's own.
module mc_proc
  import mc_pkg::*;
#(
  parameter int unsigned NUM_CORES = 2,
  parameter int unsigned ROWS      = 16,
  parameter int unsigned SQ_DEPTH  = 8,
  parameter int unsigned LB_DEPTH  = 8,
  parameter int unsigned MSG_DEPTH = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  // instruction fetch, per core
  input  logic      i_req_valid  [NUM_CORES],
  input  addr_t     i_req_addr   [NUM_CORES],
  output logic      i_req_ready  [NUM_CORES],
  output logic      i_resp_valid [NUM_CORES],
  output data_t     i_resp_data  [NUM_CORES],
  input  logic      i_resp_ready [NUM_CORES],
  // data memory, per core
  input  logic      d_req_valid  [NUM_CORES],
  input  nb_req_t   d_req        [NUM_CORES],
  output logic      d_req_ready  [NUM_CORES],
  output logic      d_resp_valid [NUM_CORES],
  output nb_resp_t  d_resp       [NUM_CORES],
  input  logic      d_resp_ready [NUM_CORES],
  // each data cache's link address register (LL/SC), for observation
  output logic      link_valid   [NUM_CORES],
  output addr_t     link_line    [NUM_CORES],
  // WideMem main memory
  output logic      mem_req_valid,
  output wide_req_t mem_req,
  input  logic      mem_req_ready,
  input  logic      mem_resp_valid,
  input  line_t     mem_resp,
  output logic      mem_resp_ready
);
  localparam int unsigned NP = NUM_CORES + 1;

  // cache -> router
  logic       tp_in_valid [NUM_CORES];
  cache_msg_t tp_in_msg   [NUM_CORES];
  logic       tp_req_rdy  [NUM_CORES];
  logic       tp_resp_rdy [NUM_CORES];
  logic       tp_out_valid[NUM_CORES];
  cache_msg_t tp_out_msg  [NUM_CORES];
  logic       tp_out_ready[NUM_CORES];
  // router -> cache
  logic       fp_in_valid [NUM_CORES];
  cache_msg_t fp_in_msg   [NUM_CORES];
  logic       fp_req_rdy  [NUM_CORES];
  logic       fp_resp_rdy [NUM_CORES];
  logic       fp_out_valid[NUM_CORES];
  cache_msg_t fp_out_msg  [NUM_CORES];
  logic       fp_out_ready[NUM_CORES];
  // parent FIFOs
  logic       pi_in_valid, pi_req_rdy, pi_resp_rdy, pi_out_valid, pi_out_ready;
  cache_msg_t pi_in_msg, pi_out_msg;
  logic       po_in_valid, po_req_rdy, po_resp_rdy, po_out_valid, po_out_ready;
  cache_msg_t po_in_msg, po_out_msg;
  // memory clients
  logic       m_req_valid  [NP];
  wide_req_t  m_req        [NP];
  logic       m_req_ready  [NP];
  logic       m_resp_valid [NP];
  line_t      m_resp       [NP];
  logic       m_resp_ready [NP];

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    icache #(.ROWS(ROWS)) u_icache (
      .clk, .rst_n,
      .req_valid     (i_req_valid[c]),
      .req_addr      (i_req_addr[c]),
      .req_ready     (i_req_ready[c]),
      .resp_valid    (i_resp_valid[c]),
      .resp_data     (i_resp_data[c]),
      .resp_ready    (i_resp_ready[c]),
      .mem_req_valid (m_req_valid[c+1]),
      .mem_req       (m_req[c+1]),
      .mem_req_ready (m_req_ready[c+1]),
      .mem_resp_valid(m_resp_valid[c+1]),
      .mem_resp      (m_resp[c+1]),
      .mem_resp_ready(m_resp_ready[c+1])
    );

    nbcache #(.ROWS(ROWS), .SQ_DEPTH(SQ_DEPTH), .LB_DEPTH(LB_DEPTH)) u_dcache (
      .clk, .rst_n,
      .req_valid    (d_req_valid[c]),
      .req          (d_req[c]),
      .req_ready    (d_req_ready[c]),
      .resp_valid   (d_resp_valid[c]),
      .resp         (d_resp[c]),
      .resp_ready   (d_resp_ready[c]),
      .tp_valid     (tp_in_valid[c]),
      .tp_msg       (tp_in_msg[c]),
      .tp_req_ready (tp_req_rdy[c]),
      .tp_resp_ready(tp_resp_rdy[c]),
      .fp_valid     (fp_out_valid[c]),
      .fp_msg       (fp_out_msg[c]),
      .fp_ready     (fp_out_ready[c]),
      .link_valid   (link_valid[c]),
      .link_line    (link_line[c])
    );

    msg_fifo #(.DEPTH(MSG_DEPTH)) u_to_parent (
      .clk, .rst_n,
      .in_valid     (tp_in_valid[c]),
      .in_msg       (tp_in_msg[c]),
      .in_req_ready (tp_req_rdy[c]),
      .in_resp_ready(tp_resp_rdy[c]),
      .out_valid    (tp_out_valid[c]),
      .out_msg      (tp_out_msg[c]),
      .out_ready    (tp_out_ready[c])
    );

    msg_fifo #(.DEPTH(MSG_DEPTH)) u_from_parent (
      .clk, .rst_n,
      .in_valid     (fp_in_valid[c]),
      .in_msg       (fp_in_msg[c]),
      .in_req_ready (fp_req_rdy[c]),
      .in_resp_ready(fp_resp_rdy[c]),
      .out_valid    (fp_out_valid[c]),
      .out_msg      (fp_out_msg[c]),
      .out_ready    (fp_out_ready[c])
    );
  end

  msg_router #(.N_CHILD(NUM_CORES)) u_router (
    .clk, .rst_n,
    .c_out_valid    (tp_out_valid),
    .c_out_msg      (tp_out_msg),
    .c_out_ready    (tp_out_ready),
    .p_in_valid     (pi_in_valid),
    .p_in_msg       (pi_in_msg),
    .p_in_req_ready (pi_req_rdy),
    .p_in_resp_ready(pi_resp_rdy),
    .p_out_valid    (po_out_valid),
    .p_out_msg      (po_out_msg),
    .p_out_ready    (po_out_ready),
    .c_in_valid     (fp_in_valid),
    .c_in_msg       (fp_in_msg),
    .c_in_req_ready (fp_req_rdy),
    .c_in_resp_ready(fp_resp_rdy)
  );

  msg_fifo #(.DEPTH(MSG_DEPTH)) u_parent_in (
    .clk, .rst_n,
    .in_valid     (pi_in_valid),
    .in_msg       (pi_in_msg),
    .in_req_ready (pi_req_rdy),
    .in_resp_ready(pi_resp_rdy),
    .out_valid    (pi_out_valid),
    .out_msg      (pi_out_msg),
    .out_ready    (pi_out_ready)
  );

  msg_fifo #(.DEPTH(MSG_DEPTH)) u_parent_out (
    .clk, .rst_n,
    .in_valid     (po_in_valid),
    .in_msg       (po_in_msg),
    .in_req_ready (po_req_rdy),
    .in_resp_ready(po_resp_rdy),
    .out_valid    (po_out_valid),
    .out_msg      (po_out_msg),
    .out_ready    (po_out_ready)
  );

  ppp #(.N_CHILD(NUM_CORES), .ROWS(ROWS)) u_ppp (
    .clk, .rst_n,
    .in_valid      (pi_out_valid),
    .in_msg        (pi_out_msg),
    .in_ready      (pi_out_ready),
    .out_valid     (po_in_valid),
    .out_msg       (po_in_msg),
    .out_req_ready (po_req_rdy),
    .out_resp_ready(po_resp_rdy),
    .mem_req_valid (m_req_valid[0]),
    .mem_req       (m_req[0]),
    .mem_req_ready (m_req_ready[0]),
    .mem_resp_valid(m_resp_valid[0]),
    .mem_resp      (m_resp[0]),
    .mem_resp_ready(m_resp_ready[0])
  );

  wide_mem_arb #(.N_PORTS(NP)) u_arb (
    .clk, .rst_n,
    .c_req_valid   (m_req_valid),
    .c_req         (m_req),
    .c_req_ready   (m_req_ready),
    .c_resp_valid  (m_resp_valid),
    .c_resp        (m_resp),
    .c_resp_ready  (m_resp_ready),
    .mem_req_valid (mem_req_valid),
    .mem_req       (mem_req),
    .mem_req_ready (mem_req_ready),
    .mem_resp_valid(mem_resp_valid),
    .mem_resp      (mem_resp),
    .mem_resp_ready(mem_resp_ready)
  );
endmodule
