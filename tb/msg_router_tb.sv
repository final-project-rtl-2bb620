// msg_router_tb: test of the message router with three caches.
//
// Upward: each cache's outgoing FIFO is modelled by the test bench; the
// router must stamp the source number into the child field, pass at most one
// message per cycle, prefer responses to requests, and serve waiting caches
// in round-robin order. Downward: messages from the parent must reach the
// cache named in their child field, and wait while that cache's FIFO is
// full for that kind.
module msg_router_tb;
  import mc_pkg::*;

  localparam int N = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       c_out_valid [N];
  cache_msg_t c_out_msg   [N];
  logic       c_out_ready [N];
  logic       p_in_valid, p_in_req_ready, p_in_resp_ready;
  cache_msg_t p_in_msg;
  logic       p_out_valid, p_out_ready;
  cache_msg_t p_out_msg;
  logic       c_in_valid      [N];
  cache_msg_t c_in_msg        [N];
  logic       c_in_req_ready  [N];
  logic       c_in_resp_ready [N];

  msg_router #(.N_CHILD(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each cache holds a list of messages; the head is offered to the router
  cache_msg_t pend [N][$];
  always_comb
    for (int i = 0; i < N; i++) begin
      c_out_valid[i] = pend[i].size() > 0;
      c_out_msg[i]   = (pend[i].size() > 0) ? pend[i][0] : '0;
    end

  cache_msg_t got[$];
  always @(negedge clk) if (rst_n) begin
    int n;
    n = 0;
    for (int i = 0; i < N; i++) if (c_out_ready[i]) n++;
    check(n == (p_in_valid ? 1 : 0), "exactly one source dequeued per message");
    if (p_in_valid) got.push_back(p_in_msg);
  end
  always @(posedge clk)
    for (int i = 0; i < N; i++)
      if (c_out_ready[i]) void'(pend[i].pop_front());

  function automatic cache_msg_t mk(bit resp, int tag_child, int n);
    cache_msg_t m;
    m = '0;
    m.is_resp = resp;
    m.child   = child_t'(tag_child);
    m.addr    = addr_t'(n);
    return m;
  endfunction

  initial begin
    p_in_req_ready = 1'b1; p_in_resp_ready = 1'b1;
    p_out_valid = 1'b0; p_out_msg = '0;
    for (int i = 0; i < N; i++) begin c_in_req_ready[i] = 1'b1; c_in_resp_ready[i] = 1'b1; end
    repeat (2) @(posedge clk);

    // load all caches while the parent cannot accept anything
    @(negedge clk);
    p_in_req_ready = 1'b0; p_in_resp_ready = 1'b0;
    rst_n = 1'b1;
    pend[0].push_back(mk(0, 3, 10));
    pend[0].push_back(mk(0, 3, 11));
    pend[1].push_back(mk(0, 3, 20));
    pend[2].push_back(mk(1, 3, 30));
    pend[1].push_back(mk(1, 3, 21));
    repeat (2) @(negedge clk);
    check(got.size() == 0, "nothing passes while the parent is full");
    p_in_req_ready = 1'b1; p_in_resp_ready = 1'b1;
    repeat (10) @(negedge clk);
    check(got.size() == 5, $sformatf("all five messages passed (%0d)", got.size()));
    // response from cache 2 first (heads: req, req, resp)
    if (got.size() == 5) begin
      check(got[0].is_resp && got[0].addr == 30 && got[0].child == 2, "response first, stamped 2");
      check(!got[1].is_resp && got[1].addr == 10 && got[1].child == 0, "then cache 0's request");
      check(!got[2].is_resp && got[2].addr == 20 && got[2].child == 1, "round robin to cache 1");
      check(got[3].is_resp && got[3].addr == 21 && got[3].child == 1, "cache 1's response next");
      check(!got[4].is_resp && got[4].addr == 11 && got[4].child == 0, "cache 0's second request");
    end
    got.delete();

    // requests blocked, responses flow
    p_in_req_ready = 1'b0;
    pend[0].push_back(mk(0, 0, 40));
    pend[1].push_back(mk(1, 0, 41));
    repeat (3) @(negedge clk);
    check(got.size() == 1 && got[0].addr == 41, "a response passes a blocked request");
    p_in_req_ready = 1'b1;
    repeat (2) @(negedge clk);
    check(got.size() == 2 && got[1].addr == 40, "request passes once allowed");

    // downward routing
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      p_out_valid = 1'b1;
      p_out_msg   = mk(i % 2, i, 100 + i);
      #1;
      check(p_out_ready && c_in_valid[i] && c_in_msg[i].addr == 100 + i, $sformatf("routed to cache %0d", i));
      for (int j = 0; j < N; j++) if (j != i) check(!c_in_valid[j], "no copy to another cache");
    end
    @(negedge clk);
    c_in_req_ready[1] = 1'b0;
    p_out_msg = mk(0, 1, 200);
    #1;
    check(!p_out_ready && !c_in_valid[1], "waits while the cache's request FIFO is full");
    p_out_msg = mk(1, 1, 201);
    #1;
    check(p_out_ready && c_in_valid[1], "a response to the same cache still goes");
    @(negedge clk);
    p_out_valid = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
