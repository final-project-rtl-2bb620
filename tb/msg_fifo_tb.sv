// msg_fifo_tb: checks that the message FIFO keeps requests and responses in
// order within their kind, shows a waiting response ahead of any request,
// reports each side full on its own, and delivers in the cycle after enqueue.
module msg_fifo_tb;
  import mc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_req_ready, in_resp_ready, out_valid, out_ready;
  cache_msg_t in_msg, out_msg;

  msg_fifo #(.DEPTH(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cache_msg_t mk(bit resp, int n);
    cache_msg_t m;
    m = '0;
    m.is_resp = resp;
    m.addr    = addr_t'(n);
    m.state   = resp ? MSI_S : MSI_M;
    return m;
  endfunction

  task automatic push(cache_msg_t m);
    @(negedge clk);
    in_valid = 1'b1;
    in_msg   = m;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic pop(output cache_msg_t m);
    @(negedge clk);
    m = out_msg;
    check(out_valid, "pop from empty FIFO");
    out_ready = 1'b1;
    @(negedge clk);
    out_ready = 1'b0;
  endtask

  initial begin
    cache_msg_t m;
    in_valid = 1'b0;
    in_msg = '0;
    out_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!out_valid && in_req_ready && in_resp_ready, "empty after reset");

    // timing: visible one cycle after enqueue
    in_valid = 1'b1; in_msg = mk(0, 100);
    #1 check(!out_valid, "no pass-through in the enqueue cycle");
    @(negedge clk); in_valid = 1'b0;
    check(out_valid && out_msg.addr == 100, "request visible the cycle after enqueue");
    pop(m);

    // two requests, then a response: response comes out first
    push(mk(0, 1));
    push(mk(0, 2));
    @(negedge clk);
    check(!in_req_ready && in_resp_ready, "request side full, response side free");
    push(mk(1, 10));
    pop(m); check(m.is_resp && m.addr == 10, "response overtakes requests");
    pop(m); check(!m.is_resp && m.addr == 1, "first request next");
    push(mk(1, 11));
    push(mk(1, 12));
    @(negedge clk);
    check(!in_resp_ready && in_req_ready, "response side full, request side free");
    pop(m); check(m.is_resp && m.addr == 11, "oldest response");
    pop(m); check(m.is_resp && m.addr == 12, "second response");
    pop(m); check(!m.is_resp && m.addr == 2, "remaining request");
    @(negedge clk);
    check(!out_valid, "empty at the end");

    // random traffic against a model
    begin
      int rq[$], rs[$];
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        in_valid  = 1'b0;
        out_ready = 1'b0;
        if ($urandom % 2) begin
          bit r;
          r = $urandom % 2;
          if (r ? in_resp_ready : in_req_ready) begin
            in_valid = 1'b1;
            in_msg   = mk(r, 1000 + n);
          end
        end
        if (out_valid && ($urandom % 2)) begin
          out_ready = 1'b1;
          if (rs.size() > 0) begin
            check(out_msg.is_resp && out_msg.addr == rs[0], "random: response order");
            void'(rs.pop_front());
          end else begin
            check(!out_msg.is_resp && rq.size() > 0 && out_msg.addr == rq[0], "random: request order");
            if (rq.size() > 0) void'(rq.pop_front());
          end
        end
        if (in_valid) begin
          if (in_msg.is_resp) rs.push_back(int'(in_msg.addr));
          else rq.push_back(int'(in_msg.addr));
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
