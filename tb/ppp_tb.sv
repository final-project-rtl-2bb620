// ppp_tb: test of the parent protocol processor with two children played by
// the test bench, a message FIFO in front of it and a behavioural memory.
//
// Covers: a grant with data read from memory; a second sharer; an S->M
// upgrade that needs one downgrade of the other sharer (sent once only) and
// is then granted without data; a read that downgrades a modified owner to
// S, writes its dirty line back and then grants that data; and an
// unsolicited dirty eviction that is written back to memory.
module ppp_tb;
  import mc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // test bench -> message FIFO -> ppp
  logic       q_in_valid, q_req_rdy, q_resp_rdy, in_valid, in_ready;
  cache_msg_t q_in_msg, in_msg;
  logic       out_valid, out_req_ready, out_resp_ready;
  cache_msg_t out_msg;
  logic       mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  wide_req_t  mem_req;
  line_t      mem_resp;

  msg_fifo #(.DEPTH(2)) u_q (
    .clk, .rst_n,
    .in_valid(q_in_valid), .in_msg(q_in_msg), .in_req_ready(q_req_rdy), .in_resp_ready(q_resp_rdy),
    .out_valid(in_valid), .out_msg(in_msg), .out_ready(in_ready)
  );

  ppp #(.N_CHILD(2), .ROWS(16)) dut (.*);

  wide_mem_model #(.LINES(256), .LATENCY(4)) u_mem (
    .clk, .rst_n,
    .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .resp_valid(mem_resp_valid), .resp(mem_resp), .resp_ready(mem_resp_ready)
  );

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

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  cache_msg_t dn_q[$];
  int         dn_cyc[$];
  always @(negedge clk) if (rst_n && out_valid) begin
    dn_q.push_back(out_msg);
    dn_cyc.push_back(cyc);
  end

  int sent_cyc;
  task automatic child(int c, bit is_resp, addr_t a, msi_t s, bit has_data, line_t l);
    @(negedge clk);
    q_in_valid = 1'b1;
    q_in_msg   = '0;
    q_in_msg.is_resp  = is_resp;
    q_in_msg.child    = child_t'(c);
    q_in_msg.addr     = a;
    q_in_msg.state    = s;
    q_in_msg.has_data = has_data;
    q_in_msg.data     = l;
    sent_cyc = cyc;
    @(negedge clk);
    q_in_valid = 1'b0;
  endtask

  task automatic expect_dn(bit is_resp, int c, addr_t a, msi_t s, bit has_data, line_t l,
                           string what, output int at);
    int t;
    t = 0;
    at = -1;
    while (dn_q.size() == 0 && t < 40) begin @(negedge clk); t++; end
    check(dn_q.size() > 0, {what, ": nothing sent"});
    if (dn_q.size() > 0) begin
      cache_msg_t m;
      m  = dn_q.pop_front();
      at = dn_cyc.pop_front();
      check(m.is_resp == is_resp && int'(m.child) == c && m.addr == a && m.state == s &&
            m.has_data == has_data && (!has_data || m.data == l),
            $sformatf("%s: got resp=%0d child=%0d addr=%h state=%s data=%0d", what, m.is_resp,
                      m.child, m.addr, m.state.name(), m.has_data));
    end
  endtask

  function automatic line_t init_line(addr_t la);
    line_t l;
    for (int w = 0; w < LINE_WORDS; w++) l[w*DATA_W +: DATA_W] = la + addr_t'(w * 4);
    return l;
  endfunction

  function automatic line_t dirty(int seed);
    line_t l;
    for (int w = 0; w < LINE_WORDS; w++) l[w*DATA_W +: DATA_W] = 32'hD000_0000 + seed * 256 + w;
    return l;
  endfunction

  localparam addr_t L  = 32'h0000_0140;
  localparam addr_t L2 = 32'h0000_0540;   // same directory row as L

  initial begin
    int at;
    q_in_valid = 1'b0; q_in_msg = '0;
    out_req_ready = 1'b1; out_resp_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. child 0 reads L: data from memory
    child(0, 0, L, MSI_S, 0, '0);
    expect_dn(1, 0, L, MSI_S, 1, init_line(L), "grant S with data", at);
    // 2. child 1 reads L too: both share
    child(1, 0, L, MSI_S, 0, '0);
    expect_dn(1, 1, L, MSI_S, 1, init_line(L), "second sharer", at);
    // 3. child 0 upgrades to M: child 1 must go to I first
    child(0, 0, L, MSI_M, 0, '0);
    expect_dn(0, 1, L, MSI_I, 0, '0, "invalidate the other sharer", at);
    repeat (6) @(negedge clk);
    check(dn_q.size() == 0, "downgrade sent only once while waiting");
    child(1, 1, L, MSI_I, 0, '0);
    expect_dn(1, 0, L, MSI_M, 0, '0, "upgrade granted without data", at);
    check(at - sent_cyc <= 3, $sformatf("upgrade grant %0d cycles after the response", at - sent_cyc));
    // 4. child 1 reads L: child 0 (M) goes to S and writes back
    child(1, 0, L, MSI_S, 0, '0);
    expect_dn(0, 0, L, MSI_S, 0, '0, "downgrade the owner to S", at);
    child(0, 1, L, MSI_S, 1, dirty(1));
    expect_dn(1, 1, L, MSI_S, 1, dirty(1), "grant carries the written-back line", at);
    check(u_mem.writes == 1, "one write-back");
    // 5. child 1 upgrades, child 0 invalidated; then child 1 evicts dirty
    child(1, 0, L, MSI_M, 0, '0);
    expect_dn(0, 0, L, MSI_I, 0, '0, "invalidate child 0", at);
    child(0, 1, L, MSI_I, 0, '0);
    expect_dn(1, 1, L, MSI_M, 0, '0, "child 1 upgraded", at);
    child(1, 1, L, MSI_I, 1, dirty(2));
    repeat (4) @(negedge clk);
    check(u_mem.writes == 2, "eviction written back");
    check(dn_q.size() == 0, "eviction needs no answer");
    // 6. child 0 reads L again: gets the evicted data, no downgrade needed
    child(0, 0, L, MSI_M, 0, '0);
    expect_dn(1, 0, L, MSI_M, 1, dirty(2), "read after eviction sees the written line", at);
    // 7. a different line in the same directory row does not conflict
    child(1, 0, L2, MSI_M, 0, '0);
    expect_dn(1, 1, L2, MSI_M, 1, init_line(L2), "other line granted M at once", at);

    repeat (3) @(negedge clk);
    check(dn_q.size() == 0, "no stray messages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
