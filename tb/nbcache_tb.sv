// nbcache_tb: directed test of the non-blocking L1 data cache, with the test
// bench playing the parent protocol processor.
//
// Covers: load miss -> S upgrade request -> fill -> answer (and its cycle
// count), hit latency, hit under miss, store queue with M upgrade and load
// bypass, write-back on replacement, downgrade handling (answered and
// ignored), and the LL/SC rules: link set by a load-linked, store-conditional
// succeeding at once, failing without a link, succeeding from the store
// queue, failing at the queue head after the link was broken by an
// invalidation, and a load-linked answered by store-queue bypass.
module nbcache_tb;
  import mc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       req_valid, req_ready, resp_valid, resp_ready;
  nb_req_t    req;
  nb_resp_t   resp;
  logic       tp_valid, tp_req_ready, tp_resp_ready, fp_valid, fp_ready;
  cache_msg_t tp_msg, fp_msg;
  logic       link_valid;
  addr_t      link_line;

  nbcache dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // messages to the parent and answers to the core, with their cycles
  cache_msg_t up_q[$];
  int         up_cyc[$];
  nb_resp_t   rs_q[$];
  int         rs_cyc[$];
  always @(negedge clk) if (rst_n) begin
    if (tp_valid) begin up_q.push_back(tp_msg); up_cyc.push_back(cyc); end
    if (resp_valid) begin rs_q.push_back(resp); rs_cyc.push_back(cyc); end
  end

  int accept_cyc;
  task automatic send(mem_op_t op, addr_t a, data_t d, rid_t rid);
    @(negedge clk);
    req_valid = 1'b1;
    req = '{op: op, addr: a, data: d, rid: rid};
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    accept_cyc = cyc;
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  task automatic parent(bit is_resp, addr_t a, msi_t s, bit has_data, line_t l);
    @(negedge clk);
    fp_valid = 1'b1;
    fp_msg   = '0;
    fp_msg.is_resp  = is_resp;
    fp_msg.addr     = a;
    fp_msg.state    = s;
    fp_msg.has_data = has_data;
    fp_msg.data     = l;
    #1;
    while (!fp_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    fp_valid = 1'b0;
  endtask

  task automatic expect_up(bit is_resp, addr_t a, msi_t s, bit has_data, string what);
    int t;
    t = 0;
    while (up_q.size() == 0 && t < 50) begin @(negedge clk); t++; end
    check(up_q.size() > 0, {what, ": no message to the parent"});
    if (up_q.size() > 0) begin
      cache_msg_t m;
      m = up_q.pop_front();
      void'(up_cyc.pop_front());
      check(m.is_resp == is_resp && m.addr == a && m.state == s && m.has_data == has_data,
            $sformatf("%s: got resp=%0d addr=%h state=%s data=%0d", what, m.is_resp, m.addr,
                      m.state.name(), m.has_data));
    end
  endtask

  task automatic expect_resp(rid_t rid, data_t d, string what, output int at);
    int t;
    t = 0;
    at = -1;
    while (rs_q.size() == 0 && t < 50) begin @(negedge clk); t++; end
    check(rs_q.size() > 0, {what, ": no answer"});
    if (rs_q.size() > 0) begin
      nb_resp_t r;
      r  = rs_q.pop_front();
      at = rs_cyc.pop_front();
      check(r.rid == rid && r.data == d,
            $sformatf("%s: got rid %0d data %h, expected rid %0d data %h", what, r.rid, r.data, rid, d));
    end
  endtask

  function automatic line_t pattern(addr_t la);
    line_t l;
    for (int w = 0; w < LINE_WORDS; w++) l[w*DATA_W +: DATA_W] = la + addr_t'(w * 4);
    return l;
  endfunction

  localparam addr_t A  = 32'h0000_0100;   // row 4
  localparam addr_t A2 = 32'h0000_0500;   // row 4, other tag
  localparam addr_t X  = 32'h0000_0240;   // row 9
  localparam addr_t B  = 32'h0000_0380;   // row 14
  localparam addr_t C  = 32'h0000_03C0;   // row 15

  initial begin
    int at;
    req_valid = 1'b0; req = '0; resp_ready = 1'b1;
    fp_valid = 1'b0; fp_msg = '0;
    tp_req_ready = 1'b1; tp_resp_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. load miss: S request the cycle after acceptance
    send(OP_LD, A + 8, '0, 4'd1);
    expect_up(0, A, MSI_S, 0, "load miss asks for S");
    check(up_cyc.size() == 0, "one message only");
    parent(1, A, MSI_S, 1, pattern(A));
    expect_resp(4'd1, A + 8, "load miss answered after fill", at);

    // 2. hit: visible the cycle after acceptance
    send(OP_LD, A + 12, '0, 4'd2);
    expect_resp(4'd2, A + 12, "load hit", at);
    check(at == accept_cyc + 1, $sformatf("hit latency %0d cycles", at - accept_cyc));

    // 3. hit under miss: X misses, A still hits and answers first
    send(OP_LD, X, '0, 4'd3);
    send(OP_LD, A + 4, '0, 4'd4);
    expect_resp(4'd4, A + 4, "hit under miss", at);
    expect_up(0, X, MSI_S, 0, "second miss asks for S");
    parent(1, X, MSI_S, 1, pattern(X));
    expect_resp(4'd3, X, "miss answered later", at);

    // 4. store to a line in S: queued, asks for M; a load bypasses it
    send(OP_ST, A + 16, 32'hDEAD_0001, 4'd0);
    send(OP_LD, A + 16, '0, 4'd5);
    expect_resp(4'd5, 32'hDEAD_0001, "load bypasses the store queue", at);
    expect_up(0, A, MSI_M, 0, "queued store asks for M");
    parent(1, A, MSI_M, 0, '0);   // upgrade without data
    repeat (3) @(negedge clk);
    check(dut.sq_count == 0, "store queue drained after M grant");
    send(OP_LD, A + 16, '0, 4'd6);
    expect_resp(4'd6, 32'hDEAD_0001, "stored value read from the line", at);

    // 5. LL/SC hit: SC succeeds at once and writes
    send(OP_LR, A + 20, '0, 4'd7);
    expect_resp(4'd7, A + 20, "load-linked value", at);
    check(link_valid && link_line == A, "link set by load-linked");
    send(OP_SC, A + 20, 32'h5C5C_0001, 4'd8);
    expect_resp(4'd8, 1, "store-conditional succeeds", at);
    check(at == accept_cyc + 1, "immediate store-conditional answer latency");
    check(!link_valid, "link cleared by store-conditional");
    send(OP_SC, A + 20, 32'hBAD0_0000, 4'd9);
    expect_resp(4'd9, 0, "store-conditional without link fails", at);
    send(OP_LD, A + 20, '0, 4'd10);
    expect_resp(4'd10, 32'h5C5C_0001, "failed store-conditional wrote nothing", at);

    // 6. link broken by an invalidation from the parent (M -> I, write-back)
    send(OP_LR, A + 24, '0, 4'd11);
    expect_resp(4'd11, A + 24, "load-linked", at);
    parent(0, A, MSI_I, 0, '0);
    expect_up(1, A, MSI_I, 1, "downgrade answered with the dirty line");
    check(!link_valid, "invalidation breaks the link");
    send(OP_SC, A + 24, 32'hBAD0_0001, 4'd12);
    expect_resp(4'd12, 0, "store-conditional after invalidation fails", at);
    check(up_q.size() == 0, "failed store-conditional sends no upgrade");

    // 7. downgrade for a line not held: ignored
    parent(0, C, MSI_I, 0, '0);
    repeat (3) @(negedge clk);
    check(up_q.size() == 0, "downgrade for an absent line ignored");

    // 8. SC from the store queue: LR on B (miss), SC queued, M grant, answers 1
    send(OP_LR, B, '0, 4'd13);
    expect_up(0, B, MSI_S, 0, "load-linked miss");
    parent(1, B, MSI_S, 1, pattern(B));
    expect_resp(4'd13, B, "load-linked after fill", at);
    check(link_valid && link_line == B, "link set when the buffered load-linked answers");
    send(OP_SC, B, 32'h0000_B0B0, 4'd14);
    expect_up(0, B, MSI_M, 0, "queued store-conditional asks for M");
    check(rs_q.size() == 0, "no answer before the store-conditional completes");
    parent(1, B, MSI_M, 0, '0);
    expect_resp(4'd14, 1, "queued store-conditional succeeds", at);
    send(OP_LD, B, '0, 4'd15);
    expect_resp(4'd15, 32'h0000_B0B0, "queued store-conditional wrote", at);

    // 9. SC queued, link broken before the grant: fails at the head
    send(OP_LR, C, '0, 4'd1);
    expect_up(0, C, MSI_S, 0, "load-linked miss on C");
    parent(1, C, MSI_S, 1, pattern(C));
    expect_resp(4'd1, C, "load-linked C", at);
    send(OP_SC, C, 32'hBAD0_0002, 4'd2);
    expect_up(0, C, MSI_M, 0, "store-conditional asks for M");
    parent(0, C, MSI_I, 0, '0);
    expect_up(1, C, MSI_I, 0, "clean line invalidated");
    expect_resp(4'd2, 0, "store-conditional fails at the queue head", at);
    parent(1, C, MSI_M, 1, pattern(C));
    send(OP_LD, C, '0, 4'd3);
    expect_resp(4'd3, C, "failed store-conditional left memory alone", at);

    // 10. replacement of a dirty line: write-back, then the new request
    send(OP_ST, B + 4, 32'h1234_5678, 4'd0);
    repeat (2) @(negedge clk);
    send(OP_LD, B + 32'h400, '0, 4'd4);    // same row, other tag
    expect_up(1, B, MSI_I, 1, "dirty line evicted with its data");
    expect_up(0, B + 32'h400, MSI_S, 0, "then the new line requested");
    parent(1, B + 32'h400, MSI_S, 1, pattern(B + 32'h400));
    expect_resp(4'd4, B + 32'h400, "load after replacement", at);

    // 11. clean replacement of A2's row is silent about data
    send(OP_LD, A2, '0, 4'd5);
    expect_up(0, A2, MSI_S, 0, "row 4 was already invalid: request only");
    parent(1, A2, MSI_S, 1, pattern(A2));
    expect_resp(4'd5, A2, "load A2", at);
    send(OP_LD, A, '0, 4'd6);
    expect_up(1, A2, MSI_I, 0, "clean eviction carries no data");
    expect_up(0, A, MSI_S, 0, "request for A");
    parent(1, A, MSI_S, 1, pattern(A));
    expect_resp(4'd6, A, "load A again", at);

    // 12. load-linked served by store-queue bypass sets the link at once
    send(OP_ST, X + 8, 32'h0000_5151, 4'd0);      // X is in S: the store waits for M
    expect_up(0, X, MSI_M, 0, "store to X asks for M");
    send(OP_LR, X + 8, '0, 4'd7);
    expect_resp(4'd7, 32'h0000_5151, "load-linked takes the queued store's value", at);
    check(link_valid && link_line == X, "bypassed load-linked sets the link");
    send(OP_LD, A + 4, '0, 4'd8);                   // loads on other lines still hit
    expect_resp(4'd8, A + 4, "hit while the store waits", at);
    parent(1, X, MSI_M, 0, '0);
    repeat (3) @(negedge clk);
    send(OP_SC, X + 8, 32'h0000_5152, 4'd9);
    expect_resp(4'd9, 1, "store-conditional after a bypassed load-linked", at);

    repeat (3) @(negedge clk);
    check(up_q.size() == 0 && rs_q.size() == 0, "no stray messages or answers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
