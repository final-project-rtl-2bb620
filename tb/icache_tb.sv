// icache_tb: test of the instruction cache against a behavioural memory.
//
// Fetches a random sequence of word addresses from a region four times the
// cache size and checks every word against the memory's initial contents
// (each word holds its own address). Checks that a hit answers one cycle
// after acceptance, that a miss issues exactly one line read, and that a
// fetch from a line just filled hits. A second phase streams fetches without
// waiting for answers: they must come back in order, and more than one line
// read must be in flight at some point (misses under a miss).
module icache_tb;
  import mc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      req_valid, req_ready, resp_valid, resp_ready;
  addr_t     req_addr;
  data_t     resp_data;
  logic      mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  wide_req_t mem_req;
  line_t     mem_resp;

  icache #(.ROWS(16)) dut (.*);

  wide_mem_model #(.LINES(256), .LATENCY(3)) u_mem (
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
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  addr_t exp_q[$];
  int    max_inflight = 0;
  always @(negedge clk)
    if (rst_n && dut.u_fills.count > max_inflight) max_inflight = int'(dut.u_fills.count);

  // reference: which lines the cache should hold
  logic  ref_v   [16];
  addr_t ref_tag [16];

  task automatic fetch(addr_t a);
    int acc, reads0;
    bit exp_hit;
    int r;
    r = int'(a[9:6]);
    exp_hit = ref_v[r] && ref_tag[r] == line_addr(a);
    reads0 = u_mem.reads;
    @(negedge clk);
    req_valid = 1'b1;
    req_addr  = a;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    acc = cyc;
    @(negedge clk);
    req_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    check(resp_data == a, $sformatf("fetch %h gave %h", a, resp_data));
    if (exp_hit) begin
      check(cyc == acc + 1, $sformatf("hit at %h took %0d cycles", a, cyc - acc));
      check(u_mem.reads == reads0, "hit reads no memory");
    end else begin
      check(u_mem.reads == reads0 + 1, "miss reads one line");
    end
    ref_v[r] = 1'b1;
    ref_tag[r] = line_addr(a);
    @(negedge clk);
  endtask

  initial begin
    req_valid = 1'b0; req_addr = '0; resp_ready = 1'b1;
    for (int r = 0; r < 16; r++) ref_v[r] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fetch(32'h0000_0404);
    fetch(32'h0000_0408);      // same line: hit
    fetch(32'h0000_0804);      // same row, other line: miss
    fetch(32'h0000_0408);      // evicted: miss again
    for (int n = 0; n < 300; n++) fetch(32'h0000_0400 + addr_t'(($urandom % 1024) * 4));

    // streaming: issue without waiting, collect answers in order
    fork
      begin
        for (int n = 0; n < 200; n++) begin
          addr_t a;
          a = 32'h0000_2000 + addr_t'(($urandom % 2048) * 4);
          @(negedge clk);
          req_valid = 1'b1;
          req_addr  = a;
          #1;
          while (!req_ready) begin @(negedge clk); #1; end
          exp_q.push_back(a);
          @(negedge clk);
          req_valid = 1'b0;
        end
      end
      begin
        int got;
        got = 0;
        while (got < 200) begin
          @(negedge clk);
          if (resp_valid) begin
            check(exp_q.size() > 0 && resp_data == exp_q[0], $sformatf("stream answer %0d: %h", got, resp_data));
            if (exp_q.size() > 0) void'(exp_q.pop_front());
            got++;
          end
        end
      end
    join
    $display("most line reads in flight: %0d", max_inflight);
    check(max_inflight > 1, "misses under a miss seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
