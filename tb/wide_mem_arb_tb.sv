// wide_mem_arb_tb: test of the main-memory arbiter with three clients that
// issue random reads and writes at the same time to a behavioural memory.
//
// Every read must return the line the memory held at that time to the
// client that asked (each client writes only its own lines, so the expected
// value is known), every request must be passed on exactly once, and a
// client that keeps asking must be served within N_PORTS grants.
module wide_mem_arb_tb;
  import mc_pkg::*;

  localparam int N = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      c_req_valid  [N];
  wide_req_t c_req        [N];
  logic      c_req_ready  [N];
  logic      c_resp_valid [N];
  line_t     c_resp       [N];
  logic      c_resp_ready [N];
  logic      mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  wide_req_t mem_req;
  line_t     mem_resp;

  wide_mem_arb #(.N_PORTS(N), .MAX_READS(4)) dut (.*);

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

  function automatic line_t init_line(addr_t la);
    line_t l;
    for (int w = 0; w < LINE_WORDS; w++) l[w*DATA_W +: DATA_W] = la + addr_t'(w * 4);
    return l;
  endfunction

  int grants_since [N];
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (c_req_ready[i]) grants_since[i] = 0;
      else if (c_req_valid[i] && mem_req_valid && mem_req_ready) begin
        grants_since[i]++;
        check(grants_since[i] < N, $sformatf("client %0d waited %0d grants", i, grants_since[i]));
      end
    end
  end

  int done_cnt = 0;
  task automatic client(int c);
    line_t shadow [8];
    line_t exp_q[$];
    int    issued;
    for (int k = 0; k < 8; k++) shadow[k] = init_line(addr_t'((c * 8 + k) * 64));
    issued = 0;
    fork
      begin
        for (int n = 0; n < 60; n++) begin
          int k;
          k = $urandom % 8;
          @(negedge clk);
          c_req_valid[c] = 1'b1;
          c_req[c].addr  = addr_t'((c * 8 + k) * 64);
          if ($urandom % 3 == 0) begin
            line_t v;
            for (int w = 0; w < LINE_WORDS; w++) v[w*DATA_W +: DATA_W] = $urandom;
            c_req[c].wr_en = '1;
            c_req[c].data  = v;
            shadow[k] = v;
          end else begin
            c_req[c].wr_en = '0;
            exp_q.push_back(shadow[k]);
          end
          #1;
          while (!c_req_ready[c]) begin @(negedge clk); #1; end
          @(negedge clk);
          c_req_valid[c] = 1'b0;
          issued++;
        end
      end
      begin
        int got;
        got = 0;
        while (issued < 60 || exp_q.size() > 0) begin
          @(negedge clk);
          if (c_resp_valid[c]) begin
            check(exp_q.size() > 0, $sformatf("client %0d: unexpected answer", c));
            if (exp_q.size() > 0) check(c_resp[c] == exp_q.pop_front(), $sformatf("client %0d: wrong line", c));
          end
        end
      end
    join
    done_cnt++;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      c_req_valid[i] = 1'b0; c_req[i] = '0; c_resp_ready[i] = 1'b1; grants_since[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      client(0);
      client(1);
      client(2);
    join
    check(done_cnt == N, "all clients finished");
    check(u_mem.reads + u_mem.writes == 180, $sformatf("%0d requests reached memory", u_mem.reads + u_mem.writes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
