// mc_workloads_tb: the memory traffic of the multicore benchmark programs,
// run on the full-size memory system with two test threads as the cores.
//
//  * hello: core 0 writes a text into an 8-word software FIFO in shared
//    memory (buffer, head and tail words); core 1 reads it out. The text
//    must arrive whole and in order.
//  * mc_vvadd: C[i] = A[i] + B[i] over 256 elements, each core taking a
//    fixed half.
//  * mc_median: 3-point median filter over 256 elements, each core taking a
//    fixed half.
//  * mc_multiply2: 256 products R[i] = A[i] * B[i]; the cores take chunks of
//    16 from a shared work counter with load-linked / store-conditional
//    until none are left, so the split is decided at run time.
// Main memory starts with every word equal to its own address, which gives
// the input arrays. Results are read back by the other core and checked.
module mc_workloads_tb;
  import mc_pkg::*;

  localparam int NC = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      i_req_valid  [NC];
  addr_t     i_req_addr   [NC];
  logic      i_req_ready  [NC];
  logic      i_resp_valid [NC];
  data_t     i_resp_data  [NC];
  logic      i_resp_ready [NC];
  logic      d_req_valid  [NC];
  nb_req_t   d_req        [NC];
  logic      d_req_ready  [NC];
  logic      d_resp_valid [NC];
  nb_resp_t  d_resp       [NC];
  logic      d_resp_ready [NC];
  logic      link_valid   [NC];
  addr_t     link_line    [NC];
  logic      mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  wide_req_t mem_req;
  line_t     mem_resp;

  mc_proc dut (.*);

  wide_mem_model u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid),
    .req       (mem_req),
    .req_ready (mem_req_ready),
    .resp_valid(mem_resp_valid),
    .resp      (mem_resp),
    .resp_ready(mem_resp_ready)
  );

  int checks = 0;
  int failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- data port access
  logic  got   [NC];
  data_t gdata [NC];
  always @(negedge clk)
    for (int c = 0; c < NC; c++)
      if (rst_n && d_resp_valid[c]) begin
        got[c]   <= 1'b1;
        gdata[c] <= d_resp[c].data;
      end

  task automatic dsend(int c, mem_op_t op, addr_t a, data_t d);
    @(negedge clk);
    d_req_valid[c] = 1'b1;
    d_req[c]       = '{op: op, addr: a, data: d, rid: '0};
    #1;
    while (!d_req_ready[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    d_req_valid[c] = 1'b0;
  endtask

  task automatic ld(int c, addr_t a, output data_t d, input mem_op_t op = OP_LD);
    dsend(c, op, a, '0);
    while (!got[c]) @(posedge clk);
    @(negedge clk);
    d = gdata[c];
    got[c] = 1'b0;
  endtask

  task automatic st(int c, addr_t a, data_t d);
    dsend(c, OP_ST, a, d);
  endtask

  task automatic sc(int c, addr_t a, data_t d, output data_t ok);
    dsend(c, OP_SC, a, d);
    while (!got[c]) @(posedge clk);
    @(negedge clk);
    ok = gdata[c];
    got[c] = 1'b0;
  endtask

  // ---------------------------------------------------------------- hello
  localparam addr_t FIFO_BUF  = 32'h0000_4000;
  localparam addr_t FIFO_HEAD = 32'h0000_4040;   // written by the producer
  localparam addr_t FIFO_TAIL = 32'h0000_4080;   // written by the consumer
  localparam string TEXT = "Hello world! Core 0 writes this text into a software FIFO and core 1 prints it.";
  string received = "";

  task automatic producer(int c);
    data_t tail;
    for (int k = 0; k < TEXT.len(); k++) begin
      do ld(c, FIFO_TAIL, tail); while (int'(tail) + 8 <= k);   // wait while the FIFO is full
      st(c, FIFO_BUF + addr_t'((k % 8) * 4), data_t'(TEXT[k]));
      st(c, FIFO_HEAD, data_t'(k + 1));
    end
  endtask

  task automatic consumer(int c);
    data_t head, ch;
    for (int k = 0; k < TEXT.len(); k++) begin
      do ld(c, FIFO_HEAD, head); while (int'(head) <= k);
      ld(c, FIFO_BUF + addr_t'((k % 8) * 4), ch);
      received = {received, string'(byte'(ch))};
      st(c, FIFO_TAIL, data_t'(k + 1));
    end
  endtask

  // ---------------------------------------------------------------- array kernels
  localparam int    N     = 256;
  localparam addr_t A     = 32'h0000_5000;
  localparam addr_t B     = 32'h0000_5400;
  localparam addr_t C     = 32'h0000_5800;
  localparam addr_t MED   = 32'h0000_5C00;
  localparam addr_t R     = 32'h0000_6000;
  localparam addr_t WORK  = 32'h0000_6400;
  localparam int    CHUNK = 16;

  function automatic data_t a_of(int i); return A + data_t'(i * 4); endfunction
  function automatic data_t b_of(int i); return B + data_t'(i * 4); endfunction
  function automatic data_t med3(data_t x, data_t y, data_t z);
    if ((x <= y && y <= z) || (z <= y && y <= x)) return y;
    if ((y <= x && x <= z) || (z <= x && x <= y)) return x;
    return z;
  endfunction

  task automatic vvadd(int c);
    for (int i = c * N / NC; i < (c + 1) * N / NC; i++) begin
      data_t x, y;
      ld(c, A + addr_t'(i * 4), x);
      ld(c, B + addr_t'(i * 4), y);
      st(c, C + addr_t'(i * 4), x + y);
    end
  endtask

  task automatic median(int c);
    for (int i = c * N / NC; i < (c + 1) * N / NC; i++) begin
      data_t x, y, z;
      if (i == 0 || i == N - 1) begin
        ld(c, A + addr_t'(i * 4), y);
        st(c, MED + addr_t'(i * 4), y);
      end else begin
        ld(c, A + addr_t'((i - 1) * 4), x);
        ld(c, A + addr_t'(i * 4), y);
        ld(c, A + addr_t'((i + 1) * 4), z);
        st(c, MED + addr_t'(i * 4), med3(x, y, z));
      end
    end
  endtask

  int chunks_done [NC];
  task automatic multiply2(int c);
    forever begin
      data_t w, ok;
      int start;
      do begin
        ld(c, WORK, w, OP_LR);
        if (w - WORK >= N) break;
        sc(c, WORK, w + CHUNK, ok);
      end while (ok == 0);
      if (w - WORK >= N) break;
      start = int'(w - WORK);
      for (int i = start; i < start + CHUNK; i++) begin
        data_t x, y;
        ld(c, A + addr_t'(i * 4), x);
        ld(c, B + addr_t'(i * 4), y);
        st(c, R + addr_t'(i * 4), x * y);
      end
      chunks_done[c]++;
    end
  endtask

  initial begin
    data_t d;
    for (int c = 0; c < NC; c++) begin
      i_req_valid[c] = 1'b0; i_req_addr[c] = '0; i_resp_ready[c] = 1'b1;
      d_req_valid[c] = 1'b0; d_req[c] = '0; d_resp_ready[c] = 1'b1;
      got[c] = 1'b0; chunks_done[c] = 0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // hello
    st(1, FIFO_TAIL, 0);
    st(0, FIFO_HEAD, 0);
    repeat (50) @(posedge clk);
    fork
      producer(0);
      consumer(1);
    join
    check(received == TEXT, $sformatf("hello: received \"%s\"", received));

    // mc_vvadd and mc_median, static split
    fork
      vvadd(0);
      vvadd(1);
    join
    fork
      median(0);
      median(1);
    join
    repeat (100) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      int c;
      c = (i < N / 2) ? 1 : 0;          // read back by the core that did not write it
      ld(c, C + addr_t'(i * 4), d);
      check(d == a_of(i) + b_of(i), $sformatf("vvadd C[%0d] = %h", i, d));
      ld(c, MED + addr_t'(i * 4), d);
      check(d == ((i == 0 || i == N - 1) ? a_of(i) : med3(a_of(i - 1), a_of(i), a_of(i + 1))),
            $sformatf("median M[%0d] = %h", i, d));
    end

    // mc_multiply2, dynamic split: the work counter starts at its own address
    fork
      multiply2(0);
      multiply2(1);
    join
    repeat (100) @(posedge clk);
    $display("multiply2: core 0 took %0d chunks, core 1 took %0d", chunks_done[0], chunks_done[1]);
    check(chunks_done[0] + chunks_done[1] == N / CHUNK, "every chunk taken exactly once");
    check(chunks_done[0] > 0 && chunks_done[1] > 0, "both cores took work");
    for (int i = 0; i < N; i++) begin
      ld(i % 2, R + addr_t'(i * 4), d);
      check(d == a_of(i) * b_of(i), $sformatf("multiply2 R[%0d] = %h", i, d));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
