// mc_proc_tb: end-to-end test of the two-core memory system at its default
// size, with two test threads standing in for the cores and a behavioural
// main memory.
//
//  1. Instruction fetch: each core fetches a code region twice (misses, then
//     hits) and checks every word against the memory's initial contents.
//  2. Private data: each core runs a random mix of loads and stores on its
//     own 4 KiB window, with up to 8 loads outstanding, and checks each load
//     against a reference model. This drives store-queue bypass, hits under
//     misses, replacements and dirty write-backs.
//  3. Sharing: core 0 writes a block that core 1 then reads (M -> S
//     downgrade with write-back).
//  4. Atomic counter: each core adds 1 to a shared counter 1000 times with
//     load-linked / store-conditional, retrying on failure; the counter must
//     end at 2000.
//  5. Plain counter: the same with load and store; updates are lost, so the
//     counter must end at 1000 or more but below 2000.
//  6. Shared random traffic: both cores load and store on the same 8 lines;
//     every load must return a value that was stored there (or the initial
//     one), and afterwards both cores must read the same values.
// Throughout, a monitor checks that no line is held in M by one cache while
// the other holds it at all.
// Every mechanism below must be seen at least once, or it counts as a
// failure.
module mc_proc_tb;
  import mc_pkg::*;

  localparam int NC = 2;
  localparam int INCS = 1000;

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

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- responses
  logic  got   [NC][16];
  data_t gdata [NC][16];
  always @(negedge clk) begin
    for (int c = 0; c < NC; c++)
      if (rst_n && d_resp_valid[c]) begin
        if (got[c][d_resp[c].rid]) begin
          failures++;
          $display("FAIL: core %0d response for rid %0d not yet read", c, d_resp[c].rid);
        end
        got[c][d_resp[c].rid]   <= 1'b1;
        gdata[c][d_resp[c].rid] <= d_resp[c].data;
      end
  end

  task automatic dsend(int c, mem_op_t op, addr_t a, data_t d, rid_t rid);
    @(negedge clk);
    d_req_valid[c] = 1'b1;
    d_req[c]       = '{op: op, addr: a, data: d, rid: rid};
    #1;
    while (!d_req_ready[c]) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    d_req_valid[c] = 1'b0;
  endtask

  task automatic dwait(int c, rid_t rid, output data_t d);
    while (!got[c][rid]) @(posedge clk);
    @(negedge clk);
    d = gdata[c][rid];
    got[c][rid] = 1'b0;
  endtask

  task automatic dop(int c, mem_op_t op, addr_t a, data_t din, output data_t d);
    dsend(c, op, a, din, 4'd15);
    dwait(c, 4'd15, d);
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_bypass, n_hit_under_miss, n_evict_dirty, n_sc_ok, n_sc_fail, n_link_broken;
  int n_ppp_downgrade, n_upgrade_nodata, n_lb_serve, n_sq_write, n_imiss, n_ihit;

  task automatic count_cache(nbc_act_t act, logic lb_busy, logic evict_dirty,
                             logic sc_ok, logic link_hit_dg);
    if (act == NBC_LD_BYPASS) n_bypass++;
    if (act == NBC_LD_HIT && lb_busy) n_hit_under_miss++;
    if (act == NBC_EVICT && evict_dirty) n_evict_dirty++;
    if (sc_ok) n_sc_ok++;
    if (act == NBC_SC_FAIL || act == NBC_SQ_SCFAIL) n_sc_fail++;
    if (link_hit_dg) n_link_broken++;
    if (act == NBC_LB_SERVE) n_lb_serve++;
    if (act == NBC_SQ_WRITE) n_sq_write++;
  endtask

  always @(negedge clk) if (rst_n) begin
    count_cache(dut.g_core[0].u_dcache.act,
                dut.g_core[0].u_dcache.lb_v.or() != 1'b0,
                dut.g_core[0].u_dcache.tp_msg.has_data,
                (dut.g_core[0].u_dcache.rq_in_valid && dut.g_core[0].u_dcache.rq_in.data == 1 &&
                 (dut.g_core[0].u_dcache.act inside {NBC_ST_HIT, NBC_SQ_WRITE})),
                (dut.g_core[0].u_dcache.act == NBC_DG && dut.g_core[0].u_dcache.fp_msg.state == MSI_I &&
                 dut.g_core[0].u_dcache.link_valid &&
                 dut.g_core[0].u_dcache.link_line == dut.g_core[0].u_dcache.fp_msg.addr));
    count_cache(dut.g_core[1].u_dcache.act,
                dut.g_core[1].u_dcache.lb_v.or() != 1'b0,
                dut.g_core[1].u_dcache.tp_msg.has_data,
                (dut.g_core[1].u_dcache.rq_in_valid && dut.g_core[1].u_dcache.rq_in.data == 1 &&
                 (dut.g_core[1].u_dcache.act inside {NBC_ST_HIT, NBC_SQ_WRITE})),
                (dut.g_core[1].u_dcache.act == NBC_DG && dut.g_core[1].u_dcache.fp_msg.state == MSI_I &&
                 dut.g_core[1].u_dcache.link_valid &&
                 dut.g_core[1].u_dcache.link_line == dut.g_core[1].u_dcache.fp_msg.addr));
    if (dut.u_ppp.act == PPP_DOWNGRADE) n_ppp_downgrade++;
    if (dut.u_ppp.act == PPP_GRANT_NODATA) n_upgrade_nodata++;
    for (int c = 0; c < NC; c++)
      if (i_req_valid[c] && i_req_ready[c]) begin
        if (c == 0 ? dut.g_core[0].u_icache.req_hit : dut.g_core[1].u_icache.req_hit) n_ihit++;
        else n_imiss++;
      end
  end

  // ---------------------------------------------------------------- coherence invariant
  // Single writer: a line held in M by one cache is held by no other.
  int n_swmr_checks = 0;
  always @(negedge clk) if (rst_n) begin
    for (int r = 0; r < 16; r++)
      if (dut.g_core[0].u_dcache.tags[r] == dut.g_core[1].u_dcache.tags[r] &&
          dut.g_core[0].u_dcache.st[r] != MSI_I && dut.g_core[1].u_dcache.st[r] != MSI_I) begin
        n_swmr_checks++;
        if (dut.g_core[0].u_dcache.st[r] == MSI_M || dut.g_core[1].u_dcache.st[r] == MSI_M) begin
          failures++;
          $display("FAIL: row %0d held by both caches with one in M", r);
        end
      end
  end

  // ---------------------------------------------------------------- phases
  task automatic ifetch(int c);
    for (int pass = 0; pass < 2; pass++)
      for (int k = 0; k < 48; k++) begin
        addr_t a;
        a = 32'h0000_8000 + addr_t'(c * 32'h800) + addr_t'(k * 4 * 3);
        @(negedge clk);
        i_req_valid[c] = 1'b1;
        i_req_addr[c]  = a;
        #1;
        while (!i_req_ready[c]) begin
          @(negedge clk);
          #1;
        end
        @(negedge clk);
        i_req_valid[c] = 1'b0;
        while (!i_resp_valid[c]) @(negedge clk);
        check(i_resp_data[c] == a, $sformatf("core %0d fetch %h gave %h", c, a, i_resp_data[c]));
        @(negedge clk);   // response taken at the posedge before this edge
      end
  endtask

  task automatic private_mix(int c);
    data_t ref_mem [addr_t];
    data_t exp_d   [16];
    logic  busy    [16];
    addr_t base;
    int    next_rid;
    base = 32'h0000_2000 + addr_t'(c * 32'h4000);
    for (int r = 0; r < 16; r++) busy[r] = 1'b0;
    next_rid = 0;
    for (int n = 0; n < 400; n++) begin
      addr_t a;
      a = base + addr_t'(($urandom % 1024) * 4);
      if (!ref_mem.exists(a)) ref_mem[a] = a;
      if ($urandom % 2 == 0) begin
        data_t v;
        v = $urandom;
        dsend(c, OP_ST, a, v, '0);
        ref_mem[a] = v;
      end else begin
        // take a rid; retire one if needed (only rids 0..7 are used here)
        if (busy[next_rid]) begin
          data_t d;
          dwait(c, rid_t'(next_rid), d);
          check(d == exp_d[next_rid], $sformatf("core %0d load rid %0d: %h, expected %h",
                                                c, next_rid, d, exp_d[next_rid]));
          busy[next_rid] = 1'b0;
        end
        exp_d[next_rid] = ref_mem[a];
        busy[next_rid]  = 1'b1;
        dsend(c, OP_LD, a, '0, rid_t'(next_rid));
        next_rid = (next_rid + 1) % 8;
      end
    end
    for (int r = 0; r < 8; r++)
      if (busy[r]) begin
        data_t d;
        dwait(c, rid_t'(r), d);
        check(d == exp_d[r], $sformatf("core %0d load rid %0d: %h, expected %h", c, r, d, exp_d[r]));
      end
    // read everything back once the store queue has drained
    repeat (100) @(posedge clk);
    foreach (ref_mem[a]) begin
      data_t d;
      dop(c, OP_LD, a, '0, d);
      check(d == ref_mem[a], $sformatf("core %0d read-back %h: %h, expected %h", c, a, d, ref_mem[a]));
    end
  endtask

  task automatic atomic_incs(int c, addr_t a);
    for (int n = 0; n < INCS; n++) begin
      data_t v, ok;
      do begin
        dop(c, OP_LR, a, '0, v);
        dop(c, OP_SC, a, v + 1, ok);
      end while (ok == 0);
    end
  endtask

  task automatic plain_incs(int c, addr_t a);
    for (int n = 0; n < INCS; n++) begin
      data_t v;
      dop(c, OP_LD, a, '0, v);
      dsend(c, OP_ST, a, v + 1, '0);
    end
  endtask

  // random loads and stores by both cores on 8 shared lines; every value
  // written is unique and remembered, so each load must return the initial
  // word or a value some core stored to that address
  data_t written [addr_t][$];
  task automatic shared_mix(int c);
    for (int n = 0; n < 300; n++) begin
      addr_t a;
      data_t d;
      a = 32'h0000_7000 + addr_t'(($urandom % 8) * 64 + ($urandom % 4) * 4);
      if ($urandom % 2) begin
        d = {8'(c + 1), 24'(n)};
        written[a].push_back(d);
        dsend(c, OP_ST, a, d, '0);
      end else begin
        bit ok;
        dop(c, OP_LD, a, '0, d);
        ok = (d == a);
        if (written.exists(a)) foreach (written[a][k]) if (written[a][k] == d) ok = 1'b1;
        check(ok, $sformatf("core %0d shared load %h returned %h, never written", c, a, d));
      end
    end
  endtask

  localparam addr_t ATOMIC_CTR = 32'h0000_1000;
  localparam addr_t PLAIN_CTR  = 32'h0000_1040;
  localparam addr_t SHARED     = 32'h0000_1800;

  initial begin
    int unsigned cyc0;
    data_t d;
    for (int c = 0; c < NC; c++) begin
      i_req_valid[c]  = 1'b0;
      i_req_addr[c]   = '0;
      i_resp_ready[c] = 1'b1;
      d_req_valid[c]  = 1'b0;
      d_req[c]        = '0;
      d_resp_ready[c] = 1'b1;
      for (int r = 0; r < 16; r++) got[c][r] = 1'b0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    fork
      ifetch(0);
      ifetch(1);
      private_mix(0);
      private_mix(1);
    join

    // sharing: core 0 writes, core 1 reads
    for (int k = 0; k < 16; k++) dsend(0, OP_ST, SHARED + addr_t'(k * 4), 32'hC0DE_0000 + k, '0);
    repeat (50) @(posedge clk);
    for (int k = 0; k < 16; k++) begin
      dop(1, OP_LD, SHARED + addr_t'(k * 4), '0, d);
      check(d == 32'hC0DE_0000 + k, $sformatf("shared word %0d: %h", k, d));
    end

    // incrementers, atomic
    cyc0 = $time / 10;
    fork
      atomic_incs(0, ATOMIC_CTR);
      atomic_incs(1, ATOMIC_CTR);
    join
    $display("atomic incrementers: %0d cycles", $time / 10 - cyc0);
    repeat (50) @(posedge clk);
    dop(0, OP_LD, ATOMIC_CTR, '0, d);
    check(d == ATOMIC_CTR + 2 * INCS, $sformatf("atomic counter %0d, expected %0d", d - ATOMIC_CTR, 2 * INCS));
    dop(1, OP_LD, ATOMIC_CTR, '0, d);
    check(d == ATOMIC_CTR + 2 * INCS, $sformatf("atomic counter seen by core 1: %0d", d - ATOMIC_CTR));

    // incrementers, plain
    fork
      plain_incs(0, PLAIN_CTR);
      plain_incs(1, PLAIN_CTR);
    join
    repeat (100) @(posedge clk);
    dop(1, OP_LD, PLAIN_CTR, '0, d);
    $display("plain incrementers: counter %0d of %0d", d - PLAIN_CTR, 2 * INCS);
    check(d - PLAIN_CTR >= INCS && d - PLAIN_CTR < 2 * INCS,
          $sformatf("plain counter %0d out of range", d - PLAIN_CTR));

    // shared random traffic; afterwards both cores must agree on every word
    fork
      shared_mix(0);
      shared_mix(1);
    join
    repeat (100) @(posedge clk);
    for (int l = 0; l < 8; l++)
      for (int w = 0; w < 4; w++) begin
        data_t d0, d1;
        addr_t a;
        a = 32'h0000_7000 + addr_t'(l * 64 + w * 4);
        dop(0, OP_LD, a, '0, d0);
        dop(1, OP_LD, a, '0, d1);
        check(d0 == d1, $sformatf("cores disagree on %h: %h vs %h", a, d0, d1));
      end
    check(n_swmr_checks > 0, "no line was ever shared");

    $display("bypass=%0d hit_under_miss=%0d dirty_evict=%0d sc_ok=%0d sc_fail=%0d link_broken=%0d",
             n_bypass, n_hit_under_miss, n_evict_dirty, n_sc_ok, n_sc_fail, n_link_broken);
    $display("ppp_downgrade=%0d upgrade_nodata=%0d lb_serve=%0d sq_write=%0d imiss=%0d ihit=%0d",
             n_ppp_downgrade, n_upgrade_nodata, n_lb_serve, n_sq_write, n_imiss, n_ihit);
    check(n_bypass > 0, "no store-queue bypass seen");
    check(n_hit_under_miss > 0, "no hit under miss seen");
    check(n_evict_dirty > 0, "no dirty eviction seen");
    check(n_sc_ok > 0, "no successful store-conditional seen");
    check(n_sc_fail > 0, "no failed store-conditional seen");
    check(n_link_broken > 0, "no link broken by an invalidation seen");
    check(n_ppp_downgrade > 0, "no downgrade request seen");
    check(n_upgrade_nodata > 0, "no S->M upgrade without data seen");
    check(n_lb_serve > 0, "no load-buffer answer seen");
    check(n_sq_write > 0, "no store-queue write seen");
    check(n_imiss > 0 && n_ihit > 0, "instruction cache hits and misses not both seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
