// wide_mem_model: behavioural model of main memory behind a WideMem port,
// for simulation only.
//
// LINES lines of LINE_WORDS words. A request with wr_en all zero is a read:
// the line is captured when the request is accepted and returned LATENCY
// cycles later, in order. A request with wr_en set writes the enabled words
// and is not answered. At reset every word holds its own byte address, so a
// test can predict the contents of memory that nothing has written. Only
// the low address bits select a line, so addresses repeat every
// LINES * LINE_WORDS * 4 bytes (64 KiB by default).
module wide_mem_model
  import mc_pkg::*;
#(
  parameter int unsigned LINES   = 1024,
  parameter int unsigned LATENCY = 4,
  parameter int unsigned QDEPTH  = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  input  wide_req_t req,
  output logic      req_ready,
  output logic      resp_valid,
  output line_t     resp,
  input  logic      resp_ready
);
  localparam int unsigned IW = $clog2(LINES);

  line_t   mem   [LINES];
  line_t   q_d   [QDEPTH];
  longint  q_due [QDEPTH];
  int      q_head, q_tail, q_count;
  longint  now;
  int      reads, writes;

  function automatic int unsigned idx(addr_t a);
    return int'(a[LINE_OFF_W +: IW]);
  endfunction

  initial begin
    for (int unsigned l = 0; l < LINES; l++)
      for (int unsigned w = 0; w < LINE_WORDS; w++)
        mem[l][w*DATA_W +: DATA_W] = DATA_W'(l * LINE_WORDS * 4 + w * 4);
  end

  assign req_ready  = q_count < QDEPTH;
  assign resp_valid = q_count > 0 && now >= q_due[q_head];
  assign resp       = q_d[q_head];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_head  <= 0;
      q_tail  <= 0;
      q_count <= 0;
      now     <= 0;
      reads   <= 0;
      writes  <= 0;
    end else begin
      int cnt;
      now <= now + 1;
      cnt = q_count;
      if (resp_valid && resp_ready) begin
        q_head <= (q_head + 1) % QDEPTH;
        cnt--;
      end
      if (req_valid && req_ready) begin
        if (req.wr_en == '0) begin
          q_d[q_tail]   <= mem[idx(req.addr)];
          q_due[q_tail] <= now + LATENCY;
          q_tail <= (q_tail + 1) % QDEPTH;
          cnt++;
          reads <= reads + 1;
        end else begin
          for (int unsigned w = 0; w < LINE_WORDS; w++)
            if (req.wr_en[w]) mem[idx(req.addr)][w*DATA_W +: DATA_W] <= req.data[w*DATA_W +: DATA_W];
          writes <= writes + 1;
        end
      end
      q_count <= cnt;
    end
  end
endmodule
