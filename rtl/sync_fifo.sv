// sync_fifo: small synchronous FIFO used for the message and response queues.
//
// DEPTH entries of any type T held in a register array with read and write
// pointers and an occupancy count. Enqueue when in_valid && in_ready; the head
// is visible on out_data while out_valid, and is removed when out_ready. A
// full FIFO refuses an enqueue even in a cycle it is dequeued, so that
// in_ready never depends on out_ready. There is no
// pass-through: data enqueued in a cycle appears at the output in the next.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [PW:0]   count;

  logic do_enq, do_deq;

  assign out_valid = (count != 0);
  assign in_ready  = (count < (PW+1)'(DEPTH));
  assign out_data  = mem[rd_ptr];
  assign do_enq    = in_valid && in_ready;
  assign do_deq    = out_valid && out_ready;

  function automatic logic [PW-1:0] bump(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_enq) wr_ptr <= bump(wr_ptr);
      if (do_deq) rd_ptr <= bump(rd_ptr);
      count <= count + (PW+1)'(do_enq) - (PW+1)'(do_deq);
    end
  end

  always_ff @(posedge clk) begin
    if (do_enq) mem[wr_ptr] <= in_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= (PW+1)'(DEPTH));
endmodule
