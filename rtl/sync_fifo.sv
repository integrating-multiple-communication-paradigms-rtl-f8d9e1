// sync_fifo: one of the MAGIC hardware queues.
//
// MAGIC buffers every request it receives and every message it sends in
// hardware queues: one from the processor, one to the processor, and a request
// and a reply queue in each direction on the network port (the two network
// channels keep the protocol deadlock free). This module is that queue: a
// single-clock FIFO of DEPTH entries of type T, built as a circular buffer.
//
// Interface: push side valid/ready (in_valid, in_ready), pop side valid/ready
// (out_valid, out_ready); the head is visible on out_data whenever out_valid is
// high (first-word fall-through). free_slots tells the dispatcher how much room
// is left, which it needs to guarantee outgoing space before starting a handler.
// Timing: a pushed entry is visible at the head on the next cycle; push and pop
// may happen in the same cycle. Reset (synchronous, active low) empties the queue.
// The queue depth is not given for the published design; 8 is this design's
// choice.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  T                           in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output T                           out_data,
  output logic [$clog2(DEPTH+1)-1:0] free_slots
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                        mem [DEPTH];
  logic [AW-1:0]           rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;

  wire do_push = in_valid && in_ready;
  wire do_pop  = out_valid && out_ready;

  assign in_ready   = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid  = (count != '0);
  assign out_data   = mem[rd_ptr];
  assign free_slots = DEPTH[$clog2(DEPTH+1)-1:0] - count;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= in_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) in_valid && !in_ready |-> !do_push);
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);
endmodule
