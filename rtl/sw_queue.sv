// sw_queue: the MAGIC software queue of pending tasks.
//
// Long operations, above all a user-message transfer, do not run to the end in
// one handler invocation. The transfer handler sends a few components and then
// reschedules itself on the software queue, so that processor and network
// requests are served in between and the outgoing queues can drain. A task is
// named by a fixed-format header (task kind and record index); only the header
// of the first task is held in a MAGIC register (head_task/head_valid), which
// the dispatcher treats as a fourth input queue of lowest priority.
//
// Interface: enq_valid/enq_ready/enq_task/enq_front. enq_front places the task
// in front of the current head (back-to-back service of the same task), else at
// the tail. deq pops the head; the next task is loaded into the head register
// at the same edge, which is the scheduling step every task performs before it
// gives up the protocol processor. Timing: a task enqueued into an empty queue
// is at the head on the next cycle.
// In the published design the tasks behind the head form a linked list in main
// memory. Here they are held in a small circular buffer of NTASK entries next
// to the head register, which is this design's simplification.
module sw_queue #(
  parameter type         T     = logic [7:0],
  parameter int unsigned NTASK = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enq_valid,
  output logic enq_ready,
  input  T     enq_task,
  input  logic enq_front,
  output logic head_valid,
  output T     head_task,
  input  logic deq
);
  localparam int unsigned AW = $clog2(NTASK);

  T                rest [NTASK];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic [AW:0]     count;
  T                head_q;
  logic            head_v;

  assign head_valid = head_v;
  assign head_task  = head_q;
  assign enq_ready  = !head_v || (count < (AW+1)'(NTASK));

  wire do_enq = enq_valid && enq_ready;
  wire do_deq = deq && head_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_v <= 1'b0;
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_deq && do_enq) begin
        if (enq_front || count == '0) begin
          head_q <= enq_task;
        end else begin
          head_q       <= rest[rd_ptr];
          rd_ptr       <= rd_ptr + 1'b1;
          rest[wr_ptr] <= enq_task;
          wr_ptr       <= wr_ptr + 1'b1;
        end
      end else if (do_deq) begin
        if (count != '0) begin
          head_q <= rest[rd_ptr];
          rd_ptr <= rd_ptr + 1'b1;
          count  <= count - 1'b1;
        end else begin
          head_v <= 1'b0;
        end
      end else if (do_enq) begin
        if (!head_v) begin
          head_q <= enq_task;
          head_v <= 1'b1;
        end else if (enq_front) begin
          rest[rd_ptr - 1'b1] <= head_q;
          rd_ptr <= rd_ptr - 1'b1;
          count  <= count + 1'b1;
          head_q <= enq_task;
        end else begin
          rest[wr_ptr] <= enq_task;
          wr_ptr <= wr_ptr + 1'b1;
          count  <= count + 1'b1;
        end
      end
    end
  end

  a_empty_head: assert property (@(posedge clk) disable iff (!rst_n) !head_v |-> count == '0);
endmodule
