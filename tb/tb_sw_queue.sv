// tb_sw_queue: checks the software queue against a reference deque.
//
// Random enqueues at the tail or at the front and random dequeues (also in
// the same cycle) are mirrored into an SV queue; every cycle head_valid,
// head_task and enq_ready are compared with it. The capacity is the head
// register plus NTASK queued tasks. Counts front insertions, simultaneous
// enqueue/dequeue and full-queue refusals; fails if any never happened.
module tb_sw_queue;
  localparam int NTASK = 4;
  typedef logic [7:0] T;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic enq_valid = 1'b0, enq_front = 1'b0, deq = 1'b0;
  T enq_task = '0;
  logic enq_ready, head_valid;
  T head_task;

  sw_queue #(.T(T), .NTASK(NTASK)) dut (.*);

  T model [$];
  int n_front = 0, n_both = 0, n_refused = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (size %0d)", what, model.size());
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      bit e, d;
      @(negedge clk);
      check(head_valid == (model.size() != 0), "head_valid");
      if (model.size() != 0) check(head_task == model[0], "head task");
      check(enq_ready == (model.size() < NTASK + 1), "enq_ready");
      e = ($urandom_range(99) < (((c / 250) % 2 == 0) ? 70 : 30));
      d = ($urandom_range(99) < (((c / 250) % 2 == 0) ? 30 : 70));
      enq_valid = e;
      enq_task  = T'($urandom);
      enq_front = ($urandom_range(3) == 0);
      deq       = d;
      @(posedge clk);
      if (e && !enq_ready) n_refused++;
      // the DUT applies dequeue, then enqueue
      if (d && model.size() != 0) void'(model.pop_front());
      if (e && enq_ready) begin
        if (enq_front) begin
          model.push_front(enq_task);
          n_front++;
        end else begin
          model.push_back(enq_task);
        end
        if (d) n_both++;
      end
    end
    $display("INFO: front=%0d both=%0d refused=%0d", n_front, n_both, n_refused);
    check(n_front > 0, "front insertions happened");
    check(n_both > 0, "simultaneous enqueue and dequeue happened");
    check(n_refused > 0, "full queue refused an enqueue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
