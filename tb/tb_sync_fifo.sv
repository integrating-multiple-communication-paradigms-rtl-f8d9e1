// tb_sync_fifo: checks the hardware queue against a reference queue.
//
// Random pushes and pops (each side asserts its handshake with a random
// probability, changed per phase so that the FIFO runs empty, full and in
// between) are mirrored into an SV queue. Every cycle the testbench checks
// out_valid, in_ready, free_slots and, on a pop, the data and its order.
// Counts how often the FIFO was seen full and empty and fails if either
// never happened.
module tb_sync_fifo;
  localparam int DEPTH = 8;
  typedef logic [15:0] T;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic in_valid = 1'b0, out_ready = 1'b0;
  T in_data = '0;
  logic in_ready, out_valid;
  T out_data;
  logic [$clog2(DEPTH+1)-1:0] free_slots;

  sync_fifo #(.T(T), .DEPTH(DEPTH)) dut (.*);

  T model [$];
  int n_full = 0, n_empty = 0, n_pop = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int p_in, p_out;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 12; phase++) begin
      p_in  = (phase % 3 == 0) ? 90 : (phase % 3 == 1) ? 20 : 55;
      p_out = (phase % 3 == 0) ? 20 : (phase % 3 == 1) ? 90 : 55;
      for (int c = 0; c < 200; c++) begin
        @(negedge clk);
        in_valid  = ($urandom_range(99) < p_in);
        in_data   = T'($urandom);
        out_ready = ($urandom_range(99) < p_out);
        // compare with the model before the edge
        check(out_valid == (model.size() != 0), "out_valid matches occupancy");
        check(in_ready == (model.size() < DEPTH), "in_ready matches occupancy");
        check(int'(free_slots) == DEPTH - model.size(), "free_slots");
        if (out_valid && model.size() != 0) check(out_data == model[0], "head data in order");
        if (model.size() == DEPTH) n_full++;
        if (model.size() == 0) n_empty++;
        @(posedge clk);
        if (out_valid && out_ready) begin
          void'(model.pop_front());
          n_pop++;
        end
        if (in_valid && in_ready) model.push_back(in_data);
      end
    end
    $display("INFO: pops=%0d full=%0d empty=%0d", n_pop, n_full, n_empty);
    check(n_full > 0, "queue reached full");
    check(n_empty > 0, "queue ran empty");
    check(n_pop > 500, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
