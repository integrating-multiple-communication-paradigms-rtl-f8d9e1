// tb_holdoff_counter: checks the translation hold-off protocol.
//
// Drives random acquire / release / change-request / change-done sequences
// (acquire only when acquire_ok, as the handler engine does; release only
// with operations outstanding) against a reference count and pending flag,
// and checks count, acquire_ok, grant and chg_pending every cycle. Counts how
// often a change had to wait for outstanding operations and how often a
// new operation was blocked by a pending change; fails if either never
// happened.
module tb_holdoff_counter;
  localparam int CNT_W = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic acquire = 1'b0, release_op = 1'b0, chg_req = 1'b0, chg_done = 1'b0;
  logic [CNT_W-1:0] count;
  logic chg_pending, acquire_ok, grant;

  holdoff_counter #(.CNT_W(CNT_W)) dut (.*);

  int m_cnt = 0;
  bit m_pend = 1'b0;
  int n_wait = 0, n_blocked = 0, n_grant = 0, n_sat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (cnt=%0d pend=%0d)", what, m_cnt, m_pend);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      check(int'(count) == m_cnt, "count");
      check(chg_pending == m_pend, "chg_pending");
      check(acquire_ok == (!m_pend && m_cnt != (1 << CNT_W) - 1), "acquire_ok");
      check(grant == (m_pend && m_cnt == 0), "grant");
      if (m_cnt == (1 << CNT_W) - 1) n_sat++;
      // stimulus; the phase decides whether operations pile up or drain
      acquire    = ((c / 300) % 2 == 0) ? ($urandom_range(99) < 60) : ($urandom_range(99) < 15);
      release_op = (m_cnt != 0) && ($urandom_range(99) < 35);
      chg_req    = !m_pend && ($urandom_range(99) < 3);
      chg_done   = grant && ($urandom_range(99) < 50);
      if (acquire && !acquire_ok) begin
        n_blocked++;
        acquire = 1'b0;                // the engine does not issue it
      end
      if (chg_req && m_cnt != 0) n_wait++;
      if (chg_done) n_grant++;
      @(posedge clk);
      if (acquire && !release_op) m_cnt++;
      else if (!acquire && release_op) m_cnt--;
      if (chg_req) m_pend = 1'b1;
      else if (chg_done) m_pend = 1'b0;
    end
    @(negedge clk);
    acquire = 1'b0; release_op = 1'b0; chg_req = 1'b0; chg_done = 1'b0;
    $display("INFO: waits=%0d blocked=%0d grants=%0d saturated=%0d", n_wait, n_blocked, n_grant, n_sat);
    check(n_wait > 0, "a change waited for outstanding operations");
    check(n_blocked > 0, "an operation was held off by a pending change");
    check(n_grant > 0, "changes were granted");
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
