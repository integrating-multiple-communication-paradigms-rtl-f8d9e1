// tb_xlate_inval_table: checks insert, remove and invalidate of the
// translation invalidation table.
//
// A reference array holds (used, V, PA, VA) per entry. Random operations:
// insert a page (physical pages drawn from a small set so that hash buckets
// chain several entries and the same page is held by several entries),
// remove a random used entry, or invalidate a physical page. After each
// operation completes (insert is single-cycle; remove and invalidate wait for
// `done`), the number of entries invalidated is compared and all entries are
// read back through the read port. Insert index and insert-ok are compared
// with "lowest free entry". Counts invalidations that hit more than one
// entry and removals from the middle of a chain.
module tb_xlate_inval_table;
  import magic_pkg::*;
  localparam int NENT = 16;
  localparam int NBKT = 8;
  localparam int IW = $clog2(NENT);
  localparam int PPN_W = PADDR_W - 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic op_ready, ins_valid = 1'b0, rem_valid = 1'b0, inv_valid = 1'b0, done, ins_ok, rd_v;
  logic [PPN_W-1:0] ins_pa = '0, inv_pa = '0, rd_pa;
  logic [51:0] ins_va = '0, rd_va;
  logic [IW-1:0] ins_idx, rem_idx = '0, rd_idx = '0;
  logic [IW:0] inv_count;

  xlate_inval_table #(.NENT(NENT), .NBKT(NBKT)) dut (.*);

  bit m_used [NENT];
  bit m_v [NENT];
  logic [PPN_W-1:0] m_pa [NENT];
  logic [51:0] m_va [NENT];
  int n_multi = 0, n_rem = 0, n_ins_full = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [PPN_W-1:0] pick_pa();
    // pages 0..11: with 8 buckets several pages share a bucket
    return PPN_W'($urandom_range(11)) ^ (PPN_W'(1) << 20);
  endfunction

  task automatic wait_done();
    int t = 0;
    while (!done && t < 100) begin @(posedge clk); t++; end
    check(done, "operation finished");
  endtask

  task automatic check_entries();
    for (int i = 0; i < NENT; i++) begin
      @(negedge clk);
      rd_idx = IW'(i);
      #1;
      check(rd_v == (m_used[i] && m_v[i]), $sformatf("V of entry %0d", i));
      if (m_used[i]) check(rd_pa == m_pa[i] && rd_va == m_va[i], $sformatf("PA/VA of entry %0d", i));
    end
  endtask

  initial begin
    for (int i = 0; i < NENT; i++) begin m_used[i] = 0; m_v[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 400; it++) begin
      int kind, nused;
      kind = $urandom_range(9);
      nused = 0;
      foreach (m_used[i]) nused += m_used[i];
      @(negedge clk);
      check(op_ready, "idle between operations");
      if (kind < 5 || nused == 0) begin
        int exp_idx;
        exp_idx = -1;
        for (int i = NENT - 1; i >= 0; i--) if (!m_used[i]) exp_idx = i;
        ins_pa = pick_pa();
        ins_va = {$urandom, 20'($urandom)};
        #1;
        check(ins_ok == (exp_idx >= 0), "insert ok = a free entry exists");
        if (exp_idx >= 0) check(int'(ins_idx) == exp_idx, "insert takes the lowest free entry");
        else n_ins_full++;
        ins_valid = 1'b1;
        @(posedge clk);
        @(negedge clk);
        ins_valid = 1'b0;
        if (exp_idx >= 0) begin
          m_used[exp_idx] = 1; m_v[exp_idx] = 1; m_pa[exp_idx] = ins_pa; m_va[exp_idx] = ins_va;
        end
      end else if (kind < 8) begin
        int k, r;
        k = $urandom_range(nused - 1);
        r = -1;
        for (int i = 0; i < NENT; i++) if (m_used[i]) begin
          if (k == 0 && r < 0) r = i;
          k--;
        end
        rem_idx = IW'(r);
        rem_valid = 1'b1;
        @(posedge clk);
        @(negedge clk);
        rem_valid = 1'b0;
        wait_done();
        m_used[r] = 0; m_v[r] = 0;
        n_rem++;
      end else begin
        int cnt;
        cnt = 0;
        inv_pa = pick_pa();
        for (int i = 0; i < NENT; i++)
          if (m_used[i] && m_v[i] && m_pa[i] == inv_pa) begin m_v[i] = 0; cnt++; end
        inv_valid = 1'b1;
        @(posedge clk);
        @(negedge clk);
        inv_valid = 1'b0;
        wait_done();
        check(int'(inv_count) == cnt, "number of entries invalidated");
        if (cnt > 1) n_multi++;
      end
      if (it % 4 == 0) check_entries();
    end
    check_entries();
    $display("INFO: multi-entry invalidations=%0d removals=%0d inserts into a full table=%0d", n_multi, n_rem, n_ins_full);
    check(n_multi > 0, "an invalidation hit several entries");
    check(n_rem > 0, "removals happened");
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
