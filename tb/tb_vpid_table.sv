// tb_vpid_table: checks writes and lookups of the virtual-PID table.
//
// Random entries (some marked invalid, some rewritten) are written while a
// reference array records them; every virtual PID, including numbers beyond
// the table, is then looked up and hit, node and OS PID are compared with the
// reference. A hit is expected only for an in-range entry written valid.
module tb_vpid_table;
  import magic_pkg::*;
  localparam int NVPID = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic wr_valid = 1'b0, wr_ok = 1'b0;
  logic [15:0] wr_vpid = '0, lk_vpid = '0;
  node_t wr_node = '0;
  pid_t wr_ospid = '0;
  logic lk_hit;
  node_t lk_node;
  pid_t lk_ospid;

  vpid_table #(.NVPID(NVPID)) dut (.*);

  bit    m_ok [NVPID];
  node_t m_node [NVPID];
  pid_t  m_pid [NVPID];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic lookup_all(input bit expect_hits);
    int hits = 0;
    for (int v = 0; v < NVPID + 8; v++) begin
      @(negedge clk);
      lk_vpid = 16'(v);
      #1;
      if (v < NVPID) begin
        check(lk_hit == m_ok[v], $sformatf("hit for vpid %0d", v));
        if (m_ok[v]) begin
          check(lk_node == m_node[v] && lk_ospid == m_pid[v], $sformatf("entry for vpid %0d", v));
          hits++;
        end
      end else begin
        check(!lk_hit, $sformatf("no hit beyond the table (vpid %0d)", v));
      end
    end
    check((hits > 0) == expect_hits, "hits only once entries were written");
  endtask

  initial begin
    for (int v = 0; v < NVPID; v++) m_ok[v] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    lookup_all(1'b0);       // empty after reset
    for (int i = 0; i < 150; i++) begin
      @(negedge clk);
      wr_valid = 1'b1;
      wr_vpid  = 16'($urandom_range(NVPID + 3));
      wr_ok    = ($urandom_range(3) != 0);
      wr_node  = node_t'($urandom);
      wr_ospid = pid_t'($urandom);
      if (int'(wr_vpid) < NVPID) begin
        m_ok[wr_vpid] = wr_ok;
        m_node[wr_vpid] = wr_node;
        m_pid[wr_vpid] = wr_ospid;
      end
      @(posedge clk);
      @(negedge clk);
      wr_valid = 1'b0;
      if (i % 50 == 49) lookup_all(1'b1);
    end
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
