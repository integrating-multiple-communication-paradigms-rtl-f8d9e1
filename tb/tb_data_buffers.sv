// tb_data_buffers: checks plain writes and the alignment load with wrap.
//
// A reference copy of all buffers is kept in the testbench. Plain line writes
// and alignment loads (random buffer pair, random shift 0..15) are applied to
// both; for a load, doubleword j of the memory line goes to position j+shift
// of buffer A when that is below 16 and to position j+shift-16 of buffer B
// otherwise, leaving the other doublewords of A and B as they were. After
// every operation all buffers are read back and compared. A simultaneous load
// and write checks that the load wins. Counts loads that wrapped into a second
// buffer and fails if there were none.
module tb_data_buffers;
  import magic_pkg::*;
  localparam int NBUF = 16;
  localparam int BW = $clog2(NBUF);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic ld_valid = 1'b0, wr_valid = 1'b0;
  logic [BW-1:0] ld_buf_a = '0, ld_buf_b = '0, wr_buf = '0, rd_buf = '0;
  logic [DWI_W-1:0] ld_shift = '0;
  line_t ld_line = '0, wr_line = '0, rd_line;

  data_buffers #(.NBUF(NBUF)) dut (.*);

  line_t model [NBUF];
  int n_wrap = 0;

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  task automatic check_all(input string what);
    for (int b = 0; b < NBUF; b++) begin
      @(negedge clk);
      rd_buf = BW'(b);
      #1;
      checks++;
      if (rd_line !== model[b]) begin
        failures++;
        if (failures < 10) $display("FAIL: %s: buffer %0d differs", what, b);
      end
    end
  endtask

  initial begin
    // give every buffer a known value with plain writes
    for (int b = 0; b < NBUF; b++) begin
      @(negedge clk);
      wr_valid = 1'b1; wr_buf = BW'(b); wr_line = rnd_line();
      model[b] = wr_line;
      @(posedge clk);
    end
    @(negedge clk);
    wr_valid = 1'b0;
    check_all("plain write");

    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        wr_valid = 1'b1; wr_buf = BW'($urandom_range(NBUF-1)); wr_line = rnd_line();
        model[wr_buf] = wr_line;
      end else begin
        int a, b, sh;
        a = $urandom_range(NBUF-1);
        b = $urandom_range(NBUF-1);
        if (it % 4 == 1) b = a;
        sh = $urandom_range(15);
        ld_valid = 1'b1; ld_buf_a = BW'(a); ld_buf_b = BW'(b); ld_shift = DWI_W'(sh);
        ld_line = rnd_line();
        for (int j = 0; j < 16; j++) begin
          if (j + sh < 16) model[a][(j+sh)*64 +: 64] = ld_line[j*64 +: 64];
          else             model[b][(j+sh-16)*64 +: 64] = ld_line[j*64 +: 64];
        end
        if (sh != 0) n_wrap++;
        // sometimes also present a write to A: the load must win
        if (it % 5 == 0) begin
          wr_valid = 1'b1; wr_buf = BW'(a); wr_line = rnd_line();
        end
      end
      @(posedge clk);
      @(negedge clk);
      ld_valid = 1'b0; wr_valid = 1'b0;
      if (it % 10 == 0) check_all("after load/write");
    end
    check_all("final");
    check(n_wrap > 0, "loads with a wrap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
