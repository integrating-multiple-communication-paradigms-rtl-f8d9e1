// tb_outbox: checks steering of outgoing messages and the data-buffer read.
//
// The outbox is combinational. For random messages (destination processor,
// request channel or reply channel; with or without a data line) and random
// ready values of the three queues, the testbench checks that exactly the
// chosen queue sees valid, that in_ready follows that queue's ready, that the
// processor gets the reply word, and that a network message carries the
// header and, when it has data, the line of the data buffer it names (a small
// array of lines stands in for the data buffers).
module tb_outbox;
  import magic_pkg::*;
  localparam int NBUF = 16;
  localparam int BW = $clog2(NBUF);

  int checks = 0;
  int failures = 0;

  logic in_valid, in_ready, in_has_data;
  ob_dest_e in_dest;
  dword_t in_pword;
  nhdr_s in_hdr;
  logic [BW-1:0] in_buf, buf_rd_idx;
  line_t buf_rd_line;
  logic proc_valid, proc_ready, nreq_valid, nreq_ready, nrep_valid, nrep_ready;
  dword_t proc_data;
  net_msg_s nreq_msg, nrep_msg;

  outbox #(.NBUF(NBUF)) dut (.*);

  line_t bufs [NBUF];
  assign buf_rd_line = bufs[buf_rd_idx];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int n_dest [3] = '{0, 0, 0};
    for (int b = 0; b < NBUF; b++)
      for (int i = 0; i < LINE_W / 32; i++) bufs[b][i*32 +: 32] = $urandom;
    for (int it = 0; it < 2000; it++) begin
      bit rdy;
      net_msg_s exp;
      in_valid    = ($urandom_range(7) != 0);
      in_dest     = ob_dest_e'($urandom_range(2));
      in_pword    = {$urandom, $urandom};
      in_hdr      = nhdr_s'({$urandom, $urandom, $urandom, $urandom});
      in_has_data = $urandom_range(1);
      in_buf      = BW'($urandom);
      proc_ready  = $urandom_range(1);
      nreq_ready  = $urandom_range(1);
      nrep_ready  = $urandom_range(1);
      #1;
      rdy = (in_dest == OB_PROC) ? proc_ready : (in_dest == OB_NET_REQ) ? nreq_ready : nrep_ready;
      check(in_ready == rdy, "in_ready follows the chosen queue");
      check(proc_valid == (in_valid && in_dest == OB_PROC), "processor valid");
      check(nreq_valid == (in_valid && in_dest == OB_NET_REQ), "request valid");
      check(nrep_valid == (in_valid && in_dest == OB_NET_REP), "reply valid");
      exp.hdr = in_hdr;
      exp.has_data = in_has_data;
      exp.data = in_has_data ? bufs[in_buf] : '0;
      if (in_dest == OB_PROC)    check(proc_data == in_pword, "reply word");
      if (in_dest == OB_NET_REQ) check(nreq_msg == exp, "request message with buffer data");
      if (in_dest == OB_NET_REP) check(nrep_msg == exp, "reply message with buffer data");
      if (in_valid && rdy) n_dest[int'(in_dest)]++;
    end
    check(n_dest[0] > 0 && n_dest[1] > 0 && n_dest[2] > 0, "all three destinations used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
