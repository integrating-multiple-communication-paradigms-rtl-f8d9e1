// tb_magic_top: end-to-end test of two MAGIC nodes exchanging user messages.
//
// Two magic_top instances (nodes 0 and 1) are joined by a two-channel
// crossbar that stands in for the network router; each has a memory model
// (reads answered after MEM_LAT cycles, writes applied with their doubleword
// mask, unwritten lines read as a pattern derived from the address) and a
// scripted processor that issues the uncached command sequences of the
// message-passing library. All design parameters stay at their defaults.
//
// Scenario, each step checked against values computed here:
//   1  setup: context switch, virtual-PID table, receive table, status area,
//      preallocated receive buffers;
//   2  unaligned two-page send (source starts at doubleword 9 of a line, pages
//      not contiguous) -> data re-aligned into the receive buffer, receive
//      table entry, status flag;
//   3  a 4 KB page-aligned send (the published performance case) with cycle
//      count per component, with the request channel stalled for a while so
//      the transfer yields on a full queue; then the same send again with
//      node 0's request link limited to 4 bytes per cycle (400 MB/s), which
//      spaces components 36 cycles apart (this link model is the
//      testbench's own; the 400 MB/s figure follows the document);
//   4  initiation answered "retry" (record busy) and "failure" (unknown PID);
//   5  translation change during a description -> retry;
//   6  translation change during a transfer -> retranslation interrupt,
//      processor answers with a new page, data taken from the new page;
//   7  Fetch-and-Add to a remote node (its latency checked against the 88
//      cycles of controller time estimated for the source design; the
//      crossbar adds no network latency) and Swap to the local node;
//      translation change while the Fetch-and-Op holds hold-off -> grant waits;
//   8  message with no matching buffer -> dropped, status 2;
//   9  a component lost in the network -> the receiver detects the gap,
//      discards what follows and asks for a resend; the sender rewinds and
//      the message is delivered intact;
//      Node 1 has armed the arrival interrupt of a blocking receive, which
//      this delivery raises;
//   10 memory copy to a destination address chosen by the sender, with a
//      translation change held off until it completes.
// Every mechanism counter must be non-zero at the end.
module tb_magic_top;
  import magic_pkg::*;

  localparam int MEM_LAT = 30;
  localparam paddr_t STAT_BASE = 40'h0_0000_8000;          // node 0
  localparam paddr_t RTAB_BASE = 40'h0_4000_9000;          // node 1 (node field = 1)
  localparam paddr_t RBUF_A    = 40'h0_4010_0000;
  localparam paddr_t RBUF_B    = 40'h0_4012_0000;
  localparam paddr_t RBUF_C    = 40'h0_4014_0000;
  localparam paddr_t RBUF_D    = 40'h0_4016_0000;
  localparam paddr_t RBUF_E    = 40'h0_4018_0000;          // memory-copy destination
  localparam paddr_t RBUF_F    = 40'h0_401A_0000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- nodes
  logic        preq_valid [2], preq_ready [2];
  proc_req_s   preq       [2];
  logic        prsp_valid [2], prsp_ready [2];
  dword_t      prsp_data  [2];
  logic        irq        [2];
  logic        rirq       [2];
  logic [3:0]  irq_entry  [2];
  logic [51:0] irq_vpn    [2];
  pid_t        irq_pid    [2];
  logic        qi_valid [2], qi_ready [2], ri_valid [2], ri_ready [2];
  net_msg_s    qi [2], ri [2];
  logic        qo_valid [2], qo_ready [2], ro_valid [2], ro_ready [2];
  net_msg_s    qo [2], ro [2];
  logic        m_valid [2], m_ready [2], m_rsp_valid [2];
  mem_req_s    m_req [2];
  line_t       m_rsp [2];
  eng_events_s ev [2];

  for (genvar n = 0; n < 2; n++) begin : g_node
    magic_top u_magic (
      .clk, .rst_n, .my_node(node_t'(n)),
      .proc_req_valid(preq_valid[n]), .proc_req_ready(preq_ready[n]), .proc_req(preq[n]),
      .proc_rsp_valid(prsp_valid[n]), .proc_rsp_ready(prsp_ready[n]), .proc_rsp_data(prsp_data[n]),
      .recv_irq(rirq[n]), .xlate_irq(irq[n]), .xlate_irq_entry(irq_entry[n]), .xlate_irq_vpn(irq_vpn[n]), .xlate_irq_pid(irq_pid[n]),
      .nreq_in_valid(qi_valid[n]), .nreq_in_ready(qi_ready[n]), .nreq_in(qi[n]),
      .nrep_in_valid(ri_valid[n]), .nrep_in_ready(ri_ready[n]), .nrep_in(ri[n]),
      .nreq_out_valid(qo_valid[n]), .nreq_out_ready(qo_ready[n]), .nreq_out(qo[n]),
      .nrep_out_valid(ro_valid[n]), .nrep_out_ready(ro_ready[n]), .nrep_out(ro[n]),
      .mem_req_valid(m_valid[n]), .mem_req_ready(m_ready[n]), .mem_req(m_req[n]),
      .mem_rsp_valid(m_rsp_valid[n]), .mem_rsp_data(m_rsp[n]),
      .events(ev[n]));
  end

  // -------------------------------------------------------------- network
  // Crossbar: destination k takes from source 0 first, then source 1.
  logic stall_req0 = 1'b0;      // hold node 0's outgoing request channel
  logic drop_comp  = 1'b0;      // lose the next component with offset 1
  logic comp_lost  = 1'b0;
  int   stall_cycles = 0;
  // link bandwidth limit on node 0's request channel: 400 MB/s at a 10 ns
  // cycle is 4 bytes per cycle, so a message holds the link for
  // (16 + 128) / 4 = 36 cycles with data and 4 cycles without
  logic net_limit  = 1'b0;
  int   net_busy   = 0;
  int   limit_msgs = 0;
  logic req0_go;
  assign req0_go = !stall_req0 && !(net_limit && net_busy > 0);

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      qi_valid[k] = 1'b0; qi[k] = qo[0];
      ri_valid[k] = 1'b0; ri[k] = ro[0];
    end
    for (int j = 0; j < 2; j++) begin
      qo_ready[j] = 1'b0;
      ro_ready[j] = 1'b0;
    end
    for (int k = 0; k < 2; k++) begin
      // request channel
      if (qo_valid[0] && req0_go && int'(qo[0].hdr.dst_node) == k) begin
        qi_valid[k] = 1'b1; qi[k] = qo[0]; qo_ready[0] = qi_ready[k];
      end else if (qo_valid[1] && int'(qo[1].hdr.dst_node) == k) begin
        qi_valid[k] = 1'b1; qi[k] = qo[1]; qo_ready[1] = qi_ready[k];
      end
      // reply channel
      if (ro_valid[0] && int'(ro[0].hdr.dst_node) == k) begin
        ri_valid[k] = 1'b1; ri[k] = ro[0]; ro_ready[0] = ri_ready[k];
      end else if (ro_valid[1] && int'(ro[1].hdr.dst_node) == k) begin
        ri_valid[k] = 1'b1; ri[k] = ro[1]; ro_ready[1] = ri_ready[k];
      end
    end
    // fault injection: the component is consumed from node 0 but not delivered
    if (drop_comp && !comp_lost && qo_valid[0] && !stall_req0 && qo[0].hdr.mtype == NM_COMP &&
        qo[0].hdr.arg == 64'd1) begin
      qi_valid[int'(qo[0].hdr.dst_node)] = 1'b0;
      qo_ready[0] = 1'b1;
    end
  end

  always @(posedge clk) begin
    if (drop_comp && !comp_lost && qo_valid[0] && !stall_req0 && qo[0].hdr.mtype == NM_COMP &&
        qo[0].hdr.arg == 64'd1)
      comp_lost <= 1'b1;
    if (stall_req0) stall_cycles <= stall_cycles + 1;
    if (net_limit && qo_valid[0] && qo_ready[0]) begin
      net_busy <= (qo[0].has_data ? 144 : 16) / 4 - 1;
      limit_msgs <= limit_msgs + 1;
    end else if (net_busy > 0) begin
      net_busy <= net_busy - 1;
    end
  end

  // --------------------------------------------------------------- memory
  line_t mem0 [paddr_t];
  line_t mem1 [paddr_t];

  function automatic dword_t pat(int n, paddr_t a);
    return {8'(n), 16'hA5A5, a};
  endfunction

  function automatic line_t bg_line(int n, paddr_t la);
    line_t l;
    for (int i = 0; i < DW_PER_LINE; i++) l[i*64 +: 64] = pat(n, la + paddr_t'(i*8));
    return l;
  endfunction

  function automatic line_t get_line(int n, paddr_t la);
    if (n == 0) return mem0.exists(la) ? mem0[la] : bg_line(0, la);
    else        return mem1.exists(la) ? mem1[la] : bg_line(1, la);
  endfunction

  function automatic void put_line(int n, paddr_t la, line_t l);
    if (n == 0) mem0[la] = l; else mem1[la] = l;
  endfunction

  function automatic dword_t peek(int n, paddr_t a);
    line_t l = get_line(n, {a[PADDR_W-1:7], 7'b0});
    return l[a[6:3]*64 +: 64];
  endfunction

  int mem_cnt [2];
  bit mem_busy [2];
  paddr_t mem_addr [2];
  int mem_reads [2];

  for (genvar n = 0; n < 2; n++) begin : g_mem
    assign m_ready[n] = !mem_busy[n];
    always @(posedge clk) begin
      m_rsp_valid[n] <= 1'b0;
      if (!rst_n) begin
        mem_busy[n] <= 1'b0;
        mem_reads[n] <= 0;
      end else if (mem_busy[n]) begin
        if (mem_cnt[n] <= 1) begin
          mem_busy[n]    <= 1'b0;
          m_rsp_valid[n] <= 1'b1;
          m_rsp[n]       <= get_line(n, mem_addr[n]);
        end
        mem_cnt[n] <= mem_cnt[n] - 1;
      end else if (m_valid[n]) begin
        if (m_req[n].we) begin
          line_t l;
          l = get_line(n, m_req[n].addr);
          for (int i = 0; i < DW_PER_LINE; i++)
            if (m_req[n].dw_mask[i]) l[i*64 +: 64] = m_req[n].wdata[i*64 +: 64];
          put_line(n, m_req[n].addr, l);
        end else begin
          mem_busy[n]  <= 1'b1;
          mem_cnt[n]   <= MEM_LAT - 2;
          mem_addr[n]  <= m_req[n].addr;
          mem_reads[n] <= mem_reads[n] + 1;
        end
      end
    end
  end

  // ------------------------------------------------------------ processor
  for (genvar n = 0; n < 2; n++) begin : g_prsp
    assign prsp_ready[n] = 1'b1;
  end

  initial begin
    for (int n = 0; n < 2; n++) begin
      preq_valid[n] = 1'b0;
      preq[n] = '0;
    end
  end

  function automatic paddr_t io_addr(io_cmd_e c);
    return {AS_IO, 38'(c) << 3};
  endfunction

  // virtual address the test gives each physical page: {24'h000070, PPN, offset}
  function automatic dword_t va_of(paddr_t pa);
    return {24'h000070, pa[39:12], 12'h0};
  endfunction

  function automatic paddr_t msg_addr(paddr_t pa);
    return {AS_MSG, pa[PADDR_W-3:0]};
  endfunction

  task automatic pwrite(input int n, input paddr_t a, input dword_t d);
    @(negedge clk);
    preq_valid[n] = 1'b1;
    preq[n] = '{we: 1'b1, addr: a, data: d};
    @(posedge clk);
    while (!preq_ready[n]) @(posedge clk);
    @(negedge clk);
    preq_valid[n] = 1'b0;
  endtask

  // an uncached read blocks the processor until MAGIC answers
  task automatic pread(input int n, input paddr_t a, output dword_t d);
    @(negedge clk);
    preq_valid[n] = 1'b1;
    preq[n] = '{we: 1'b0, addr: a, data: '0};
    @(posedge clk);
    while (!preq_ready[n]) @(posedge clk);
    @(negedge clk);
    preq_valid[n] = 1'b0;
    while (!prsp_valid[n]) @(posedge clk);
    d = prsp_data[n];
    @(posedge clk);
  endtask

  task automatic wait_cycles(input int c);
    repeat (c) @(posedge clk);
  endtask

  // Describe and start a user message; returns the initiation result word.
  task automatic send(input int n, input int vpid, input int flag, input int ty,
                      input int len, input paddr_t pages [], output dword_t res);
    init_cmd_s c;
    c = '{dest_vpid: 16'(vpid), status_flag: 8'(flag), msg_type: 8'(ty),
          num_addrs: 8'(pages.size()), length: LEN_W'(len)};
    pwrite(n, io_addr(IO_MSG_INIT), dword_t'(c));
    foreach (pages[i]) pwrite(n, msg_addr(pages[i]), va_of(pages[i]));
    pread(n, msg_addr('0), res);
  endtask

  // Wait until the status flag `flag` of node 0 is non-zero (the library's poll).
  task automatic wait_flag(input int flag, output dword_t v, input int limit);
    int t = 0;
    v = peek(0, STAT_BASE + paddr_t'(flag * 8));
    while (v == 0 && t < limit) begin
      wait_cycles(10);
      t += 10;
      v = peek(0, STAT_BASE + paddr_t'(flag * 8));
    end
  endtask

  // ------------------------------------------------------ expected data
  // byte offset i of a message whose pages are pg[], starting at pg[0]
  function automatic paddr_t src_addr(paddr_t pg [], int i);
    int first = 4096 - int'(pg[0][11:0]);
    if (i < first) return pg[0] + paddr_t'(i);
    return {pg[1 + (i - first) / 4096][39:12], 12'h0} + paddr_t'((i - first) % 4096);
  endfunction

  task automatic check_delivery(input string name, input paddr_t pg [], input int len,
                                input paddr_t rbase, input int src_node);
    int bad = 0;
    for (int i = 0; i < len; i += 8) begin
      dword_t exp = peek(src_node, src_addr(pg, i));
      dword_t got = peek(1, rbase + paddr_t'(i));
      if (exp !== got) begin
        if (bad < 4) $display("  %s: dword %0d got %h exp %h", name, i / 8, got, exp);
        bad++;
      end
    end
    check(bad == 0, {name, ": receive buffer holds the message"});
    // the doubleword just past the end must be untouched
    if (len % 128 != 0)
      check(peek(1, rbase + paddr_t'(len)) == pat(1, rbase + paddr_t'(len)),
            {name, ": nothing written past the end"});
  endtask


  int n_irq = 0;

  // -------------------------------------------------------------- script
  initial begin : script
    dword_t r, v, old;
    paddr_t pg2 [], pg1 [], pgx [], pgd [];
    int t0, t1, ncomp;

    // the library clears the status flags before it uses them
    put_line(0, STAT_BASE, '0);
    wait_cycles(5);
    rst_n = 1'b1;
    wait_cycles(5);

    // ---- 1: setup
    pwrite(0, io_addr(IO_CTX_SWITCH), 64'h10);
    pwrite(1, io_addr(IO_CTX_SWITCH), 64'h21);
    pwrite(0, io_addr(IO_VPID_SET), {1'b1, 15'b0, 16'd1, 8'b0, 8'd1, 16'h21});   // vpid 1 -> node 1, pid 0x21
    pwrite(0, io_addr(IO_STAT_SETUP), '0);
    pwrite(0, msg_addr(STAT_BASE), 64'h1234_5000);
    pwrite(1, io_addr(IO_RTAB_SETUP), '0);
    pwrite(1, msg_addr(RTAB_BASE), 64'h1234_6000);
    pwrite(1, io_addr(IO_BUFALLOC), {24'b0, 8'd5, 8'b0, 24'd8192});
    pwrite(1, msg_addr(RBUF_A), 64'h2000_0000);
    pwrite(1, io_addr(IO_BUFALLOC), {24'b0, 8'd5, 8'b0, 24'd8192});
    pwrite(1, msg_addr(RBUF_B), 64'h2000_4000);
    pwrite(1, io_addr(IO_BUFALLOC), {24'b0, 8'd6, 8'b0, 24'd16384});
    pwrite(1, msg_addr(RBUF_C), 64'h2000_8000);
    pwrite(1, io_addr(IO_BUFALLOC), {24'b0, 8'd6, 8'b0, 24'd16384});
    pwrite(1, msg_addr(RBUF_D), 64'h2000_C000);

    // ---- 2: unaligned send across two non-contiguous pages
    pg2 = new[2];
    pg2[0] = 40'h0_0002_0F48;     // starts at doubleword 9 of its line
    pg2[1] = 40'h0_0005_7000;
    send(0, 1, 1, 5, 3000, pg2, r);
    check(r[1:0] == INIT_SUCCESS, "unaligned send accepted");
    wait_flag(1, v, 20000);
    check(v == 64'd1, "status flag 1 reports delivery");
    check_delivery("unaligned", pg2, 3000, RBUF_A, 0);
    v = peek(1, RTAB_BASE);
    check(v[63:56] == 8'h01 && v[47:32] == 16'h10 && v[23:0] == 24'd3000, "receive table: sender PID and length");
    check(peek(1, RTAB_BASE + 8) == 64'(RBUF_A), "receive table: buffer address");

    // ---- 3: 4 KB page-aligned send; the request channel is held for the
    //      first 400 cycles (the header takes one queue slot, so a chunk
    //      finds the queue full part-way)
    pg1 = new[1];
    pg1[0] = 40'h0_0003_0000;
    stall_req0 = 1'b1;
    t0 = cycle;
    send(0, 1, 2, 5, 4096, pg1, r);
    check(r[1:0] == INIT_SUCCESS, "page send accepted");
    // ---- 4a: a second description from the same process while busy: retry
    begin
      paddr_t p1 [] = new[1];
      p1[0] = 40'h0_0003_8000;
      send(0, 1, 3, 5, 64, p1, v);
      check(v[1:0] == INIT_RETRY, "busy sender record answers retry");
    end
    wait_cycles(400 - (cycle - t0));
    stall_req0 = 1'b0;
    wait_flag(2, v, 40000);
    t1 = cycle;
    $display("INFO: page send status %h at cycle %0d", v, t1);
    check(v == 64'd1, "page send delivered");
    check_delivery("page", pg1, 4096, RBUF_B, 0);
    ncomp = 4096 / 128;
    $display("INFO: 4 KB page: %0d cycles from initiation to status flag (%0d stalled), %0d cycles per component",
             t1 - t0, 400, (t1 - t0 - 400) / ncomp);
    // hardware engine: one memory read per component plus a few cycles
    check((t1 - t0 - 400) / ncomp <= MEM_LAT + 12, "page send: at most memory latency + 12 cycles per component");
    check(ev[0].yield_full > 0, "transfer yielded on a full request queue");

    // ---- 3b: the same 4 KB page send with node 0's link limited to 400 MB/s
    //      (the published estimate: about 355 MB/s of data, 36 cycles per
    //      component, once the network is the bottleneck)
    pwrite(1, io_addr(IO_BUFALLOC), {24'b0, 8'd5, 8'b0, 24'd8192});
    pwrite(1, msg_addr(RBUF_F), 64'h2000_8000);
    pg1[0] = 40'h0_0003_2000;
    net_limit = 1'b1;
    t0 = cycle;
    send(0, 1, 8, 5, 4096, pg1, r);
    check(r[1:0] == INIT_SUCCESS, "network-limited page send accepted");
    wait_flag(8, v, 40000);
    t1 = cycle;
    net_limit = 1'b0;
    check(v == 64'd1, "network-limited page send delivered");
    check_delivery("network-limited page", pg1, 4096, RBUF_F, 0);
    $display("INFO: 4 KB page at 400 MB/s: %0d cycles from initiation to status flag, %0d cycles per component, %0d MB/s of data",
             t1 - t0, (t1 - t0) / ncomp, 4096 * 100 / (t1 - t0));
    check((t1 - t0) / ncomp >= 36 && (t1 - t0) / ncomp <= 40,
          "network-limited send: 36 to 40 cycles per component");
    check(limit_msgs == ncomp + 1, "header and every component crossed the limited link");

    // ---- 4b: unknown destination: failure
    begin
      paddr_t p1 [] = new[1];
      p1[0] = 40'h0_0003_8000;
      send(0, 7, 3, 5, 64, p1, v);
      check(v[1:0] == INIT_FAIL, "unknown virtual PID answers failure");
    end

    // ---- 5: translation change in the middle of a description
    begin
      init_cmd_s c;
      c = '{dest_vpid: 16'd1, status_flag: 8'd3, msg_type: 8'd6, num_addrs: 8'd1, length: 24'd256};
      pwrite(0, io_addr(IO_MSG_INIT), dword_t'(c));
      pwrite(0, msg_addr(40'h0_0003_8000), 64'h1_0003_8000);
      pwrite(0, io_addr(IO_XLATE_CHG), 64'h0_0003_8000);
      pread(0, io_addr(IO_XLATE_CHG), v);
      check(v == 64'd1, "translation change granted");
      pread(0, msg_addr('0), v);
      check(v[1:0] == INIT_RETRY, "description with a changed page answers retry");
    end

    // ---- 6: translation change during a transfer
    pgx = new[2];
    pgx[0] = 40'h0_0004_0000;
    pgx[1] = 40'h0_0004_1000;
    send(0, 1, 4, 6, 8192, pgx, r);
    check(r[1:0] == INIT_SUCCESS, "two-page send accepted");
    pwrite(0, io_addr(IO_XLATE_CHG), 64'h0_0004_1000);
    pread(0, io_addr(IO_XLATE_CHG), v);
    check(v == 64'd1, "change granted at once (base message passing uses no hold-off)");
    begin
      int t;
      t = 0;
      while (!irq[0] && t < 20000) begin wait_cycles(1); t++; end
      check(irq[0], "retranslation interrupt raised");
      check(irq_pid[0] == 16'h10, "interrupt names the sending process");
      check(irq_vpn[0] == {24'h000070, 28'h0000041}, "interrupt carries the virtual page");
      n_irq++;
      // the OS maps the page elsewhere and tells MAGIC
      pwrite(0, io_addr(IO_XLATE_NEW), {4'b0, irq_entry[0], 16'b0, 40'h0_0006_1000});
    end
    pgx[1] = 40'h0_0006_1000;
    wait_flag(4, v, 60000);
    check(v == 64'd1, "two-page send delivered after retranslation");
    check_delivery("retranslated", pgx, 8192, RBUF_C, 0);

    // ---- 7: Fetch-and-Op
    old = peek(1, 40'h0_4000_0208);
    t0 = cycle;
    pwrite(0, msg_addr(40'h0_4000_0208), {FOP_ADD, 60'd5});
    pread(0, io_addr(IO_FOP_RESULT), v);
    t1 = cycle;
    // the network model adds no latency, so this is the occupancy of the two
    // nodes plus the memory read (about 88 cycles in the source design)
    $display("INFO: remote Fetch-and-Add: %0d cycles from command to result", t1 - t0);
    check(t1 - t0 <= 88, "remote Fetch-and-Add within 88 cycles without network latency");
    check(v == old, "Fetch-and-Add returns the old value");
    check(peek(1, 40'h0_4000_0208) == old + 64'd5, "Fetch-and-Add updates the home node's memory");
    old = peek(0, 40'h0_0000_0310);
    pwrite(0, msg_addr(40'h0_0000_0310), {FOP_SWAP, 60'h123});
    pread(0, io_addr(IO_FOP_RESULT), v);
    check(v == old && peek(0, 40'h0_0000_0310) == 64'h123, "Swap on the local node");
    // translation change while a Fetch-and-Op holds hold-off
    old = peek(1, 40'h0_4000_0400);
    pwrite(0, msg_addr(40'h0_4000_0400), {FOP_OR, 60'hF0});
    pwrite(0, io_addr(IO_XLATE_CHG), 64'h0_0009_0000);
    pread(0, io_addr(IO_XLATE_CHG), v);
    check(v == 64'd1, "translation change granted after the Fetch-and-Op");
    pread(0, io_addr(IO_FOP_RESULT), v);
    check(v == old && peek(1, 40'h0_4000_0400) == (old | 64'hF0), "Fetch-and-Or result");
    check(ev[0].holdoff_wait > 0, "grant waited for hold-off");

    // ---- ordinary base-space write and read through MAGIC
    pwrite(0, 40'h0_0000_0A08, 64'hDEAD_BEEF);
    pread(0, 40'h0_0000_0A08, v);
    check(v == 64'hDEAD_BEEF, "base-space write and read");

    // ---- 8: no matching buffer (type 9 never allocated)
    begin
      paddr_t p1 [] = new[1];
      p1[0] = 40'h0_0003_8000;
      send(0, 1, 5, 9, 256, p1, r);
      check(r[1:0] == INIT_SUCCESS, "send of unexpected type accepted");
      wait_flag(5, v, 20000);
      check(v == 64'd2, "status flag 2 reports the message was dropped");
    end

    // ---- 9: a component lost in the network
    pgd = new[1];
    pgd[0] = 40'h0_0003_A000;
    drop_comp = 1'b1;
    pwrite(1, io_addr(IO_RECV_WAIT), 64'd1);   // node 1's process blocks in receive
    check(!rirq[1], "arrival interrupt quiet while nothing arrived");
    send(0, 1, 6, 6, 384, pgd, r);
    check(r[1:0] == INIT_SUCCESS, "send accepted");
    wait_flag(6, v, 20000);
    check(comp_lost, "component removed by the network");
    check(ev[1].seq_err > 0, "receiver detects the gap in the sequence");
    check(ev[1].retx_req == 1 && ev[0].retx == 1, "one retransmission requested and served");
    check(v == 64'd1, "message delivered after retransmission");
    check_delivery("retransmitted", pgd, 384, RBUF_D, 0);
    check(rirq[1], "arrival interrupt raised for the blocked receiver");
    pwrite(1, io_addr(IO_RECV_WAIT), 64'd0);
    wait_cycles(20);
    check(!rirq[1], "arrival interrupt cleared");

    // ---- 10: memory copy of 1000 bytes from doubleword 3 of a line on node 0
    //      to a line-aligned address on node 1 named by the sender; a
    //      translation change issued meanwhile is granted only after the
    //      acknowledgement, because the copy holds hold-off
    begin
      init_cmd_s c;
      paddr_t pm [] = new[1];
      int hw0;
      pm[0] = 40'h0_0003_C018;
      c = '{dest_vpid: 16'd0, status_flag: 8'd7, msg_type: 8'd0, num_addrs: 8'd1, length: 24'd1000};
      pwrite(0, io_addr(IO_MSG_INIT), dword_t'(c));
      pwrite(0, io_addr(IO_MCOPY_DEST), 64'(RBUF_E));
      pwrite(0, msg_addr(pm[0]), va_of(pm[0]));
      pread(0, msg_addr('0), r);
      check(r[1:0] == INIT_SUCCESS, "memory copy accepted");
      hw0 = ev[0].holdoff_wait;
      pwrite(0, io_addr(IO_XLATE_CHG), 64'h0_0009_1000);
      pread(0, io_addr(IO_XLATE_CHG), v);
      check(peek(0, STAT_BASE + 7 * 8) == 64'd1, "change granted only after the copy completed");
      check(ev[0].holdoff_wait == hw0 + 1, "grant waited for the copy's hold-off");
      check_delivery("memory copy", pm, 1000, RBUF_E, 0);
      check(ev[1].mcopy_done == 1, "receiver completed one memory copy");
    end

    // ---- mechanism counts
    $display("INFO: node0 init_ok=%0d retry=%0d fail=%0d hdr=%0d comp_sent=%0d resched=%0d yield_full=%0d shifted=%0d acks=%0d inval=%0d irq=%0d fop_done=%0d holdoff_wait=%0d",
             ev[0].init_ok, ev[0].init_retry, ev[0].init_fail, ev[0].hdr_sent, ev[0].comp_sent,
             ev[0].resched, ev[0].yield_full, ev[0].shifted_loads, ev[0].acks, ev[0].invalidated,
             ev[0].xlate_irq, ev[0].fop_done, ev[0].holdoff_wait);
    $display("INFO: node1 comp_recv=%0d delivered=%0d dropped=%0d seq_err=%0d retx_req=%0d fop_home=%0d; node0 retx=%0d",
             ev[1].comp_recv, ev[1].delivered, ev[1].dropped, ev[1].seq_err, ev[1].retx_req, ev[1].fop_home, ev[0].retx);
    check(ev[0].init_ok     > 0, "mechanism: initiation accepted");
    check(ev[0].init_retry  > 0, "mechanism: initiation retry");
    check(ev[0].init_fail   > 0, "mechanism: initiation failure");
    check(ev[0].hdr_sent    > 0, "mechanism: header message");
    check(ev[0].comp_sent   > 0, "mechanism: components sent");
    check(ev[0].resched     > 0, "mechanism: software-queue rescheduling (chunking)");
    check(ev[0].yield_full  > 0, "mechanism: yield on full outgoing queue");
    check(ev[0].shifted_loads > 0, "mechanism: alignment load with wrap");
    check(ev[0].acks        > 0, "mechanism: acknowledgement / status flag");
    check(ev[0].invalidated > 0, "mechanism: translation invalidation");
    check(ev[0].xlate_irq   > 0, "mechanism: retranslation interrupt");
    check(ev[0].fop_done    > 0, "mechanism: Fetch-and-Op result");
    check(ev[0].holdoff_wait > 0, "mechanism: hold-off delays a translation change");
    check(ev[1].comp_recv   > 0, "mechanism: components received");
    check(ev[1].delivered   > 0, "mechanism: completion notification");
    check(ev[1].dropped     > 0, "mechanism: no receive buffer");
    check(ev[1].seq_err     > 0, "mechanism: sequence check");
    check(ev[1].retx_req    > 0, "mechanism: retransmission request");
    check(ev[0].retx        > 0, "mechanism: retransmission from the sender record");
    check(ev[1].mcopy_done  > 0, "mechanism: memory copy");
    check(ev[1].recv_irqs   > 0, "mechanism: arrival interrupt for a blocking receive");
    check(ev[1].fop_home    > 0, "mechanism: Fetch-and-Op at the home node");
    check(stall_cycles      > 0, "mechanism: network back-pressure");
    check(n_irq == 1, "one retranslation interrupt");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
