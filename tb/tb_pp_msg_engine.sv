// tb_pp_msg_engine: tests the message-passing handler engine of one node.
//
// The engine is surrounded by the real data buffers, software queue, hold-off
// counter, translation invalidation table, virtual-PID table and
// Fetch-and-Op unit. The testbench plays the dispatcher (it hands requests to
// the engine one at a time and feeds the software-queue head back as a
// transfer task when nothing else waits), the memory (answers a read after
// MEM_LAT cycles; unwritten lines read as a pattern of their address) and the
// network (it records every outgoing message together with the data-buffer
// line it names, and injects incoming messages).
//
// Checked against values computed here:
//   * initiation: reply word (success with message number, failure for an
//     unknown virtual PID);
//   * an aligned send: header to the right node with sender PID, receiver
//     PID, type and length, then every component in order with the memory
//     line of its source address;
//   * an unaligned send (source starts at doubleword 3): components carry
//     the re-aligned data;
//   * reception: header and two components of an incoming message are written
//     into the preallocated buffer with the right doubleword masks, a
//     receive-table entry is written and an acknowledgement goes back on the
//     reply channel;
//   * an acknowledgement writes the sender's status flag;
//   * Fetch-and-Op as requester (request message, result read) and as home
//     node (memory read-modify-write and reply).
module tb_pp_msg_engine;
  import magic_pkg::*;

  localparam int NBUF = 16, NENT = 16, NPROC = 4;
  localparam int BW = $clog2(NBUF), IW = $clog2(NENT);
  localparam int MEM_LAT = 6;
  localparam node_t ME = 8'd2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------- wiring
  logic disp_valid = 1'b0, disp_take;
  disp_s disp = '0;
  logic ob_valid, ob_ready, ob_has_data;
  ob_dest_e ob_dest;
  dword_t ob_pword;
  nhdr_s ob_hdr;
  logic [BW-1:0] ob_buf;
  logic ld_valid, bw_valid;
  logic [BW-1:0] ld_buf_a, ld_buf_b, bw_buf;
  logic [DWI_W-1:0] ld_shift;
  line_t ld_line, bw_line, rd_line;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_s mem_req;
  line_t mem_rsp_data;
  logic swq_enq_valid, swq_enq_ready, swq_enq_front, swq_head_valid, swq_deq;
  swq_task_t swq_enq_task, swq_head;
  logic ho_acquire, ho_release, ho_chg_req, ho_chg_done, ho_acquire_ok, ho_grant, ho_pend;
  logic [7:0] ho_count;
  logic xt_op_ready, xt_ins_valid, xt_ins_ok, xt_rem_valid, xt_inv_valid, xt_done, xt_rd_v;
  logic [PADDR_W-13:0] xt_ins_pa, xt_inv_pa, xt_rd_pa;
  logic [51:0] xt_ins_va, xt_rd_va;
  logic [IW-1:0] xt_ins_idx, xt_rem_idx, xt_rd_idx;
  logic [IW:0] xt_inv_count;
  logic vp_wr_valid, vp_wr_ok, vp_lk_hit;
  logic [15:0] vp_wr_vpid, vp_lk_vpid;
  node_t vp_wr_node, vp_lk_node;
  pid_t vp_wr_ospid, vp_lk_ospid;
  fop_e fa_op;
  dword_t fa_old, fa_new;
  logic [59:0] fa_operand;
  logic xlate_irq, recv_irq;
  logic [IW-1:0] xlate_irq_entry;
  logic [51:0] xlate_irq_vpn;
  pid_t xlate_irq_pid;
  eng_events_s events;
  logic [3:0] free_req = 4'd8;

  pp_msg_engine #(.NPROC(NPROC), .NBUF(NBUF), .NENT(NENT)) dut (
    .clk, .rst_n, .my_node(ME),
    .disp_valid, .disp, .disp_take,
    .ob_valid, .ob_ready, .ob_dest, .ob_pword, .ob_hdr, .ob_has_data, .ob_buf, .free_req,
    .ld_valid, .ld_buf_a, .ld_buf_b, .ld_shift, .ld_line, .bw_valid, .bw_buf, .bw_line,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data,
    .swq_enq_valid, .swq_enq_ready, .swq_enq_task, .swq_enq_front,
    .ho_acquire, .ho_release, .ho_chg_req, .ho_chg_done, .ho_acquire_ok, .ho_grant,
    .xt_op_ready, .xt_ins_valid, .xt_ins_pa, .xt_ins_va, .xt_ins_idx, .xt_ins_ok,
    .xt_rem_valid, .xt_rem_idx, .xt_inv_valid, .xt_inv_pa, .xt_done, .xt_inv_count,
    .xt_rd_idx, .xt_rd_v, .xt_rd_pa, .xt_rd_va,
    .vp_wr_valid, .vp_wr_vpid, .vp_wr_ok, .vp_wr_node, .vp_wr_ospid,
    .vp_lk_vpid, .vp_lk_hit, .vp_lk_node, .vp_lk_ospid,
    .fa_op, .fa_old, .fa_operand, .fa_new,
    .recv_irq, .xlate_irq, .xlate_irq_entry, .xlate_irq_vpn, .xlate_irq_pid,
    .events);

  data_buffers #(.NBUF(NBUF)) u_buf (
    .clk, .ld_valid, .ld_buf_a, .ld_buf_b, .ld_shift, .ld_line,
    .wr_valid(bw_valid), .wr_buf(bw_buf), .wr_line(bw_line),
    .rd_buf(ob_buf), .rd_line);
  sw_queue #(.T(swq_task_t), .NTASK(8)) u_swq (
    .clk, .rst_n, .enq_valid(swq_enq_valid), .enq_ready(swq_enq_ready), .enq_task(swq_enq_task),
    .enq_front(swq_enq_front), .head_valid(swq_head_valid), .head_task(swq_head), .deq(swq_deq));
  holdoff_counter #(.CNT_W(8)) u_ho (
    .clk, .rst_n, .acquire(ho_acquire), .release_op(ho_release), .chg_req(ho_chg_req),
    .chg_done(ho_chg_done), .count(ho_count), .chg_pending(ho_pend), .acquire_ok(ho_acquire_ok),
    .grant(ho_grant));
  xlate_inval_table #(.NENT(NENT)) u_xt (
    .clk, .rst_n, .op_ready(xt_op_ready), .ins_valid(xt_ins_valid), .ins_pa(xt_ins_pa),
    .ins_va(xt_ins_va), .ins_idx(xt_ins_idx), .ins_ok(xt_ins_ok), .rem_valid(xt_rem_valid),
    .rem_idx(xt_rem_idx), .inv_valid(xt_inv_valid), .inv_pa(xt_inv_pa), .done(xt_done),
    .inv_count(xt_inv_count), .rd_idx(xt_rd_idx), .rd_v(xt_rd_v), .rd_pa(xt_rd_pa), .rd_va(xt_rd_va));
  vpid_table u_vp (
    .clk, .rst_n, .wr_valid(vp_wr_valid), .wr_vpid(vp_wr_vpid), .wr_ok(vp_wr_ok),
    .wr_node(vp_wr_node), .wr_ospid(vp_wr_ospid), .lk_vpid(vp_lk_vpid), .lk_hit(vp_lk_hit),
    .lk_node(vp_lk_node), .lk_ospid(vp_lk_ospid));
  fetch_op_alu u_fa (.op(fa_op), .old_val(fa_old), .operand(fa_operand), .new_val(fa_new));

  // ------------------------------------------------------------- memory
  line_t mem [paddr_t];
  mem_req_s wlog [$];            // every memory write, for the checks

  function automatic dword_t pat(paddr_t a);
    return {16'hBEEF, 8'h00, a};
  endfunction

  function automatic line_t get_line(paddr_t la);
    line_t l;
    if (mem.exists(la)) return mem[la];
    for (int i = 0; i < DW_PER_LINE; i++) l[i*64 +: 64] = pat(la + paddr_t'(i*8));
    return l;
  endfunction

  int mcnt = 0;
  bit mbusy = 1'b0;
  paddr_t maddr;
  assign mem_req_ready = !mbusy;
  always @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (mbusy) begin
      if (mcnt <= 1) begin
        mbusy <= 1'b0;
        mem_rsp_valid <= 1'b1;
        mem_rsp_data <= get_line(maddr);
      end
      mcnt <= mcnt - 1;
    end else if (mem_req_valid) begin
      if (mem_req.we) begin
        line_t l;
        l = get_line(mem_req.addr);
        for (int i = 0; i < DW_PER_LINE; i++)
          if (mem_req.dw_mask[i]) l[i*64 +: 64] = mem_req.wdata[i*64 +: 64];
        mem[mem_req.addr] = l;
        wlog.push_back(mem_req);
      end else begin
        mbusy <= 1'b1;
        mcnt  <= MEM_LAT;
        maddr <= mem_req.addr;
      end
    end
  end

  // ------------------------------------------------------------ outbound
  typedef struct {
    ob_dest_e dest;
    dword_t   pword;
    nhdr_s    hdr;
    logic     has_data;
    line_t    data;
  } out_s;
  out_s outq [$];

  always @(posedge clk) begin
    ob_ready <= ($urandom_range(3) != 0);
    if (ob_valid && ob_ready)
      outq.push_back('{ob_dest, ob_pword, ob_hdr, ob_has_data, rd_line});
  end

  task automatic get_out(output out_s o);
    int t;
    t = 0;
    while (outq.size() == 0 && t < 5000) begin @(posedge clk); t++; end
    check(outq.size() != 0, "engine produced an outgoing message");
    if (outq.size() != 0) o = outq.pop_front();
    else o = '{OB_PROC, '0, '0, 1'b0, '0};
  endtask

  // ---------------------------------------------------------- dispatcher
  disp_s inq [$];
  bit hold_swq = 1'b0;           // keeps transfer tasks back for a while
  assign swq_deq = !disp_valid && inq.size() == 0 && swq_head_valid && rst_n && !hold_swq;

  always @(posedge clk) begin
    if (disp_valid && disp_take) disp_valid <= 1'b0;
    else if (!disp_valid && inq.size() != 0) begin
      disp <= inq.pop_front();
      disp_valid <= 1'b1;
    end else if (swq_deq) begin
      disp <= '{handler: H_SWQ_TASK, src: SRC_SWQ, preq: '0, nmsg: '0, task_hdr: swq_head};
      disp_valid <= 1'b1;
    end
  end

  function automatic disp_s preq(bit we, paddr_t a, dword_t d);
    disp_s r = '0;
    r.src = SRC_PROC;
    r.preq = '{we: we, addr: a, data: d};
    case (a[39:38])
      2'b00: r.handler = we ? H_LOCAL_WR : H_LOCAL_RD;
      2'b01: r.handler = we ? H_IO_WR : H_IO_RD;
      2'b10: r.handler = we ? H_MSG_WR : H_MSG_RD;
      default: r.handler = H_BAD;
    endcase
    return r;
  endfunction

  function automatic disp_s nmsg(nmsg_e t, node_t src, logic [31:0] num, dword_t arg, line_t data);
    disp_s r = '0;
    r.nmsg.hdr = '{mtype: t, rsvd0: '0, src_node: src, dst_node: ME, rsvd1: '0, msg_num: num, arg: arg};
    r.nmsg.has_data = 1'b1;
    r.nmsg.data = data;
    r.src = (t inside {NM_ACK, NM_FOP_REP, NM_RETX}) ? SRC_NET_REP : SRC_NET_REQ;
    case (t)
      NM_HDR: r.handler = H_NET_HDR;
      NM_COMP: r.handler = H_NET_COMP;
      NM_ACK: r.handler = H_NET_ACK;
      NM_RETX: r.handler = H_NET_RETX;
      NM_MHDR: r.handler = H_NET_HDR;
      NM_MCOMP: r.handler = H_NET_COMP;
      NM_FOP_REQ: r.handler = H_NET_FOP_REQ;
      default: r.handler = H_NET_FOP_REP;
    endcase
    return r;
  endfunction

  function automatic paddr_t io(io_cmd_e c);
    return {AS_IO, 38'(c) << 3};
  endfunction

  function automatic paddr_t msg(paddr_t pa);
    return {AS_MSG, pa[37:0]};
  endfunction

  task automatic wait_idle();
    int t;
    t = 0;
    while ((inq.size() != 0 || disp_valid) && t < 5000) begin @(posedge clk); t++; end
    repeat (4) @(posedge clk);
  endtask

  // -------------------------------------------------------------- script
  function automatic dword_t src_dw(paddr_t base, int i);
    return pat(base + paddr_t'(i * 8));
  endfunction

  initial begin : script
    out_s o;
    init_cmd_s c;
    dword_t old;
    int nw;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // setup: process 5 runs; virtual PID 2 is process 9 on node 3
    inq.push_back(preq(1, io(IO_CTX_SWITCH), 64'd5));
    inq.push_back(preq(1, io(IO_VPID_SET), {1'b1, 15'b0, 16'd2, 8'b0, 8'd3, 16'd9}));
    inq.push_back(preq(1, io(IO_STAT_SETUP), '0));
    inq.push_back(preq(1, msg(40'h0_0000_7000), 64'h0));
    inq.push_back(preq(1, io(IO_RTAB_SETUP), '0));
    inq.push_back(preq(1, msg(40'h0_0000_6000), 64'h0));
    inq.push_back(preq(1, io(IO_BUFALLOC), {24'b0, 8'd7, 8'b0, 24'd4096}));
    inq.push_back(preq(1, msg(40'h0_0005_0000), 64'h0));
    wait_idle();

    // ---- failing initiation: virtual PID 4 is not mapped
    c = '{dest_vpid: 16'd4, status_flag: 8'd1, msg_type: 8'd1, num_addrs: 8'd1, length: 24'd128};
    inq.push_back(preq(1, io(IO_MSG_INIT), dword_t'(c)));
    inq.push_back(preq(1, msg(40'h0_0001_0000), 64'h5_0000));
    inq.push_back(preq(0, msg('0), '0));
    get_out(o);
    check(o.dest == OB_PROC && o.pword[1:0] == INIT_FAIL, "unknown virtual PID: failure");

    // ---- aligned send: 512 bytes from 0x10100, flag 3, type 7
    hold_swq = 1'b1;
    c = '{dest_vpid: 16'd2, status_flag: 8'd3, msg_type: 8'd7, num_addrs: 8'd1, length: 24'd512};
    inq.push_back(preq(1, io(IO_MSG_INIT), dword_t'(c)));
    inq.push_back(preq(1, msg(40'h0_0001_0100), 64'h0000_0777_0000_0000));
    inq.push_back(preq(0, msg('0), '0));
    get_out(o);
    check(o.dest == OB_PROC && o.pword[1:0] == INIT_SUCCESS, "aligned send: success");
    check(o.pword[63:56] == ME && o.pword[55:32] == 24'd0, "message number = node and count");
    hold_swq = 1'b0;
    get_out(o);
    check(o.dest == OB_NET_REQ && o.hdr.mtype == NM_HDR && o.hdr.dst_node == 8'd3 && !o.has_data,
          "header message to node 3");
    check(o.hdr.arg == {16'd5, 16'd9, 8'd7, 24'd512}, "header carries PIDs, type and length");
    check(o.hdr.msg_num == {ME, 24'd0}, "header message number");
    for (int k = 0; k < 4; k++) begin
      bit ok;
      get_out(o);
      ok = (o.dest == OB_NET_REQ && o.hdr.mtype == NM_COMP && o.hdr.arg == 64'(k) && o.has_data);
      for (int i = 0; i < 16; i++) ok &= (o.data[i*64 +: 64] == src_dw(40'h0_0001_0100, k * 16 + i));
      check(ok, $sformatf("aligned component %0d with its data", k));
    end

    // ---- acknowledgement of that message: status flag 3 becomes 1
    nw = wlog.size();
    inq.push_back(nmsg(NM_ACK, 8'd3, {ME, 24'd0}, 64'd1, '0));
    wait_idle();
    check(wlog.size() == nw + 1, "acknowledgement writes memory once");
    if (wlog.size() == nw + 1)
      check(wlog[nw].addr == 40'h0_0000_7000 && wlog[nw].dw_mask == 16'h0008 &&
            wlog[nw].wdata[3*64 +: 64] == 64'd1, "status flag 3 set to delivered");

    // ---- unaligned send: 256 bytes from 0x20018 (doubleword 3)
    c = '{dest_vpid: 16'd2, status_flag: 8'd4, msg_type: 8'd7, num_addrs: 8'd1, length: 24'd256};
    inq.push_back(preq(1, io(IO_MSG_INIT), dword_t'(c)));
    inq.push_back(preq(1, msg(40'h0_0002_0018), 64'h0000_0888_0000_0000));
    inq.push_back(preq(0, msg('0), '0));
    get_out(o);
    check(o.dest == OB_PROC && o.pword[1:0] == INIT_SUCCESS, "unaligned send: success");
    get_out(o);
    check(o.hdr.mtype == NM_HDR && o.hdr.msg_num == {ME, 24'd1}, "second header, next message number");
    for (int k = 0; k < 2; k++) begin
      bit ok;
      get_out(o);
      ok = (o.hdr.mtype == NM_COMP && o.hdr.arg == 64'(k));
      for (int i = 0; i < 16; i++) ok &= (o.data[i*64 +: 64] == src_dw(40'h0_0002_0018, k * 16 + i));
      check(ok, $sformatf("re-aligned component %0d", k));
    end
    check(events.shifted_loads > 0, "alignment loads used a shift");

    // ---- the receiver of that message lost component 1: it asks for a
    //      resend from offset 1; the record (waiting for its acknowledgement)
    //      goes back on the software queue and resends component 1 re-aligned
    inq.push_back(nmsg(NM_RETX, 8'd3, {ME, 24'd1}, 64'd1, '0));
    begin
      bit ok;
      get_out(o);
      ok = (o.dest == OB_NET_REQ && o.hdr.mtype == NM_COMP && o.hdr.arg == 64'd1 && o.hdr.msg_num == {ME, 24'd1});
      for (int i = 0; i < 16; i++) ok &= (o.data[i*64 +: 64] == src_dw(40'h0_0002_0018, 16 + i));
      check(ok, "component 1 resent after a retransmission request");
      check(events.retx == 1, "retransmission counted at the sender");
    end

    // ---- receiver side of a gap (message of a type with no buffer, so it is
    //      only counted): component 1 before 0 -> request from offset 0; the
    //      repeated component 1 is discarded; then 0 and 1 complete it
    inq.push_back(nmsg(NM_HDR, 8'd3, 32'h0300_0050, {16'h33, 16'd5, 8'd99, 24'd256}, '0));
    inq.push_back(nmsg(NM_COMP, 8'd3, 32'h0300_0050, 64'd1, '0));
    get_out(o);
    check(o.dest == OB_NET_REP && o.hdr.mtype == NM_RETX && o.hdr.dst_node == 8'd3 &&
          o.hdr.msg_num == 32'h0300_0050 && o.hdr.arg == 64'd0, "gap answered with a retransmission request");
    inq.push_back(nmsg(NM_COMP, 8'd3, 32'h0300_0050, 64'd1, '0));
    inq.push_back(nmsg(NM_COMP, 8'd3, 32'h0300_0050, 64'd0, '0));
    inq.push_back(nmsg(NM_COMP, 8'd3, 32'h0300_0050, 64'd1, '0));
    get_out(o);
    check(o.dest == OB_NET_REP && o.hdr.mtype == NM_ACK && o.hdr.msg_num == 32'h0300_0050 &&
          o.hdr.arg == 64'd2, "one request per gap, then completion (dropped: status 2)");
    check(events.retx_req == 1 && events.seq_err == 1, "one gap counted");

    // ---- memory copy received: the header names the destination, each
    //      component is written at the address it carries, no receive-table
    //      entry, then the acknowledgement
    nw = wlog.size();
    inq.push_back(nmsg(NM_MHDR, 8'd3, 32'h0300_0060, {24'd136, 40'h0_0007_0000}, '0));
    begin
      line_t l0, l1;
      for (int i = 0; i < 32; i++) l0[i*32 +: 32] = $urandom;
      for (int i = 0; i < 32; i++) l1[i*32 +: 32] = $urandom;
      inq.push_back(nmsg(NM_MCOMP, 8'd3, 32'h0300_0060, {24'd0, 40'h0_0007_0000}, l0));
      inq.push_back(nmsg(NM_MCOMP, 8'd3, 32'h0300_0060, {24'd1, 40'h0_0007_0080}, l1));
      get_out(o);
      check(o.dest == OB_NET_REP && o.hdr.mtype == NM_ACK && o.hdr.msg_num == 32'h0300_0060 &&
            o.hdr.arg == 64'd1, "memory copy acknowledged");
      check(wlog.size() == nw + 2, "memory copy: two component writes, no receive-table entry");
      if (wlog.size() == nw + 2)
        check(wlog[nw].addr == 40'h0_0007_0000 && wlog[nw].wdata == l0 && wlog[nw].dw_mask == 16'hFFFF &&
              wlog[nw+1].addr == 40'h0_0007_0080 && wlog[nw+1].dw_mask == 16'h0001 && wlog[nw+1].wdata == l1,
              "memory copy components written at their labelled addresses");
      check(events.mcopy_done == 1, "memory copy counted");
    end

    // ---- reception of a 200-byte message of type 7 from process 0x33, node 3
    inq.push_back(preq(1, io(IO_RECV_WAIT), 64'd1));    // a blocking receive arms the interrupt
    wait_idle();
    check(!recv_irq, "arrival interrupt quiet before the message");
    nw = wlog.size();
    inq.push_back(nmsg(NM_HDR, 8'd3, 32'h0300_0042, {16'h33, 16'd5, 8'd7, 24'd200}, '0));
    begin
      line_t l0, l1;
      for (int i = 0; i < 32; i++) l0[i*32 +: 32] = $urandom;
      for (int i = 0; i < 32; i++) l1[i*32 +: 32] = $urandom;
      inq.push_back(nmsg(NM_COMP, 8'd3, 32'h0300_0042, 64'd0, l0));
      inq.push_back(nmsg(NM_COMP, 8'd3, 32'h0300_0042, 64'd1, l1));
      get_out(o);
      check(o.dest == OB_NET_REP && o.hdr.mtype == NM_ACK && o.hdr.dst_node == 8'd3 &&
            o.hdr.msg_num == 32'h0300_0042 && o.hdr.arg == 64'd1, "acknowledgement on the reply channel");
      check(recv_irq, "arrival interrupt raised by the delivered message");
      inq.push_back(preq(1, io(IO_RECV_WAIT), 64'd0));
      wait_idle();
      check(!recv_irq, "arrival interrupt cleared");
      check(wlog.size() == nw + 3, "two component writes and a receive-table write");
      if (wlog.size() == nw + 3) begin
        check(wlog[nw].addr == 40'h0_0005_0000 && wlog[nw].dw_mask == 16'hFFFF && wlog[nw].wdata == l0,
              "component 0 written to the buffer");
        check(wlog[nw+1].addr == 40'h0_0005_0080 && wlog[nw+1].dw_mask == 16'h01FF && wlog[nw+1].wdata == l1,
              "component 1: only the 9 doublewords of the message");
        check(wlog[nw+2].addr == 40'h0_0000_6000 && wlog[nw+2].dw_mask == 16'h0003 &&
              wlog[nw+2].wdata[63:0] == {8'h01, 8'h00, 16'h33, 8'h00, 24'd200} &&
              wlog[nw+2].wdata[127:64] == 64'h0_0005_0000, "receive-table entry");
      end
    end

    // ---- Fetch-and-Add to a word on node 3
    inq.push_back(preq(1, msg({2'b00, 8'd3, 30'h0000_0208}), {FOP_ADD, 60'd7}));
    get_out(o);
    check(o.dest == OB_NET_REQ && o.hdr.mtype == NM_FOP_REQ && o.hdr.dst_node == 8'd3 &&
          o.hdr.arg == 64'({2'b00, 8'd3, 30'h0000_0208}) && o.data[63:0] == {FOP_ADD, 60'd7},
          "Fetch-and-Op request to the home node");
    inq.push_back(preq(0, io(IO_FOP_RESULT), '0));
    repeat (20) @(posedge clk);
    check(outq.size() == 0, "result read waits for the reply");
    inq.push_back(nmsg(NM_FOP_REP, 8'd3, '0, 64'h1234_5678, '0));
    get_out(o);
    check(o.dest == OB_PROC && o.pword == 64'h1234_5678, "Fetch-and-Op result returned to the processor");

    // ---- Fetch-and-Xor arriving at this node as home
    old = pat(40'h0_8000_0310);
    nw = wlog.size();
    inq.push_back(nmsg(NM_FOP_REQ, 8'd3, '0, 64'h0_8000_0310, line_t'({FOP_XOR, 60'hFF})));
    get_out(o);
    check(o.dest == OB_NET_REP && o.hdr.mtype == NM_FOP_REP && o.hdr.dst_node == 8'd3 && o.hdr.arg == old,
          "home node replies with the old value");
    check(wlog.size() == nw + 1 && wlog[nw].dw_mask == 16'h0004 && wlog[nw].wdata[2*64 +: 64] == (old ^ 64'hFF),
          "home node writes the new value");

    check(events.init_fail == 1 && events.init_ok == 2, "initiation counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
