// magic_top: one MAGIC node controller (Memory And General Interconnect
// Controller) configured for message passing.
//
// A node of the machine holds a processor with its caches, a slice of main
// memory, a network port and this controller. Every processor access that
// leaves the caches, every network message and every memory access passes
// through it. Requests wait in hardware queues (one from the processor, a
// request and a reply queue from the network), the dispatcher (Inbox) picks
// one or the head of the software queue and chooses the handler, the handler
// engine runs it, and the outbox puts what the handler sends into the queue
// to the processor or one of the two outgoing network queues:
//
//   processor --> [proc in q] --+                      +--> [proc out q] --> processor
//   net req   --> [req in q ] --+--> dispatcher --> handler engine --> outbox --> [req out q] --> net
//   net reply --> [rep in q ] --+        ^             |  |  |                 --> [rep out q] --> net
//                               software queue <-------+  |  +-- data buffers (alignment load)
//                                                         +----- hold-off counter, translation
//                                                                invalidation table, VPID table,
//                                                                Fetch-and-Op unit, memory port
//
// The handler engine implements in hardware the message-passing handlers that
// the protocol processor runs in software in the published design: the
// initiation protocol, chunked line-by-line transfer rescheduled through the
// software queue, reception into preallocated buffers with completion
// notification, Fetch-and-Op, and the hold-off and invalidation techniques
// for translation changes. See pp_msg_engine for the command set.
//
// Ports: the processor interface (uncached reads and writes in, replies out,
// the retranslation interrupt), the two network channels in each direction,
// and a line-wide memory port (read requests answered by mem_rsp_valid some
// cycles later; writes carry a doubleword mask). my_node is this node's
// number. The processor, memory, router and the MAGIC instruction and data
// caches are outside this design. events counts what the handlers did.
// Queue depths and table sizes are this design's choices (see each block).
module magic_top
  import magic_pkg::*;
#(
  parameter int unsigned QDEPTH    = 8,
  parameter int unsigned NBUF      = 16,
  parameter int unsigned NPROC     = 4,
  parameter int unsigned MAX_PAGES = 4,
  parameter int unsigned NRR       = 4,
  parameter int unsigned NRBUF     = 4,
  parameter int unsigned CHUNK     = 4,
  parameter int unsigned NENT      = 16,
  parameter int unsigned NBKT      = 8,
  parameter int unsigned NVPID     = 64,
  parameter int unsigned NTASK     = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  node_t       my_node,
  // processor interface
  input  logic        proc_req_valid,
  output logic        proc_req_ready,
  input  proc_req_s   proc_req,
  output logic        proc_rsp_valid,
  input  logic        proc_rsp_ready,
  output dword_t      proc_rsp_data,
  output logic        recv_irq,
  output logic        xlate_irq,
  output logic [$clog2(NENT)-1:0] xlate_irq_entry,
  output logic [51:0] xlate_irq_vpn,
  output pid_t        xlate_irq_pid,
  // network port, two channels each way
  input  logic        nreq_in_valid,
  output logic        nreq_in_ready,
  input  net_msg_s    nreq_in,
  input  logic        nrep_in_valid,
  output logic        nrep_in_ready,
  input  net_msg_s    nrep_in,
  output logic        nreq_out_valid,
  input  logic        nreq_out_ready,
  output net_msg_s    nreq_out,
  output logic        nrep_out_valid,
  input  logic        nrep_out_ready,
  output net_msg_s    nrep_out,
  // memory port
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output mem_req_s    mem_req,
  input  logic        mem_rsp_valid,
  input  line_t       mem_rsp_data,
  // observation
  output eng_events_s events
);
  localparam int unsigned FREE_W = $clog2(QDEPTH+1);
  localparam int unsigned BFW    = $clog2(NBUF);

  // ------------------------------------------------------- inbound queues
  logic proc_q_valid, proc_q_pop;      proc_req_s proc_q_head;
  logic nreq_q_valid, nreq_q_pop;      net_msg_s  nreq_q_head;
  logic nrep_q_valid, nrep_q_pop;      net_msg_s  nrep_q_head;
  logic [FREE_W-1:0] unused_f0, unused_f1, unused_f2;

  sync_fifo #(.T(proc_req_s), .DEPTH(QDEPTH)) u_proc_in (
    .clk, .rst_n, .in_valid(proc_req_valid), .in_ready(proc_req_ready), .in_data(proc_req),
    .out_valid(proc_q_valid), .out_ready(proc_q_pop), .out_data(proc_q_head), .free_slots(unused_f0));
  sync_fifo #(.T(net_msg_s), .DEPTH(QDEPTH)) u_nreq_in (
    .clk, .rst_n, .in_valid(nreq_in_valid), .in_ready(nreq_in_ready), .in_data(nreq_in),
    .out_valid(nreq_q_valid), .out_ready(nreq_q_pop), .out_data(nreq_q_head), .free_slots(unused_f1));
  sync_fifo #(.T(net_msg_s), .DEPTH(QDEPTH)) u_nrep_in (
    .clk, .rst_n, .in_valid(nrep_in_valid), .in_ready(nrep_in_ready), .in_data(nrep_in),
    .out_valid(nrep_q_valid), .out_ready(nrep_q_pop), .out_data(nrep_q_head), .free_slots(unused_f2));

  // ------------------------------------------------------ outbound queues
  logic ob_proc_valid, ob_proc_ready;  dword_t   ob_proc_data;
  logic ob_nreq_valid, ob_nreq_ready;  net_msg_s ob_nreq_msg;
  logic ob_nrep_valid, ob_nrep_ready;  net_msg_s ob_nrep_msg;
  logic [FREE_W-1:0] free_proc, free_req, free_rep;

  sync_fifo #(.T(dword_t), .DEPTH(QDEPTH)) u_proc_out (
    .clk, .rst_n, .in_valid(ob_proc_valid), .in_ready(ob_proc_ready), .in_data(ob_proc_data),
    .out_valid(proc_rsp_valid), .out_ready(proc_rsp_ready), .out_data(proc_rsp_data), .free_slots(free_proc));
  sync_fifo #(.T(net_msg_s), .DEPTH(QDEPTH)) u_nreq_out (
    .clk, .rst_n, .in_valid(ob_nreq_valid), .in_ready(ob_nreq_ready), .in_data(ob_nreq_msg),
    .out_valid(nreq_out_valid), .out_ready(nreq_out_ready), .out_data(nreq_out), .free_slots(free_req));
  sync_fifo #(.T(net_msg_s), .DEPTH(QDEPTH)) u_nrep_out (
    .clk, .rst_n, .in_valid(ob_nrep_valid), .in_ready(ob_nrep_ready), .in_data(ob_nrep_msg),
    .out_valid(nrep_out_valid), .out_ready(nrep_out_ready), .out_data(nrep_out), .free_slots(free_rep));

  // ------------------------------------------------------- software queue
  logic      swq_valid, swq_pop, swq_enq_valid, swq_enq_ready, swq_enq_front;
  swq_task_t swq_head, swq_enq_task;

  sw_queue #(.T(swq_task_t), .NTASK(NTASK)) u_swq (
    .clk, .rst_n, .enq_valid(swq_enq_valid), .enq_ready(swq_enq_ready), .enq_task(swq_enq_task),
    .enq_front(swq_enq_front), .head_valid(swq_valid), .head_task(swq_head), .deq(swq_pop));

  // ----------------------------------------------------------- dispatcher
  logic  disp_valid, disp_take;
  disp_s disp;

  inbox_dispatcher #(.FREE_W(FREE_W)) u_inbox (
    .clk, .rst_n,
    .proc_valid(proc_q_valid), .proc_head(proc_q_head), .proc_pop(proc_q_pop),
    .nreq_valid(nreq_q_valid), .nreq_head(nreq_q_head), .nreq_pop(nreq_q_pop),
    .nrep_valid(nrep_q_valid), .nrep_head(nrep_q_head), .nrep_pop(nrep_q_pop),
    .swq_valid(swq_valid), .swq_head(swq_head), .swq_pop(swq_pop),
    .free_req(free_req), .free_rep(free_rep), .free_proc(free_proc),
    .out_valid(disp_valid), .out(disp), .out_take(disp_take));

  // --------------------------------------------------------- data buffers
  logic               ld_valid, bw_valid;
  logic [BFW-1:0]     ld_buf_a, ld_buf_b, bw_buf, ob_buf, buf_rd_idx;
  logic [DWI_W-1:0]   ld_shift;
  line_t              ld_line, bw_line, buf_rd_line;

  data_buffers #(.NBUF(NBUF)) u_dbuf (
    .clk, .ld_valid, .ld_buf_a, .ld_buf_b, .ld_shift, .ld_line,
    .wr_valid(bw_valid), .wr_buf(bw_buf), .wr_line(bw_line),
    .rd_buf(buf_rd_idx), .rd_line(buf_rd_line));

  // --------------------------------------------------------------- outbox
  logic     ob_valid, ob_ready, ob_has_data;
  ob_dest_e ob_dest;
  dword_t   ob_pword;
  nhdr_s    ob_hdr;

  outbox #(.NBUF(NBUF)) u_outbox (
    .in_valid(ob_valid), .in_ready(ob_ready), .in_dest(ob_dest), .in_pword(ob_pword),
    .in_hdr(ob_hdr), .in_has_data(ob_has_data), .in_buf(ob_buf),
    .buf_rd_idx(buf_rd_idx), .buf_rd_line(buf_rd_line),
    .proc_valid(ob_proc_valid), .proc_ready(ob_proc_ready), .proc_data(ob_proc_data),
    .nreq_valid(ob_nreq_valid), .nreq_ready(ob_nreq_ready), .nreq_msg(ob_nreq_msg),
    .nrep_valid(ob_nrep_valid), .nrep_ready(ob_nrep_ready), .nrep_msg(ob_nrep_msg));

  // ------------------------------------------------------ support tables
  logic ho_acquire, ho_release, ho_chg_req, ho_chg_done, ho_acquire_ok, ho_grant, ho_pending;
  logic [7:0] ho_count;

  holdoff_counter #(.CNT_W(8)) u_holdoff (
    .clk, .rst_n, .acquire(ho_acquire), .release_op(ho_release), .chg_req(ho_chg_req),
    .chg_done(ho_chg_done), .count(ho_count), .chg_pending(ho_pending),
    .acquire_ok(ho_acquire_ok), .grant(ho_grant));

  localparam int unsigned EW = $clog2(NENT);
  logic xt_op_ready, xt_ins_valid, xt_ins_ok, xt_rem_valid, xt_inv_valid, xt_done, xt_rd_v;
  logic [PADDR_W-13:0] xt_ins_pa, xt_inv_pa, xt_rd_pa;
  logic [51:0]         xt_ins_va, xt_rd_va;
  logic [EW-1:0]       xt_ins_idx, xt_rem_idx, xt_rd_idx;
  logic [EW:0]         xt_inv_count;

  xlate_inval_table #(.NENT(NENT), .NBKT(NBKT)) u_xlate (
    .clk, .rst_n, .op_ready(xt_op_ready),
    .ins_valid(xt_ins_valid), .ins_pa(xt_ins_pa), .ins_va(xt_ins_va), .ins_idx(xt_ins_idx), .ins_ok(xt_ins_ok),
    .rem_valid(xt_rem_valid), .rem_idx(xt_rem_idx),
    .inv_valid(xt_inv_valid), .inv_pa(xt_inv_pa), .done(xt_done), .inv_count(xt_inv_count),
    .rd_idx(xt_rd_idx), .rd_v(xt_rd_v), .rd_pa(xt_rd_pa), .rd_va(xt_rd_va));

  logic        vp_wr_valid, vp_wr_ok, vp_lk_hit;
  logic [15:0] vp_wr_vpid, vp_lk_vpid;
  node_t       vp_wr_node, vp_lk_node;
  pid_t        vp_wr_ospid, vp_lk_ospid;

  vpid_table #(.NVPID(NVPID)) u_vpid (
    .clk, .rst_n, .wr_valid(vp_wr_valid), .wr_vpid(vp_wr_vpid), .wr_ok(vp_wr_ok),
    .wr_node(vp_wr_node), .wr_ospid(vp_wr_ospid),
    .lk_vpid(vp_lk_vpid), .lk_hit(vp_lk_hit), .lk_node(vp_lk_node), .lk_ospid(vp_lk_ospid));

  fop_e        fa_op;
  dword_t      fa_old, fa_new;
  logic [59:0] fa_operand;

  fetch_op_alu u_fop (.op(fa_op), .old_val(fa_old), .operand(fa_operand), .new_val(fa_new));

  // ------------------------------------------------------- handler engine
  pp_msg_engine #(
    .NPROC(NPROC), .MAX_PAGES(MAX_PAGES), .NRR(NRR), .NRBUF(NRBUF), .CHUNK(CHUNK),
    .NBUF(NBUF), .NENT(NENT), .FREE_W(FREE_W)
  ) u_pp (
    .clk, .rst_n, .my_node,
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
endmodule
