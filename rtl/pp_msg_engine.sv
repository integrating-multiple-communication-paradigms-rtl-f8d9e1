// pp_msg_engine: the message-passing handlers of the MAGIC protocol processor.
//
// In MAGIC a programmable protocol processor runs one handler per request the
// dispatcher hands it. This module builds the handlers for user-level message
// passing and Fetch-and-Op as one hardwired state machine that serves one
// dispatched request at a time and reaches memory, the data buffers, the
// outbox and the support tables through their ports.
//
// Sender side
//   * Initiation protocol. The OS names the running process (IO_CTX_SWITCH);
//     each process has its own sender record, so an interrupted description
//     resumes after a context switch. IO_MSG_INIT opens a description
//     (destination virtual PID, status flag, type, number of page addresses,
//     length); each message-space write then supplies the authentic physical
//     address of one page (address) and its virtual address (data), which is
//     linked at once into the translation invalidation table. The final
//     message-space read commits or aborts atomically and returns
//     INIT_SUCCESS, INIT_RETRY (record still busy with an earlier message, a
//     page translation changed during the description, table full) or
//     INIT_FAIL (bad virtual PID, bad length, page count not matching).
//   * Transfer. On success the record is queued on the software queue. Each
//     invocation sends the header once, then up to CHUNK cache-line components,
//     each labelled with the message number and its offset. Before each
//     component it checks for space in the outgoing request queue and yields
//     if there is none. An unfinished transfer reschedules itself at the tail
//     of the software queue. A source that does not start on a line boundary
//     is re-aligned with the data-buffer alignment load: line k is loaded with
//     shift 16-d (d = starting doubleword), its tail wrapping into the buffer
//     that collects component k, and line k+1 completes it. Every invocation
//     first reloads the partly filled buffer, because buffers are not kept
//     across invocations.
//   * Before using a page the handler checks its V bit. An invalid page stops
//     the transfer and raises xlate_irq with the entry, virtual page and PID;
//     the processor answers with IO_XLATE_NEW {entry, new physical address},
//     the entry is re-linked under its new page, and the transfer resumes.
//   * The acknowledgement from the receiver writes the status flag (1 =
//     delivered, 2 = dropped) at stat_base + 8*flag and frees the record.
// Receiver side
//   * IO_BUFALLOC + one message-space write register a preallocated receive
//     buffer (type, owner PID, size, line-aligned physical base).
//   * A header takes a free receiver record and the first buffer whose type and
//     owner match and which is large enough. Components are looked up by
//     message number, checked for sequence, and written at base + 128*offset;
//     the last one writes only the doublewords inside the message. A
//     component beyond the expected offset reveals a lost one: it is
//     discarded and one NM_RETX (first missing offset) goes back on the reply
//     channel; later components are discarded until the missing one arrives.
//     The sender, whose record is kept until the acknowledgement, rewinds to
//     that offset and puts the task back on the software queue. When the
//     remaining count reaches zero the receive-table entry {marker, sender PID,
//     length; buffer address} is written and an acknowledgement is returned on
//     the reply channel.
// Memory copy
//   * IO_MCOPY_DEST, written after IO_MSG_INIT, turns the open description
//     into a memory copy to a line-aligned physical address on another node
//     (the destination virtual PID is then ignored). On commit the copy takes
//     translation hold-off, which it keeps until the acknowledgement; its
//     pages therefore need no V check during the transfer. The header
//     (NM_MHDR) carries length and destination; each component (NM_MCOMP)
//     carries its offset and the destination address of its line. The
//     receiver only counts components, writes each at its address and
//     acknowledges; no buffer is chosen and no receive-table entry written.
// Blocking receive
//   * IO_RECV_WAIT with data bit 0 set arms recv_irq: the next user message
//     delivered into a receive buffer raises it (level) and disarms. Any
//     IO_RECV_WAIT write clears it.
// Fetch-and-Op
//   * A message-space write outside any description is a Fetch-and-Op command:
//     address = target word, data = {op, 60-bit constant}. It takes hold-off,
//     goes to the home node as a request; the home node reads the line,
//     applies the operation, writes back and returns the old value. The
//     processor collects it with an uncached read of IO_FOP_RESULT, which is
//     answered when the reply is in.
// Translation changes
//   * IO_XLATE_CHG (write, data = physical address of the page) notes the
//     change with the hold-off counter and invalidates every use of the page.
//     The processor's read of IO_XLATE_CHG is answered once the hold-off count
//     is zero.
// Ordinary base-space reads and writes are served from local memory.
//
// Timing: not cycle-equivalent to a software handler. A memory read costs the
// memory port's latency plus two cycles; an outbox message one cycle once its
// queue has room.
// The protocol steps follow the published design. Record sizes (NPROC sender
// records, NRR receiver records, NRBUF receive buffers, MAX_PAGES pages per
// message, CHUNK components per invocation, RTAB_N receive-table entries), the
// command field layout and the status codes are this design's choices. Not
// built: recovery from a lost header or a lost retransmission request, the
// system-space fallback for a message without a receive buffer (it is dropped
// and the sender told so), a memory copy to an unaligned destination, and
// coherence actions on
// message data (memory is assumed clean, local coherence).
module pp_msg_engine
  import magic_pkg::*;
#(
  parameter int unsigned NPROC     = 4,
  parameter int unsigned MAX_PAGES = 4,
  parameter int unsigned NRR       = 4,
  parameter int unsigned NRBUF     = 4,
  parameter int unsigned CHUNK     = 4,
  parameter int unsigned RTAB_N    = 32,
  parameter int unsigned NBUF      = 16,
  parameter int unsigned NENT      = 16,
  parameter int unsigned FREE_W    = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  node_t                   my_node,
  // from the dispatcher
  input  logic                    disp_valid,
  input  disp_s                   disp,
  output logic                    disp_take,
  // to the outbox
  output logic                    ob_valid,
  input  logic                    ob_ready,
  output ob_dest_e                ob_dest,
  output dword_t                  ob_pword,
  output nhdr_s                   ob_hdr,
  output logic                    ob_has_data,
  output logic [$clog2(NBUF)-1:0] ob_buf,
  input  logic [FREE_W-1:0]       free_req,
  // data buffers
  output logic                    ld_valid,
  output logic [$clog2(NBUF)-1:0] ld_buf_a,
  output logic [$clog2(NBUF)-1:0] ld_buf_b,
  output logic [DWI_W-1:0]        ld_shift,
  output line_t                   ld_line,
  output logic                    bw_valid,
  output logic [$clog2(NBUF)-1:0] bw_buf,
  output line_t                   bw_line,
  // memory
  output logic                    mem_req_valid,
  input  logic                    mem_req_ready,
  output mem_req_s                mem_req,
  input  logic                    mem_rsp_valid,
  input  line_t                   mem_rsp_data,
  // software queue
  output logic                    swq_enq_valid,
  input  logic                    swq_enq_ready,
  output swq_task_t               swq_enq_task,
  output logic                    swq_enq_front,
  // hold-off counter
  output logic                    ho_acquire,
  output logic                    ho_release,
  output logic                    ho_chg_req,
  output logic                    ho_chg_done,
  input  logic                    ho_acquire_ok,
  input  logic                    ho_grant,
  // translation invalidation table
  input  logic                    xt_op_ready,
  output logic                    xt_ins_valid,
  output logic [PADDR_W-13:0]     xt_ins_pa,
  output logic [51:0]             xt_ins_va,
  input  logic [$clog2(NENT)-1:0] xt_ins_idx,
  input  logic                    xt_ins_ok,
  output logic                    xt_rem_valid,
  output logic [$clog2(NENT)-1:0] xt_rem_idx,
  output logic                    xt_inv_valid,
  output logic [PADDR_W-13:0]     xt_inv_pa,
  input  logic                    xt_done,
  input  logic [$clog2(NENT):0]   xt_inv_count,
  output logic [$clog2(NENT)-1:0] xt_rd_idx,
  input  logic                    xt_rd_v,
  input  logic [PADDR_W-13:0]     xt_rd_pa,
  input  logic [51:0]             xt_rd_va,
  // virtual PID table
  output logic                    vp_wr_valid,
  output logic [15:0]             vp_wr_vpid,
  output logic                    vp_wr_ok,
  output node_t                   vp_wr_node,
  output pid_t                    vp_wr_ospid,
  output logic [15:0]             vp_lk_vpid,
  input  logic                    vp_lk_hit,
  input  node_t                   vp_lk_node,
  input  pid_t                    vp_lk_ospid,
  // Fetch-and-Op unit
  output fop_e                    fa_op,
  output dword_t                  fa_old,
  output logic [59:0]             fa_operand,
  input  dword_t                  fa_new,
  // retranslation interrupt to the processor
  output logic                    recv_irq,    // a user message arrived (blocking receive)
  output logic                    xlate_irq,
  output logic [$clog2(NENT)-1:0] xlate_irq_entry,
  output logic [51:0]             xlate_irq_vpn,
  output pid_t                    xlate_irq_pid,
  // observation
  output eng_events_s             events
);
  localparam int unsigned SW  = (NPROC > 1) ? $clog2(NPROC) : 1;
  localparam int unsigned PW  = (MAX_PAGES > 1) ? $clog2(MAX_PAGES) : 1;
  localparam int unsigned RW  = (NRR > 1) ? $clog2(NRR) : 1;
  localparam int unsigned BBW = (NRBUF > 1) ? $clog2(NRBUF) : 1;
  localparam int unsigned EW  = $clog2(NENT);
  localparam int unsigned TW  = $clog2(RTAB_N);
  localparam int unsigned BFW = $clog2(NBUF);
  localparam int unsigned CW  = LEN_W - 7 + 1;   // component / line count width

  // Data buffers used by the handlers
  localparam logic [BFW-1:0] BUF_SCRATCH = BFW'(2);
  localparam logic [BFW-1:0] BUF_FOP     = BFW'(3);

  // ---------------------------------------------------------- records
  typedef enum logic [2:0] {SR_IDLE, SR_DESCR, SR_ACTIVE, SR_WAIT_XLATE, SR_WAIT_ACK} sr_state_e;

  typedef struct packed {
    sr_state_e        st;
    logic             busy_nack;   // description arrived while busy: answer retry
    logic             bad;         // description malformed: answer failure
    pid_t             ospid;
    logic [15:0]      dest_vpid;
    logic [7:0]       status_flag;
    logic [7:0]       msg_type;
    logic [7:0]       num_addrs;
    logic [LEN_W-1:0] length;
    logic [7:0]       addrs_got;
    logic [11:0]      first_off;   // page offset of the first byte
    node_t            dst_node;
    pid_t             dst_ospid;
    logic [31:0]      msg_num;
    logic             hdr_sent;
    logic [CW-1:0]    next_comp;
    logic [CW-1:0]    ncomp;
    logic [CW-1:0]    nlines;
    logic [PW-1:0]    xl_page;
    logic             mc;          // memory copy: destination given by the sender
    paddr_t           dst_base;    // memory copy: destination physical base
  } srec_s;

  typedef struct packed {
    logic             valid;
    logic [7:0]       msg_type;
    pid_t             owner;
    paddr_t           base;
    logic [LEN_W-1:0] size;
  } rbuf_s;

  typedef struct packed {
    logic             valid;
    logic             drop;
    logic             gap;         // retransmission requested, waiting for next_off
    logic             mc;          // memory copy: no buffer, no receive-table entry
    logic [31:0]      msg_num;
    node_t            src_node;
    pid_t             src_pid;
    paddr_t           base;
    logic [LEN_W-1:0] length;
    logic [CW-1:0]    next_off;
    logic [CW-1:0]    remaining;
  } rrec_s;

  srec_s           srec    [NPROC];
  logic [EW-1:0]   sent    [NPROC][MAX_PAGES];   // table entry per page
  logic            sent_ok [NPROC][MAX_PAGES];
  rbuf_s           rbuf    [NRBUF];
  rrec_s           rrec    [NRR];

  pid_t            cur_pid;
  logic [SW-1:0]   cur_slot;
  typedef enum logic [1:0] {PK_NONE, PK_BUF, PK_RTAB, PK_STAT} pend_e;
  pend_e           pend_kind;
  logic [7:0]      pend_type;
  logic [LEN_W-1:0] pend_size;
  paddr_t          rtab_base;
  logic [TW-1:0]   rtab_idx;
  paddr_t          stat_base;
  logic [23:0]     send_cnt;

  // Fetch-and-Op requester state
  logic            fop_busy, fop_issue_pend, fop_have, fop_rd_pend;
  paddr_t          fop_target;
  dword_t          fop_word, fop_result;
  // translation change
  logic            xchg_rd_pend;
  // blocking receive: interrupt on the next delivered message
  logic            recv_armed;

  // ------------------------------------------------------- main FSM
  typedef enum logic [5:0] {
    S_IDLE, S_DECODE, S_SEND, S_MRD, S_MRD_WAIT, S_MWR,
    S_LRD_DONE,
    S_MSGRD_CHK, S_MSGRD_DEC,
    S_FREE, S_FREE_WAIT,
    S_XCHG_WAIT,
    S_XNEW_REM, S_XNEW_INS,
    S_T_START, S_T_LOOP, S_T_LDCHK, S_T_LDDONE, S_T_SENDC, S_T_AFTER, S_T_RESCHED,
    S_R_COMP_WR, S_R_DONE_TAB, S_R_ACK,
    S_ACK_FLAG, S_FOP_SEND, S_REPLY_PW,
    S_FH_WR, S_FH_REP
  } st_e;

  st_e            st, ret_st;
  disp_s          d;              // request being served
  line_t          mline;          // last memory line read
  logic [SW-1:0]  slot;           // sender record in use
  logic [RW-1:0]  rslot;          // receiver record in use
  logic [PW:0]    pi;             // page loop index
  logic           chk_stale;
  logic [$clog2(CHUNK+1)-1:0] chunk_c;
  logic           cur_b;          // which of buffers 0/1 collects the component
  logic [CW-1:0]  ld_j;           // source line being loaded
  logic           ld_prime;       // this load primes (A = scratch)
  logic [EW-1:0]  xnew_idx;
  paddr_t         xnew_pa;
  logic [51:0]    xnew_va;

  eng_events_s    ev;
  assign events = ev;

  // -------------------------------------------- combinational helpers
  // Index of the sender record that owns an acknowledgement
  function automatic logic [SW:0] find_ack(logic [31:0] mn);
    for (int s = 0; s < NPROC; s++)
      if (srec[s].st == SR_WAIT_ACK && srec[s].msg_num == mn) return {1'b1, SW'(s)};
    return '0;
  endfunction

  // Sender record a retransmission request refers to (transfer not finished)
  function automatic logic [SW:0] find_retx(logic [31:0] mn);
    for (int s = 0; s < NPROC; s++)
      if (srec[s].st inside {SR_ACTIVE, SR_WAIT_XLATE, SR_WAIT_ACK} && srec[s].msg_num == mn)
        return {1'b1, SW'(s)};
    return '0;
  endfunction

  function automatic logic [RW:0] find_rrec(logic [31:0] mn);
    for (int r = 0; r < NRR; r++)
      if (rrec[r].valid && rrec[r].msg_num == mn) return {1'b1, RW'(r)};
    return '0;
  endfunction

  function automatic logic [RW:0] free_rrec();
    for (int r = 0; r < NRR; r++)
      if (!rrec[r].valid) return {1'b1, RW'(r)};
    return '0;
  endfunction

  function automatic logic [BBW:0] match_rbuf(logic [7:0] ty, pid_t owner, logic [LEN_W-1:0] len);
    for (int b = 0; b < NRBUF; b++)
      if (rbuf[b].valid && rbuf[b].msg_type == ty && rbuf[b].owner == owner && rbuf[b].size >= len)
        return {1'b1, BBW'(b)};
    return '0;
  endfunction

  function automatic logic [BBW:0] free_rbuf();
    for (int b = 0; b < NRBUF; b++)
      if (!rbuf[b].valid) return {1'b1, BBW'(b)};
    return '0;
  endfunction

  function automatic logic [SW:0] find_xwait(logic [EW-1:0] e);
    for (int s = 0; s < NPROC; s++)
      if (srec[s].st == SR_WAIT_XLATE && sent[s][srec[s].xl_page] == e) return {1'b1, SW'(s)};
    return '0;
  endfunction

  function automatic logic [CW-1:0] lines_of(logic [LEN_W-1:0] len, logic [3:0] dws);
    return CW'((32'(len) + 32'(dws) * 8 + 127) >> 7);
  endfunction

  // pages needed by a message starting at page offset off
  function automatic logic [8:0] pages_of(logic [11:0] off, logic [LEN_W-1:0] len);
    return 9'((32'(off) + 32'(len) + 4095) >> 12);
  endfunction

  // Source line j of the current sender record: page index and in-page offset
  logic [31:0] lin_off;
  logic [PW-1:0] ld_page;
  always_comb begin
    lin_off = 32'({srec[slot].first_off[11:7], 7'b0}) + (32'(ld_j) << 7);
    ld_page = PW'(lin_off >> 12);
  end

  // doubleword offset of the source start
  logic [3:0] src_dw;
  assign src_dw = srec[slot].first_off[6:3];

  // Receive-table slot address
  paddr_t rtab_line;
  logic [3:0] rtab_dw;
  assign rtab_line = rtab_base + (paddr_t'(rtab_idx[TW-1:3]) << 7);
  assign rtab_dw   = {rtab_idx[2:0], 1'b0};

  // mask of valid doublewords in component `off` of a message of `len` bytes
  function automatic dwmask_t comp_mask(logic [LEN_W-1:0] len, logic [CW-1:0] off);
    logic [31:0] left;
    dwmask_t m;
    left = 32'(len) - (32'(off) << 7);
    m = '0;
    for (int i = 0; i < DW_PER_LINE; i++)
      if (32'(i) * 8 < left) m[i] = 1'b1;
    return m;
  endfunction

  // table read port
  always_comb begin
    xt_rd_idx = sent[slot][ld_page];
    if (st == S_MSGRD_CHK) xt_rd_idx = sent[slot][pi[PW-1:0]];
    if (st == S_XNEW_REM)  xt_rd_idx = xnew_idx;
  end

  // vpid lookup is always for the current sender record
  assign vp_lk_vpid = srec[slot].dest_vpid;

  // Fetch-and-Op unit at the home node
  assign fa_op      = fop_e'(d.nmsg.data[63:60]);
  assign fa_operand = d.nmsg.data[59:0];
  assign fa_old     = get_dw(mline, d.nmsg.hdr.arg[6:3]);

  assign swq_enq_front = 1'b0;
  assign disp_take     = (st == S_IDLE) && disp_valid && !(
                           (fop_rd_pend && fop_have) ||
                           (xchg_rd_pend && ho_grant) ||
                           (fop_issue_pend && ho_acquire_ok && free_req != '0));

  // -------------------------------------------------------- the FSM
  always_ff @(posedge clk) begin
    // single-cycle strobes
    ld_valid     <= 1'b0;
    bw_valid     <= 1'b0;
    swq_enq_valid <= 1'b0;
    ho_acquire   <= 1'b0;
    ho_release   <= 1'b0;
    ho_chg_req   <= 1'b0;
    ho_chg_done  <= 1'b0;
    xt_ins_valid <= 1'b0;
    xt_rem_valid <= 1'b0;
    xt_inv_valid <= 1'b0;
    vp_wr_valid  <= 1'b0;

    if (!rst_n) begin
      st            <= S_IDLE;
      ob_valid      <= 1'b0;
      mem_req_valid <= 1'b0;
      cur_pid       <= '0;
      cur_slot      <= '0;
      pend_kind     <= PK_NONE;
      rtab_base     <= '0;
      rtab_idx      <= '0;
      stat_base     <= '0;
      send_cnt      <= '0;
      fop_busy      <= 1'b0;
      fop_issue_pend <= 1'b0;
      fop_have      <= 1'b0;
      fop_rd_pend   <= 1'b0;
      xchg_rd_pend  <= 1'b0;
      xlate_irq     <= 1'b0;
      recv_irq      <= 1'b0;
      recv_armed    <= 1'b0;
      ev            <= '0;
      slot          <= '0;
      ld_j          <= '0;
      for (int s = 0; s < NPROC; s++) srec[s] <= '0;
      for (int r = 0; r < NRR; r++)   rrec[r] <= '0;
      for (int b = 0; b < NRBUF; b++) rbuf[b] <= '0;
    end else begin
      unique case (st)
        // ----------------------------------------------------------- idle
        S_IDLE: begin
          if (fop_rd_pend && fop_have) begin
            // deferred answer to the IO_FOP_RESULT read
            fop_rd_pend <= 1'b0;
            fop_have    <= 1'b0;
            ev.fop_done <= ev.fop_done + 1'b1;
            ob_valid <= 1'b1; ob_dest <= OB_PROC; ob_pword <= fop_result;
            ob_has_data <= 1'b0; ob_hdr <= '0;
            ret_st <= S_IDLE; st <= S_SEND;
          end else if (xchg_rd_pend && ho_grant) begin
            // deferred grant of a translation change
            xchg_rd_pend <= 1'b0;
            ho_chg_done  <= 1'b1;
            ob_valid <= 1'b1; ob_dest <= OB_PROC; ob_pword <= 64'd1;
            ob_has_data <= 1'b0; ob_hdr <= '0;
            ret_st <= S_IDLE; st <= S_SEND;
          end else if (fop_issue_pend && ho_acquire_ok && free_req != '0) begin
            fop_issue_pend <= 1'b0;
            ho_acquire     <= 1'b1;
            bw_valid <= 1'b1; bw_buf <= BUF_FOP;
            bw_line  <= line_t'(fop_word);
            st <= S_FOP_SEND;
          end else if (disp_valid) begin
            d  <= disp;
            st <= S_DECODE;
          end
        end

        // ------------------------------------------------ generic steps
        S_SEND: if (ob_ready) begin
          ob_valid <= 1'b0;
          st <= ret_st;
        end
        S_MRD: if (mem_req_ready) begin
          mem_req_valid <= 1'b0;
          st <= S_MRD_WAIT;
        end
        S_MRD_WAIT: if (mem_rsp_valid) begin
          mline <= mem_rsp_data;
          st <= ret_st;
        end
        S_MWR: if (mem_req_ready) begin
          mem_req_valid <= 1'b0;
          st <= ret_st;
        end

        // ------------------------------------------------------- decode
        S_DECODE: begin
          st <= S_IDLE;
          unique case (d.handler)
            H_LOCAL_RD: begin
              mem_req_valid <= 1'b1;
              mem_req <= '{we: 1'b0, addr: {2'b00, d.preq.addr[PADDR_W-3:7], 7'b0}, dw_mask: '0, wdata: '0};
              ret_st <= S_LRD_DONE; st <= S_MRD;
            end
            H_LOCAL_WR: begin
              mem_req_valid <= 1'b1;
              mem_req <= '{we: 1'b1, addr: {2'b00, d.preq.addr[PADDR_W-3:7], 7'b0},
                           dw_mask: dwmask_t'(1) << d.preq.addr[6:3],
                           wdata: {DW_PER_LINE{d.preq.data}}};
              ret_st <= S_IDLE; st <= S_MWR;
            end
            H_IO_WR: begin
              unique case (io_cmd_of(d.preq.addr))
                IO_MSG_INIT: begin
                  automatic init_cmd_s c = init_cmd_s'(d.preq.data);
                  slot <= cur_slot;
                  if (srec[cur_slot].st inside {SR_ACTIVE, SR_WAIT_XLATE, SR_WAIT_ACK}) begin
                    srec[cur_slot].busy_nack <= 1'b1;
                  end else begin
                    srec[cur_slot].busy_nack   <= 1'b0;
                    srec[cur_slot].bad         <= (c.num_addrs == 0) || (32'(c.num_addrs) > MAX_PAGES) ||
                                                  (c.length == 0) || (c.length[2:0] != 3'b0);
                    srec[cur_slot].ospid       <= cur_pid;
                    srec[cur_slot].dest_vpid   <= c.dest_vpid;
                    srec[cur_slot].status_flag <= c.status_flag;
                    srec[cur_slot].msg_type    <= c.msg_type;
                    srec[cur_slot].num_addrs   <= c.num_addrs;
                    srec[cur_slot].length      <= c.length;
                    srec[cur_slot].mc          <= 1'b0;
                    if (srec[cur_slot].st == SR_DESCR) begin
                      // an abandoned description: release its pages first
                      pi <= '0; ret_st <= S_IDLE; st <= S_FREE;
                    end else begin
                      srec[cur_slot].addrs_got <= '0;
                    end
                    srec[cur_slot].st <= SR_DESCR;
                  end
                end
                IO_RECV_WAIT: begin
                  recv_armed <= d.preq.data[0];
                  recv_irq   <= 1'b0;
                end
                IO_MCOPY_DEST: begin
                  if (srec[cur_slot].st == SR_DESCR && !srec[cur_slot].busy_nack) begin
                    srec[cur_slot].mc       <= 1'b1;
                    srec[cur_slot].dst_base <= d.preq.data[PADDR_W-1:0];
                  end
                end
                IO_CTX_SWITCH: begin
                  cur_pid  <= d.preq.data[15:0];
                  cur_slot <= SW'(d.preq.data[15:0] % 16'(NPROC));
                end
                IO_VPID_SET: begin
                  vp_wr_valid <= 1'b1;
                  vp_wr_ok    <= d.preq.data[63];
                  vp_wr_vpid  <= d.preq.data[47:32];
                  vp_wr_node  <= d.preq.data[23:16];
                  vp_wr_ospid <= d.preq.data[15:0];
                end
                IO_BUFALLOC: begin
                  pend_kind <= PK_BUF;
                  pend_type <= d.preq.data[39:32];
                  pend_size <= d.preq.data[LEN_W-1:0];
                end
                IO_RTAB_SETUP: pend_kind <= PK_RTAB;
                IO_STAT_SETUP: pend_kind <= PK_STAT;
                IO_XLATE_CHG: begin
                  ho_chg_req   <= 1'b1;
                  xt_inv_valid <= 1'b1;
                  xt_inv_pa    <= {2'b00, d.preq.data[PADDR_W-3:12]};
                  st <= S_XCHG_WAIT;
                end
                IO_XLATE_NEW: begin
                  automatic logic [SW:0] f = find_xwait(d.preq.data[56 +: EW]);
                  if (f[SW]) begin
                    slot     <= f[SW-1:0];
                    xnew_idx <= d.preq.data[56 +: EW];
                    xnew_pa  <= {2'b00, d.preq.data[PADDR_W-3:0]};
                    st <= S_XNEW_REM;
                  end
                end
                default: ;
              endcase
            end
            H_IO_RD: begin
              unique case (io_cmd_of(d.preq.addr))
                IO_FOP_RESULT: begin
                  if (fop_have) begin
                    fop_have <= 1'b0;
                    ev.fop_done <= ev.fop_done + 1'b1;
                    ob_valid <= 1'b1; ob_dest <= OB_PROC; ob_pword <= fop_result;
                    ob_has_data <= 1'b0; ob_hdr <= '0;
                    ret_st <= S_IDLE; st <= S_SEND;
                  end else begin
                    fop_rd_pend <= 1'b1;
                  end
                end
                IO_XLATE_CHG: begin
                  if (ho_grant) begin
                    ho_chg_done <= 1'b1;
                    ob_valid <= 1'b1; ob_dest <= OB_PROC; ob_pword <= 64'd1;
                    ob_has_data <= 1'b0; ob_hdr <= '0;
                    ret_st <= S_IDLE; st <= S_SEND;
                  end else begin
                    xchg_rd_pend <= 1'b1;
                    ev.holdoff_wait <= ev.holdoff_wait + 1'b1;
                  end
                end
                default: begin
                  ob_valid <= 1'b1; ob_dest <= OB_PROC; ob_pword <= '0;
                  ob_has_data <= 1'b0; ob_hdr <= '0;
                  ret_st <= S_IDLE; st <= S_SEND;
                end
              endcase
            end
            H_MSG_WR: begin
              automatic paddr_t pa = {2'b00, d.preq.addr[PADDR_W-3:0]};
              if (srec[cur_slot].busy_nack) begin
                // absorbed: the description will be answered with retry
              end else if (srec[cur_slot].st == SR_DESCR &&
                           srec[cur_slot].addrs_got < srec[cur_slot].num_addrs) begin
                automatic logic [PW-1:0] k = PW'(srec[cur_slot].addrs_got);
                if (srec[cur_slot].addrs_got == 0) srec[cur_slot].first_off <= pa[11:0];
                if (32'(srec[cur_slot].addrs_got) < MAX_PAGES) begin
                  sent[cur_slot][k]    <= xt_ins_idx;
                  sent_ok[cur_slot][k] <= xt_ins_ok;
                  xt_ins_valid <= 1'b1;
                  xt_ins_pa    <= pa[PADDR_W-1:12];
                  xt_ins_va    <= d.preq.data[63:12];
                end
                srec[cur_slot].addrs_got <= srec[cur_slot].addrs_got + 1'b1;
              end else begin
                unique case (pend_kind)
                  PK_BUF: begin
                    automatic logic [BBW:0] f = free_rbuf();
                    if (f[BBW])
                      rbuf[f[BBW-1:0]] <= '{valid: 1'b1, msg_type: pend_type, owner: cur_pid,
                                            base: {pa[PADDR_W-1:7], 7'b0}, size: pend_size};
                    pend_kind <= PK_NONE;
                  end
                  PK_RTAB: begin
                    rtab_base <= {pa[PADDR_W-1:7], 7'b0};
                    rtab_idx  <= '0;
                    pend_kind <= PK_NONE;
                  end
                  PK_STAT: begin
                    stat_base <= {pa[PADDR_W-1:3], 3'b0};
                    pend_kind <= PK_NONE;
                  end
                  default: begin
                    // Fetch-and-Op command
                    if (!fop_busy) begin
                      fop_busy       <= 1'b1;
                      fop_issue_pend <= 1'b1;
                      fop_have       <= 1'b0;
                      fop_target     <= pa;
                      fop_word       <= d.preq.data;
                    end
                  end
                endcase
              end
            end
            H_MSG_RD: begin
              // final command of the initiation protocol
              slot <= cur_slot;
              pi <= '0;
              chk_stale <= 1'b0;
              st <= S_MSGRD_CHK;
            end
            H_SWQ_TASK: begin
              automatic logic [SW-1:0] s = SW'(d.task_hdr);
              slot <= s;
              if (srec[s].st == SR_ACTIVE) st <= S_T_START;
            end
            H_NET_HDR: if (d.nmsg.hdr.mtype == NM_MHDR) begin
              // memory copy: the sender names the destination
              automatic logic [RW:0] fr = free_rrec();
              if (fr[RW]) begin
                rrec[fr[RW-1:0]] <= '{valid: 1'b1, drop: 1'b0, gap: 1'b0, mc: 1'b1,
                                     msg_num: d.nmsg.hdr.msg_num, src_node: d.nmsg.hdr.src_node,
                                     src_pid: '0, base: d.nmsg.hdr.arg[PADDR_W-1:0],
                                     length: d.nmsg.hdr.arg[63:PADDR_W], next_off: '0,
                                     remaining: lines_of(d.nmsg.hdr.arg[63:PADDR_W], 4'd0)};
              end else begin
                ev.dropped <= ev.dropped + 1'b1;
              end
            end else begin
              automatic logic [RW:0]  fr = free_rrec();
              automatic logic [BBW:0] fb = match_rbuf(d.nmsg.hdr.arg[31:24], d.nmsg.hdr.arg[47:32],
                                                     d.nmsg.hdr.arg[LEN_W-1:0]);
              if (fr[RW]) begin
                rrec[fr[RW-1:0]] <= '{valid: 1'b1, drop: !fb[BBW], msg_num: d.nmsg.hdr.msg_num,
                                     src_node: d.nmsg.hdr.src_node, src_pid: d.nmsg.hdr.arg[63:48],
                                     base: rbuf[fb[BBW-1:0]].base, length: d.nmsg.hdr.arg[LEN_W-1:0],
                                     gap: 1'b0, mc: 1'b0, next_off: '0,
                                     remaining: lines_of(d.nmsg.hdr.arg[LEN_W-1:0], 4'd0)};
                if (fb[BBW]) rbuf[fb[BBW-1:0]].valid <= 1'b0;
                else ev.dropped <= ev.dropped + 1'b1;
              end else begin
                ev.dropped <= ev.dropped + 1'b1;
              end
            end
            H_NET_COMP: begin
              automatic logic [RW:0] f = find_rrec(d.nmsg.hdr.msg_num);
              ev.comp_recv <= ev.comp_recv + 1'b1;
              if (f[RW]) begin
                automatic rrec_s r = rrec[f[RW-1:0]];
                automatic logic mcc = (d.nmsg.hdr.mtype == NM_MCOMP);
                automatic logic [CW-1:0] off = mcc ? CW'(d.nmsg.hdr.arg[63:PADDR_W]) : CW'(d.nmsg.hdr.arg);
                automatic paddr_t wa = mcc ? {d.nmsg.hdr.arg[PADDR_W-1:7], 7'b0} : r.base + (paddr_t'(off) << 7);
                rslot <= f[RW-1:0];
                if (off == r.next_off) begin
                  rrec[f[RW-1:0]].gap       <= 1'b0;
                  rrec[f[RW-1:0]].next_off  <= off + 1'b1;
                  rrec[f[RW-1:0]].remaining <= r.remaining - 1'b1;
                  if (!r.drop) begin
                    mem_req_valid <= 1'b1;
                    mem_req <= '{we: 1'b1, addr: wa,
                                 dw_mask: comp_mask(r.length, off), wdata: d.nmsg.data};
                    ret_st <= S_R_COMP_WR; st <= S_MWR;
                  end else begin
                    st <= S_R_COMP_WR;
                  end
                end else if (off > r.next_off && !r.gap) begin
                  // gap: discard, and ask the sender to resend from next_off
                  rrec[f[RW-1:0]].gap <= 1'b1;
                  ev.seq_err  <= ev.seq_err + 1'b1;
                  ev.retx_req <= ev.retx_req + 1'b1;
                  ob_valid <= 1'b1; ob_dest <= OB_NET_REP; ob_has_data <= 1'b0;
                  ob_hdr <= '{mtype: NM_RETX, rsvd0: '0, src_node: my_node, dst_node: r.src_node,
                              rsvd1: '0, msg_num: r.msg_num, arg: 64'(r.next_off)};
                  ret_st <= S_IDLE; st <= S_SEND;
                end
                // otherwise a duplicate, or a component after an already
                // reported gap: discarded
              end else begin
                ev.seq_err <= ev.seq_err + 1'b1;
              end
            end
            H_NET_ACK: begin
              automatic logic [SW:0] f = find_ack(d.nmsg.hdr.msg_num);
              automatic paddr_t sa = stat_base + (paddr_t'(srec[f[SW-1:0]].status_flag) << 3);
              if (f[SW]) begin
                slot <= f[SW-1:0];
                ev.acks <= ev.acks + 1'b1;
                mem_req_valid <= 1'b1;
                mem_req <= '{we: 1'b1, addr: {sa[PADDR_W-1:7], 7'b0},
                             dw_mask: dwmask_t'(1) << sa[6:3],
                             wdata: {DW_PER_LINE{d.nmsg.hdr.arg}}};
                ret_st <= S_ACK_FLAG; st <= S_MWR;
              end
            end
            H_NET_RETX: begin
              automatic logic [SW:0] f = find_retx(d.nmsg.hdr.msg_num);
              if (f[SW]) begin
                ev.retx <= ev.retx + 1'b1;
                if (CW'(d.nmsg.hdr.arg) < srec[f[SW-1:0]].next_comp)
                  srec[f[SW-1:0]].next_comp <= CW'(d.nmsg.hdr.arg);
                if (srec[f[SW-1:0]].st == SR_WAIT_ACK) begin
                  // all sent already: back onto the software queue
                  srec[f[SW-1:0]].st <= SR_ACTIVE;
                  swq_enq_valid <= 1'b1;
                  swq_enq_task  <= swq_task_t'(f[SW-1:0]);
                end
              end
            end
            H_NET_FOP_REQ: begin
              mem_req_valid <= 1'b1;
              mem_req <= '{we: 1'b0, addr: {2'b00, d.nmsg.hdr.arg[PADDR_W-3:7], 7'b0}, dw_mask: '0, wdata: '0};
              ret_st <= S_FH_WR; st <= S_MRD;
            end
            H_NET_FOP_REP: begin
              fop_result <= d.nmsg.hdr.arg;
              fop_have   <= 1'b1;
              fop_busy   <= 1'b0;
              ho_release <= 1'b1;
            end
            default: ;   // H_BAD / H_NONE: dropped
          endcase
        end

        // ------------------------------------------------ local read reply
        S_LRD_DONE: begin
          ob_valid <= 1'b1; ob_dest <= OB_PROC;
          ob_pword <= get_dw(mline, d.preq.addr[6:3]);
          ob_has_data <= 1'b0; ob_hdr <= '0;
          ret_st <= S_IDLE; st <= S_SEND;
        end

        // -------------------------------------- initiation: final read
        S_MSGRD_CHK: begin
          // walk the pages of the description and look for invalidated ones
          if (srec[slot].st != SR_DESCR || srec[slot].busy_nack ||
              32'(pi) >= 32'(srec[slot].addrs_got) || 32'(pi) >= MAX_PAGES) begin
            st <= S_MSGRD_DEC;
          end else begin
            if (!sent_ok[slot][pi[PW-1:0]] || !xt_rd_v) chk_stale <= 1'b1;
            pi <= pi + 1'b1;
          end
        end
        S_MSGRD_DEC: begin
          automatic init_result_e res;
          automatic srec_s r = srec[slot];
          automatic logic fail = r.bad || (r.addrs_got != r.num_addrs) ||
                                 (r.mc ? (r.dst_base[6:0] != 7'b0 || space_of(r.dst_base) != AS_BASE)
                                       : !vp_lk_hit) ||
                                 (pages_of(r.first_off, r.length) != 9'(r.num_addrs)) ||
                                 (r.first_off[2:0] != 3'b0);
          if (r.busy_nack) begin
            res = INIT_RETRY;
            srec[slot].busy_nack <= 1'b0;
          end else if (r.st != SR_DESCR) begin
            res = INIT_FAIL;
          end else if (fail) begin
            res = INIT_FAIL;
          end else if (chk_stale || (r.mc && !ho_acquire_ok)) begin
            res = INIT_RETRY;
          end else begin
            res = INIT_SUCCESS;
          end
          ob_dest <= OB_PROC; ob_has_data <= 1'b0; ob_hdr <= '0;
          ob_pword <= {32'b0, 30'b0, res};
          st <= S_REPLY_PW;
          if (!r.busy_nack && r.st == SR_DESCR) begin
            if (res == INIT_SUCCESS) begin
              srec[slot].st        <= SR_ACTIVE;
              srec[slot].dst_node  <= r.mc ? node_of(r.dst_base) : vp_lk_node;
              srec[slot].dst_ospid <= r.mc ? '0 : vp_lk_ospid;
              // a memory copy holds translation hold-off until its acknowledgement
              ho_acquire <= r.mc;
              srec[slot].msg_num   <= {my_node, send_cnt};
              srec[slot].hdr_sent  <= 1'b0;
              srec[slot].next_comp <= '0;
              srec[slot].ncomp     <= lines_of(r.length, 4'd0);
              srec[slot].nlines    <= lines_of(r.length, r.first_off[6:3]);
              ob_pword <= {my_node, send_cnt, 30'b0, res};   // MID in the upper word
              send_cnt <= send_cnt + 1'b1;
              swq_enq_valid <= 1'b1;
              swq_enq_task  <= swq_task_t'(slot);
              ev.init_ok <= ev.init_ok + 1'b1;
            end else begin
              // abort: release the pages, forget the description
              srec[slot].st <= SR_IDLE;
              pi <= '0;
              ret_st <= S_REPLY_PW;  // reply after the release
              st <= S_FREE;
              if (res == INIT_FAIL) ev.init_fail <= ev.init_fail + 1'b1;
              else                  ev.init_retry <= ev.init_retry + 1'b1;
            end
          end else if (res == INIT_RETRY) begin
            ev.init_retry <= ev.init_retry + 1'b1;
          end else begin
            ev.init_fail <= ev.init_fail + 1'b1;
          end
        end

        S_REPLY_PW: begin
          ob_valid <= 1'b1;
          ret_st <= S_IDLE; st <= S_SEND;
        end

        // -------------------------- release the page entries of `slot`
        S_FREE: begin
          if (32'(pi) >= 32'(srec[slot].addrs_got) || 32'(pi) >= MAX_PAGES) begin
            srec[slot].addrs_got <= '0;
            st <= ret_st;
          end else if (sent_ok[slot][pi[PW-1:0]]) begin
            xt_rem_valid <= 1'b1;
            xt_rem_idx   <= sent[slot][pi[PW-1:0]];
            st <= S_FREE_WAIT;
          end else begin
            pi <= pi + 1'b1;
          end
        end
        S_FREE_WAIT: if (xt_done) begin
          sent_ok[slot][pi[PW-1:0]] <= 1'b0;
          pi <= pi + 1'b1;
          st <= S_FREE;
        end

        // -------------------------------------------- translation change
        S_XCHG_WAIT: if (xt_done) begin
          ev.invalidated <= ev.invalidated + 16'(xt_inv_count);
          st <= S_IDLE;
        end
        S_XNEW_REM: begin
          xnew_va      <= xt_rd_va;
          xt_rem_valid <= 1'b1;
          xt_rem_idx   <= xnew_idx;
          st <= S_XNEW_INS;
        end
        S_XNEW_INS: if (xt_done) begin
          // the freed entry is free again, so insertion succeeds
          xt_ins_valid <= 1'b1;
          xt_ins_pa    <= xnew_pa[PADDR_W-1:12];
          xt_ins_va    <= xnew_va;
          sent[slot][srec[slot].xl_page]    <= xt_ins_idx;
          sent_ok[slot][srec[slot].xl_page] <= 1'b1;
          srec[slot].st <= SR_ACTIVE;
          xlate_irq     <= 1'b0;
          swq_enq_valid <= 1'b1;
          swq_enq_task  <= swq_task_t'(slot);
          st <= S_IDLE;
        end

        // ------------------------------------------------------ transfer
        S_T_START: begin
          chunk_c <= '0;
          cur_b   <= srec[slot].next_comp[0];
          if (!srec[slot].hdr_sent) begin
            srec[slot].hdr_sent <= 1'b1;
            ev.hdr_sent <= ev.hdr_sent + 1'b1;
            ob_valid <= 1'b1; ob_dest <= OB_NET_REQ; ob_has_data <= 1'b0;
            ob_hdr <= '{mtype: srec[slot].mc ? NM_MHDR : NM_HDR, rsvd0: '0, src_node: my_node,
                        dst_node: srec[slot].dst_node, rsvd1: '0, msg_num: srec[slot].msg_num,
                        arg: srec[slot].mc ? {srec[slot].length, srec[slot].dst_base}
                                           : {srec[slot].ospid, srec[slot].dst_ospid, srec[slot].msg_type,
                                              srec[slot].length}};
            ret_st <= S_T_LOOP; st <= S_SEND;
          end else begin
            st <= S_T_LOOP;
          end
        end
        S_T_LOOP: begin
          if (srec[slot].next_comp >= srec[slot].ncomp) begin
            srec[slot].st <= SR_WAIT_ACK;
            st <= S_IDLE;
          end else if (32'(chunk_c) >= CHUNK) begin
            ev.resched <= ev.resched + 1'b1;
            st <= S_T_RESCHED;
          end else if (free_req == '0) begin
            ev.yield_full <= ev.yield_full + 1'b1;
            ev.resched <= ev.resched + 1'b1;
            st <= S_T_RESCHED;
          end else if (src_dw == 4'd0) begin
            ld_j <= srec[slot].next_comp;
            ld_prime <= 1'b0;
            st <= S_T_LDCHK;
          end else if (chunk_c == '0) begin
            // refill the buffer that collects this component
            ld_j <= srec[slot].next_comp;
            ld_prime <= 1'b1;
            st <= S_T_LDCHK;
          end else if (srec[slot].next_comp + 1'b1 < srec[slot].nlines) begin
            ld_j <= srec[slot].next_comp + 1'b1;
            ld_prime <= 1'b0;
            st <= S_T_LDCHK;
          end else begin
            st <= S_T_SENDC;
          end
        end
        S_T_LDCHK: begin
          if (!srec[slot].mc && (!sent_ok[slot][ld_page] || !xt_rd_v)) begin
            // stale translation (a memory copy is protected by hold-off instead): ask the processor for a new one
            srec[slot].st      <= SR_WAIT_XLATE;
            srec[slot].xl_page <= ld_page;
            xlate_irq       <= 1'b1;
            xlate_irq_entry <= sent[slot][ld_page];
            xlate_irq_vpn   <= xt_rd_va;
            xlate_irq_pid   <= srec[slot].ospid;
            ev.xlate_irq    <= ev.xlate_irq + 1'b1;
            st <= S_IDLE;
          end else begin
            mem_req_valid <= 1'b1;
            mem_req <= '{we: 1'b0, addr: {xt_rd_pa, lin_off[11:0]}, dw_mask: '0, wdata: '0};
            ret_st <= S_T_LDDONE; st <= S_MRD;
          end
        end
        S_T_LDDONE: begin
          ld_valid <= 1'b1;
          ld_line  <= mline;
          if (src_dw == 4'd0) begin
            ld_buf_a <= BFW'(cur_b);
            ld_buf_b <= BFW'(cur_b);
            ld_shift <= '0;
            st <= S_T_SENDC;
          end else begin
            ev.shifted_loads <= ev.shifted_loads + 1'b1;
            ld_shift <= DWI_W'(5'd16 - 5'(src_dw));
            if (ld_prime) begin
              ld_buf_a <= BUF_SCRATCH;
              ld_buf_b <= BFW'(cur_b);
              ld_prime <= 1'b0;
              // then the next line completes the component
              if (srec[slot].next_comp + 1'b1 < srec[slot].nlines) begin
                ld_j <= srec[slot].next_comp + 1'b1;
                st <= S_T_LDCHK;
              end else begin
                st <= S_T_SENDC;
              end
            end else begin
              ld_buf_a <= BFW'(cur_b);
              ld_buf_b <= BFW'(!cur_b);
              st <= S_T_SENDC;
            end
          end
        end
        S_T_SENDC: begin
          ev.comp_sent <= ev.comp_sent + 1'b1;
          ob_valid <= 1'b1; ob_dest <= OB_NET_REQ; ob_has_data <= 1'b1;
          ob_buf   <= BFW'(cur_b);
          ob_hdr <= '{mtype: srec[slot].mc ? NM_MCOMP : NM_COMP, rsvd0: '0, src_node: my_node,
                      dst_node: srec[slot].dst_node, rsvd1: '0, msg_num: srec[slot].msg_num,
                      arg: srec[slot].mc ? {24'(srec[slot].next_comp),
                                            srec[slot].dst_base + (paddr_t'(srec[slot].next_comp) << 7)}
                                         : 64'(srec[slot].next_comp)};
          ret_st <= S_T_AFTER; st <= S_SEND;
        end
        S_T_AFTER: begin
          srec[slot].next_comp <= srec[slot].next_comp + 1'b1;
          chunk_c <= chunk_c + 1'b1;
          cur_b   <= !cur_b;
          st <= S_T_LOOP;
        end
        S_T_RESCHED: begin
          swq_enq_valid <= 1'b1;
          swq_enq_task  <= swq_task_t'(slot);
          st <= S_IDLE;
        end

        // ------------------------------------------------------ receive
        S_R_COMP_WR: begin
          if (rrec[rslot].remaining == '0) begin
            if (!rrec[rslot].drop && !rrec[rslot].mc) begin
              mem_req_valid <= 1'b1;
              mem_req <= '{we: 1'b1, addr: rtab_line,
                           dw_mask: dwmask_t'(2'b11) << rtab_dw,
                           wdata: line_t'({24'b0, rrec[rslot].base,
                                           8'h01, 8'b0, rrec[rslot].src_pid, 8'b0, rrec[rslot].length})
                                  << (64 * int'(rtab_dw))};
              rtab_idx <= rtab_idx + 1'b1;
              ret_st <= S_R_ACK; st <= S_MWR;
            end else begin
              st <= S_R_ACK;
            end
          end else begin
            st <= S_IDLE;
          end
        end
        S_R_ACK: begin
          rrec[rslot].valid <= 1'b0;
          if (!rrec[rslot].drop) ev.delivered <= ev.delivered + 1'b1;
          if (rrec[rslot].mc) ev.mcopy_done <= ev.mcopy_done + 1'b1;
          if (!rrec[rslot].drop && !rrec[rslot].mc && recv_armed) begin
            recv_irq   <= 1'b1;
            recv_armed <= 1'b0;
            ev.recv_irqs <= ev.recv_irqs + 1'b1;
          end
          ob_valid <= 1'b1; ob_dest <= OB_NET_REP; ob_has_data <= 1'b0;
          ob_hdr <= '{mtype: NM_ACK, rsvd0: '0, src_node: my_node, dst_node: rrec[rslot].src_node,
                      rsvd1: '0, msg_num: rrec[rslot].msg_num,
                      arg: rrec[rslot].drop ? 64'd2 : 64'd1};
          ret_st <= S_IDLE; st <= S_SEND;
        end

        // -------------------------------------------- acknowledgement
        S_ACK_FLAG: begin
          srec[slot].st <= SR_IDLE;
          ho_release    <= srec[slot].mc;
          pi <= '0;
          ret_st <= S_IDLE;
          st <= S_FREE;
        end

        // ----------------------------------------- Fetch-and-Op requester
        S_FOP_SEND: begin
          ob_valid <= 1'b1; ob_dest <= OB_NET_REQ; ob_has_data <= 1'b1; ob_buf <= BUF_FOP;
          ob_hdr <= '{mtype: NM_FOP_REQ, rsvd0: '0, src_node: my_node, dst_node: node_of(fop_target),
                      rsvd1: '0, msg_num: {my_node, send_cnt}, arg: 64'(fop_target)};
          ret_st <= S_IDLE; st <= S_SEND;
        end
        // ----------------------------------------- Fetch-and-Op home node
        S_FH_WR: begin
          ev.fop_home <= ev.fop_home + 1'b1;
          mem_req_valid <= 1'b1;
          mem_req <= '{we: 1'b1, addr: {2'b00, d.nmsg.hdr.arg[PADDR_W-3:7], 7'b0},
                       dw_mask: dwmask_t'(1) << d.nmsg.hdr.arg[6:3],
                       wdata: {DW_PER_LINE{fa_new}}};
          ret_st <= S_FH_REP; st <= S_MWR;
        end
        S_FH_REP: begin
          ob_valid <= 1'b1; ob_dest <= OB_NET_REP; ob_has_data <= 1'b0;
          ob_hdr <= '{mtype: NM_FOP_REP, rsvd0: '0, src_node: my_node, dst_node: d.nmsg.hdr.src_node,
                      rsvd1: '0, msg_num: d.nmsg.hdr.msg_num, arg: fa_old};
          ret_st <= S_IDLE; st <= S_SEND;
        end

        default: st <= S_IDLE;
      endcase
    end
  end

  a_swq_room: assert property (@(posedge clk) disable iff (!rst_n) swq_enq_valid |-> swq_enq_ready);
  a_xt_idle:  assert property (@(posedge clk) disable iff (!rst_n)
                (xt_ins_valid || xt_rem_valid || xt_inv_valid) |-> xt_op_ready);
endmodule
