// magic_pkg: types and constants shared by the MAGIC node-controller blocks.
//
// A MAGIC node controller sits between a node's processor, its slice of the
// distributed main memory and the network. This package fixes the formats that
// cross those boundaries:
//   * the physical address (two address-space bits on top, then node number,
//     line number and line offset);
//   * the 64-bit commands the processor issues as uncached accesses to the
//     I/O space and the message space;
//   * the low-level network messages (16-byte header plus an optional 128-byte
//     cache line of data) carried on the request and reply channels;
//   * the memory port.
// The field order of the physical address, the 128-byte line, the 64-bit
// doubleword alignment granularity, the 4 KB page and the 256-node machine
// follow the published design. Bit widths of the command fields, the codes of
// the I/O-space commands and the header layout are this design's own choices.
package magic_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned LINE_BYTES  = 128;               // cache line
  localparam int unsigned DW_BYTES    = 8;                 // 64-bit doubleword
  localparam int unsigned DW_PER_LINE = LINE_BYTES / DW_BYTES;  // 16
  localparam int unsigned LINE_W      = LINE_BYTES * 8;    // 1024
  localparam int unsigned DWI_W       = $clog2(DW_PER_LINE);   // 4
  localparam int unsigned PAGE_BYTES  = 4096;
  localparam int unsigned PADDR_W     = 40;
  localparam int unsigned NODE_W      = 8;                 // 256 nodes
  localparam int unsigned OFFSET_W    = $clog2(LINE_BYTES);     // 7
  localparam int unsigned LINENUM_W   = PADDR_W - 2 - NODE_W - OFFSET_W;
  localparam int unsigned PID_W       = 16;
  localparam int unsigned LEN_W       = 24;                // message length in bytes

  typedef logic [LINE_W-1:0]      line_t;
  typedef logic [PADDR_W-1:0]     paddr_t;
  typedef logic [63:0]            dword_t;
  typedef logic [NODE_W-1:0]      node_t;
  typedef logic [PID_W-1:0]       pid_t;
  typedef logic [DW_PER_LINE-1:0] dwmask_t;

  // ------------------------------------------------------ physical address
  // Top two bits select one of four physical address spaces.
  typedef enum logic [1:0] {
    AS_BASE = 2'b00,   // ordinary memory reads and writes
    AS_IO   = 2'b01,   // commands: address names the command, data is the argument
    AS_MSG  = 2'b10,   // message space: address is an authentic physical address
    AS_ALT3 = 2'b11    // fourth space, unused by the message-passing handlers
  } addr_space_e;

  typedef struct packed {
    addr_space_e            space;
    logic [NODE_W-1:0]      node;
    logic [LINENUM_W-1:0]   line;
    logic [OFFSET_W-1:0]    offset;
  } paddr_s;

  // ---------------------------------------------------- I/O-space commands
  // The command number sits in the address bits just above the doubleword
  // offset: io_cmd = addr[3 +: 8].
  typedef enum logic [7:0] {
    IO_NONE        = 8'd0,
    IO_MSG_INIT    = 8'd1,  // W: start a user-message description (send)
    IO_CTX_SWITCH  = 8'd2,  // W: OS tells the PID now running
    IO_VPID_SET    = 8'd3,  // W: OS writes a virtual-PID table entry
    IO_BUFALLOC    = 8'd4,  // W: next message-space write names a receive buffer
    IO_RTAB_SETUP  = 8'd5,  // W: next message-space write names the receive table
    IO_STAT_SETUP  = 8'd6,  // W: next message-space write names the status-flag area
    IO_FOP_RESULT  = 8'd7,  // R: result of the outstanding Fetch-and-Op
    IO_XLATE_CHG   = 8'd8,  // W: page whose translation changes; R: wait for the grant
    IO_XLATE_NEW   = 8'd9,  // W: processor answers a retranslation interrupt
    IO_MCOPY_DEST  = 8'd10, // W: makes the open description a memory copy to this address
    IO_RECV_WAIT   = 8'd11  // W: data[0]=1 arms the arrival interrupt, 0 disarms; clears it
  } io_cmd_e;

  // Data word of IO_MSG_INIT (field order as printed for the transfer command).
  typedef struct packed {
    logic [15:0]      dest_vpid;
    logic [7:0]       status_flag;
    logic [7:0]       msg_type;
    logic [7:0]       num_addrs;
    logic [LEN_W-1:0] length;       // bytes, whole doublewords
  } init_cmd_s;

  // Answer to the final read of the initiation protocol.
  typedef enum logic [1:0] {
    INIT_SUCCESS = 2'd0,
    INIT_RETRY   = 2'd1,
    INIT_FAIL    = 2'd2
  } init_result_e;

  // Fetch-and-Op operations (the command's top nibble).
  typedef enum logic [3:0] {
    FOP_ADD  = 4'd0,
    FOP_AND  = 4'd1,
    FOP_OR   = 4'd2,
    FOP_XOR  = 4'd3,
    FOP_SWAP = 4'd4,
    FOP_MAX  = 4'd5
  } fop_e;

  // ------------------------------------------------------ processor side
  typedef struct packed {
    logic   we;       // 1: uncached write, 0: uncached read
    paddr_t addr;
    dword_t data;
  } proc_req_s;

  // -------------------------------------------------------- network side
  typedef enum logic [3:0] {
    NM_HDR     = 4'd1,  // request: user-message header
    NM_COMP    = 4'd2,  // request: one cache-line component
    NM_ACK     = 4'd3,  // reply:   receiver acknowledges a complete user message
    NM_FOP_REQ = 4'd4,  // request: Fetch-and-Op to the home node
    NM_FOP_REP = 4'd5,  // reply:   Fetch-and-Op result
    NM_RETX    = 4'd6,  // reply:   receiver asks the sender to resend from a component
    NM_MHDR    = 4'd7,  // request: memory-copy header
    NM_MCOMP   = 4'd8   // request: memory-copy component (labelled with its address)
  } nmsg_e;

  // 16-byte header. Meaning of arg per type:
  //   HDR     : {src_pid, dst_ospid, msg_type, length}
  //   COMP    : component offset (line index within the user message)
  //   ACK     : status (1 delivered, 2 dropped for want of a buffer)
  //   FOP_REQ : target physical address; data doubleword 0 = {op, constant}
  //   FOP_REP : old value of the target word
  //   RETX    : first missing component offset
  //   MHDR    : {length[23:0], destination base[39:0]}
  //   MCOMP   : {component offset[23:0], destination line address[39:0]}
  typedef struct packed {
    nmsg_e       mtype;
    logic [3:0]  rsvd0;
    node_t       src_node;
    node_t       dst_node;
    logic [7:0]  rsvd1;
    logic [31:0] msg_num;   // {src_node, per-node send count}
    dword_t      arg;
  } nhdr_s;                 // 128 bits = 16 bytes

  typedef struct packed {
    nhdr_s  hdr;
    logic   has_data;
    line_t  data;
  } net_msg_s;

  // --------------------------------------------------------- memory port
  typedef struct packed {
    logic    we;
    paddr_t  addr;          // line aligned
    dwmask_t dw_mask;       // doublewords written
    line_t   wdata;
  } mem_req_s;

  // ---------------------------------------------------------- handlers
  typedef enum logic [3:0] {
    H_NONE, H_LOCAL_RD, H_LOCAL_WR, H_IO_WR, H_IO_RD, H_MSG_WR, H_MSG_RD,
    H_NET_HDR, H_NET_COMP, H_NET_ACK, H_NET_FOP_REQ, H_NET_FOP_REP,
    H_NET_RETX, H_SWQ_TASK, H_BAD
  } handler_e;

  typedef enum logic [1:0] {
    SRC_PROC, SRC_NET_REQ, SRC_NET_REP, SRC_SWQ
  } disp_src_e;

  // Destination chosen for an outgoing message by the outbox.
  typedef enum logic [1:0] {
    OB_PROC, OB_NET_REQ, OB_NET_REP
  } ob_dest_e;

  // Fixed-format software-queue task header: the sender record to continue.
  typedef logic [7:0] swq_task_t;

  // What the dispatcher hands to the handler engine.
  typedef struct packed {
    handler_e   handler;
    disp_src_e  src;
    proc_req_s  preq;
    net_msg_s   nmsg;
    swq_task_t  task_hdr;
  } disp_s;

  // Event counters of the handler engine (for observation and tests).
  typedef struct packed {
    logic [15:0] init_ok;       // initiations accepted
    logic [15:0] init_retry;    // initiations answered "retry"
    logic [15:0] init_fail;     // initiations answered "failure"
    logic [15:0] hdr_sent;      // user-message headers sent
    logic [15:0] comp_sent;     // components sent
    logic [15:0] comp_recv;     // components received
    logic [15:0] resched;       // transfer task put back on the software queue
    logic [15:0] yield_full;    // transfer yielded because the request queue was full
    logic [15:0] shifted_loads; // alignment loads with a non-zero shift
    logic [15:0] delivered;     // user messages completed at this receiver
    logic [15:0] dropped;       // user messages without a matching receive buffer
    logic [15:0] acks;          // acknowledgements received by this sender
    logic [15:0] seq_err;       // components out of sequence
    logic [15:0] invalidated;   // translation entries invalidated
    logic [15:0] xlate_irq;     // retranslation interrupts raised
    logic [15:0] fop_home;      // Fetch-and-Ops performed as home node
    logic [15:0] fop_done;      // Fetch-and-Op results returned to the processor
    logic [15:0] holdoff_wait;  // translation-change grants that had to wait
    logic [15:0] retx_req;      // retransmission requests sent by this receiver
    logic [15:0] retx;          // retransmission requests served by this sender
    logic [15:0] mcopy_done;    // memory copies completed at this receiver
    logic [15:0] recv_irqs;     // arrival interrupts raised for a blocking receive
  } eng_events_s;

  function automatic addr_space_e space_of(paddr_t a);
    return addr_space_e'(a[PADDR_W-1 -: 2]);
  endfunction

  function automatic node_t node_of(paddr_t a);
    return a[PADDR_W-3 -: NODE_W];
  endfunction

  function automatic io_cmd_e io_cmd_of(paddr_t a);
    return io_cmd_e'(a[3 +: 8]);
  endfunction

  function automatic dword_t get_dw(line_t l, logic [DWI_W-1:0] i);
    return l[i*64 +: 64];
  endfunction

endpackage
