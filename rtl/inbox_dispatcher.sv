// inbox_dispatcher: first stage of the MAGIC macropipeline (the Inbox).
//
// Four sources compete for the protocol processor: the processor's inbound
// queue, the network request and reply queues, and the head register of the
// software queue. The dispatcher picks one, decodes it and selects the handler
// that must run, so that no handler spends time sorting requests out. For a
// processor access the two address-space bits choose between an ordinary
// memory access, an I/O-space command and a message-space command; for a
// network message the message type does. A network message arriving on the
// wrong channel selects H_BAD.
//
// A handler is started only when the outgoing queues can take at least the
// guaranteed minimum of messages (MIN_REQ / MIN_REP / MIN_PROC free slots); a
// handler that wants to send more must check for space itself.
// Priority: network reply > network request > processor > software queue. The
// software queue is served only when the three hardware queues have nothing
// (as in the published design); the order among the hardware queues (replies
// first, so that replies always drain) is this design's choice.
//
// Interface: the heads of the four sources with their pop strobes; free-slot
// counts of the three outgoing queues; one registered output (out_valid,
// out) that the engine consumes with out_take.
// Timing: the decoded request is registered; a new one can be loaded in the
// cycle the previous one is taken, so one request per cycle can flow.
module inbox_dispatcher
  import magic_pkg::*;
#(
  parameter int unsigned FREE_W   = 4,
  parameter int unsigned MIN_REQ  = 2,
  parameter int unsigned MIN_REP  = 1,
  parameter int unsigned MIN_PROC = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              proc_valid,
  input  proc_req_s         proc_head,
  output logic              proc_pop,
  input  logic              nreq_valid,
  input  net_msg_s          nreq_head,
  output logic              nreq_pop,
  input  logic              nrep_valid,
  input  net_msg_s          nrep_head,
  output logic              nrep_pop,
  input  logic              swq_valid,
  input  swq_task_t         swq_head,
  output logic              swq_pop,
  input  logic [FREE_W-1:0] free_req,
  input  logic [FREE_W-1:0] free_rep,
  input  logic [FREE_W-1:0] free_proc,
  output logic              out_valid,
  output disp_s             out,
  input  logic              out_take
);
  function automatic handler_e proc_handler(proc_req_s r);
    unique case (space_of(r.addr))
      AS_BASE: return r.we ? H_LOCAL_WR : H_LOCAL_RD;
      AS_IO:   return r.we ? H_IO_WR    : H_IO_RD;
      AS_MSG:  return r.we ? H_MSG_WR   : H_MSG_RD;
      default: return H_BAD;
    endcase
  endfunction

  function automatic handler_e net_handler(net_msg_s m, logic is_reply);
    unique case (m.hdr.mtype)
      NM_HDR:     return is_reply ? H_BAD : H_NET_HDR;
      NM_COMP:    return is_reply ? H_BAD : H_NET_COMP;
      NM_MHDR:    return is_reply ? H_BAD : H_NET_HDR;
      NM_MCOMP:   return is_reply ? H_BAD : H_NET_COMP;
      NM_FOP_REQ: return is_reply ? H_BAD : H_NET_FOP_REQ;
      NM_ACK:     return is_reply ? H_NET_ACK : H_BAD;
      NM_FOP_REP: return is_reply ? H_NET_FOP_REP : H_BAD;
      NM_RETX:    return is_reply ? H_NET_RETX : H_BAD;
      default:    return H_BAD;
    endcase
  endfunction

  logic space_ok;
  logic load;
  disp_s nxt;

  assign space_ok = (free_req  >= FREE_W'(MIN_REQ)) &&
                    (free_rep  >= FREE_W'(MIN_REP)) &&
                    (free_proc >= FREE_W'(MIN_PROC));

  // the output register can take a new request
  assign load = space_ok && (!out_valid || out_take);

  always_comb begin
    proc_pop = 1'b0;
    nreq_pop = 1'b0;
    nrep_pop = 1'b0;
    swq_pop  = 1'b0;
    nxt          = '0;
    nxt.preq     = proc_head;
    nxt.task_hdr = swq_head;
    nxt.handler  = H_NONE;
    if (load) begin
      if (nrep_valid) begin
        nrep_pop    = 1'b1;
        nxt.src     = SRC_NET_REP;
        nxt.nmsg    = nrep_head;
        nxt.handler = net_handler(nrep_head, 1'b1);
      end else if (nreq_valid) begin
        nreq_pop    = 1'b1;
        nxt.src     = SRC_NET_REQ;
        nxt.nmsg    = nreq_head;
        nxt.handler = net_handler(nreq_head, 1'b0);
      end else if (proc_valid) begin
        proc_pop    = 1'b1;
        nxt.src     = SRC_PROC;
        nxt.handler = proc_handler(proc_head);
      end else if (swq_valid) begin
        swq_pop     = 1'b1;
        nxt.src     = SRC_SWQ;
        nxt.handler = H_SWQ_TASK;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (load) begin
      out_valid <= (nxt.handler != H_NONE);
      out       <= nxt;
    end else if (out_take) begin
      out_valid <= 1'b0;
    end
  end

  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({proc_pop, nreq_pop, nrep_pop, swq_pop}));
  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) out_take |-> out_valid);
endmodule
