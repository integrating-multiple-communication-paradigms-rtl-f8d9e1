// outbox: third stage of the MAGIC macropipeline.
//
// The handler engine hands every message it produces to the outbox, tagged
// with where it goes: to the processor (a reply to an uncached read), to the
// network request channel or to the network reply channel. The outbox steers
// the message into the matching outgoing hardware queue and back-pressures the
// engine while that queue is full. Messages for the network are formed here
// from the engine's header and the contents of the named data buffer, so the
// engine never copies a line itself.
//
// Interface: in_valid/in_ready with in_dest (ob_dest_e), in_pword (64-bit
// processor reply), in_hdr (network header), in_has_data/in_buf (data buffer
// whose line travels with the message). buf_rd_idx/buf_rd_line read the data
// buffers. Three valid/ready outputs feed the outgoing queues.
// Timing: combinational; a message is accepted in the cycle its queue is ready.
// The steering by message class follows the published queue structure; the
// message formats are this design's own.
module outbox
  import magic_pkg::*;
#(
  parameter int unsigned NBUF = 16
) (
  input  logic                    in_valid,
  output logic                    in_ready,
  input  ob_dest_e                in_dest,
  input  dword_t                  in_pword,
  input  nhdr_s                   in_hdr,
  input  logic                    in_has_data,
  input  logic [$clog2(NBUF)-1:0] in_buf,
  output logic [$clog2(NBUF)-1:0] buf_rd_idx,
  input  line_t                   buf_rd_line,
  output logic                    proc_valid,
  input  logic                    proc_ready,
  output dword_t                  proc_data,
  output logic                    nreq_valid,
  input  logic                    nreq_ready,
  output net_msg_s                nreq_msg,
  output logic                    nrep_valid,
  input  logic                    nrep_ready,
  output net_msg_s                nrep_msg
);
  net_msg_s m;

  assign buf_rd_idx = in_buf;

  always_comb begin
    m.hdr      = in_hdr;
    m.has_data = in_has_data;
    m.data     = in_has_data ? buf_rd_line : '0;
  end

  assign proc_data = in_pword;
  assign nreq_msg  = m;
  assign nrep_msg  = m;

  assign proc_valid = in_valid && (in_dest == OB_PROC);
  assign nreq_valid = in_valid && (in_dest == OB_NET_REQ);
  assign nrep_valid = in_valid && (in_dest == OB_NET_REP);

  always_comb begin
    unique case (in_dest)
      OB_PROC:    in_ready = proc_ready;
      OB_NET_REQ: in_ready = nreq_ready;
      OB_NET_REP: in_ready = nrep_ready;
      default:    in_ready = 1'b1;   // unused code: dropped
    endcase
  end
endmodule
