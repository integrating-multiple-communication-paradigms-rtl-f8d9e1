// vpid_table: virtual process id translation for message destinations.
//
// A program names the receiver of a user message by a virtual process id in
// 0..P-1. MAGIC keeps a table, written by the operating system, that maps each
// valid virtual PID to the node that runs the process and its operating-system
// PID. Only processes of the same application are reachable: an entry that was
// never written, or a virtual PID beyond the table, is reported invalid and
// makes the send fail.
//
// Interface: write port (wr_valid, wr_vpid, wr_ok, wr_node, wr_ospid), where
// wr_ok = 0 removes an entry; lookup port (lk_vpid -> lk_hit, lk_node,
// lk_ospid), combinational. Timing: writes take effect at the clock edge;
// reset invalidates every entry.
// The table contents follow the published design; its size (64 entries) is
// this design's choice.
module vpid_table
  import magic_pkg::*;
#(
  parameter int unsigned NVPID = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_valid,
  input  logic [15:0] wr_vpid,
  input  logic        wr_ok,
  input  node_t       wr_node,
  input  pid_t        wr_ospid,
  input  logic [15:0] lk_vpid,
  output logic        lk_hit,
  output node_t       lk_node,
  output pid_t        lk_ospid
);
  localparam int unsigned IW = $clog2(NVPID);

  logic  ok_q   [NVPID];
  node_t node_q [NVPID];
  pid_t  pid_q  [NVPID];

  wire in_range = (lk_vpid < 16'(NVPID));
  wire [IW-1:0] lk_idx = lk_vpid[IW-1:0];

  assign lk_hit   = in_range && ok_q[lk_idx];
  assign lk_node  = node_q[lk_idx];
  assign lk_ospid = pid_q[lk_idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NVPID; i++) ok_q[i] <= 1'b0;
    end else if (wr_valid && wr_vpid < 16'(NVPID)) begin
      ok_q[wr_vpid[IW-1:0]] <= wr_ok;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && wr_vpid < 16'(NVPID)) begin
      node_q[wr_vpid[IW-1:0]] <= wr_node;
      pid_q[wr_vpid[IW-1:0]]  <= wr_ospid;
    end
  end
endmodule
