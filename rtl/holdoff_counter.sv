// holdoff_counter: translation hold-off for MAGIC operations.
//
// Operations that must not see a virtual-to-physical translation change while
// they run (a Fetch-and-Op, a memory copy) take hold-off: the counter holds the
// number of such operations outstanding. When the processor announces a
// translation change, the change is noted as pending; from then on no new
// hold-off operation may start (acquire_ok low), and the change is granted as
// soon as the count reaches zero. The processor waits for that grant before it
// changes the mapping. Because no new operation can start, the count is sure
// to reach zero as long as the outstanding operations finish on their own.
//
// Interface: acquire (start of a hold-off operation, only when acquire_ok),
// release (end of one), chg_req (translation change announced), chg_done (the
// grant has been delivered to the processor; clears the pending change).
// Outputs: count, chg_pending, grant = chg_pending && count == 0.
// Timing: all inputs take effect at the clock edge; outputs are registered
// state or simple functions of it. acquire and release in the same cycle
// cancel. The counter width is this design's choice.
module holdoff_counter #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             acquire,
  input  logic             release_op,
  input  logic             chg_req,
  input  logic             chg_done,
  output logic [CNT_W-1:0] count,
  output logic             chg_pending,
  output logic             acquire_ok,
  output logic             grant
);
  assign acquire_ok = !chg_pending && (count != '1);
  assign grant      = chg_pending && (count == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count       <= '0;
      chg_pending <= 1'b0;
    end else begin
      case ({acquire && acquire_ok, release_op && count != '0})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      if (chg_req)       chg_pending <= 1'b1;
      else if (chg_done) chg_pending <= 1'b0;
    end
  end

  a_no_acquire_when_blocked: assert property (@(posedge clk) disable iff (!rst_n)
    acquire |-> acquire_ok);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    release_op |-> count != '0 || acquire);
endmodule
