// tb_inbox_dispatcher: checks input selection, handler decode and the
// outgoing-space guarantee of the dispatcher.
//
// Four input heads (processor, network request, network reply, software
// queue) are presented with random contents and random valid bits, the free
// space of the three outgoing queues is random, and the consumer takes the
// registered output at random. The testbench predicts, from the values at
// each clock edge, whether a request is loaded (space above the minimum and
// output register free or taken), which input is popped (reply channel, then
// request channel, then processor, then software queue), and which handler the
// loaded request gets; it then compares pops, out_valid and the output. Counts
// loads held back for want of space and fails if none happened.
module tb_inbox_dispatcher;
  import magic_pkg::*;
  localparam int FREE_W = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic proc_valid = 0, nreq_valid = 0, nrep_valid = 0, swq_valid = 0, out_take = 0;
  proc_req_s proc_head = '0;
  net_msg_s nreq_head = '0, nrep_head = '0;
  swq_task_t swq_head = '0;
  logic [FREE_W-1:0] free_req = '0, free_rep = '0, free_proc = '0;
  logic proc_pop, nreq_pop, nrep_pop, swq_pop, out_valid;
  disp_s out;

  inbox_dispatcher #(.FREE_W(FREE_W), .MIN_REQ(2), .MIN_REP(1), .MIN_PROC(1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic handler_e exp_proc(proc_req_s r);
    case (r.addr[39:38])
      2'b00: return r.we ? H_LOCAL_WR : H_LOCAL_RD;
      2'b01: return r.we ? H_IO_WR : H_IO_RD;
      2'b10: return r.we ? H_MSG_WR : H_MSG_RD;
      default: return H_BAD;
    endcase
  endfunction

  function automatic handler_e exp_net(net_msg_s m, bit rep);
    case (m.hdr.mtype)
      NM_HDR:     return rep ? H_BAD : H_NET_HDR;
      NM_COMP:    return rep ? H_BAD : H_NET_COMP;
      NM_MHDR:    return rep ? H_BAD : H_NET_HDR;
      NM_MCOMP:   return rep ? H_BAD : H_NET_COMP;
      NM_FOP_REQ: return rep ? H_BAD : H_NET_FOP_REQ;
      NM_ACK:     return rep ? H_NET_ACK : H_BAD;
      NM_FOP_REP: return rep ? H_NET_FOP_REP : H_BAD;
      NM_RETX:    return rep ? H_NET_RETX : H_BAD;
      default:    return H_BAD;
    endcase
  endfunction

  initial begin
    bit exp_valid = 0;
    disp_s exp_out = '0;
    int n_held = 0, n_src [4] = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) begin
      bit space, load;
      @(negedge clk);
      check(out_valid == exp_valid, "out_valid");
      if (exp_valid) check(out.handler == exp_out.handler && out.src == exp_out.src, "handler and source");
      if (exp_valid && exp_out.src == SRC_PROC) check(out.preq == exp_out.preq, "processor request carried");
      if (exp_valid && exp_out.src inside {SRC_NET_REQ, SRC_NET_REP}) check(out.nmsg == exp_out.nmsg, "network message carried");
      if (exp_valid && exp_out.src == SRC_SWQ) check(out.task_hdr == exp_out.task_hdr, "task carried");
      proc_valid = $urandom_range(1);
      nreq_valid = ($urandom_range(3) == 0);
      nrep_valid = ($urandom_range(3) == 0);
      swq_valid  = $urandom_range(1);
      proc_head  = '{we: $urandom_range(1), addr: {$urandom_range(3), 38'($urandom)}, data: {$urandom, $urandom}};
      nreq_head  = '0;
      nreq_head.hdr.mtype = nmsg_e'($urandom_range(9));
      nreq_head.hdr.msg_num = $urandom;
      nrep_head  = '0;
      nrep_head.hdr.mtype = nmsg_e'($urandom_range(9));
      nrep_head.hdr.arg = {$urandom, $urandom};
      swq_head   = swq_task_t'($urandom);
      free_req   = FREE_W'($urandom_range(5));
      free_rep   = FREE_W'($urandom_range(3));
      free_proc  = FREE_W'($urandom_range(3));
      out_take   = out_valid && $urandom_range(1);
      #1;
      space = (free_req >= 2) && (free_rep >= 1) && (free_proc >= 1);
      load  = space && (!exp_valid || out_take);
      check(nrep_pop == (load && nrep_valid), "reply channel first");
      check(nreq_pop == (load && !nrep_valid && nreq_valid), "request channel second");
      check(proc_pop == (load && !nrep_valid && !nreq_valid && proc_valid), "processor third");
      check(swq_pop  == (load && !nrep_valid && !nreq_valid && !proc_valid && swq_valid), "software queue last");
      if (!space && (nrep_valid || nreq_valid || proc_valid || swq_valid)) n_held++;
      @(posedge clk);
      if (load) begin
        exp_valid = nrep_valid || nreq_valid || proc_valid || swq_valid;
        if (nrep_valid) begin
          exp_out.src = SRC_NET_REP; exp_out.nmsg = nrep_head; exp_out.handler = exp_net(nrep_head, 1); n_src[0]++;
        end else if (nreq_valid) begin
          exp_out.src = SRC_NET_REQ; exp_out.nmsg = nreq_head; exp_out.handler = exp_net(nreq_head, 0); n_src[1]++;
        end else if (proc_valid) begin
          exp_out.src = SRC_PROC; exp_out.preq = proc_head; exp_out.handler = exp_proc(proc_head); n_src[2]++;
        end else if (swq_valid) begin
          exp_out.src = SRC_SWQ; exp_out.task_hdr = swq_head; exp_out.handler = H_SWQ_TASK; n_src[3]++;
        end
      end else if (out_take) begin
        exp_valid = 0;
      end
    end
    $display("INFO: held for space=%0d  from rep/req/proc/swq=%0d/%0d/%0d/%0d", n_held, n_src[0], n_src[1], n_src[2], n_src[3]);
    check(n_held > 0, "dispatch held back for outgoing space");
    check(n_src[0] > 0 && n_src[1] > 0 && n_src[2] > 0 && n_src[3] > 0, "every input served");
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
