// tb_fetch_op_alu: checks each Fetch-and-Op operation.
//
// For every operation (add, and, or, xor, swap, max) and for undefined
// operation codes, random old values and 60-bit constants (plus corner values:
// zero, all ones, the largest constant) are applied and the new value is
// compared with one computed here. The constant is zero-extended to 64 bits;
// max compares as unsigned; an undefined code leaves the word unchanged.
module tb_fetch_op_alu;
  import magic_pkg::*;

  int checks = 0;
  int failures = 0;

  fop_e op;
  dword_t old_val, new_val;
  logic [59:0] operand;

  fetch_op_alu dut (.*);

  function automatic dword_t ref_op(logic [3:0] o, dword_t a, logic [59:0] k);
    dword_t b = {4'b0, k};
    case (o)
      4'd0: return a + b;
      4'd1: return a & b;
      4'd2: return a | b;
      4'd3: return a ^ b;
      4'd4: return b;
      4'd5: return (a > b) ? a : b;
      default: return a;
    endcase
  endfunction

  initial begin
    dword_t corners [4] = '{64'd0, '1, 64'h0FFF_FFFF_FFFF_FFFF, 64'h8000_0000_0000_0001};
    for (int o = 0; o < 8; o++) begin
      for (int i = 0; i < 200; i++) begin
        op = fop_e'(4'(o));
        old_val = (i < 4) ? corners[i] : {$urandom, $urandom};
        operand = (i % 4 == 1) ? '1 : (i % 4 == 2) ? '0 : {28'($urandom), $urandom};
        #1;
        checks++;
        if (new_val !== ref_op(4'(o), old_val, operand)) begin
          failures++;
          if (failures < 10) $display("FAIL: op %0d old %h k %h got %h", o, old_val, operand, new_val);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
