// fetch_op_alu: the read-modify-write of a Fetch-and-Op at the home node.
//
// A Fetch-and-Op is a simple active message: the home node of an address
// combines the word in memory with a constant from the command, stores the
// result back, and returns the old value to the requester. This unit computes
// the new value; the handler engine does the memory read and write around it.
//
// Interface: op (fop_e), old_val (the memory word), operand (the constant,
// 60 bits, zero-extended) -> new_val. Purely combinational.
// Fetch-and-Add is the operation the published design names; the other
// operations (and, or, xor, swap, unsigned max) and their codes are this
// design's choice. Unknown codes leave the word unchanged.
module fetch_op_alu
  import magic_pkg::*;
(
  input  fop_e        op,
  input  dword_t      old_val,
  input  logic [59:0] operand,
  output dword_t      new_val
);
  dword_t k;
  assign k = {4'b0, operand};

  always_comb begin
    unique case (op)
      FOP_ADD:  new_val = old_val + k;
      FOP_AND:  new_val = old_val & k;
      FOP_OR:   new_val = old_val | k;
      FOP_XOR:  new_val = old_val ^ k;
      FOP_SWAP: new_val = k;
      FOP_MAX:  new_val = (k > old_val) ? k : old_val;
      default:  new_val = old_val;
    endcase
  end
endmodule
