// data_buffers: MAGIC data buffers with the doubleword alignment load.
//
// Data moves through MAGIC in cache-line sized registers, the data buffers.
// Besides an ordinary aligned load, a memory line can be loaded starting at an
// arbitrary 64-bit doubleword of a buffer: doubleword j of the line goes to
// position j+shift; positions that fall past the end of buffer A wrap into
// position j+shift-16 of a second buffer B named with the same load. Loading
// the next memory line into B (as the new A) completes a line whose alignment
// matches the receive buffer, so an unaligned source is re-aligned while every
// memory line is read about once.
//
// Interface:
//   ld_valid/ld_buf_a/ld_buf_b/ld_shift/ld_line : load a memory line. Only the
//     doublewords the load covers are written; the rest of both buffers keep
//     their contents. With ld_shift = 0 this is the ordinary aligned load into
//     ld_buf_a and ld_buf_b is untouched.
//   wr_valid/wr_buf/wr_line : plain whole-line write (data arriving from the
//     network or the processor).
//   rd_buf -> rd_line : combinational read of one buffer.
// Timing: writes take effect at the clock edge; reads are combinational.
// Buffer contents are not reset (they carry data, not state).
// The 128-byte line, the doubleword granularity and the wrap into a second
// named buffer follow the published mechanism. The number of buffers is not
// given there; 16 is this design's choice.
module data_buffers
  import magic_pkg::*;
#(
  parameter int unsigned NBUF = 16
) (
  input  logic                     clk,
  input  logic                     ld_valid,
  input  logic [$clog2(NBUF)-1:0]  ld_buf_a,
  input  logic [$clog2(NBUF)-1:0]  ld_buf_b,
  input  logic [DWI_W-1:0]         ld_shift,
  input  line_t                    ld_line,
  input  logic                     wr_valid,
  input  logic [$clog2(NBUF)-1:0]  wr_buf,
  input  line_t                    wr_line,
  input  logic [$clog2(NBUF)-1:0]  rd_buf,
  output line_t                    rd_line
);
  line_t buf_q [NBUF];

  assign rd_line = buf_q[rd_buf];

  always_ff @(posedge clk) begin
    if (ld_valid) begin
      for (int j = 0; j < DW_PER_LINE; j++) begin
        // position of doubleword j within the pair (A,B)
        automatic int unsigned pos = j + int'(ld_shift);
        if (pos < DW_PER_LINE)
          buf_q[ld_buf_a][pos*64 +: 64] <= ld_line[j*64 +: 64];
        else
          buf_q[ld_buf_b][(pos-DW_PER_LINE)*64 +: 64] <= ld_line[j*64 +: 64];
      end
    end else if (wr_valid) begin
      buf_q[wr_buf] <= wr_line;
    end
  end
endmodule
