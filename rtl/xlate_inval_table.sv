// xlate_inval_table: the translation invalidation structure of MAGIC.
//
// MAGIC keeps physical page addresses it was given by the processor (the pages
// of a send buffer) for as long as an operation uses them. If the operating
// system changes the translation of such a page, every use must be marked
// invalid, so that the handler asks for a new translation before it touches
// the page again. Each use is an entry (V, PA, VA) owned by a sender record;
// entries are chained into linked lists that hang off a hash table indexed by
// the physical page, so all uses of one page are found by walking one bucket.
//
// Operations (one at a time; op_ready is low while a walk runs):
//   insert  (ins_valid, ins_pa, ins_va): takes a free entry, sets V, pushes it
//           at the head of its bucket's list; ins_idx/ins_ok answer in the same
//           cycle, the entry is linked at the clock edge. Single cycle.
//   remove  (rem_valid, rem_idx): unlinks the entry and frees it. Walks the
//           bucket list, one entry per cycle.
//   invalidate (inv_valid, inv_pa): walks the bucket of inv_pa and clears V of
//           every entry holding that page; inv_count reports how many.
//   read    (rd_idx -> rd_v, rd_pa, rd_va): combinational.
// done pulses for one cycle when a remove or invalidate walk finishes.
// Addresses are page numbers (physical address without the 12 offset bits).
// The structure (hash on physical address, chained entries holding V, PA and
// VA) follows the published design. The number of entries and buckets and the
// hash function (xor of the two low 3-bit groups of the page number) are this
// design's choices; there the lists live in main memory, here in registers.
module xlate_inval_table
  import magic_pkg::*;
#(
  parameter int unsigned NENT = 16,
  parameter int unsigned NBKT = 8,
  parameter int unsigned PPN_W = PADDR_W - 12,
  parameter int unsigned VPN_W = 52
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    op_ready,
  input  logic                    ins_valid,
  input  logic [PPN_W-1:0]        ins_pa,
  input  logic [VPN_W-1:0]        ins_va,
  output logic [$clog2(NENT)-1:0] ins_idx,
  output logic                    ins_ok,
  input  logic                    rem_valid,
  input  logic [$clog2(NENT)-1:0] rem_idx,
  input  logic                    inv_valid,
  input  logic [PPN_W-1:0]        inv_pa,
  output logic                    done,
  output logic [$clog2(NENT):0]   inv_count,
  input  logic [$clog2(NENT)-1:0] rd_idx,
  output logic                    rd_v,
  output logic [PPN_W-1:0]        rd_pa,
  output logic [VPN_W-1:0]        rd_va
);
  localparam int unsigned IW = $clog2(NENT);
  localparam int unsigned BW = $clog2(NBKT);

  typedef struct packed {
    logic             used;
    logic             v;
    logic [PPN_W-1:0] pa;
    logic [VPN_W-1:0] va;
    logic             has_next;
    logic [IW-1:0]    next;
  } entry_s;

  entry_s        ent [NENT];
  logic          bkt_v [NBKT];
  logic [IW-1:0] bkt_h [NBKT];

  typedef enum logic [1:0] {S_IDLE, S_REM, S_INV} st_e;
  st_e            st;
  logic [IW-1:0]  cur;        // entry being visited
  logic           cur_v;
  logic           prev_v;     // a predecessor exists
  logic [IW-1:0]  prev;
  logic [IW-1:0]  target;     // entry to remove
  logic [BW-1:0]  bkt;        // bucket being walked
  logic [PPN_W-1:0] key;
  logic [IW:0]    cnt;

  function automatic logic [BW-1:0] hash(logic [PPN_W-1:0] p);
    return BW'(p[BW-1:0] ^ p[2*BW-1:BW]);
  endfunction

  // first free entry
  always_comb begin
    ins_ok  = 1'b0;
    ins_idx = '0;
    for (int i = NENT-1; i >= 0; i--) begin
      if (!ent[i].used) begin
        ins_ok  = 1'b1;
        ins_idx = IW'(i);
      end
    end
  end

  assign op_ready  = (st == S_IDLE);
  assign rd_v      = ent[rd_idx].used && ent[rd_idx].v;
  assign rd_pa     = ent[rd_idx].pa;
  assign rd_va     = ent[rd_idx].va;
  assign inv_count = cnt;

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (!rst_n) begin
      st <= S_IDLE;
      cnt <= '0;
      for (int i = 0; i < NENT; i++) ent[i] <= '0;
      for (int b = 0; b < NBKT; b++) begin
        bkt_v[b] <= 1'b0;
        bkt_h[b] <= '0;
      end
    end else begin
      unique case (st)
        S_IDLE: begin
          if (ins_valid && ins_ok) begin
            automatic logic [BW-1:0] h = hash(ins_pa);
            ent[ins_idx] <= '{used: 1'b1, v: 1'b1, pa: ins_pa, va: ins_va,
                              has_next: bkt_v[h], next: bkt_h[h]};
            bkt_v[h] <= 1'b1;
            bkt_h[h] <= ins_idx;
          end else if (rem_valid) begin
            automatic logic [BW-1:0] h = hash(ent[rem_idx].pa);
            st     <= S_REM;
            target <= rem_idx;
            bkt    <= h;
            cur    <= bkt_h[h];
            cur_v  <= bkt_v[h];
            prev_v <= 1'b0;
          end else if (inv_valid) begin
            automatic logic [BW-1:0] h = hash(inv_pa);
            st     <= S_INV;
            key    <= inv_pa;
            bkt    <= h;
            cur    <= bkt_h[h];
            cur_v  <= bkt_v[h];
            cnt    <= '0;
          end
        end
        S_REM: begin
          if (!cur_v) begin
            // not found in its list: just free it
            ent[target].used <= 1'b0;
            st <= S_IDLE;
            done <= 1'b1;
          end else if (cur == target) begin
            if (prev_v) begin
              ent[prev].has_next <= ent[cur].has_next;
              ent[prev].next     <= ent[cur].next;
            end else begin
              bkt_v[bkt] <= ent[cur].has_next;
              bkt_h[bkt] <= ent[cur].next;
            end
            ent[cur].used <= 1'b0;
            st <= S_IDLE;
            done <= 1'b1;
          end else begin
            prev   <= cur;
            prev_v <= 1'b1;
            cur    <= ent[cur].next;
            cur_v  <= ent[cur].has_next;
          end
        end
        S_INV: begin
          if (!cur_v) begin
            st <= S_IDLE;
            done <= 1'b1;
          end else begin
            if (ent[cur].pa == key && ent[cur].v) begin
              ent[cur].v <= 1'b0;
              cnt <= cnt + 1'b1;
            end
            cur   <= ent[cur].next;
            cur_v <= ent[cur].has_next;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    !op_ready |-> !(ins_valid || rem_valid || inv_valid));
endmodule
