// rm_write_buffer: buffer for writes that depend on an external condition.
//
// A cache data write must not change the array before the tag check says
// "hit". Such a write enters this buffer instead of the array (push). One
// cycle later the condition arrives from the inter-mat control network
// (resolve with cond): the entry becomes committed when cond is 1 and is
// dropped when it is 0. A committed entry is written into the array in a
// later cycle in which the array port is free (drain_ok), for instance the
// slot of the next conditional write, which itself only enters the buffer.
//
// Reads search the buffer (srch_addr): when a committed entry holds the word,
// or the pending entry is being resolved with cond=1 in this cycle, hit is 1
// and hit_data/hit_md give the buffered value (the youngest match if
// several), so a read right behind a conditional write already sees it. An
// ordinary write to the word of a buffered entry (kill_en) drops that entry,
// so a later drain cannot overwrite newer data.
//
// Buffered entries are part of the memory's state, so operations that change
// meta-data in the array change them too: a second-port meta-data write
// (md_we, from a read-modify-write) to the word of a committed entry (a
// pending entry was pushed after the read-modify-write read the word, so it
// is the newer value), and gang set/clear and the conditional gang clear on
// all entries, applied in the same order as in the array.
// The user of the buffer must not drain in a cycle with a gang update; a
// drain in the cycle of a second-port write to the same word must take the
// second-port value for the array.
//
// DEPTH entries; with the condition one cycle after the push, at most one
// pending and one committed entry exist, and a push may take the slot that
// drains in the same cycle, so DEPTH=2 never overflows at one push per cycle
// as long as pushes come with a free array slot (true in the mat, where a
// conditional write does not use the array port). Each entry carries a push sequence number that orders
// drains and forwarding. The depth, the drop-on-write rule and
// forwarding of committed entries only are this design's choices.
module rm_write_buffer #(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned AW    = 9,
  parameter int unsigned D     = 32,
  parameter int unsigned M     = 4,
  parameter int unsigned CG_COND   = 1,  // conditional gang: clear CG_TARGET
  parameter int unsigned CG_TARGET = 0   // where CG_COND is 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // push a conditional write
  input  logic          push,
  input  logic [AW-1:0] push_addr,
  input  logic [D-1:0]  push_data,
  input  logic [M-1:0]  push_md,
  // condition of the entry pushed in the previous cycle
  input  logic          resolve,
  input  logic          cond,
  // drain a committed entry into the array
  input  logic          drain_ok,
  output logic          drain,
  output logic [AW-1:0] drain_addr,
  output logic [D-1:0]  drain_data,
  output logic [M-1:0]  drain_md,
  // read search
  input  logic [AW-1:0] srch_addr,
  output logic          hit,
  output logic [D-1:0]  hit_data,
  output logic [M-1:0]  hit_md,
  output logic          hit_pend,   // the hit is the entry resolving now
  // ordinary write to the array
  input  logic          kill_en,
  input  logic [AW-1:0] kill_addr,
  // meta-data updates applied to the array in this cycle
  input  logic          md_we,
  input  logic [AW-1:0] md_addr,
  input  logic [M-1:0]  md_wdata,
  input  logic [M-1:0]  gset,
  input  logic [M-1:0]  gclr,
  input  logic          cgang,
  output logic          full
);
  typedef enum logic [1:0] {E_FREE, E_PEND, E_COMMIT} state_e;

  typedef struct packed {
    state_e        st;
    logic [31:0]   seq;     // push order
    logic [AW-1:0] addr;
    logic [D-1:0]  data;
    logic [M-1:0]  md;
  } entry_t;

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  entry_t        ent [DEPTH];
  logic [31:0]   seq_ctr;
  logic          have_free, have_commit;
  logic [IW-1:0] free_idx, commit_idx;

  // oldest committed entry drains first
  always_comb begin
    have_commit = 1'b0;
    commit_idx  = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (ent[i].st == E_COMMIT &&
          (!have_commit || ent[i].seq < ent[commit_idx].seq)) begin
        have_commit = 1'b1;
        commit_idx  = IW'(i);
      end
    end
  end

  assign drain      = have_commit & drain_ok;

  // a push may reuse the slot that drains in the same cycle
  always_comb begin
    have_free = drain;
    free_idx  = commit_idx;
    for (int i = 0; i < DEPTH; i++) begin
      if (ent[i].st == E_FREE && !have_free) begin
        have_free = 1'b1;
        free_idx  = IW'(i);
      end
    end
  end

  assign full       = ~have_free;
  assign drain_addr = ent[commit_idx].addr;
  assign drain_data = ent[commit_idx].data;
  assign drain_md   = ent[commit_idx].md;

  // youngest committed (or committing) entry for the searched word
  always_comb begin
    logic [31:0] best;
    hit      = 1'b0;
    hit_data = '0;
    hit_md   = '0;
    hit_pend = 1'b0;
    best     = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if ((ent[i].st == E_COMMIT || (ent[i].st == E_PEND && resolve && cond)) &&
          ent[i].addr == srch_addr &&
          (!hit || ent[i].seq > best)) begin
        hit      = 1'b1;
        best     = ent[i].seq;
        hit_data = ent[i].data;
        hit_md   = ent[i].md;
        hit_pend = (ent[i].st == E_PEND);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seq_ctr <= '0;
      for (int i = 0; i < DEPTH; i++) ent[i] <= '{st: E_FREE, default: '0};
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        logic [M-1:0] md;
        md = ent[i].md;
        if (md_we && ent[i].st == E_COMMIT && ent[i].addr == md_addr) md = md_wdata;
        md = (md | gset) & ~gclr;
        if (cgang && md[CG_COND]) md[CG_TARGET] = 1'b0;
        ent[i].md <= md;
        if (ent[i].st == E_PEND && resolve)
          ent[i].st <= cond ? E_COMMIT : E_FREE;
        if (ent[i].st != E_FREE && kill_en && ent[i].addr == kill_addr)
          ent[i].st <= E_FREE;
      end
      if (drain) ent[commit_idx].st <= E_FREE;
      if (push && have_free) begin   // after the drain: may reuse its slot
        ent[free_idx] <= '{st: E_PEND, seq: seq_ctr, addr: push_addr,
                           data: push_data, md: push_md};
        seq_ctr <= seq_ctr + 1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> have_free)
    else $error("write buffer overflow");
  assert property (@(posedge clk) disable iff (!rst_n)
    drain |-> !((|gset) || (|gclr) || cgang))
    else $error("write buffer drained during a meta-data update");
endmodule
