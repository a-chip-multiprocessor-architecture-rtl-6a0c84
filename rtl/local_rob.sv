// local_rob: the reorder buffer of one processing element, organised in
// 4-entry slices, with the ordering link that lets four of them act as one
// logical reorder buffer in the integrated superscalar mode.
//
// How it works. ROB_SLICES slices of PE_W (four) entries each. Allocation
// always fills one whole slice at the tail: slots without an instruction
// become filler no-ops, already complete. An entry completes when a result
// with its tag comes from this PE's functional units (entry index = low tag
// bits); marks and no-ops complete at allocation. The entry holds no result
// value: results go straight into the bank-based register file.
//
// Commit. The local head moves through the current slice, up to four entries
// a cycle, in order and only over completed entries. The first entry of a
// slice may commit only when the ordering link into that slice is ON (in the
// integrated mode; in the multithreaded mode the buffer is an ordinary
// private one and links are ignored). When the fourth entry of a slice
// commits, 'done' pulses with the slice number; the surrounding logic turns
// it into the link of the next slice in program order (same slice of the
// next PE, or the next slice of the first PE). A link arriving on 'link_set'
// is stored, and also counts in the same cycle, so one block of 16 entries
// can retire in one cycle from PE 0 through PE 3. The stored link is turned
// OFF when the slice it opens commits its first entry. Flush (interrupt,
// squash) empties the buffer and restores the initial links: only the link
// into slice 0 of PE 0 is ON.
//
// Iteration-end and loop-exit marks commit only while 'mark_ok' is high
// (the PE is nonspeculative), and at most one mark commits per cycle.
//
// From the document: slices of four entries, blocks of one slice per PE,
// ordering links with the initial state above, turned ON when the fourth
// entry of the previous slice completes at the head, first entry of a slice
// committing only with its link ON. This design's choices: the link is
// turned OFF when it is used (the document turns it OFF when the previous
// slice is allocated again, which with whole-block allocation could drop a
// link before it is used), and the same-cycle use of a link.
module local_rob
  import cmp_pkg::*;
#(
  parameter bit IS_FIRST = 1'b0     // PE 0 holds the initial ON link
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  logic    use_links,
  input  logic    alloc,
  input  uop_t    alloc_uop [PE_W],
  output slice_t  tail_slice,
  output logic    full,
  output logic    empty,
  input  result_t fu_res    [PE_W],
  input  logic    link_set,
  input  slice_t  link_set_slice,
  output logic    done,
  output slice_t  done_slice,
  input  logic    mark_ok,
  output commit_t commits   [PE_W],
  output logic    link_used       // a link was consumed this cycle
);

  typedef struct packed {
    logic busy;
    logic cmpl;
    logic real_i;   // a real instruction (not a filler no-op)
    logic wr;
    reg_t rd;
    op_e  op;
  } entry_t;

  entry_t ent [ROB_DEPTH];
  logic   link_q [ROB_SLICES];
  slice_t head_s, tail_s;
  logic [1:0] head_o;
  logic [SW:0] cnt;     // occupied slices

  assign tail_slice = tail_s;
  assign full  = (cnt == (SW+1)'(ROB_SLICES));
  assign empty = (cnt == '0);

  logic link_eff;
  logic [2:0] ncommit;
  logic marked;

  always_comb begin
    logic stop;
    int idx;
    // PE 0 sees the link from PE 3 only once stored, which keeps the ring
    // of links free of a combinational loop.
    link_eff = link_q[head_s] || (!IS_FIRST && link_set && link_set_slice == head_s);
    stop    = 1'b0;
    idx     = 0;
    marked  = 1'b0;
    ncommit = '0;
    done    = 1'b0;
    done_slice = head_s;
    link_used  = 1'b0;
    for (int k = 0; k < PE_W; k++) begin
      commits[k] = '0;
      if (!stop && (int'(head_o) + k < PE_W) && !flush) begin
        idx = int'(head_s) * PE_W + int'(head_o) + k;
        if (!ent[idx].busy || !ent[idx].cmpl) stop = 1'b1;
        else if ((int'(head_o) + k == 0) && use_links && !link_eff) stop = 1'b1;
        else if ((ent[idx].op == OP_ITEREND || ent[idx].op == OP_LOOPX) && ent[idx].real_i
                 && (!mark_ok || marked)) stop = 1'b1;
        else begin
          ncommit = ncommit + 3'd1;
          commits[k].valid = ent[idx].real_i;
          commits[k].wr    = ent[idx].wr;
          commits[k].rd    = ent[idx].rd;
          commits[k].op    = ent[idx].op;
          if (ent[idx].real_i && (ent[idx].op == OP_ITEREND || ent[idx].op == OP_LOOPX)) marked = 1'b1;
          if (int'(head_o) + k == 0 && use_links) link_used = 1'b1;
          if (int'(head_o) + k == PE_W - 1) done = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ROB_DEPTH; i++) ent[i] <= '0;
      for (int s = 0; s < ROB_SLICES; s++) link_q[s] <= IS_FIRST && (s == 0);
      head_s <= '0; head_o <= '0; tail_s <= '0; cnt <= '0;
    end else if (flush) begin
      for (int i = 0; i < ROB_DEPTH; i++) ent[i] <= '0;
      for (int s = 0; s < ROB_SLICES; s++) link_q[s] <= IS_FIRST && (s == 0);
      head_s <= '0; head_o <= '0; tail_s <= '0; cnt <= '0;
    end else begin
      // completion from this PE's functional units
      for (int f = 0; f < PE_W; f++)
        if (fu_res[f].valid)
          ent[fu_res[f].tag[LW-1:0]].cmpl <= 1'b1;
      // links
      if (link_set) link_q[link_set_slice] <= 1'b1;
      if (link_used) link_q[head_s] <= 1'b0;
      // commit
      for (int k = 0; k < PE_W; k++)
        if (k < int'(ncommit))
          ent[int'(head_s) * PE_W + int'(head_o) + k].busy <= 1'b0;
      if (done) begin
        head_s <= head_s + 1'b1;
        head_o <= '0;
      end else begin
        head_o <= head_o + 2'(ncommit);
      end
      // allocation of one whole slice
      if (alloc && !full) begin
        for (int k = 0; k < PE_W; k++) begin
          ent[int'(tail_s) * PE_W + k].busy   <= 1'b1;
          ent[int'(tail_s) * PE_W + k].real_i <= alloc_uop[k].valid;
          ent[int'(tail_s) * PE_W + k].cmpl   <= !(alloc_uop[k].valid && is_alu(alloc_uop[k].op));
          ent[int'(tail_s) * PE_W + k].wr     <= alloc_uop[k].valid && alloc_uop[k].wr;
          ent[int'(tail_s) * PE_W + k].rd     <= alloc_uop[k].rd;
          ent[int'(tail_s) * PE_W + k].op     <= alloc_uop[k].valid ? alloc_uop[k].op : OP_NOP;
        end
        tail_s <= tail_s + 1'b1;
      end
      cnt <= cnt + (SW+1)'(alloc && !full) - (SW+1)'(done);
    end
  end

  // A slice is only ever allocated when it is free.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n || flush) !(alloc && full))
    else $error("local_rob: allocation into a full buffer");

endmodule
