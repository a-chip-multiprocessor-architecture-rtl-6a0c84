// gifdu: the global instruction fetch and dispatch unit, active in the
// integrated superscalar mode.
//
// How it works. Each cycle the fetch side offers up to GW (16) instruction
// words in dynamic program order ('fetch_avail' of them valid); the unit
// decodes them, renames them with its rename_unit (global IBIT, RBIT and
// register mapping table) and, if a reorder-buffer block is free and every
// PE's instruction window can take four more instructions, allocates the
// block at the global tail: slots 0-3 go to PE 0, 4-7 to PE 1, 8-11 to PE 2
// and 12-15 to PE 3, each slot's tag being the PE number followed by the
// local entry number (block*4 + slot mod 4). Slots not filled become no-ops.
// 'fetch_take' tells the fetch side how many words were consumed; fewer than
// offered when the group is cut (two-writer bank limit, or the loop-entry
// mark, after which the unit waits for the mode switch).
//
// The global head and tail pointers count reorder-buffer blocks. The tail
// advances with each allocated block; the head advances when the last slice
// of the oldest block (PE 3's) has committed, which is when the whole block
// is free again. A flush (precise interrupt) resets both; 'reset_tables'
// (return from the multithreaded mode) resets the renaming hardware.
//
// Interface timing: decode, rename and the dispatch decision are
// combinational; the PEs write the micro-ops into their windows and reorder
// buffers at the same clock edge.
//
// From the document: one GIFDU, up to 16 instructions per cycle split into
// four ordered partitions of four, head/tail pointers of the first PE's
// buffer, tail used to form tags, register mapping table, IBIT and RBIT in
// the unit. This design's choices: the fetch source is outside the unit (the
// trace cache is not part of this design), the whole-block free test and the
// cut rules.
module gifdu
  import cmp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         active,
  input  logic [31:0]  fetch_words [GW],
  input  logic [4:0]   fetch_avail,
  output logic [4:0]   fetch_take,
  input  logic         pe_accept [NPE],
  output logic         disp_valid,
  output uop_t         disp_uop [NPE][PE_W],
  output slice_t       tail_block,
  input  logic         block_retired,   // PE 3 committed the last entry of a slice
  input  commit_t      commits [GW],
  input  result_t      bcast   [GW],
  input  logic         flush,
  input  logic         reset_tables,
  output bank_t        ibit [NREG],
  output bank_t        rbit [NREG],
  output logic         loop_entry_wait, // loop entry mark taken, waiting for the switch
  output logic         rob_empty,
  output logic         stall_bank,
  output logic         stall_rob_full,
  output logic         intra_dep
);

  slice_t head_q, tail_q;
  logic [SW:0] cnt_q;

  instr_t ins  [GW];
  tag_t   tags [GW];
  uop_t   uops [GW];
  logic   all_accept;
  logic   stop_taken;

  always_comb begin
    all_accept = 1'b1;
    for (int p = 0; p < NPE; p++) all_accept &= pe_accept[p];
    for (int j = 0; j < GW; j++) begin
      ins[j]  = instr_t'(fetch_words[j]);
      tags[j] = {peid_t'(j / PE_W), tail_q, 2'(j % PE_W)};
    end
  end

  assign stall_rob_full = active && (fetch_avail != 0) && (cnt_q == (SW+1)'(ROB_SLICES));
  assign rob_empty  = (cnt_q == '0);
  assign tail_block = tail_q;

  rename_unit #(.W(GW), .NB(GW), .NC(GW), .STOP_OP(OP_LOOPB)) u_ren (
    .clk, .rst_n,
    .instr(ins), .avail(fetch_avail),
    .en(active && all_accept && (cnt_q != (SW+1)'(ROB_SLICES))),
    .tags, .take(fetch_take), .uops,
    .stop_taken, .halted(loop_entry_wait), .resume(1'b0),
    .bcast, .commits, .flush, .reset_tables,
    .load_en(1'b0), .load_ibit(ibit), .load_rbit(rbit),
    .ibit, .rbit, .stall_bank, .intra_dep
  );

  assign disp_valid = (fetch_take != '0);
  always_comb
    for (int p = 0; p < NPE; p++)
      for (int k = 0; k < PE_W; k++)
        disp_uop[p][k] = uops[p*PE_W + k];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0; tail_q <= '0; cnt_q <= '0;
    end else if (flush || reset_tables) begin
      head_q <= '0; tail_q <= '0; cnt_q <= '0;
    end else begin
      if (disp_valid) tail_q <= tail_q + 1'b1;
      if (block_retired) head_q <= head_q + 1'b1;
      cnt_q <= cnt_q + (SW+1)'(disp_valid) - (SW+1)'(block_retired);
    end
  end

endmodule
