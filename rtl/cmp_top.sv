// cmp_top: a chip multiprocessor of four 4-issue processing elements with two
// execution modes.
//
// In the integrated superscalar mode the global fetch/dispatch unit (gifdu)
// takes up to 16 instructions per cycle of one dynamic instruction stream,
// renames them, and hands four to each PE; the four reorder buffers are
// chained into one logical buffer by ordering links, and every result is
// broadcast to all PEs so their bank-based register files stay identical.
// In the multithreaded mode each PE fetches its own thread through its local
// unit (lifdu) and the result network keeps results inside the PE. The
// mode controller switches at loop-entry and loop-exit marks.
//
// Ports:
//   g_fetch_*  16-wide fetch port of the global unit: 'g_fetch_avail' words
//              valid, 'g_fetch_take' words consumed this cycle (a prefix).
//   t_fetch_*  one 4-wide fetch port per PE for its thread (multithreaded
//              mode), same handshake.
//   irq        interrupt request; in the integrated mode all uncommitted
//              work is dropped in that cycle, so the committed state is
//              precise and fetch must resume after the last committed
//              instruction ('retired' counts committed instructions).
//   mode, nonspec, arch_regs: current mode, nonspeculative PE and committed
//              register values seen by each PE.
//
// Ordering-link wiring: the link into slice s of PE p (p > 0) comes from
// slice s of PE p-1; the link into slice s of PE 0 from slice s-1 of PE 3.
// Links from PE 0 to PE 3 may be used in the same cycle; the link from PE 3
// back to PE 0 is seen a cycle later.
//
// The instruction source (trace cache and core fetch unit for the global
// port, instruction caches for the thread ports), the memory system and the
// inter-thread register and memory communication hardware of the
// multithreaded mode are outside this design.
module cmp_top
  import cmp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        irq,
  input  logic [31:0] g_fetch_words [GW],
  input  logic [4:0]  g_fetch_avail,
  output logic [4:0]  g_fetch_take,
  input  logic [31:0] t_fetch_words [NPE][PE_W],
  input  logic [2:0]  t_fetch_avail [NPE],
  output logic [2:0]  t_fetch_take  [NPE],
  output mode_e       mode,
  output peid_t       nonspec,
  output logic [4:0]  retired,
  output word_t       arch_regs [NPE][NREG]
);

  // ---------------------------------------------------------------- control
  logic irq_flush, sync, to_mt, handoff;
  logic loop_entry_wait, g_rob_empty;
  commit_t pe_commits [NPE][PE_W];
  logic integrated, mt_active, flush_pe;

  assign integrated = (mode == MODE_ISS);
  assign mt_active  = (mode == MODE_MT);
  assign flush_pe   = irq_flush || sync;

  mode_ctrl u_mode (
    .clk, .rst_n, .irq, .loop_entry_wait, .rob_drained(g_rob_empty),
    .pe_commits, .mode, .nonspec, .irq_flush, .sync, .to_mt, .handoff
  );

  // ---------------------------------------------------------------- result network
  result_t pe_res [NPE][PE_W];
  result_t to_pe  [NPE][GW];
  result_bus u_bus (.integrated, .enable(!flush_pe), .pe_res, .to_pe);

  // ---------------------------------------------------------------- global unit
  logic   pe_accept [NPE];
  logic   g_valid;
  uop_t   g_uop [NPE][PE_W];
  slice_t tail_block;
  commit_t g_commits [GW];
  bank_t  g_ibit [NREG], g_rbit [NREG];
  logic   stall_bank, stall_rob_full, intra_dep;
  logic   done [NPE];
  slice_t done_slice [NPE];

  always_comb
    for (int p = 0; p < NPE; p++)
      for (int k = 0; k < PE_W; k++) begin
        g_commits[p*PE_W+k] = pe_commits[p][k];
        g_commits[p*PE_W+k].valid = pe_commits[p][k].valid && integrated;
      end

  gifdu u_gifdu (
    .clk, .rst_n, .active(integrated),
    .fetch_words(g_fetch_words), .fetch_avail(g_fetch_avail), .fetch_take(g_fetch_take),
    .pe_accept, .disp_valid(g_valid), .disp_uop(g_uop), .tail_block,
    .block_retired(done[NPE-1] && integrated),
    .commits(g_commits), .bcast(to_pe[0]),
    .flush(irq_flush), .reset_tables(sync),
    .ibit(g_ibit), .rbit(g_rbit),
    .loop_entry_wait, .rob_empty(g_rob_empty),
    .stall_bank, .stall_rob_full, .intra_dep
  );

  // ---------------------------------------------------------------- processing elements
  word_t  arch [NPE][NREG];
  logic   link_used [NPE], rob_empty [NPE], loop_exit_wait [NPE], ins_capture [NPE];

  // Each PE's link inputs are separate nets so that the PE 0 -> PE 3 chain of
  // same-cycle links is visibly free of loops (PE 3 -> PE 0 is registered
  // inside the reorder buffer).
  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic   done_w, link_set;
    slice_t done_slice_w, link_set_slice;
    assign done[p] = done_w;
    assign done_slice[p] = done_slice_w;
    if (p == 0) begin : g_first
      assign link_set       = g_pe[NPE-1].done_w;
      assign link_set_slice = g_pe[NPE-1].done_slice_w + 1'b1;
    end else begin : g_next
      assign link_set       = g_pe[p-1].done_w;
      assign link_set_slice = g_pe[p-1].done_slice_w;
    end
    pe #(.PE_ID(p)) u_pe (
      .clk, .rst_n, .integrated, .mt_active,
      .g_valid, .g_uop(g_uop[p]), .accept(pe_accept[p]),
      .fetch_words(t_fetch_words[p]), .fetch_avail(t_fetch_avail[p]),
      .fetch_take(t_fetch_take[p]), .loop_exit_wait(loop_exit_wait[p]),
      .bcast(to_pe[p]), .res_out(pe_res[p]),
      .commits(pe_commits[p]),
      .link_set, .link_set_slice,
      .done(done_w), .done_slice(done_slice_w), .link_used(link_used[p]),
      .mark_ok(mt_active && nonspec == peid_t'(p)),
      .rob_empty(rob_empty[p]),
      .flush(flush_pe), .reset_tables(sync),
      .g_ibit, .g_rbit,
      .rf_load(sync), .rf_load_val(arch[nonspec]),
      .arch(arch[p]), .ins_capture(ins_capture[p])
    );
  end

  assign arch_regs = arch;

  always_comb begin
    retired = '0;
    for (int p = 0; p < NPE; p++)
      for (int k = 0; k < PE_W; k++)
        if (pe_commits[p][k].valid) retired = retired + 5'd1;
  end

endmodule
