// mode_ctrl: execution-mode controller and the speculative/nonspeculative
// status of the processing elements.
//
// How it works. After reset the machine is in the integrated superscalar
// mode (MODE_ISS). When the global unit has taken a loop-entry mark and the
// logical reorder buffer has drained, it enters the multithreaded mode
// (MODE_MT) with PE 0 nonspeculative. In that mode exactly one PE, the one
// running the oldest unfinished iteration, is nonspeculative
// ('nonspec'); when it commits an iteration-end mark the status passes to
// the next PE (round robin), and when it commits a loop-exit mark the
// machine spends one cycle in MODE_SYNC: every PE is squashed, every
// register file is loaded with the committed register values of the
// nonspeculative PE, and all renaming tables are reset. The next cycle the
// machine is back in the integrated mode. An interrupt ('irq') is taken in
// the integrated mode only: it flushes all uncommitted work in that cycle
// (RBIT restored from IBIT), which leaves the state precise.
//
// Outputs are registered state (mode, nonspec) plus single-cycle strobes
// derived from it combinationally (flush, sync).
//
// From the document: start in the integrated mode, switch at loop entry and
// loop exit points, one nonspeculative PE whose successor takes over when
// its iteration completes, register files made consistent from the
// nonspeculative PE, renaming hardware reset. This design's choices: the
// drain before entering the multithreaded mode, the one-cycle SYNC state,
// squashing the speculative PEs at loop exit, interrupts held off in the
// multithreaded mode.
module mode_ctrl
  import cmp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    irq,
  input  logic    loop_entry_wait,
  input  logic    rob_drained,
  input  commit_t pe_commits [NPE][PE_W],
  output mode_e   mode,
  output peid_t   nonspec,
  output logic    irq_flush,
  output logic    sync,
  output logic    to_mt,        // event: switch to the multithreaded mode this cycle
  output logic    handoff       // event: nonspeculative status passed on
);

  logic iter_end, loop_exit;

  always_comb begin
    iter_end  = 1'b0;
    loop_exit = 1'b0;
    for (int k = 0; k < PE_W; k++) begin
      if (pe_commits[nonspec][k].valid && pe_commits[nonspec][k].op == OP_ITEREND) iter_end = 1'b1;
      if (pe_commits[nonspec][k].valid && pe_commits[nonspec][k].op == OP_LOOPX)   loop_exit = 1'b1;
    end
  end

  assign irq_flush = (mode == MODE_ISS) && irq;
  assign sync      = (mode == MODE_SYNC);
  assign to_mt     = (mode == MODE_ISS) && !irq && loop_entry_wait && rob_drained;
  assign handoff   = (mode == MODE_MT) && iter_end && !loop_exit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode    <= MODE_ISS;
      nonspec <= '0;
    end else begin
      unique case (mode)
        MODE_ISS: if (to_mt) begin
          mode    <= MODE_MT;
          nonspec <= '0;
        end
        MODE_MT: begin
          if (loop_exit)    mode <= MODE_SYNC;
          else if (handoff) nonspec <= nonspec + 1'b1;
        end
        default: mode <= MODE_ISS;   // MODE_SYNC lasts one cycle
      endcase
    end
  end

endmodule
