// lifdu: the local instruction fetch and dispatch unit of one processing
// element, active in the multithreaded mode.
//
// How it works. Each cycle the PE's own fetch side offers up to PE_W (four)
// instruction words of the thread this PE runs. The unit decodes them,
// renames them with its own rename_unit (this PE's IBIT, RBIT and mapping
// table) and, if the PE's reorder buffer has a free slice and its
// instruction window room for four, dispatches them into that slice; tags
// are the PE number followed by slice*4 + slot. The group is cut after a
// loop-exit mark, after which the unit takes nothing until it is flushed.
//
// While the machine is in the integrated mode the unit is idle and its
// tables follow the global unit's IBIT and RBIT every cycle ('follow'), so
// that the PE starts the multithreaded mode with the right bank for every
// register. Its IBIT is also what selects the committed value of each
// register in the PE's register file.
//
// From the document: one LIFDU per PE, up to four instructions per cycle,
// enabled only in the multithreaded mode, per-PE RBIT updated from the
// global one in the integrated mode. This design's choices: as for the
// global unit, the fetch source is outside the unit.
module lifdu
  import cmp_pkg::*;
#(
  parameter int unsigned PE_ID = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         active,
  input  logic [31:0]  fetch_words [PE_W],
  input  logic [2:0]   fetch_avail,
  output logic [2:0]   fetch_take,
  input  logic         win_accept,
  input  logic         rob_full,
  input  slice_t       rob_tail,
  output logic         disp_valid,
  output uop_t         disp_uop [PE_W],
  input  result_t      bcast    [GW],
  input  commit_t      commits  [PE_W],
  input  logic         flush,
  input  logic         reset_tables,
  input  logic         follow,
  input  bank_t        g_ibit   [NREG],
  input  bank_t        g_rbit   [NREG],
  output bank_t        ibit     [NREG],
  output logic         loop_exit_wait,
  output logic         stall_bank
);

  instr_t ins  [PE_W];
  tag_t   tags [PE_W];
  bank_t  rbit [NREG];
  logic   stop_taken, intra_dep;

  always_comb
    for (int j = 0; j < PE_W; j++) begin
      ins[j]  = instr_t'(fetch_words[j]);
      tags[j] = {peid_t'(PE_ID), rob_tail, 2'(j)};
    end

  rename_unit #(.W(PE_W), .NB(GW), .NC(PE_W), .STOP_OP(OP_LOOPX)) u_ren (
    .clk, .rst_n,
    .instr(ins), .avail(fetch_avail),
    .en(active && win_accept && !rob_full),
    .tags, .take(fetch_take), .uops(disp_uop),
    .stop_taken, .halted(loop_exit_wait), .resume(1'b0),
    .bcast, .commits, .flush, .reset_tables,
    .load_en(follow), .load_ibit(g_ibit), .load_rbit(g_rbit),
    .ibit, .rbit, .stall_bank, .intra_dep
  );

  assign disp_valid = (fetch_take != '0);

endmodule
