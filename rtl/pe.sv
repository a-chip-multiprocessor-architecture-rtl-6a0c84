// pe: one processing element, a 4-issue out-of-order core that can work
// alone (multithreaded mode) or as one quarter of a 16-issue core
// (integrated superscalar mode).
//
// Contents: a local fetch/dispatch unit (lifdu), an instruction window, a
// sliced reorder buffer, a bank-based register file and PE_W ALUs.
// Dispatch comes from the global unit in the integrated mode and from the
// local unit in the multithreaded mode. A dispatched group of four takes one
// reorder-buffer slice and enters the window; operands found ready are read
// from the register file bank named by renaming. Up to four ready
// operations issue per cycle; each ALU result is registered and broadcast
// in the next cycle with its tag, register and bank, to the windows,
// reorder buffers and register files that the result network lets see it.
// The reorder buffer commits in order and reports each committed
// instruction; in the integrated mode its first entry per slice waits for
// the ordering link.
//
// Timing: dispatch at edge t; earliest issue in cycle t; result on the
// broadcast network in cycle t+1; dependent instruction issues in t+2;
// commit of the entry no earlier than t+2.
//
// From the document: the PE's parts (fetch unit, decoding, instruction
// window, functional units, reorder buffer, bank-based register file) and
// how they work together in each mode. This design's choices are those of
// the parts, listed in their own files.
module pe
  import cmp_pkg::*;
#(
  parameter int unsigned PE_ID = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        integrated,     // integrated superscalar mode
  input  logic        mt_active,      // multithreaded mode: local fetch enabled
  // dispatch from the global unit
  input  logic        g_valid,
  input  uop_t        g_uop [PE_W],
  output logic        accept,         // room for one more group
  // local fetch
  input  logic [31:0] fetch_words [PE_W],
  input  logic [2:0]  fetch_avail,
  output logic [2:0]  fetch_take,
  output logic        loop_exit_wait,
  // results
  input  result_t     bcast  [GW],
  output result_t     res_out[PE_W],
  // commit and ordering links
  output commit_t     commits[PE_W],
  input  logic        link_set,
  input  slice_t      link_set_slice,
  output logic        done,
  output slice_t      done_slice,
  output logic        link_used,
  input  logic        mark_ok,
  output logic        rob_empty,
  // control
  input  logic        flush,
  input  logic        reset_tables,
  input  bank_t       g_ibit [NREG],
  input  bank_t       g_rbit [NREG],
  input  logic        rf_load,
  input  word_t       rf_load_val [NREG],
  output word_t       arch   [NREG],
  output logic        ins_capture
);

  // ---------------------------------------------------------------- dispatch
  logic   win_accept, rob_full;
  slice_t rob_tail;
  logic   l_valid;
  uop_t   l_uop [PE_W];
  bank_t  ibit  [NREG];
  logic   l_stall_bank;

  lifdu #(.PE_ID(PE_ID)) u_lifdu (
    .clk, .rst_n, .active(mt_active),
    .fetch_words, .fetch_avail, .fetch_take,
    .win_accept, .rob_full, .rob_tail,
    .disp_valid(l_valid), .disp_uop(l_uop),
    .bcast, .commits, .flush, .reset_tables,
    .follow(integrated), .g_ibit, .g_rbit,
    .ibit, .loop_exit_wait, .stall_bank(l_stall_bank)
  );

  logic d_valid;
  uop_t d_uop [PE_W];
  always_comb begin
    d_valid = integrated ? g_valid : l_valid;
    for (int k = 0; k < PE_W; k++) d_uop[k] = integrated ? g_uop[k] : l_uop[k];
  end
  assign accept = win_accept && !rob_full;

  // ---------------------------------------------------------------- register file
  reg_t  rd_reg  [2*PE_W];
  bank_t rd_bank [2*PE_W];
  word_t rd_data [2*PE_W];
  word_t v1 [PE_W], v2 [PE_W];
  always_comb
    for (int k = 0; k < PE_W; k++) begin
      rd_reg[2*k]    = d_uop[k].s1.r;  rd_bank[2*k]   = d_uop[k].s1.bank;
      rd_reg[2*k+1]  = d_uop[k].s2.r;  rd_bank[2*k+1] = d_uop[k].s2.bank;
      v1[k] = rd_data[2*k];
      v2[k] = rd_data[2*k+1];
    end

  bank_regfile #(.NRD(2*PE_W), .NWR(GW)) u_rf (
    .clk, .rst_n, .rd_reg, .rd_bank, .rd_data,
    .wr(bcast), .load_en(rf_load), .load_val(rf_load_val),
    .ibit, .arch
  );

  // ---------------------------------------------------------------- window
  logic  iss_v [PE_W];
  uop_t  iss_u [PE_W];
  word_t iss_a [PE_W], iss_b [PE_W];

  instr_window #(.DEPTH(WIN_DEPTH), .NB(GW)) u_win (
    .clk, .rst_n, .flush,
    .ins_en(d_valid && !rob_full), .ins_uop(d_uop), .ins_v1(v1), .ins_v2(v2),
    .can_accept(win_accept), .bcast,
    .issue_v(iss_v), .issue_u(iss_u), .issue_a(iss_a), .issue_b(iss_b),
    .ins_capture
  );

  // ---------------------------------------------------------------- functional units
  word_t   y [PE_W];
  result_t res_q [PE_W];
  for (genvar f = 0; f < PE_W; f++) begin : g_fu
    alu u_alu (.op(iss_u[f].op), .a(iss_a[f]), .b(iss_b[f]), .y(y[f]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < PE_W; f++) res_q[f] <= '0;
    end else begin
      for (int f = 0; f < PE_W; f++) begin
        res_q[f].valid <= iss_v[f] && !flush;
        res_q[f].tag   <= iss_u[f].tag;
        res_q[f].wr    <= iss_u[f].wr;
        res_q[f].rd    <= iss_u[f].rd;
        res_q[f].bank  <= iss_u[f].dbank;
        res_q[f].value <= y[f];
      end
    end
  end
  assign res_out = res_q;

  // ---------------------------------------------------------------- reorder buffer
  result_t own_res [PE_W];
  always_comb
    for (int f = 0; f < PE_W; f++) begin
      own_res[f] = res_q[f];
      own_res[f].valid = res_q[f].valid && !flush;
    end

  local_rob #(.IS_FIRST(PE_ID == 0)) u_rob (
    .clk, .rst_n, .flush, .use_links(integrated),
    .alloc(d_valid && win_accept), .alloc_uop(d_uop),
    .tail_slice(rob_tail), .full(rob_full), .empty(rob_empty),
    .fu_res(own_res), .link_set, .link_set_slice,
    .done, .done_slice, .mark_ok, .commits, .link_used
  );

endmodule
