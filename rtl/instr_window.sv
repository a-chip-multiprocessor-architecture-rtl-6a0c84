// instr_window: the instruction window (reservation stations) of one
// processing element.
//
// How it works. WIN_DEPTH entries. Up to PE_W renamed ALU micro-ops are
// written per cycle into the lowest-numbered free entries; filler no-ops and
// loop marks are not entered (they need no functional unit). A source that
// renaming found ready arrives with its value (read from the bank-based
// register file by the PE); a source still waiting holds the tag of its
// producer. Every cycle each waiting source compares its tag with all
// results on the broadcast network and copies a matching value; this also
// happens in the cycle of insertion, so a result broadcast while its
// consumer is being dispatched is not missed. Each cycle up to PE_W entries
// whose operands are all present are sent to the functional units, lowest
// entry first, and freed.
//
// Interface: 'can_accept' is high when at least PE_W entries are free (a
// dispatch group is accepted whole or not at all); 'issue' carries the
// selected operations with both operand values, combinationally from the
// current state. 'flush' empties the window.
//
// From the document: operands read from the local register file when
// available, otherwise the tag recorded in the window; results broadcast
// with their tag to all windows; instructions forwarded to the functional
// units once operands are available. This design's choices: depth 16,
// lowest-entry-first selection (not oldest-first), the whole-group accept
// rule.
module instr_window
  import cmp_pkg::*;
#(
  parameter int unsigned DEPTH = WIN_DEPTH,
  parameter int unsigned NB    = GW
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  logic    ins_en,
  input  uop_t    ins_uop [PE_W],
  input  word_t   ins_v1  [PE_W],
  input  word_t   ins_v2  [PE_W],
  output logic    can_accept,
  input  result_t bcast   [NB],
  output logic    issue_v [PE_W],
  output uop_t    issue_u [PE_W],
  output word_t   issue_a [PE_W],
  output word_t   issue_b [PE_W],
  output logic    ins_capture   // a source was captured from the bus at insertion
);

  typedef struct packed {
    logic  busy;
    uop_t  u;
    logic  r1;
    word_t v1;
    logic  r2;
    word_t v2;
  } went_t;

  went_t w [DEPTH];

  // ------------------------------------------------------------ free count
  int unsigned nfree;
  always_comb begin
    nfree = 0;
    for (int i = 0; i < DEPTH; i++) if (!w[i].busy) nfree++;
  end
  assign can_accept = (nfree >= PE_W);

  // ------------------------------------------------------------ selection
  logic sel [DEPTH];
  always_comb begin
    int unsigned n;
    n = 0;
    for (int i = 0; i < DEPTH; i++) sel[i] = 1'b0;
    for (int k = 0; k < PE_W; k++) begin
      issue_v[k] = 1'b0; issue_u[k] = '0; issue_a[k] = '0; issue_b[k] = '0;
    end
    for (int i = 0; i < DEPTH; i++) begin
      if (w[i].busy && w[i].r1 && w[i].r2 && n < PE_W && !flush) begin
        sel[i] = 1'b1;
        issue_v[n] = 1'b1;
        issue_u[n] = w[i].u;
        issue_a[n] = w[i].v1;
        issue_b[n] = w[i].v2;
        n++;
      end
    end
  end

  // ------------------------------------------------------------ insertion
  int   slot_of [PE_W];   // entry that slot k goes to, -1 for none
  went_t new_e [PE_W];
  always_comb begin
    int unsigned next;
    next = 0;
    ins_capture = 1'b0;
    for (int k = 0; k < PE_W; k++) begin
      slot_of[k] = -1;
      new_e[k] = '0;
      new_e[k].busy = 1'b1;
      new_e[k].u    = ins_uop[k];
      new_e[k].r1   = !ins_uop[k].s1.pend;
      new_e[k].v1   = ins_v1[k];
      new_e[k].r2   = ins_uop[k].use_imm || !ins_uop[k].s2.pend;
      new_e[k].v2   = ins_uop[k].use_imm ? ins_uop[k].imm : ins_v2[k];
      for (int b = 0; b < NB; b++) begin
        if (!new_e[k].r1 && bcast[b].valid && bcast[b].tag == ins_uop[k].s1.tag) begin
          new_e[k].r1 = 1'b1; new_e[k].v1 = bcast[b].value; ins_capture = 1'b1;
        end
        if (!new_e[k].r2 && bcast[b].valid && bcast[b].tag == ins_uop[k].s2.tag) begin
          new_e[k].r2 = 1'b1; new_e[k].v2 = bcast[b].value; ins_capture = 1'b1;
        end
      end
    end
    if (ins_en && can_accept && !flush) begin
      for (int k = 0; k < PE_W; k++) begin
        if (ins_uop[k].valid && is_alu(ins_uop[k].op)) begin
          for (int i = 0; i < DEPTH; i++) begin
            if (slot_of[k] < 0 && !w[i].busy && int'(next) <= i) begin
              slot_of[k] = i;
              next = i + 1;
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) w[i] <= '0;
    end else if (flush) begin
      for (int i = 0; i < DEPTH; i++) w[i].busy <= 1'b0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (sel[i]) w[i].busy <= 1'b0;
        else if (w[i].busy) begin
          for (int b = 0; b < NB; b++) begin
            if (!w[i].r1 && bcast[b].valid && bcast[b].tag == w[i].u.s1.tag) begin
              w[i].r1 <= 1'b1; w[i].v1 <= bcast[b].value;
            end
            if (!w[i].r2 && bcast[b].valid && bcast[b].tag == w[i].u.s2.tag) begin
              w[i].r2 <= 1'b1; w[i].v2 <= bcast[b].value;
            end
          end
        end
      end
      for (int k = 0; k < PE_W; k++)
        if (slot_of[k] >= 0) w[slot_of[k]] <= new_e[k];
    end
  end

endmodule
