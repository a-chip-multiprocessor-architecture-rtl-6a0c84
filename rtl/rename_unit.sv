// rename_unit: register renaming for the bank-based register file: the
// in-order bank index table (IBIT), the recently-updated bank index table
// (RBIT) and the register mapping table, plus the decision of how many of
// the offered instructions can be dispatched this cycle.
//
// How it works. For each logical register the RBIT names the bank that the
// youngest issued writer uses, the IBIT the bank that holds the committed
// value. Renaming a writer increments its RBIT entry (modulo three) and
// records the writer's reorder-buffer tag in the mapping table as "result
// not yet available". A source whose mapping entry is valid waits for that
// tag; otherwise it is read from bank RBIT[rs]. Sources produced by an
// earlier instruction of the same group take that instruction's tag. When a
// result is broadcast the mapping entry is cleared if it still holds that
// tag. Each committed writer increments its IBIT entry. 'flush' (a precise
// interrupt or a squash) copies the IBIT into the RBIT and empties the
// mapping table; 'reset_tables' sets both tables to bank 0 (used when the
// register files have just been made consistent in bank 0); 'load_en' copies
// both tables from another unit (each PE follows the global unit in the
// integrated mode).
//
// Dispatch limit: with three banks a register can have at most two
// uncommitted writers (the third bank holds the committed value), so a group
// is cut before the first instruction that would exceed that. A group is
// also cut after STOP_OP (a loop entry or exit mark) and the unit then
// accepts nothing until 'resume'. The accepted instructions are always a
// prefix of the offered ones; 'take' says how many.
//
// Interface: W instruction slots in, W renamed micro-ops out, all
// combinational in one cycle; tables update at the clock edge. NB result
// ports and NC commit ports.
//
// From the document: IBIT/RBIT semantics, increment on issue and on in-order
// completion, RBIT replaced by IBIT on an interrupt, mapping table holding
// the reorder-buffer tag while the result is outstanding. This design's
// choices: the two-writer limit and the stall it causes (the document does
// not say what happens when a fourth bank would be needed), the cut at the
// loop marks, and that a mapping entry is cleared at broadcast time.
module rename_unit
  import cmp_pkg::*;
#(
  parameter int unsigned W  = GW,
  parameter int unsigned NB = GW,
  parameter int unsigned NC = GW,
  parameter op_e STOP_OP    = OP_LOOPB
) (
  input  logic    clk,
  input  logic    rst_n,
  input  instr_t  instr  [W],
  input  logic [$clog2(W+1)-1:0] avail,
  input  logic    en,          // downstream has room for a whole group
  input  tag_t    tags   [W],  // tag each slot would receive
  output logic [$clog2(W+1)-1:0] take,
  output uop_t    uops   [W],
  output logic    stop_taken,  // STOP_OP accepted this cycle
  output logic    halted,      // waiting for resume after STOP_OP
  input  logic    resume,
  input  result_t bcast  [NB],
  input  commit_t commits[NC],
  input  logic    flush,
  input  logic    reset_tables,
  input  logic    load_en,
  input  bank_t   load_ibit[NREG],
  input  bank_t   load_rbit[NREG],
  output bank_t   ibit   [NREG],
  output bank_t   rbit   [NREG],
  output logic    stall_bank,  // group cut by the two-writer limit
  output logic    intra_dep    // a source was renamed to a tag of the same group
);

  logic  map_v   [NREG];
  tag_t  map_tag [NREG];
  logic  halt_q;

  assign halted = halt_q;

  // ---------------------------------------------------------------- rename
  bank_t cur_rbit [NREG];
  logic [1:0] infl [NREG];
  logic  stop_seen;
  logic  go;
  int unsigned n;

  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      cur_rbit[r] = rbit[r];
      infl[r] = (rbit[r] >= ibit[r]) ? 2'(rbit[r] - ibit[r]) : 2'(rbit[r] + 2'(NBANK) - ibit[r]);
    end
    stop_seen  = 1'b0;
    stall_bank = 1'b0;
    intra_dep  = 1'b0;
    stop_taken = 1'b0;
    go = en && !halt_q && !flush && !reset_tables;
    n  = 0;
    for (int j = 0; j < W; j++) begin
      uops[j] = '0;
      if (go && (j < int'(avail)) && !stop_seen) begin
        if (writes_rd(instr[j].op) && (infl[instr[j].rd] >= 2'd2)) begin
          stall_bank = 1'b1;
          go = 1'b0;
        end else begin
          n = j + 1;
          uops[j].valid   = 1'b1;
          uops[j].op      = instr[j].op;
          uops[j].tag     = tags[j];
          uops[j].use_imm = (instr[j].op == OP_ADDI);
          uops[j].imm     = word_t'(signed'(instr[j].imm));
          // sources, looked up before this slot's own destination
          uops[j].s1.r    = instr[j].rs1;
          uops[j].s1.bank = cur_rbit[instr[j].rs1];
          uops[j].s1.pend = map_v[instr[j].rs1] && is_alu(instr[j].op);
          uops[j].s1.tag  = map_tag[instr[j].rs1];
          uops[j].s2.r    = instr[j].rs2;
          uops[j].s2.bank = cur_rbit[instr[j].rs2];
          uops[j].s2.pend = map_v[instr[j].rs2] && uses_rs2(instr[j].op);
          uops[j].s2.tag  = map_tag[instr[j].rs2];
          for (int k = 0; k < j; k++) begin
            if (writes_rd(instr[k].op) && instr[k].rd == instr[j].rs1 && is_alu(instr[j].op)) begin
              uops[j].s1.pend = 1'b1;
              uops[j].s1.tag  = tags[k];
              intra_dep = 1'b1;
            end
            if (writes_rd(instr[k].op) && instr[k].rd == instr[j].rs2 && uses_rs2(instr[j].op)) begin
              uops[j].s2.pend = 1'b1;
              uops[j].s2.tag  = tags[k];
              intra_dep = 1'b1;
            end
          end
          if (writes_rd(instr[j].op)) begin
            uops[j].wr    = 1'b1;
            uops[j].rd    = instr[j].rd;
            uops[j].dbank = bank_inc(cur_rbit[instr[j].rd]);
            cur_rbit[instr[j].rd] = bank_inc(cur_rbit[instr[j].rd]);
            infl[instr[j].rd] = infl[instr[j].rd] + 2'd1;
          end
          if (instr[j].op == STOP_OP) begin
            stop_seen  = 1'b1;
            stop_taken = 1'b1;
          end
        end
      end
    end
    take = ($clog2(W+1))'(n);
  end

  // ---------------------------------------------------------------- commit
  bank_t ibit_nx [NREG];
  always_comb begin
    for (int r = 0; r < NREG; r++) ibit_nx[r] = ibit[r];
    for (int c = 0; c < NC; c++)
      if (commits[c].valid && commits[c].wr)
        ibit_nx[commits[c].rd] = bank_inc(ibit_nx[commits[c].rd]);
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) begin
        ibit[r] <= '0; rbit[r] <= '0; map_v[r] <= 1'b0; map_tag[r] <= '0;
      end
      halt_q <= 1'b0;
    end else if (reset_tables) begin
      for (int r = 0; r < NREG; r++) begin
        ibit[r] <= '0; rbit[r] <= '0; map_v[r] <= 1'b0;
      end
      halt_q <= 1'b0;
    end else if (load_en) begin
      for (int r = 0; r < NREG; r++) begin
        ibit[r] <= load_ibit[r]; rbit[r] <= load_rbit[r]; map_v[r] <= 1'b0;
      end
      halt_q <= 1'b0;
    end else if (flush) begin
      for (int r = 0; r < NREG; r++) begin
        ibit[r] <= ibit_nx[r]; rbit[r] <= ibit_nx[r]; map_v[r] <= 1'b0;
      end
      halt_q <= 1'b0;
    end else begin
      for (int r = 0; r < NREG; r++) begin
        ibit[r] <= ibit_nx[r];
        rbit[r] <= cur_rbit[r];
      end
      for (int b = 0; b < NB; b++)
        if (bcast[b].valid && bcast[b].wr && map_v[bcast[b].rd] && map_tag[bcast[b].rd] == bcast[b].tag)
          map_v[bcast[b].rd] <= 1'b0;
      for (int j = 0; j < W; j++)
        if (uops[j].valid && uops[j].wr) begin
          map_v[uops[j].rd]   <= 1'b1;
          map_tag[uops[j].rd] <= uops[j].tag;
        end
      if (stop_taken) halt_q <= 1'b1;
      else if (resume) halt_q <= 1'b0;
    end
  end

endmodule
