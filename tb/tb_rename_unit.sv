// tb_rename_unit: directed sequence through the renaming tables at a 4-wide
// size: intra-group dependences, mapping-table lookups, bank choice on each
// write, the two-writer stall, IBIT update on commit, mapping cleared by a
// broadcast, the cut at the stop mark, flush (RBIT := IBIT) and table load.
// Expected values are worked out by hand from the IBIT/RBIT rules.
module tb_rename_unit;
  import cmp_pkg::*;

  localparam int W = 4, NB = 2, NC = 2;
  logic    clk = 1'b0, rst_n = 1'b0;
  instr_t  instr [W];
  logic [2:0] avail, take;
  logic    en = 1'b1;
  tag_t    tags [W];
  uop_t    uops [W];
  logic    stop_taken, halted, resume = 1'b0;
  result_t bcast [NB];
  commit_t commits [NC];
  logic    flush = 1'b0, reset_tables = 1'b0, load_en = 1'b0;
  bank_t   load_ibit [NREG], load_rbit [NREG], ibit [NREG], rbit [NREG];
  logic    stall_bank, intra_dep;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rename_unit #(.W(W), .NB(NB), .NC(NC), .STOP_OP(OP_LOOPB)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic instr_t I(op_e op, int rd, int rs1, int rs2);
    instr_t i;
    i.op = op; i.rd = reg_t'(rd); i.rs1 = reg_t'(rs1); i.rs2 = reg_t'(rs2); i.imm = 13'd5;
    return i;
  endfunction

  task automatic offer(input instr_t a, b, c, d, input int n, input int tbase);
    instr[0] = a; instr[1] = b; instr[2] = c; instr[3] = d;
    avail = 3'(n);
    for (int j = 0; j < W; j++) tags[j] = tag_t'(tbase + j);
    #1;
  endtask

  initial begin
    tag_t t_r1, t_r4;
    for (int b = 0; b < NB; b++) bcast[b] = '0;
    for (int c = 0; c < NC; c++) commits[c] = '0;
    for (int r = 0; r < NREG; r++) begin load_ibit[r] = bank_t'(r % 3); load_rbit[r] = bank_t'((r + 1) % 3); end
    avail = '0;
    for (int j = 0; j < W; j++) begin instr[j] = '0; tags[j] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 1: a group with dependences inside it
    @(negedge clk);
    offer(I(OP_ADD, 1, 2, 3), I(OP_ADD, 4, 1, 1), I(OP_ADDI, 1, 1, 0), I(OP_ADD, 5, 1, 4), 4, 8);
    chk(take == 3'd4, "group 1 fully taken");
    chk(!uops[0].s1.pend && uops[0].s1.bank == 0 && uops[0].dbank == 1 && uops[0].tag == 8, "slot 0");
    chk(uops[1].s1.pend && uops[1].s1.tag == 8 && uops[1].s2.pend && uops[1].s2.tag == 8, "slot 1 waits for slot 0");
    chk(uops[2].s1.pend && uops[2].s1.tag == 8 && uops[2].dbank == 2 && uops[2].use_imm && uops[2].imm == 5, "slot 2");
    chk(uops[3].s1.pend && uops[3].s1.tag == 10 && uops[3].s2.pend && uops[3].s2.tag == 9, "slot 3");
    chk(intra_dep, "intra-group dependence flagged");
    t_r1 = 10; t_r4 = 9;
    @(posedge clk);
    #1;
    chk(rbit[1] == 2 && ibit[1] == 0 && rbit[4] == 1 && rbit[5] == 1, "RBIT after group 1");

    // 2: lookups through the mapping table; r1 already has two writers
    @(negedge clk);
    offer(I(OP_SUB, 6, 1, 2), I(OP_ADDI, 1, 0, 0), I(OP_NOP, 0, 0, 0), I(OP_NOP, 0, 0, 0), 2, 12);
    chk(take == 3'd1 && stall_bank, "third writer of r1 stalls");
    chk(uops[0].s1.pend && uops[0].s1.tag == t_r1 && !uops[0].s2.pend && uops[0].s2.bank == 0, "slot reads map");
    chk(!uops[1].valid, "cut slot not dispatched");
    // commit the first r1 writer and broadcast r4's result
    commits[0] = '{valid: 1'b1, wr: 1'b1, rd: 5'd1, op: OP_ADD};
    bcast[0]   = '{valid: 1'b1, tag: t_r4, wr: 1'b1, rd: 5'd4, bank: 2'd1, value: 32'h1};
    @(posedge clk);
    #1;
    commits[0] = '0; bcast[0] = '0;
    chk(ibit[1] == 1 && rbit[1] == 2, "IBIT moved on commit");

    // 3: r1 now accepted into bank 0, r4 ready in bank 1
    @(negedge clk);
    offer(I(OP_ADDI, 1, 0, 0), I(OP_ADD, 7, 4, 4), I(OP_LOOPB, 0, 0, 0), I(OP_ADD, 8, 1, 1), 4, 16);
    chk(take == 3'd3 && stop_taken, "cut after the stop mark");
    chk(uops[0].dbank == 0, "bank wraps to 0");
    chk(!uops[1].s1.pend && uops[1].s1.bank == 1, "broadcast value read from the file");
    chk(uops[2].valid && !uops[2].wr && !uops[3].valid, "mark taken, rest cut");
    @(posedge clk);
    @(negedge clk);
    offer(I(OP_ADD, 9, 1, 1), I(OP_NOP, 0, 0, 0), I(OP_NOP, 0, 0, 0), I(OP_NOP, 0, 0, 0), 1, 20);
    chk(halted && take == 0, "halted after stop mark");
    resume = 1'b1;
    @(posedge clk);
    #1;
    resume = 1'b0;
    @(negedge clk);
    offer(I(OP_ADD, 9, 1, 1), I(OP_NOP, 0, 0, 0), I(OP_NOP, 0, 0, 0), I(OP_NOP, 0, 0, 0), 1, 20);
    chk(!halted && take == 1, "resumed");

    // 4: flush restores RBIT from IBIT (plus the commit of this cycle)
    avail = 0;
    flush = 1'b1;
    commits[1] = '{valid: 1'b1, wr: 1'b1, rd: 5'd5, op: OP_ADD};
    @(posedge clk);
    #1;
    flush = 1'b0; commits[1] = '0;
    chk(rbit[1] == ibit[1] && ibit[1] == 1 && rbit[5] == 1 && ibit[5] == 1 && rbit[4] == 0, "flush");
    @(negedge clk);
    offer(I(OP_ADD, 2, 1, 6), I(OP_NOP, 0, 0, 0), I(OP_NOP, 0, 0, 0), I(OP_NOP, 0, 0, 0), 1, 24);
    chk(!uops[0].s1.pend && uops[0].s1.bank == 1 && !uops[0].s2.pend, "map empty after flush");

    // 5: table load
    avail = 0;
    load_en = 1'b1;
    @(posedge clk);
    #1;
    load_en = 1'b0;
    for (int r = 0; r < NREG; r++) chk(ibit[r] == load_ibit[r] && rbit[r] == load_rbit[r], "load");
    reset_tables = 1'b1;
    @(posedge clk);
    #1;
    reset_tables = 1'b0;
    for (int r = 0; r < NREG; r++) chk(ibit[r] == 0 && rbit[r] == 0, "reset tables");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
