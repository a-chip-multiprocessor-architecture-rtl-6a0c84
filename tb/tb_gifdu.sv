// tb_gifdu: the global unit's partitioning of 16 instructions into four
// ordered groups of four, the tags it gives them (PE number, block, slot),
// the global tail and head pointers and the full stall, the stall when a PE
// window is full, a group cut at the loop-entry mark and the wait after
// it, and the flush of the pointers.
module tb_gifdu;
  import cmp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, active = 1'b1;
  logic [31:0] fetch_words [GW];
  logic [4:0]  fetch_avail, fetch_take;
  logic        pe_accept [NPE];
  logic        disp_valid;
  uop_t        disp_uop [NPE][PE_W];
  slice_t      tail_block;
  logic        block_retired = 1'b0;
  commit_t     commits [GW];
  result_t     bcast [GW];
  logic        flush = 1'b0, reset_tables = 1'b0;
  bank_t       ibit [NREG], rbit [NREG];
  logic        loop_entry_wait, rob_empty, stall_bank, stall_rob_full, intra_dep;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gifdu dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [31:0] enc(op_e op, int rd, int rs1, int imm);
    instr_t i;
    i.op = op; i.rd = reg_t'(rd); i.rs1 = reg_t'(rs1); i.rs2 = '0; i.imm = 13'(imm);
    return 32'(i);
  endfunction

  task automatic step();
    @(posedge clk);
    #1;
    block_retired = 1'b0;
  endtask

  initial begin
    for (int j = 0; j < GW; j++) begin commits[j] = '0; bcast[j] = '0; end
    for (int p = 0; p < NPE; p++) pe_accept[p] = 1'b1;
    // 16 independent instructions writing r(j + base)
    for (int j = 0; j < GW; j++) fetch_words[j] = enc(OP_ADDI, j, 31, j);
    fetch_avail = 5'd16;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(rob_empty, "empty after reset");
    for (int b = 0; b < ROB_SLICES; b++) begin
      // alternate register halves so the bank limit is not reached
      for (int j = 0; j < GW; j++) fetch_words[j] = enc(OP_ADDI, j + 16 * (b % 2), 31, j);
      #1;
      chk(fetch_take == 16 && disp_valid, $sformatf("block %0d dispatched", b));
      for (int p = 0; p < NPE; p++)
        for (int k = 0; k < PE_W; k++) begin
          chk(disp_uop[p][k].valid && disp_uop[p][k].rd == reg_t'(p * PE_W + k + 16 * (b % 2)) &&
              disp_uop[p][k].imm == word_t'(p * PE_W + k), $sformatf("partition p%0d k%0d", p, k));
          chk(disp_uop[p][k].tag == {peid_t'(p), slice_t'(b), 2'(k)}, $sformatf("tag p%0d k%0d", p, k));
        end
      step();
    end
    chk(fetch_take == 0 && stall_rob_full && tail_block == 0, "full after four blocks");
    block_retired = 1'b1;                   // oldest block done
    step();
    chk(fetch_take == 0 && stall_bank, "bank limit: r0-r15 have two writers in flight");
    for (int j = 0; j < GW; j++) fetch_words[j] = enc(OP_ADDI, 0, 31, j);
    fetch_words[0] = enc(OP_NOP, 0, 0, 0);
    #1 chk(fetch_take == 1, "cut at first register over the limit");
    // a PE whose window is full stops the whole group
    pe_accept[2] = 1'b0;
    #1 chk(fetch_take == 0 && !disp_valid, "window full in one PE stalls");
    pe_accept[2] = 1'b1;
    flush = 1'b1;
    step();
    flush = 1'b0;
    chk(rob_empty && tail_block == 0, "flush resets pointers");
    // loop-entry mark in slot 5
    for (int j = 0; j < GW; j++) fetch_words[j] = enc(OP_ADDI, 8, 31, j);
    fetch_words[1] = enc(OP_ADDI, 9, 31, 0);
    fetch_words[5] = enc(OP_LOOPB, 0, 0, 0);
    fetch_words[2] = enc(OP_ADD, 10, 8, 0);
    #1 chk(fetch_take == 4, "cut by two-writer limit on r8 (third writer in slot 4)");
    for (int j = 0; j < GW; j++) fetch_words[j] = enc(OP_ADDI, j, 31, j);
    fetch_words[5] = enc(OP_LOOPB, 0, 0, 0);
    #1 chk(fetch_take == 6 && disp_uop[1][1].op == OP_LOOPB && !disp_uop[1][2].valid, "cut after the loop-entry mark");
    step();
    chk(loop_entry_wait && fetch_take == 0, "waits after the loop-entry mark");
    reset_tables = 1'b1;
    step();
    reset_tables = 1'b0;
    #1;
    chk(!loop_entry_wait && fetch_take == 6, "fetch resumes after the mode round trip");
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
