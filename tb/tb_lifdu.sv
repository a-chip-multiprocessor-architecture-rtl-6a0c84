// tb_lifdu: the local unit of PE 2: idle outside the multithreaded mode,
// tags made of its PE number, the reorder-buffer slice and the slot,
// following the global tables, stalls on a full window or reorder buffer,
// the cut after a loop-exit mark and the flush that releases it.
module tb_lifdu;
  import cmp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  logic [31:0] fetch_words [PE_W];
  logic [2:0]  fetch_avail = 3'd4, fetch_take;
  logic        win_accept = 1'b1, rob_full = 1'b0;
  slice_t      rob_tail = 2'd3;
  logic        disp_valid;
  uop_t        disp_uop [PE_W];
  result_t     bcast [GW];
  commit_t     commits [PE_W];
  logic        flush = 1'b0, reset_tables = 1'b0, follow = 1'b0;
  bank_t       g_ibit [NREG], g_rbit [NREG], ibit [NREG];
  logic        loop_exit_wait, stall_bank;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lifdu #(.PE_ID(2)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [31:0] enc(op_e op, int rd, int rs1);
    instr_t i;
    i.op = op; i.rd = reg_t'(rd); i.rs1 = reg_t'(rs1); i.rs2 = '0; i.imm = 13'd1;
    return 32'(i);
  endfunction

  initial begin
    for (int j = 0; j < GW; j++) bcast[j] = '0;
    for (int k = 0; k < PE_W; k++) commits[k] = '0;
    for (int r = 0; r < NREG; r++) begin g_ibit[r] = bank_t'(r % 3); g_rbit[r] = bank_t'(r % 3); end
    fetch_words = '{enc(OP_ADDI, 1, 2), enc(OP_ADDI, 3, 1), enc(OP_ADDI, 4, 5), enc(OP_ADDI, 6, 7)};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 chk(fetch_take == 0 && !disp_valid, "idle while not active");
    follow = 1'b1;
    @(posedge clk); #1;
    follow = 1'b0;
    for (int r = 0; r < NREG; r++) chk(ibit[r] == g_ibit[r], "IBIT follows the global table");
    active = 1'b1;
    #1;
    chk(fetch_take == 4 && disp_valid, "four taken");
    for (int k = 0; k < PE_W; k++)
      chk(disp_uop[k].tag == {peid_t'(2), slice_t'(3), 2'(k)}, $sformatf("tag slot %0d", k));
    chk(disp_uop[0].s1.bank == bank_t'(2 % 3) && disp_uop[0].dbank == bank_inc(bank_t'(1 % 3)), "banks from the loaded tables");
    chk(disp_uop[1].s1.pend && disp_uop[1].s1.tag == {peid_t'(2), slice_t'(3), 2'(0)}, "same-group dependence");
    win_accept = 1'b0;
    #1 chk(fetch_take == 0, "stall on full window");
    win_accept = 1'b1; rob_full = 1'b1;
    #1 chk(fetch_take == 0, "stall on full reorder buffer");
    rob_full = 1'b0;
    fetch_words[1] = enc(OP_LOOPX, 0, 0);
    #1 chk(fetch_take == 2 && disp_uop[1].op == OP_LOOPX && !disp_uop[2].valid, "cut after the loop-exit mark");
    @(posedge clk); #1;
    chk(loop_exit_wait && fetch_take == 0, "waits after the loop-exit mark");
    flush = 1'b1;
    @(posedge clk); #1;
    flush = 1'b0;
    #1 chk(!loop_exit_wait && fetch_take == 2, "released by flush");
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
