// tb_instr_window: operands ready at dispatch, operands waiting for a tag,
// a result captured in the cycle of insertion, immediates, marks kept out,
// wake-up by broadcast, four issues per cycle from a full window, the
// whole-group accept rule and flush. Expected operand values come from the
// stimulus.
module tb_instr_window;
  import cmp_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0, flush = 1'b0, ins_en = 1'b0;
  uop_t    ins_uop [PE_W];
  word_t   ins_v1 [PE_W], ins_v2 [PE_W];
  logic    can_accept, ins_capture;
  result_t bcast [GW];
  logic    issue_v [PE_W];
  uop_t    issue_u [PE_W];
  word_t   issue_a [PE_W], issue_b [PE_W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  instr_window dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic uop_t U(op_e op, int tag, logic p1, int t1, logic p2, int t2, logic imm);
    uop_t u = '0;
    u.valid = 1'b1; u.op = op; u.wr = 1'b1; u.tag = tag_t'(tag);
    u.s1.pend = p1; u.s1.tag = tag_t'(t1);
    u.s2.pend = p2; u.s2.tag = tag_t'(t2);
    u.use_imm = imm; u.imm = 32'd100;
    return u;
  endfunction

  function automatic int nissue();
    int n = 0;
    for (int k = 0; k < PE_W; k++) if (issue_v[k]) n++;
    return n;
  endfunction

  function automatic int find(int tag);   // issue slot holding 'tag', -1 if none
    for (int k = 0; k < PE_W; k++) if (issue_v[k] && issue_u[k].tag == tag_t'(tag)) return k;
    return -1;
  endfunction

  task automatic clear_bus();
    for (int b = 0; b < GW; b++) bcast[b] = '0;
  endtask

  task automatic step();
    @(posedge clk);
    #1;
    ins_en = 1'b0; clear_bus();
  endtask

  initial begin
    int k;
    clear_bus();
    for (int i = 0; i < PE_W; i++) begin ins_uop[i] = '0; ins_v1[i] = '0; ins_v2[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(can_accept && nissue() == 0, "empty window");
    // group: ready; waits for tag 5; captures tag 6 now; immediate
    ins_en = 1'b1;
    ins_uop = '{U(OP_ADD, 1, 0, 0, 0, 0, 0), U(OP_SUB, 2, 1, 5, 0, 0, 0),
                U(OP_XOR, 3, 1, 6, 0, 0, 0), U(OP_ADDI, 4, 0, 0, 1, 9, 1)};
    ins_v1 = '{32'd10, 32'd0, 32'd0, 32'd40};
    ins_v2 = '{32'd11, 32'd21, 32'd31, 32'd0};
    bcast[7] = '{valid: 1'b1, tag: tag_t'(6), wr: 1'b1, rd: '0, bank: '0, value: 32'd66};
    #1 chk(ins_capture, "capture at insertion");
    step();
    chk(nissue() == 3, "three ready entries issue");
    k = find(1); chk(k >= 0 && issue_a[k] == 10 && issue_b[k] == 11, "ready operands");
    k = find(3); chk(k >= 0 && issue_a[k] == 66 && issue_b[k] == 31, "operand captured at insertion");
    k = find(4); chk(k >= 0 && issue_a[k] == 40 && issue_b[k] == 100, "immediate operand");
    chk(find(2) < 0, "waiting entry holds");
    step();
    chk(nissue() == 0, "issued entries freed");
    bcast[15] = '{valid: 1'b1, tag: tag_t'(5), wr: 1'b1, rd: '0, bank: '0, value: 32'd55};
    step();
    k = find(2); chk(k >= 0 && issue_a[k] == 55 && issue_b[k] == 21 && nissue() == 1, "wake-up by broadcast");
    step();
    // fill the window with 16 entries that all wait on tag 9; a mark is not entered
    for (int g = 0; g < 4; g++) begin
      chk(can_accept, "room for a group");
      ins_en = 1'b1;
      for (int i = 0; i < PE_W; i++) ins_uop[i] = U(OP_ADD, 16 + 4 * g + i, 1, 9, 0, 0, 0);
      step();
    end
    chk(!can_accept, "full window refuses a group");
    bcast[0] = '{valid: 1'b1, tag: tag_t'(9), wr: 1'b1, rd: '0, bank: '0, value: 32'd9};
    step();
    for (int c = 0; c < 4; c++) begin
      chk(nissue() == PE_W, "four issues per cycle");
      if (c == 0) begin
        ins_en = 1'b1;
        ins_uop = '{U(OP_LOOPX, 40, 0, 0, 0, 0, 0), U(OP_ADD, 41, 1, 50, 0, 0, 0), '0, '0};
      end
      step();
      if (c == 0) chk(dut.nfree == PE_W, "group refused while fewer than four entries free");
    end
    chk(nissue() == 0, "window drained");
    ins_en = 1'b1;
    ins_uop = '{U(OP_LOOPX, 40, 0, 0, 0, 0, 0), U(OP_ADD, 41, 1, 50, 0, 0, 0), '0, '0};
    step();
    chk(dut.nfree == WIN_DEPTH - 1, "mark not entered, one entry used");
    flush = 1'b1;
    step();
    flush = 1'b0;
    chk(dut.nfree == WIN_DEPTH, "flush empties");
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
