// tb_cmp_top: end-to-end test of the two-mode chip multiprocessor at its
// default sizes.
//
// The testbench builds one program and runs it through both modes:
//   A  random dependent ALU code on few registers (integrated mode), with an
//      interrupt part-way, then a loop-entry mark;
//   L  a loop of LOOP_ITERS iterations, iteration i on PE i mod 4, each
//      ending in an iteration-end mark, the last in a loop-exit mark; PEs
//      that run ahead get extra iterations that must be squashed;
//   B  independent instructions, 16 per group, to measure the 16-wide rate;
//   C  more random dependent code, with a second interrupt.
// A sequential reference model gives the expected committed registers at
// the switch into the multithreaded mode, after the switch back (the state of
// the nonspeculative PE: the threads do not exchange registers in this
// design), and at the end. After an interrupt the fetch side restarts from
// the first uncommitted instruction, as a real front end would.
// It also counts every mechanism of the design (bank-limit stall, full
// reorder buffer, same-group dependence, wake-up at insertion, same-cycle
// ordering link, 16-instruction dispatch, issue and retirement in one cycle,
// mode switches, nonspeculative hand-off, squash, interrupt flush) and fails
// for each that never happened.
module tb_cmp_top;
  import cmp_pkg::*;

  localparam int LOOP_ITERS = 6;
  localparam int MAX_CYCLES = 20000;

  logic clk = 1'b0, rst_n = 1'b0, irq = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] g_fetch_words [GW];
  logic [4:0]  g_fetch_avail, g_fetch_take;
  logic [31:0] t_fetch_words [NPE][PE_W];
  logic [2:0]  t_fetch_avail [NPE], t_fetch_take [NPE];
  mode_e       mode;
  peid_t       nonspec;
  logic [4:0]  retired;
  word_t       arch_regs [NPE][NREG];

  cmp_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ program
  logic [31:0] gprog [$];
  logic [31:0] tprog [NPE][$];
  int gptr, tptr [NPE];
  int irq_at [2];
  int seg_b_start, seg_b_end;

  function automatic logic [31:0] enc(op_e op, int rd, int rs1, int rs2, int imm);
    instr_t i;
    i.op = op; i.rd = reg_t'(rd); i.rs1 = reg_t'(rs1); i.rs2 = reg_t'(rs2); i.imm = 13'(imm);
    return 32'(i);
  endfunction

  function automatic logic [31:0] rnd_instr(int nregs);
    op_e ops [9] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL, OP_ADDI};
    op_e op;
    op = ops[$urandom_range(8)];
    if ($urandom_range(2) == 0) op = OP_ADDI;
    return enc(op, $urandom_range(nregs - 1), $urandom_range(nregs - 1),
               $urandom_range(nregs - 1), $urandom_range(8191));
  endfunction

  function automatic word_t ref_alu(op_e op, word_t a, word_t b);
    case (op)
      OP_ADD, OP_ADDI: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_SLT: return word_t'($signed(a) < $signed(b));
      OP_SLL: return a << b[4:0];
      OP_SRL: return a >> b[4:0];
      default: return '0;
    endcase
  endfunction

  task automatic ref_exec(inout word_t st [NREG], input logic [31:0] w);
    instr_t i;
    word_t b;
    i = instr_t'(w);
    if (!is_alu(i.op)) return;
    b = (i.op == OP_ADDI) ? word_t'(signed'(i.imm)) : st[i.rs2];
    st[i.rd] = ref_alu(i.op, st[i.rs1], b);
  endtask

  word_t st_entry [NREG], st_exit [NREG], st_final [NREG];
  logic [31:0] iter [LOOP_ITERS + 4][$];

  initial begin
    word_t st [NREG];
    int exit_pe;
    for (int r = 0; r < NREG; r++) st[r] = '0;
    // segment A
    for (int n = 0; n < 300; n++) gprog.push_back(rnd_instr(8));
    foreach (gprog[n]) ref_exec(st, gprog[n]);
    gprog.push_back(enc(OP_LOOPB, 0, 0, 0, 0));
    st_entry = st;
    // loop iterations (the last legal one ends with the exit mark)
    for (int it = 0; it < LOOP_ITERS + 3; it++) begin
      for (int n = 0; n < 7; n++) iter[it].push_back(rnd_instr(12));
      iter[it].push_back(enc(it == LOOP_ITERS - 1 ? OP_LOOPX : OP_ITEREND, 0, 0, 0, 0));
      tprog[it % NPE] = {tprog[it % NPE], iter[it]};
    end
    exit_pe = (LOOP_ITERS - 1) % NPE;
    for (int it = exit_pe; it < LOOP_ITERS; it += NPE)
      foreach (iter[it][n]) ref_exec(st, iter[it][n]);
    st_exit = st;
    // segment B: groups of 16 independent instructions, alternating halves
    // of the register file so a register has at most two writers in flight
    seg_b_start = gprog.size();
    for (int g = 0; g < 48; g++)
      for (int j = 0; j < GW; j++)
        gprog.push_back(enc(OP_ADDI, (g % 2) * 16 + j, (g % 2) * 16 + j, 0, g * 16 + j));
    seg_b_end = gprog.size();
    // segment C
    for (int n = 0; n < 300; n++) gprog.push_back(rnd_instr(6));
    for (int n = seg_b_start; n < gprog.size(); n++) ref_exec(st, gprog[n]);
    st_final = st;
  end

  // ------------------------------------------------------------ fetch sides
  always_comb begin
    int n;
    n = gprog.size() - gptr;
    if (n > GW) n = GW;
    if (n < 0) n = 0;
    g_fetch_avail = 5'(n);
    for (int j = 0; j < GW; j++)
      g_fetch_words[j] = (gptr + j < gprog.size()) ? gprog[gptr + j] : '0;
    for (int p = 0; p < NPE; p++) begin
      n = tprog[p].size() - tptr[p];
      if (n > PE_W) n = PE_W;
      if (n < 0) n = 0;
      t_fetch_avail[p] = 3'(n);
      for (int j = 0; j < PE_W; j++)
        t_fetch_words[p][j] = (tptr[p] + j < tprog[p].size()) ? tprog[p][tptr[p] + j] : '0;
    end
  end

  int cycle = 0;
  int g_committed = 0;
  int ev_bank = 0, ev_robfull = 0, ev_intra = 0, ev_capture = 0, ev_link = 0;
  int ev_disp16 = 0, ev_issue16 = 0, ev_ret16 = 0, ev_to_mt = 0, ev_sync = 0;
  int ev_handoff = 0, ev_squash = 0, ev_irq = 0;
  int b_first = -1, b_last = -1;

  always_ff @(posedge clk) if (rst_n) begin
    int nis;
    cycle <= cycle + 1;
    if (irq) begin
      gptr <= g_committed;              // restart after the last committed instruction
    end else begin
      gptr <= gptr + int'(g_fetch_take);
      if (mode == MODE_ISS) g_committed <= g_committed + int'(retired);
    end
    for (int p = 0; p < NPE; p++) tptr[p] <= tptr[p] + int'(t_fetch_take[p]);
    // throughput of segment B: first and last cycle in which its
    // instructions retire
    if (mode == MODE_ISS && retired != 0 && !irq) begin
      if (g_committed + int'(retired) > seg_b_start && b_first < 0) b_first <= cycle;
      if (g_committed + int'(retired) >= seg_b_end && b_last < 0) b_last <= cycle;
    end
    // mechanism counters
    if (dut.stall_bank) ev_bank++;
    if (dut.stall_rob_full) ev_robfull++;
    if (dut.intra_dep && dut.g_valid) ev_intra++;
    for (int p = 0; p < NPE; p++) if (dut.ins_capture[p] && mode != MODE_SYNC) ev_capture++;
    if (dut.g_pe[1].u_pe.link_used && dut.g_pe[0].done_w) ev_link++;
    if (g_fetch_take == 5'd16) ev_disp16++;
    nis = 0;
    for (int f = 0; f < PE_W; f++)
      nis += int'(dut.g_pe[0].u_pe.iss_v[f]) + int'(dut.g_pe[1].u_pe.iss_v[f])
           + int'(dut.g_pe[2].u_pe.iss_v[f]) + int'(dut.g_pe[3].u_pe.iss_v[f]);
    if (nis == 16) ev_issue16++;
    if (retired == 5'd16) ev_ret16++;
    if (dut.to_mt) ev_to_mt++;
    if (dut.sync) begin
      ev_sync++;
      for (int p = 0; p < NPE; p++)
        if (peid_t'(p) != nonspec && !dut.rob_empty[p]) begin ev_squash++; break; end
    end
    if (dut.handoff) ev_handoff++;
    if (dut.irq_flush) ev_irq++;
  end

  // ------------------------------------------------------------ sequence
  initial begin
    gptr = 0;
    for (int p = 0; p < NPE; p++) tptr[p] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // first interrupt while segment A is in flight
    repeat (25) @(posedge clk);
    irq <= 1'b1;
    @(posedge clk);
    irq <= 1'b0;
    // entry into the multithreaded mode
    wait (mode == MODE_MT);
    @(posedge clk); @(posedge clk);
    for (int p = 0; p < NPE; p++)
      for (int r = 0; r < NREG; r++)
        check(arch_regs[p][r] == st_entry[r], $sformatf("entry state PE%0d r%0d", p, r));
    // back to the integrated mode
    wait (mode == MODE_SYNC);
    @(posedge clk); @(posedge clk);
    for (int p = 0; p < NPE; p++)
      for (int r = 0; r < NREG; r++)
        check(arch_regs[p][r] == st_exit[r], $sformatf("exit state PE%0d r%0d: %h vs %h",
              p, r, arch_regs[p][r], st_exit[r]));
    check(nonspec == peid_t'((LOOP_ITERS - 1) % NPE), "nonspeculative PE at loop exit");
    // second interrupt during segment B/C
    wait (g_committed > seg_b_end + 40);
    irq <= 1'b1;
    @(posedge clk);
    irq <= 1'b0;
    wait (g_committed == gprog.size());
    repeat (4) @(posedge clk);
    for (int p = 0; p < NPE; p++)
      for (int r = 0; r < NREG; r++)
        check(arch_regs[p][r] == st_final[r], $sformatf("final state PE%0d r%0d: %h vs %h",
              p, r, arch_regs[p][r], st_final[r]));
    check(mode == MODE_ISS, "ends in the integrated mode");
    // sustained rate on independent code: 48 groups of 16
    $display("segment B: %0d instructions retired in %0d cycles", seg_b_end - seg_b_start,
             b_last - b_first + 1);
    check((b_last - b_first + 1) * GW <= (seg_b_end - seg_b_start),
          "independent code retires 16 instructions per cycle");
    $display("events: bank=%0d robfull=%0d intra=%0d capture=%0d link=%0d disp16=%0d issue16=%0d ret16=%0d",
             ev_bank, ev_robfull, ev_intra, ev_capture, ev_link, ev_disp16, ev_issue16, ev_ret16);
    $display("events: to_mt=%0d sync=%0d handoff=%0d squash=%0d irq=%0d cycles=%0d",
             ev_to_mt, ev_sync, ev_handoff, ev_squash, ev_irq, cycle);
    check(ev_bank > 0, "bank-limit stall happened");
    check(ev_robfull > 0, "full reorder buffer stall happened");
    check(ev_intra > 0, "same-group dependence happened");
    check(ev_capture > 0, "wake-up at insertion happened");
    check(ev_link > 0, "same-cycle ordering link happened");
    check(ev_disp16 > 0, "16-instruction dispatch happened");
    check(ev_issue16 > 0, "16-instruction issue happened");
    check(ev_ret16 > 0, "16-instruction retirement happened");
    check(ev_to_mt == 1, "one switch to the multithreaded mode");
    check(ev_sync == 1, "one switch back to the integrated mode");
    check(ev_handoff == LOOP_ITERS - 1, "nonspeculative hand-offs");
    check(ev_squash > 0, "speculative PEs squashed at loop exit");
    check(ev_irq == 2, "two interrupts taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d cycles (mode %0d, gptr %0d, committed %0d)",
             MAX_CYCLES, mode, gptr, g_committed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
