// tb_mode_ctrl: walks the controller through loop entry, iteration
// hand-offs, marks committed by speculative PEs (ignored), loop exit, the
// one-cycle SYNC state and interrupts in both modes.
module tb_mode_ctrl;
  import cmp_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0, irq = 1'b0;
  logic    loop_entry_wait = 1'b0, rob_drained = 1'b0;
  commit_t pe_commits [NPE][PE_W];
  mode_e   mode;
  peid_t   nonspec;
  logic    irq_flush, sync, to_mt, handoff;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mode_ctrl dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic mark(input int p, input op_e op);
    pe_commits[p][1] = '{valid: 1'b1, wr: 1'b0, rd: '0, op: op};
  endtask

  task automatic step();
    @(posedge clk);
    #1;
    for (int p = 0; p < NPE; p++) for (int k = 0; k < PE_W; k++) pe_commits[p][k] = '0;
  endtask

  initial begin
    for (int p = 0; p < NPE; p++) for (int k = 0; k < PE_W; k++) pe_commits[p][k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(mode == MODE_ISS, "starts in the integrated mode");
    irq = 1'b1;
    #1 chk(irq_flush, "interrupt taken in the integrated mode");
    step();
    irq = 1'b0;
    loop_entry_wait = 1'b1;
    #1 chk(!to_mt, "waits for the buffer to drain");
    step();
    chk(mode == MODE_ISS, "still integrated");
    rob_drained = 1'b1;
    #1 chk(to_mt, "switch requested");
    step();
    loop_entry_wait = 1'b0;
    chk(mode == MODE_MT && nonspec == 0, "multithreaded, PE 0 nonspeculative");
    irq = 1'b1;
    #1 chk(!irq_flush, "interrupt held off in the multithreaded mode");
    irq = 1'b0;
    // a speculative PE's mark is ignored
    mark(2, OP_ITEREND);
    #1 chk(!handoff, "speculative mark ignored");
    step();
    chk(nonspec == 0, "no hand-off");
    for (int i = 0; i < 5; i++) begin
      mark(i % NPE, OP_ITEREND);
      #1 chk(handoff, "hand-off");
      step();
      chk(nonspec == peid_t'((i + 1) % NPE), $sformatf("nonspec after %0d hand-offs", i + 1));
    end
    mark(3, OP_LOOPX);          // speculative PE 3 reaching the exit: ignored
    step();
    chk(mode == MODE_MT, "exit by speculative PE ignored");
    mark(1, OP_LOOPX);
    step();
    chk(mode == MODE_SYNC && sync && nonspec == 1, "SYNC after exit by nonspeculative PE");
    step();
    chk(mode == MODE_ISS && !sync, "back in the integrated mode after one cycle");
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
