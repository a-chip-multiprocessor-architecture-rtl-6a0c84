// tb_local_rob: two reorder buffers driven alike, one holding the initial
// ordering link (first PE) and one not. Checks in-order commit over
// out-of-order completion, that the first entry of a slice waits for its
// link, same-cycle use of an incoming link (not in the first PE), the
// 'done' pulse at the fourth entry, the mark held until the PE is
// nonspeculative, filler no-ops, the full flag, flush, and link-free commit
// in the multithreaded mode.
module tb_local_rob;
  import cmp_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    flush = 1'b0, use_links = 1'b1, alloc = 1'b0;
  uop_t    alloc_uop [PE_W];
  slice_t  tail_a, tail_b;
  logic    full_a, full_b, empty_a, empty_b;
  result_t fu_res [PE_W];
  logic    link_set = 1'b0;
  slice_t  link_set_slice = '0;
  logic    done_a, done_b, used_a, used_b;
  slice_t  ds_a, ds_b;
  logic    mark_ok = 1'b0;
  commit_t com_a [PE_W], com_b [PE_W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  local_rob #(.IS_FIRST(1'b1)) dut_a (
    .clk, .rst_n, .flush, .use_links, .alloc, .alloc_uop, .tail_slice(tail_a),
    .full(full_a), .empty(empty_a), .fu_res, .link_set, .link_set_slice,
    .done(done_a), .done_slice(ds_a), .mark_ok, .commits(com_a), .link_used(used_a));
  local_rob #(.IS_FIRST(1'b0)) dut_b (
    .clk, .rst_n, .flush, .use_links, .alloc, .alloc_uop, .tail_slice(tail_b),
    .full(full_b), .empty(empty_b), .fu_res, .link_set, .link_set_slice,
    .done(done_b), .done_slice(ds_b), .mark_ok, .commits(com_b), .link_used(used_b));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic int ncom(input commit_t c [PE_W]);
    int n = 0;
    for (int k = 0; k < PE_W; k++) if (c[k].valid) n++;
    return n;
  endfunction

  function automatic uop_t U(logic v, op_e op, int rd);
    uop_t u = '0;
    u.valid = v; u.op = op; u.wr = is_alu(op); u.rd = reg_t'(rd);
    return u;
  endfunction

  task automatic complete(input int a, input int b);  // entries a and b (-1: none)
    for (int f = 0; f < PE_W; f++) fu_res[f] = '0;
    if (a >= 0) begin fu_res[0].valid = 1'b1; fu_res[0].tag = tag_t'(a); end
    if (b >= 0) begin fu_res[1].valid = 1'b1; fu_res[1].tag = tag_t'(b); end
  endtask

  task automatic step();
    @(posedge clk);
    #1;
    alloc = 1'b0; link_set = 1'b0;
    complete(-1, -1);
  endtask

  initial begin
    complete(-1, -1);
    for (int k = 0; k < PE_W; k++) alloc_uop[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // slice 0: four ALU ops; slice 1: ALU, filler, iteration-end mark, ALU
    alloc = 1'b1;
    alloc_uop = '{U(1, OP_ADD, 1), U(1, OP_ADD, 2), U(1, OP_SUB, 3), U(1, OP_XOR, 4)};
    step();
    alloc = 1'b1;
    alloc_uop = '{U(1, OP_ADD, 5), U(0, OP_NOP, 0), U(1, OP_ITEREND, 0), U(1, OP_OR, 6)};
    step();
    chk(tail_a == 2 && !empty_a && !full_a, "two slices allocated");
    // completion out of order: nothing commits until entry 0 is done
    complete(2, 1);
    #1 chk(ncom(com_a) == 0 && ncom(com_b) == 0, "no commit before entry 0 completes");
    step();
    complete(0, -1);
    step();
    chk(ncom(com_a) == 3 && com_a[2].rd == 3 && com_a[0].wr, "first PE commits entries 0-2 with its initial link");
    chk(ncom(com_b) == 0, "other PE waits for its link");
    chk(!done_a, "no done before the fourth entry");
    step();
    chk(ncom(com_a) == 0, "entry 3 incomplete");
    complete(3, 4);
    step();
    chk(ncom(com_a) == 1 && done_a && ds_a == 0, "fourth entry commits, done for slice 0");
    step();
    chk(ncom(com_a) == 0, "slice 1 waits for its link");
    // the link into slice 1: PE b may use it in the same cycle, PE a only stored
    link_set = 1'b1; link_set_slice = 2'd1;
    #1;
    chk(!used_b && ncom(com_b) == 0, "PE b: a link into slice 1 does not open slice 0");
    chk(ncom(com_a) == 0 && !used_a, "PE a: incoming link not used in the same cycle");
    step();
    chk(com_a[0].valid && com_a[0].rd == 5 && ncom(com_a) == 1 && used_a, "PE a: entry 4 commits, filler passes, mark held");
    step();
    chk(ncom(com_a) == 0, "mark held while speculative");
    mark_ok = 1'b1;
    #1 chk(ncom(com_a) == 1 && com_a[0].op == OP_ITEREND && !done_a, "mark commits once nonspeculative");
    step();
    mark_ok = 1'b0;
    complete(7, -1);
    step();
    chk(com_a[0].valid && com_a[0].rd == 6 && done_a && ds_a == 1, "entry 7 commits, done for slice 1");
    step();
    chk(empty_a, "PE a empty");
    // PE b still holds two slices: two more make it full
    for (int s = 0; s < ROB_SLICES - 2; s++) begin
      alloc = 1'b1;
      alloc_uop = '{U(1, OP_ADD, 1), U(1, OP_ADD, 2), U(1, OP_ADD, 3), U(1, OP_ADD, 4)};
      step();
    end
    chk(full_b && !full_a, "full after four slices");
    flush = 1'b1;
    step();
    flush = 1'b0;
    chk(empty_a && empty_b && tail_a == 0, "flush empties");
    // multithreaded mode: no links needed; a second set of tags at slice 0
    use_links = 1'b0;
    alloc = 1'b1;
    alloc_uop = '{U(1, OP_ADD, 9), U(1, OP_ADD, 10), U(0, OP_NOP, 0), U(0, OP_NOP, 0)};
    step();
    complete(0, 1);
    step();
    chk(ncom(com_b) == 2 && done_b && com_b[1].rd == 10, "PE b commits without link in multithreaded mode");
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
