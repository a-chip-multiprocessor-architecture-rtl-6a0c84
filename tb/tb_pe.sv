// tb_pe: one processing element running a random thread on its own
// (multithreaded mode), its results looped back as the broadcast network
// would in that mode. Every committed instruction is checked, in order,
// against a sequential reference model, and at the end the committed
// register values are compared. Also checks that a flush mid-run leaves the
// committed state intact and that the PE restarts from it.
module tb_pe;
  import cmp_pkg::*;

  localparam int N = 400;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        g_valid = 1'b0;
  uop_t        g_uop [PE_W];
  logic        accept;
  logic [31:0] fetch_words [PE_W];
  logic [2:0]  fetch_avail, fetch_take;
  logic        loop_exit_wait;
  result_t     bcast [GW];
  result_t     res_out [PE_W];
  commit_t     commits [PE_W];
  logic        done, link_used, rob_empty, ins_capture;
  slice_t      done_slice;
  logic        flush = 1'b0, reset_tables = 1'b0, rf_load = 1'b0;
  bank_t       g_ibit [NREG], g_rbit [NREG];
  word_t       rf_load_val [NREG], arch [NREG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe #(.PE_ID(1)) dut (
    .clk, .rst_n, .integrated(1'b0), .mt_active(1'b1),
    .g_valid, .g_uop, .accept, .fetch_words, .fetch_avail, .fetch_take, .loop_exit_wait,
    .bcast, .res_out, .commits, .link_set(1'b0), .link_set_slice('0), .done, .done_slice,
    .link_used, .mark_ok(1'b1), .rob_empty, .flush, .reset_tables, .g_ibit, .g_rbit,
    .rf_load, .rf_load_val, .arch, .ins_capture);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // results of this PE only, as in the multithreaded mode
  always_comb begin
    for (int j = 0; j < GW; j++) bcast[j] = '0;
    for (int f = 0; f < PE_W; f++) bcast[PE_W + f] = res_out[f];
  end

  logic [31:0] prog [N];
  word_t st [NREG];
  int ptr = 0, ncommitted = 0;

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

  always_comb begin
    int n;
    n = N - ptr;
    if (n > PE_W) n = PE_W;
    fetch_avail = 3'(n);
    for (int j = 0; j < PE_W; j++) fetch_words[j] = (ptr + j < N) ? prog[ptr + j] : '0;
  end

  // check each commit against the reference, in program order
  always_ff @(posedge clk) if (rst_n) begin
    int c;
    c = ncommitted;
    if (flush) ptr <= ncommitted;
    else ptr <= ptr + int'(fetch_take);
    for (int k = 0; k < PE_W; k++)
      if (commits[k].valid) begin
        instr_t i;
        word_t b;
        i = instr_t'(prog[c]);
        chk(commits[k].op == i.op && (!commits[k].wr || commits[k].rd == i.rd),
            $sformatf("commit %0d in order", c));
        b = (i.op == OP_ADDI) ? word_t'(signed'(i.imm)) : st[i.rs2];
        if (is_alu(i.op)) st[i.rd] = ref_alu(i.op, st[i.rs1], b);
        c++;
      end
    ncommitted <= c;
  end

  initial begin
    op_e ops [9] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL, OP_ADDI};
    for (int r = 0; r < NREG; r++) begin st[r] = '0; g_ibit[r] = '0; g_rbit[r] = '0; rf_load_val[r] = '0; end
    for (int k = 0; k < PE_W; k++) g_uop[k] = '0;
    for (int n = 0; n < N; n++) begin
      instr_t i;
      i.op = ops[$urandom_range(8)]; i.rd = reg_t'($urandom_range(7));
      i.rs1 = reg_t'($urandom_range(7)); i.rs2 = reg_t'($urandom_range(7)); i.imm = 13'($urandom);
      if (n % 9 == 0) i.op = OP_ADDI;
      prog[n] = 32'(i);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (60) @(posedge clk);
    #1 flush = 1'b1;
    @(posedge clk);
    #1 flush = 1'b0;
    chk(rob_empty, "flush empties the reorder buffer");
    for (int r = 0; r < NREG; r++) chk(arch[r] == st[r], $sformatf("state after flush r%0d", r));
    wait (ncommitted == N);
    repeat (3) @(posedge clk);
    for (int r = 0; r < NREG; r++) chk(arch[r] == st[r], $sformatf("final r%0d %h vs %h", r, arch[r], st[r]));
    chk(rob_empty, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
