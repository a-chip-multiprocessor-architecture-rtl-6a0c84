// cmp_pkg: sizes, instruction format and the record types shared by the
// two-mode chip multiprocessor.
//
// The machine has four processing elements (PEs), each a 4-issue
// out-of-order core; in the integrated superscalar mode they act as one
// 16-issue core fed by a single global fetch/dispatch unit, in the
// multithreaded mode each runs its own thread. Register files are
// bank-based: every logical register has one physical copy in each of three
// banks, and two small tables (IBIT, RBIT) say which bank holds the
// committed and the most recently renamed value. A reorder-buffer tag is the
// local entry index with the PE number added as its two top bits.
//
// From the document: four PEs, four-issue PEs, three register banks, the
// reorder buffer made of 4-entry slices, the PE number in the two top tag
// bits. This design's own choices: 32 logical registers, 32-bit data, four
// slices (16 entries) per reorder buffer, a 16-entry instruction window and
// the small ALU-only instruction set below, whose only control instructions
// are the marks that a binary annotator would place at loop entry, iteration
// end and loop exit.
package cmp_pkg;

  localparam int unsigned NPE        = 4;   // processing elements
  localparam int unsigned PE_W       = 4;   // issue width of one PE
  localparam int unsigned GW         = NPE * PE_W; // global fetch width (16)
  localparam int unsigned NREG       = 32;  // logical registers
  localparam int unsigned XLEN       = 32;  // data width
  localparam int unsigned NBANK      = 3;   // register banks
  localparam int unsigned ROB_SLICES = 4;   // 4-entry slices per PE reorder buffer
  localparam int unsigned ROB_DEPTH  = ROB_SLICES * PE_W;
  localparam int unsigned WIN_DEPTH  = 16;  // instruction window entries per PE

  localparam int unsigned RW   = $clog2(NREG);
  localparam int unsigned BW   = 2;                    // bank index width
  localparam int unsigned PW   = $clog2(NPE);          // PE id width (2)
  localparam int unsigned SW   = $clog2(ROB_SLICES);   // slice / block index width
  localparam int unsigned LW   = $clog2(ROB_DEPTH);    // local ROB index width
  localparam int unsigned TW   = PW + LW;              // global tag width

  typedef logic [RW-1:0]   reg_t;
  typedef logic [BW-1:0]   bank_t;
  typedef logic [TW-1:0]   tag_t;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [PW-1:0]   peid_t;
  typedef logic [SW-1:0]   slice_t;

  // Instruction encoding (32 bits):
  //   [31:28] opcode  [27:23] rd  [22:18] rs1  [17:13] rs2  [12:0] imm (signed)
  typedef enum logic [3:0] {
    OP_NOP    = 4'h0,
    OP_ADD    = 4'h1,
    OP_SUB    = 4'h2,
    OP_AND    = 4'h3,
    OP_OR     = 4'h4,
    OP_XOR    = 4'h5,
    OP_SLT    = 4'h6,
    OP_SLL    = 4'h7,
    OP_SRL    = 4'h8,
    OP_ADDI   = 4'h9,
    OP_LOOPB  = 4'hC,   // loop entry point mark
    OP_ITEREND= 4'hD,   // end of one loop iteration (multithreaded mode)
    OP_LOOPX  = 4'hE    // loop exit point mark
  } op_e;

  typedef struct packed {
    op_e          op;
    reg_t         rd;
    reg_t         rs1;
    reg_t         rs2;
    logic [12:0]  imm;
  } instr_t;

  // True when the instruction executes in a functional unit.
  function automatic logic is_alu(op_e op);
    return (op >= OP_ADD) && (op <= OP_ADDI);
  endfunction

  // True when the instruction writes rd (writes to r0 are allowed; r0 is an
  // ordinary register in this instruction set).
  function automatic logic writes_rd(op_e op);
    return is_alu(op);
  endfunction

  function automatic logic uses_rs2(op_e op);
    return is_alu(op) && (op != OP_ADDI);
  endfunction

  function automatic bank_t bank_inc(bank_t b);
    return (b == bank_t'(NBANK - 1)) ? bank_t'(0) : bank_t'(b + 1'b1);
  endfunction

  // One source operand after renaming: either ready in the register file
  // (read bank 'bank' of register 'r') or waiting for result 'tag'.
  typedef struct packed {
    logic  pend;
    tag_t  tag;
    bank_t bank;
    reg_t  r;
  } src_t;

  // A renamed micro-operation as dispatched to a PE.
  typedef struct packed {
    logic   valid;     // slot holds an instruction (else a filler no-op)
    op_e    op;
    logic   wr;        // writes rd
    reg_t   rd;
    bank_t  dbank;     // bank the result goes to
    tag_t   tag;       // reorder buffer tag
    src_t   s1;
    src_t   s2;
    logic   use_imm;
    word_t  imm;       // sign-extended immediate
  } uop_t;

  // A result on the broadcast network.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    logic  wr;
    reg_t  rd;
    bank_t bank;
    word_t value;
  } result_t;

  // One retired reorder-buffer entry.
  typedef struct packed {
    logic valid;
    logic wr;
    reg_t rd;
    op_e  op;
  } commit_t;

  typedef enum logic [1:0] {
    MODE_ISS  = 2'd0,   // integrated superscalar mode
    MODE_MT   = 2'd1,   // speculative multithreaded mode
    MODE_SYNC = 2'd2    // one cycle: leaving multithreaded mode, files made consistent
  } mode_e;

endpackage
