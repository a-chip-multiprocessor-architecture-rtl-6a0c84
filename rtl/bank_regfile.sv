// bank_regfile: bank-based register file of one processing element.
//
// Every logical register has one physical copy in each of NBANK (three)
// banks, all with the same register numbers. Renaming only chooses a bank:
// a result is written straight into bank 'bank' of register 'rd' when it is
// produced, so the reorder buffer needs no result field. Which bank holds
// the committed value is kept outside, in the IBIT; given that table on
// 'ibit' this block also presents the committed (architectural) value of
// every register on 'arch', which is what is copied to the other PEs when
// the machine leaves the multithreaded mode.
//
// Interface: NRD combinational read ports (register + bank), NWR write ports
// taking results from the broadcast network (written at the clock edge),
// and a 'load_en' strobe that writes 'load_val' into bank 0 of every register
// and has priority over the write ports. Reset clears all banks.
//
// From the document: three banks, same identifiers in every bank, results
// written directly into the file, the files of the four PEs kept consistent
// in the integrated mode and made consistent from the nonspeculative PE on
// return to it. This design's choices: bank 0 receives the copied values
// (the renaming tables are reset to 0 at that moment), and a later write
// port wins if two ports write the same bank and register in one cycle,
// which renaming never produces.
module bank_regfile
  import cmp_pkg::*;
#(
  parameter int unsigned NRD = 2 * PE_W,
  parameter int unsigned NWR = GW
) (
  input  logic    clk,
  input  logic    rst_n,
  input  reg_t    rd_reg  [NRD],
  input  bank_t   rd_bank [NRD],
  output word_t   rd_data [NRD],
  input  result_t wr      [NWR],
  input  logic    load_en,
  input  word_t   load_val[NREG],
  input  bank_t   ibit    [NREG],
  output word_t   arch    [NREG]
);

  word_t bank_q [NBANK][NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANK; b++)
        for (int r = 0; r < NREG; r++)
          bank_q[b][r] <= '0;
    end else if (load_en) begin
      for (int r = 0; r < NREG; r++)
        bank_q[0][r] <= load_val[r];
    end else begin
      for (int w = 0; w < NWR; w++)
        if (wr[w].valid && wr[w].wr && (int'(wr[w].bank) < NBANK))
          bank_q[wr[w].bank][wr[w].rd] <= wr[w].value;
    end
  end

  always_comb begin
    for (int i = 0; i < NRD; i++)
      rd_data[i] = (int'(rd_bank[i]) < NBANK) ? bank_q[rd_bank[i]][rd_reg[i]] : '0;
    for (int r = 0; r < NREG; r++)
      arch[r] = (int'(ibit[r]) < NBANK) ? bank_q[ibit[r]][r] : '0;
  end

endmodule
