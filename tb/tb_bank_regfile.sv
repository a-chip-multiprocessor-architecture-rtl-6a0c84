// tb_bank_regfile: random writes through the result ports into random banks,
// random reads of (register, bank) pairs, the committed-value view selected
// by a random IBIT, and the bulk load into bank 0, all against a model
// array kept by the testbench.
module tb_bank_regfile;
  import cmp_pkg::*;

  localparam int NRD = 8, NWR = 16;
  logic    clk = 1'b0, rst_n = 1'b0;
  reg_t    rd_reg  [NRD];
  bank_t   rd_bank [NRD];
  word_t   rd_data [NRD];
  result_t wr      [NWR];
  logic    load_en;
  word_t   load_val[NREG];
  bank_t   ibit    [NREG];
  word_t   arch    [NREG];
  int checks = 0, failures = 0;
  word_t model [NBANK][NREG];

  always #5 clk = ~clk;

  bank_regfile #(.NRD(NRD), .NWR(NWR)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    load_en = 1'b0;
    for (int w = 0; w < NWR; w++) wr[w] = '0;
    for (int r = 0; r < NREG; r++) begin ibit[r] = '0; load_val[r] = '0; end
    for (int i = 0; i < NRD; i++) begin rd_reg[i] = '0; rd_bank[i] = '0; end
    for (int b = 0; b < NBANK; b++) for (int r = 0; r < NREG; r++) model[b][r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // reads of the state before this edge
      for (int i = 0; i < NRD; i++) begin
        rd_reg[i]  = reg_t'($urandom);
        rd_bank[i] = bank_t'($urandom_range(2));
      end
      for (int r = 0; r < NREG; r++) ibit[r] = bank_t'($urandom_range(2));
      #1;
      for (int i = 0; i < NRD; i++)
        chk(rd_data[i] == model[rd_bank[i]][rd_reg[i]], $sformatf("read r%0d b%0d", rd_reg[i], rd_bank[i]));
      for (int r = 0; r < NREG; r++)
        chk(arch[r] == model[ibit[r]][r], $sformatf("arch r%0d", r));
      // writes for the next edge: distinct (register, bank) pairs per cycle
      load_en = (n % 97 == 50);
      for (int r = 0; r < NREG; r++) load_val[r] = $urandom;
      for (int w = 0; w < NWR; w++) begin
        wr[w].valid = $urandom_range(1);
        wr[w].wr    = 1'b1;
        wr[w].rd    = reg_t'(2 * w + $urandom_range(1));
        wr[w].bank  = bank_t'($urandom_range(2));
        wr[w].value = $urandom;
        wr[w].tag   = '0;
      end
      if (load_en) begin
        for (int r = 0; r < NREG; r++) model[0][r] = load_val[r];
      end else begin
        for (int w = 0; w < NWR; w++)
          if (wr[w].valid) model[wr[w].bank][wr[w].rd] = wr[w].value;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
