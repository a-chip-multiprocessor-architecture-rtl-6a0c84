// tb_result_bus: checks which PE sees which result in each mode: all
// sixteen in the integrated mode, only its own four in the multithreaded
// mode, none while disabled; the payload must arrive unchanged.
module tb_result_bus;
  import cmp_pkg::*;

  logic    integrated, enable;
  result_t pe_res [NPE][PE_W];
  result_t to_pe  [NPE][GW];
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  result_bus dut (.*);

  initial begin
    for (int n = 0; n < 300; n++) begin
      integrated = n[0];
      enable     = (n % 5 != 0);
      for (int p = 0; p < NPE; p++)
        for (int f = 0; f < PE_W; f++) begin
          pe_res[p][f].valid = $urandom_range(3) != 0;
          pe_res[p][f].tag   = tag_t'($urandom);
          pe_res[p][f].wr    = 1'b1;
          pe_res[p][f].rd    = reg_t'($urandom);
          pe_res[p][f].bank  = bank_t'($urandom_range(2));
          pe_res[p][f].value = $urandom;
        end
      #1;
      for (int q = 0; q < NPE; q++)
        for (int p = 0; p < NPE; p++)
          for (int f = 0; f < PE_W; f++) begin
            logic exp_v;
            exp_v = pe_res[p][f].valid && enable && (integrated || p == q);
            checks++;
            if (to_pe[q][p*PE_W+f].valid !== exp_v ||
                (exp_v && (to_pe[q][p*PE_W+f].value !== pe_res[p][f].value ||
                           to_pe[q][p*PE_W+f].tag !== pe_res[p][f].tag ||
                           to_pe[q][p*PE_W+f].rd !== pe_res[p][f].rd ||
                           to_pe[q][p*PE_W+f].bank !== pe_res[p][f].bank))) begin
              failures++;
              $display("FAIL: n=%0d q=%0d p=%0d f=%0d", n, q, p, f);
            end
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
