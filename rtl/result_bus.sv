// result_bus: the result broadcast network between the four processing
// elements.
//
// Each PE produces up to PE_W results per cycle (one per functional unit).
// In the integrated superscalar mode every result, with its tag,
// destination register and bank, goes to the instruction windows, reorder
// buffers and register files of all four PEs, which keeps the four
// bank-based register files identical. In the multithreaded mode a PE sees
// only its own results: the files evolve independently. The network is
// combinational; output port p*PE_W+f of PE q carries functional unit f of
// PE p, invalid when PE q may not see it. 'enable' low (during the cycle that
// leaves the multithreaded mode, and during flushes) blocks all results.
//
// From the document: broadcast to all PEs in the integrated mode, no
// broadcast to other PEs in the multithreaded mode. The fixed slot order is
// this design's choice.
module result_bus
  import cmp_pkg::*;
(
  input  logic    integrated,
  input  logic    enable,
  input  result_t pe_res [NPE][PE_W],
  output result_t to_pe  [NPE][GW]
);

  always_comb begin
    for (int q = 0; q < NPE; q++)
      for (int p = 0; p < NPE; p++)
        for (int f = 0; f < PE_W; f++) begin
          to_pe[q][p*PE_W+f] = pe_res[p][f];
          if (!enable || (!integrated && p != q))
            to_pe[q][p*PE_W+f].valid = 1'b0;
        end
  end

endmodule
