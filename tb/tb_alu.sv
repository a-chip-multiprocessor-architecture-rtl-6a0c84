// tb_alu: checks every ALU operation on random and corner operands against
// a reference computed in the testbench.
module tb_alu;
  import cmp_pkg::*;

  op_e   op;
  word_t a, b, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  alu dut (.op, .a, .b, .y);

  function automatic word_t ref_alu(op_e o, word_t x, word_t z);
    case (o)
      OP_ADD, OP_ADDI: return x + z;
      OP_SUB: return x - z;
      OP_AND: return x & z;
      OP_OR:  return x | z;
      OP_XOR: return x ^ z;
      OP_SLT: return ($signed(x) < $signed(z)) ? 32'd1 : 32'd0;
      OP_SLL: return x << (z % 32);
      OP_SRL: return x >> (z % 32);
      default: return '0;
    endcase
  endfunction

  initial begin
    op_e ops [10] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL, OP_ADDI, OP_NOP};
    for (int n = 0; n < 2000; n++) begin
      op = ops[n % 10];
      a  = (n % 7 == 0) ? 32'h8000_0000 : $urandom;
      b  = (n % 11 == 0) ? 32'hffff_ffff : $urandom;
      #1;
      checks++;
      if (y !== ref_alu(op, a, b)) begin
        failures++;
        $display("FAIL: op %s a %h b %h y %h", op.name(), a, b, y);
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
