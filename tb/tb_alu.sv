// tb_alu: random and corner operands for every ALU operation, compared with
// a model written here.
`timescale 1ns/1ps
module tb_alu;
  import mt_pkg::*;
  aluop_t op;
  logic [31:0] a, b, y;
  logic eq;
  int checks = 0, failures = 0;
  alu dut (.op, .a, .b, .y, .eq);

  function automatic logic [31:0] model(aluop_t o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_MUL: return 32'(longint'(x) * longint'(z));
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_SLT: return (int'(x) < int'(z)) ? 32'd1 : 32'd0;
      default: return 0;
    endcase
  endfunction

  initial begin
    #100000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      op = aluop_t'(i % 6);
      a = (i < 12) ? 32'h8000_0000 : $urandom;
      b = (i < 6) ? 32'h7fff_ffff : ((i % 7 == 0) ? a : $urandom);
      #1;
      checks++;
      if (y !== model(op, a, b) || eq !== (a == b)) begin
        failures++;
        $display("FAIL op %0d a %h b %h: y %h expected %h", op, a, b, y, model(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
