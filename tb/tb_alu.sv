// tb_alu: checks every ALU operation on directed and random operands against
// results computed here from arithmetic identities (subtraction as addition
// of the two's complement, shifts as multiplication/division by powers of
// two, the immediate sign-extended by hand).
module tb_alu;
  import bprf_pkg::*;
  int checks = 0, failures = 0;

  alu_op_e          op;
  logic [63:0]      a, b, y, exp;
  logic [15:0]      imm;

  alu u_dut (.op, .a, .b, .imm, .y);

  function automatic logic [63:0] model(alu_op_e o, logic [63:0] x, logic [63:0] z,
                                        logic [15:0] im);
    logic [63:0] se;
    se = im[15] ? {48'hFFFF_FFFF_FFFF, im} : {48'h0, im};
    case (o)
      OP_ADD:  return x + z;
      OP_SUB:  return x + (~z) + 64'd1;
      OP_AND:  return ~(~x | ~z);
      OP_OR:   return ~(~x & ~z);
      OP_XOR:  return (x | z) & ~(x & z);
      OP_SLL:  return x * (64'd1 << z[5:0]);
      OP_SRL:  return x / (64'd1 << z[5:0]);
      OP_ADDI: return x + se;
      OP_SLLI: return x * (64'd1 << im[5:0]);
      OP_SRLI: return x / (64'd1 << im[5:0]);
      default: return '0;
    endcase
  endfunction

  initial begin
    for (int k = 0; k < 5000; k++) begin
      op  = alu_op_e'(k % 10);
      a   = (k % 7 == 0) ? '1 : {$urandom, $urandom};
      b   = (k % 11 == 0) ? 64'd0 : {$urandom, $urandom};
      imm = $urandom;
      #1;
      exp = model(op, a, b, imm);
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL: op=%s a=%h b=%h imm=%h -> %h expected %h", op.name(), a, b, imm, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
