// tb_operand_assemble: checks that the two bank words are placed by LSBP
// (bank 0 low when LSBP = 0, swapped when LSBP = 1) and that an invalid
// upper entry reads as zero, for random bank contents and all four
// combinations of LSBP and upper_valid.
module tb_operand_assemble;
  import bprf_pkg::*;
  int checks = 0, failures = 0;

  logic            lsbp, uv;
  logic [31:0]     b0, b1;
  logic [63:0]     y, exp;

  operand_assemble u_dut (.lsbp, .upper_valid (uv), .bank0_data (b0), .bank1_data (b1),
                          .operand (y));

  initial begin
    for (int k = 0; k < 1000; k++) begin
      b0 = $urandom; b1 = $urandom;
      lsbp = k[0]; uv = k[1];
      #1;
      if (!lsbp) exp = uv ? {b1, b0} : {32'h0, b0};
      else       exp = uv ? {b0, b1} : {32'h0, b1};
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL: lsbp=%b uv=%b b0=%h b1=%h -> %h expected %h", lsbp, uv, b0, b1, y, exp);
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
