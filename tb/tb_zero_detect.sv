// tb_zero_detect: checks the 0-detect logic for the 2-bank (32-bit halves)
// and 4-bank (16-bit quarters) splits. Directed corner values (zero, all
// ones, a single set bit at every position) and random values with the
// upper part forced to zero are compared with an independent bit count.
module tb_zero_detect;
  int checks = 0, failures = 0;

  logic [63:0] r2, r4;
  logic [1:0]  z2;
  logic [3:0]  z4;
  logic        n2, n4;

  zero_detect #(.XLEN(64), .NBANKS(2)) u2 (.result (r2), .sub_zero (z2), .narrow (n2));
  zero_detect #(.XLEN(64), .NBANKS(4)) u4 (.result (r4), .sub_zero (z4), .narrow (n4));

  task automatic apply(logic [63:0] v);
    logic exp_n2, exp_n4;
    r2 = v; r4 = v;
    #1;
    // narrow for 2 banks: no set bit at position 32 or above
    exp_n2 = 1'b1;
    exp_n4 = 1'b1;
    for (int i = 32; i < 64; i++) if (v[i]) exp_n2 = 1'b0;
    for (int i = 16; i < 64; i++) if (v[i]) exp_n4 = 1'b0;
    checks++;
    if (n2 !== exp_n2 || n4 !== exp_n4 || z2[0] !== (v[31:0] == 0) ||
        z4[2] !== (v[47:32] == 0)) begin
      failures++;
      $display("FAIL: value %h narrow2=%b narrow4=%b z2=%b z4=%b", v, n2, n4, z2, z4);
    end
  endtask

  initial begin
    apply(64'h0);
    apply('1);
    apply(64'h0000_0000_FFFF_FFFF);
    apply(64'h0000_0000_0000_FFFF);
    for (int b = 0; b < 64; b++) apply(64'h1 << b);
    for (int k = 0; k < 2000; k++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      case (k % 3)
        0: v[63:32] = '0;
        1: v[63:16] = '0;
        default: ;
      endcase
      apply(v);
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
