// zero_detect: the 0-detect logic of the bit-partitioned register file.
//
// Checks the effective bit-width of each ALU result. For every sub-word it
// reports whether the sub-word is all zero; `narrow` is set when every
// sub-word above the least significant one is all zero, i.e. the result
// fits in one bank entry. The core then releases the entry that was
// allocated for the upper sub-word (early register deallocation).
//
// Purely combinational. Only all-zero sub-words are detected, as in the
// design; sign-extended (all-one) upper halves are stored in full.
module zero_detect #(
  parameter int unsigned XLEN   = 64,
  parameter int unsigned NBANKS = 2,
  localparam int unsigned SUBW  = XLEN / NBANKS
) (
  input  logic [XLEN-1:0]   result,
  output logic [NBANKS-1:0] sub_zero,   // sub_zero[k]: sub-word k is all zero
  output logic              narrow      // all sub-words above sub-word 0 are zero
);

  always_comb begin
    for (int k = 0; k < int'(NBANKS); k++)
      sub_zero[k] = (result[k*SUBW +: SUBW] == '0);
    narrow = &sub_zero[NBANKS-1:1];
  end

endmodule
