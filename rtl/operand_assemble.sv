// operand_assemble: builds a 64-bit operand from the two register banks.
//
// Each bank is read with its own register ID. The LSBP says which bank holds
// the least significant sub-word: with LSBP = 0 the bank-0 word is the low
// half, with LSBP = 1 the two words are swapped. When the value owns no
// upper entry (it was found narrow and its upper entry released), the upper
// half is zero and the other bank's word is ignored.
//
// Purely combinational. The swap by LSBP follows the design; zero-filling
// an invalid upper sub-word follows its all-zero detection.
module operand_assemble
  import bprf_pkg::*;
(
  input  logic             lsbp,
  input  logic             upper_valid,
  input  logic [SUBW-1:0]  bank0_data,
  input  logic [SUBW-1:0]  bank1_data,
  output logic [XLEN-1:0]  operand
);

  logic [SUBW-1:0] lo, hi;

  always_comb begin
    lo      = lsbp ? bank1_data : bank0_data;
    hi      = upper_valid ? (lsbp ? bank0_data : bank1_data) : '0;
    operand = {hi, lo};
  end

endmodule
