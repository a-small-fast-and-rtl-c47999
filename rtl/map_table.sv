// map_table: register map table of the bit-partitioned register file core.
//
// Maps each architectural register to its renamed operand tag: two physical
// register IDs, one in each bank (PRegID0, PRegID1), and the Least
// Significant Bank Pointer (LSBP) saying which bank holds the low sub-word.
// Compared with a conventional map table the register-ID field is twofold.
//
// Interface: NRD asynchronous read ports; NWR synchronous write ports that
// update at the rising clock edge, a higher-numbered port winning when two
// name the same register (later instruction of a rename group). Reset maps
// register i to entry i of bank 0 with LSBP = 0; its bank-1 ID is a
// placeholder, because the initial values are zero and have no upper entry.
//
// The field layout follows the design; the reset mapping and the port
// counts (three reads and one write per renamed instruction, plus an
// observation read) are this implementation's choice.
module map_table
  import bprf_pkg::*;
#(
  parameter int unsigned NRD = 25,
  parameter int unsigned NWR = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NRD-1:0][AREG_W-1:0] rd_areg,
  output rmap_t [NRD-1:0]            rd_map,
  input  logic [NWR-1:0]             wr_en,
  input  logic [NWR-1:0][AREG_W-1:0] wr_areg,
  input  rmap_t [NWR-1:0]            wr_map
);

  rmap_t map [NAREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NAREGS); i++)
        map[i] <= '{id1: '0, id0: preg_t'(i), lsbp: 1'b0};
    end else begin
      for (int p = 0; p < int'(NWR); p++)
        if (wr_en[p]) map[wr_areg[p]] <= wr_map[p];
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NRD); p++) rd_map[p] = map[rd_areg[p]];
  end

endmodule
