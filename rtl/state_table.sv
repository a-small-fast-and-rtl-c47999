// state_table: per-entry state of the bit-partitioned register file.
//
// One record per physical entry of each bank, addressed by {bank, ID} of the
// entry that holds a value's least significant sub-word:
//   ready       - the value has been written back (the valid/ready bit
//                 that the instruction queue reads at dispatch);
//   upper_valid - the value still owns an upper entry in the other bank.
// The 0-detect logic clears upper_valid when it finds a narrow result; this
// is how the upper register ID is invalidated after early deallocation.
// Readers of the value then take zero for the upper sub-word, and commit
// does not release the upper entry a second time.
//
// Interface: NRD asynchronous read ports; NWR synchronous write ports. The
// core uses the first half for rename (allocate: ready=0, upper_valid=1)
// and the second half for write back. They never address the same record
// in one cycle; the higher-numbered port wins if they do. Reset marks the first INIT_READY entries of bank 0 as ready with
// no upper entry (the zero-valued initial registers) and all others idle.
//
// Keeping upper_valid with the low entry is this implementation's reading
// of "invalidating ID in state-table".
module state_table
  import bprf_pkg::*;
#(
  parameter int unsigned ENTRIES    = 80,
  parameter int unsigned INIT_READY = 32,
  parameter int unsigned NRD        = 41,
  parameter int unsigned NWR        = 16,
  localparam int unsigned ID_W      = $clog2(ENTRIES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic  [NRD-1:0]       rd_bank,
  input  preg_t [NRD-1:0]       rd_id,
  output logic  [NRD-1:0]       rd_ready,
  output logic  [NRD-1:0]       rd_upper_valid,
  input  logic  [NWR-1:0]       wr_en,
  input  logic  [NWR-1:0]       wr_bank,
  input  preg_t [NWR-1:0]       wr_id,
  input  logic  [NWR-1:0]       wr_ready,
  input  logic  [NWR-1:0]       wr_upper_valid
);

  logic ready_q [NBANKS][ENTRIES];
  logic upper_q [NBANKS][ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(NBANKS); b++)
        for (int i = 0; i < int'(ENTRIES); i++) begin
          ready_q[b][i] <= (b == 0) && (i < int'(INIT_READY));
          upper_q[b][i] <= 1'b0;
        end
    end else begin
      for (int p = 0; p < int'(NWR); p++)
        if (wr_en[p]) begin
          ready_q[wr_bank[p]][ID_W'(wr_id[p])] <= wr_ready[p];
          upper_q[wr_bank[p]][ID_W'(wr_id[p])] <= wr_upper_valid[p];
        end
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NRD); p++) begin
      if (int'(rd_id[p]) < int'(ENTRIES)) begin
        rd_ready[p]       = ready_q[rd_bank[p]][ID_W'(rd_id[p])];
        rd_upper_valid[p] = upper_q[rd_bank[p]][ID_W'(rd_id[p])];
      end else begin
        rd_ready[p]       = 1'b0;
        rd_upper_valid[p] = 1'b0;
      end
    end
  end

  for (genvar p = 0; p < int'(NWR); p++) begin : g_chk
    a_wr_range: assert property (@(posedge clk) disable iff (!rst_n)
      wr_en[p] |-> int'(wr_id[p]) < int'(ENTRIES));
  end

endmodule
