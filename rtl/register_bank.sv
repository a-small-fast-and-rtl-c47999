// register_bank: one sub-word bank of the bit-partitioned register file.
//
// Holds ENTRIES words of WIDTH bits (one 32-bit sub-word of a 64-bit
// register per entry). The 2-partitioned register file is two of these
// banks side by side, each with its own register-ID and data paths.
//
// Interface: NRD asynchronous read ports (rd_id -> rd_data in the same
// cycle) and NWR synchronous write ports (written at the rising clock edge
// when wr_en is set; a later port wins on equal IDs). Reset clears every
// entry so that the initial architectural registers read as zero.
//
// The bank split, 80 entries and 32-bit width follow the design. The port
// counts follow its block diagram (two operand reads and one write per ALU)
// for the 8-wide core: 16 operand reads plus one observation read, and 8
// writes. The reset is this implementation's choice.
module register_bank #(
  parameter int unsigned ENTRIES = 80,
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned NRD     = 17,
  parameter int unsigned NWR     = 8,
  localparam int unsigned ID_W   = $clog2(ENTRIES)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NRD-1:0][ID_W-1:0]    rd_id,
  output logic [NRD-1:0][WIDTH-1:0]   rd_data,
  input  logic [NWR-1:0]              wr_en,
  input  logic [NWR-1:0][ID_W-1:0]    wr_id,
  input  logic [NWR-1:0][WIDTH-1:0]   wr_data
);

  logic [WIDTH-1:0] mem [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) mem[i] <= '0;
    end else begin
      for (int p = 0; p < int'(NWR); p++)
        if (wr_en[p]) mem[wr_id[p]] <= wr_data[p];
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NRD); p++)
      rd_data[p] = (int'(rd_id[p]) < int'(ENTRIES)) ? mem[rd_id[p]] : '0;
  end

  for (genvar p = 0; p < int'(NWR); p++) begin : g_chk
    a_wr_id_range: assert property (@(posedge clk) disable iff (!rst_n)
      wr_en[p] |-> int'(wr_id[p]) < int'(ENTRIES));
  end

endmodule
