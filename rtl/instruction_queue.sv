// instruction_queue: issue queue of the bit-partitioned register file core.
//
// Holds renamed instructions until both source operands are ready, then
// issues up to W per cycle. A source is identified by its renamed tag (two
// register IDs and an LSBP); its readiness is tracked through the entry
// holding its least significant sub-word, {LSBP, ID in that bank}, which
// is also what each write-back lane broadcasts when a result is written.
//
// Interface:
//   ins_*  - insert up to W instructions per cycle, with the source ready
//            bits read from the state table; wake-up broadcasts in the same
//            cycle are applied to them too. Allowed only while `room` says W
//            slots are free.
//   wk_*   - W wake-up broadcasts of the {bank, ID} just written back.
//   iss_*  - up to W issued instructions, packed from lane 0; they leave the
//            queue at the clock edge.
// Selection picks the lowest-numbered ready slots; an entry inserted in
// cycle t can issue in cycle t+1 at the earliest.
//
// The size of 64 and width of 8 are the 8-issue configuration's integer
// queue and issue width. Slot-order selection is this implementation's
// choice.
module instruction_queue
  import bprf_pkg::*;
#(
  parameter int unsigned SIZE = 64,
  parameter int unsigned W    = 8,
  localparam int unsigned CNT_W = $clog2(SIZE + 1),
  localparam int unsigned SL_W  = $clog2(SIZE)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic        [W-1:0]      ins_valid,
  input  iq_payload_t [W-1:0]      ins_payload,
  input  logic        [W-1:0]      ins_src1_ready,
  input  logic        [W-1:0]      ins_src2_ready,
  output logic                     room,
  output logic [CNT_W-1:0]         count,
  input  logic        [W-1:0]      wk_valid,
  input  logic        [W-1:0]      wk_bank,
  input  preg_t       [W-1:0]      wk_id,
  output logic        [W-1:0]      iss_valid,
  output iq_payload_t [W-1:0]      iss_payload
);

  iq_payload_t pl    [SIZE];
  logic        vld   [SIZE];
  logic        rdy1  [SIZE];
  logic        rdy2  [SIZE];

  logic [W-1:0][SL_W-1:0] free_slot, iss_slot;
  logic [W-1:0]           free_ok;
  logic [CNT_W-1:0]       cnt;

  function automatic logic wakes(rmap_t src, logic [W-1:0] v, logic [W-1:0] bank,
                                 preg_t [W-1:0] id);
    logic hit = 1'b0;
    for (int j = 0; j < int'(W); j++)
      if (v[j] && (src.lsbp == bank[j]) && (lo_id(src) == id[j])) hit = 1'b1;
    return hit;
  endfunction

  always_comb begin
    automatic int nf = 0;
    automatic int ni = 0;
    free_slot = '0;
    free_ok   = '0;
    iss_slot  = '0;
    iss_valid = '0;
    for (int i = 0; i < int'(SIZE); i++) begin
      if (!vld[i] && nf < int'(W)) begin
        free_slot[nf] = SL_W'(i);
        free_ok[nf]   = 1'b1;
        nf++;
      end
      if (vld[i] && rdy1[i] && rdy2[i] && ni < int'(W)) begin
        iss_slot[ni]  = SL_W'(i);
        iss_valid[ni] = 1'b1;
        ni++;
      end
    end
    for (int k = 0; k < int'(W); k++) iss_payload[k] = pl[iss_slot[k]];
  end

  assign room  = &free_ok;
  assign count = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < int'(SIZE); i++) begin
        vld[i]  <= 1'b0;
        rdy1[i] <= 1'b0;
        rdy2[i] <= 1'b0;
        pl[i]   <= '0;
      end
    end else begin
      for (int i = 0; i < int'(SIZE); i++) begin
        if (vld[i] && wakes(pl[i].src1, wk_valid, wk_bank, wk_id)) rdy1[i] <= 1'b1;
        if (vld[i] && wakes(pl[i].src2, wk_valid, wk_bank, wk_id)) rdy2[i] <= 1'b1;
      end
      for (int k = 0; k < int'(W); k++)
        if (iss_valid[k]) vld[iss_slot[k]] <= 1'b0;
      for (int k = 0; k < int'(W); k++)
        if (ins_valid[k] && free_ok[k]) begin
          vld[free_slot[k]]  <= 1'b1;
          pl[free_slot[k]]   <= ins_payload[k];
          rdy1[free_slot[k]] <= ins_src1_ready[k] ||
                                wakes(ins_payload[k].src1, wk_valid, wk_bank, wk_id);
          rdy2[free_slot[k]] <= ins_src2_ready[k] ||
                                wakes(ins_payload[k].src2, wk_valid, wk_bank, wk_id);
        end
      cnt <= cnt + CNT_W'($countones(ins_valid & free_ok)) - CNT_W'($countones(iss_valid));
    end
  end

  a_ins_room: assert property (@(posedge clk) disable iff (!rst_n) |ins_valid |-> room);

endmodule
