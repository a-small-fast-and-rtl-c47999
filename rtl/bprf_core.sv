// bprf_core: out-of-order integer back end built around a 2-partitioned,
// bit-partitioned register file (BPRF).
//
// Main idea: most 64-bit operands have an all-zero upper half. The register
// file is split into two 32-bit banks, each with its own free-pool, so a
// narrow value occupies one 32-bit entry and a wide value two. Rename gives
// every destination one entry in each bank plus a Least Significant Bank
// Pointer (LSBP) naming the bank for the low sub-word. When the ALU result
// reaches write back, the 0-detect logic checks its upper half; if it is
// zero, only the low entry is written and the upper entry is released at
// once (early register deallocation, ERD) and marked invalid in the state
// table. All other entries are released in the usual way, when a later
// writer of the same architectural register commits.
//
// Pipeline, WIDTH instructions per stage per cycle:
//   rename   : read the source mappings and their ready bits (a source
//              written by an earlier instruction of the same group takes
//              that instruction's new mapping and is not ready), take one
//              ID from each free-pool per instruction, choose the LSBP,
//              write the map table, the reorder buffer and the queue.
//   issue    : the queue selects up to WIDTH instructions with ready sources.
//   reg read : each bank is read with its own ID; the sub-words are swapped
//              by LSBP and the upper half is zero if it was released.
//   execute  : WIDTH 64-bit ALUs.
//   writeback: per lane, 0-detect; write the low sub-word into the LSBP bank
//              and, for a wide result, the upper sub-word into the other
//              bank; set the ready bit, wake dependents, mark the ROB entry
//              done; release the upper entry of a narrow result.
//   commit   : in order, up to WIDTH per cycle; release replaced mappings.
// A lone instruction commits 5 cycles after it is accepted. A dependent
// instruction can issue the cycle after its producer's write back (there is
// no bypass network), so a dependency chain advances every 4 cycles.
//
// Interface: in_valid[k]/in_instr[k] offer a group of up to WIDTH decoded
// instructions, lanes 0..n-1 in program order (lane 0 oldest, no gaps). The
// whole group is accepted in a cycle with in_ready high; in_ready needs
// WIDTH free entries in each free-pool and WIDTH free queue and ROB slots.
// The fetch/decode front end is outside this block. commit_valid/commit_rd
// report retirement, lane 0 oldest. dbg_areg/dbg_data read an architectural
// register through the map table on an extra read port of each bank (valid
// once the pipeline is idle); events pulses one bit per mechanism.
//
// From the design: two 32-bit banks with separate ID and data paths, two
// free-pools, twofold IDs in map table, ROB and queue, the LSBP, 0-detect on
// ALU results, ERD with invalidation in the state table, 80 entries per bank,
// and the 8-issue configuration's width 8, queue 64 and ROB 192. This
// implementation's own choices: rename, issue and commit all WIDTH wide with
// one ALU per lane; the LSBP rule (the bank with more free entries takes the
// low sub-word; on a tie, even lanes bank 0 and odd lanes bank 1); the reset
// mapping (all registers zero, in bank 0); the ALU operations.
module bprf_core
  import bprf_pkg::*;
#(
  parameter int unsigned WIDTH    = 8,    // rename / issue / commit width
  parameter int unsigned ENTRIES  = 80,   // entries per bank
  parameter int unsigned IQ_SIZE  = 64,
  parameter int unsigned ROB_SIZE = 192,
  localparam int unsigned ID_W    = $clog2(ENTRIES),
  localparam int unsigned CNT_W   = $clog2(ENTRIES + 1),
  localparam int unsigned W       = WIDTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [W-1:0]               in_valid,
  output logic                       in_ready,
  input  instr_t [W-1:0]             in_instr,
  output logic [W-1:0]               commit_valid,
  output logic [W-1:0][AREG_W-1:0]   commit_rd,
  input  logic [AREG_W-1:0]          dbg_areg,
  output logic [XLEN-1:0]            dbg_data,
  output logic [CNT_W-1:0]           free0_count,
  output logic [CNT_W-1:0]           free1_count,
  output core_events_t               events
);

  localparam int unsigned AN_W = $clog2(W + 1);
  // map-table read ports: 3 per lane (rs1, rs2, old rd) + debug
  localparam int unsigned MT_DBG = 3 * W;
  // state-table read ports: 2 per lane at rename, 2 per lane at register
  // read, 1 per lane at commit, + debug
  localparam int unsigned ST_RR = 2 * W, ST_CM = 4 * W, ST_DBG = 5 * W;
  // bank read ports: 2 per lane + debug
  localparam int unsigned BK_DBG = 2 * W;

  // ---------------------------------------------------------------- signals
  logic [AN_W-1:0]                     n_ren;
  logic [NBANKS-1:0][W-1:0][ID_W-1:0]  pool_id;
  logic [NBANKS-1:0]                   pool_empty;
  logic [NBANKS-1:0][CNT_W-1:0]        pool_cnt;
  logic [NBANKS-1:0][2*W-1:0]          pool_rel_en;
  logic [NBANKS-1:0][2*W-1:0][ID_W-1:0] pool_rel_id;

  logic [3*W:0][AREG_W-1:0]   mt_areg;
  rmap_t [3*W:0]              mt_map;
  rmap_t [W-1:0]              new_map, src1_map, src2_map, old_map;
  logic  [W-1:0]              src1_grp, src2_grp, lsbp_new, do_ren;
  logic  [W-1:0][AREG_W-1:0]  ren_rd;

  logic  [5*W:0]              st_rd_bank;
  preg_t [5*W:0]              st_rd_id;
  logic  [5*W:0]              st_ready, st_upper;
  logic  [2*W-1:0]            st_wr_en, st_wr_bank, st_wr_ready, st_wr_upper;
  preg_t [2*W-1:0]            st_wr_id;

  logic [W-1:0][ROB_IDX_W-1:0] rob_idx;
  logic                       rob_room;
  rob_entry_t [W-1:0]         rob_alloc, rob_commit;

  logic                       iq_room;
  logic [W-1:0]               iss_valid;
  iq_payload_t [W-1:0]        iss_payload, ins_payload;
  logic [W-1:0]               ins_r1, ins_r2;

  logic [W-1:0]               rr_valid, ex_valid, wb_valid;
  iq_payload_t [W-1:0]        rr_q, ex_q;
  logic [W-1:0][XLEN-1:0]     ex_a, ex_b, wb_result, opnd1, opnd2, alu_y;
  rmap_t [W-1:0]              wb_dst;
  logic [W-1:0][ROB_IDX_W-1:0] wb_rob;
  logic [W-1:0][NBANKS-1:0]   wb_sub_zero;
  logic [W-1:0]               wb_narrow;

  logic [NBANKS-1:0][2*W:0][ID_W-1:0] bk_rd_id;
  logic [NBANKS-1:0][2*W:0][SUBW-1:0] bk_rd_data;
  logic [NBANKS-1:0][W-1:0]            bk_wr_en;
  logic [NBANKS-1:0][W-1:0][ID_W-1:0]  bk_wr_id;
  logic [NBANKS-1:0][W-1:0][SUBW-1:0]  bk_wr_data;

  // ---------------------------------------------------------------- rename
  assign in_ready = (int'(pool_cnt[0]) >= int'(W)) && (int'(pool_cnt[1]) >= int'(W)) &&
                    iq_room && rob_room;
  assign do_ren   = in_ready ? in_valid : '0;
  assign n_ren    = AN_W'($countones(do_ren));

  always_comb begin
    for (int k = 0; k < int'(W); k++) begin
      mt_areg[3*k]     = in_instr[k].rs1;
      mt_areg[3*k + 1] = in_instr[k].rs2;
      mt_areg[3*k + 2] = in_instr[k].rd;
      ren_rd[k]        = in_instr[k].rd;
    end
    mt_areg[MT_DBG] = dbg_areg;

    for (int k = 0; k < int'(W); k++) begin
      // lanes are contiguous, so lane k takes the k-th free ID of each pool
      if (pool_cnt[1] != pool_cnt[0]) lsbp_new[k] = (pool_cnt[1] > pool_cnt[0]);
      else                            lsbp_new[k] = 1'(k % 2);
      new_map[k].id0  = preg_t'(pool_id[0][k]);
      new_map[k].id1  = preg_t'(pool_id[1][k]);
      new_map[k].lsbp = lsbp_new[k];
    end

    // mappings seen by each lane: the map table, overridden by the newest
    // earlier lane of the same group that writes the register
    for (int k = 0; k < int'(W); k++) begin
      src1_map[k] = mt_map[3*k];
      src2_map[k] = mt_map[3*k + 1];
      old_map[k]  = mt_map[3*k + 2];
      src1_grp[k] = 1'b0;
      src2_grp[k] = 1'b0;
      for (int j = 0; j < k; j++) begin
        if (in_valid[j] && in_instr[j].rd == in_instr[k].rs1) begin
          src1_map[k] = new_map[j];
          src1_grp[k] = 1'b1;
        end
        if (in_valid[j] && in_instr[j].rd == in_instr[k].rs2) begin
          src2_map[k] = new_map[j];
          src2_grp[k] = 1'b1;
        end
        if (in_valid[j] && in_instr[j].rd == in_instr[k].rd)
          old_map[k] = new_map[j];
      end
    end
  end

  map_table #(.NRD(3 * W + 1), .NWR(W)) u_map (
    .clk, .rst_n,
    .rd_areg (mt_areg),
    .rd_map  (mt_map),
    .wr_en   (do_ren),
    .wr_areg (ren_rd),
    .wr_map  (new_map)
  );

  for (genvar b = 0; b < int'(NBANKS); b++) begin : g_pool
    free_pool #(
      .ENTRIES   (ENTRIES),
      .INIT_FIRST(b == 0 ? NAREGS : 0),
      .NALLOC    (W),
      .NREL      (2 * W)
    ) u_pool (
      .clk, .rst_n,
      .alloc_n  (n_ren),
      .alloc_id (pool_id[b]),
      .empty    (pool_empty[b]),
      .count    (pool_cnt[b]),
      .rel_en   (pool_rel_en[b]),
      .rel_id   (pool_rel_id[b])
    );
  end

  assign free0_count = pool_cnt[0];
  assign free1_count = pool_cnt[1];

  // ---------------------------------------------------------------- state table
  always_comb begin
    for (int k = 0; k < int'(W); k++) begin
      st_rd_bank[2*k]         = src1_map[k].lsbp;     st_rd_id[2*k]         = lo_id(src1_map[k]);
      st_rd_bank[2*k + 1]     = src2_map[k].lsbp;     st_rd_id[2*k + 1]     = lo_id(src2_map[k]);
      st_rd_bank[ST_RR + 2*k]     = rr_q[k].src1.lsbp; st_rd_id[ST_RR + 2*k]     = lo_id(rr_q[k].src1);
      st_rd_bank[ST_RR + 2*k + 1] = rr_q[k].src2.lsbp; st_rd_id[ST_RR + 2*k + 1] = lo_id(rr_q[k].src2);
      st_rd_bank[ST_CM + k]   = rob_commit[k].old_map.lsbp;
      st_rd_id[ST_CM + k]     = lo_id(rob_commit[k].old_map);
      // rename allocates the low entry of each new mapping
      st_wr_en[k]        = do_ren[k];
      st_wr_bank[k]      = lsbp_new[k];
      st_wr_id[k]        = lo_id(new_map[k]);
      st_wr_ready[k]     = 1'b0;
      st_wr_upper[k]     = 1'b1;
      // write back: ready, and the 0-detect verdict
      st_wr_en[W + k]    = wb_valid[k];
      st_wr_bank[W + k]  = wb_dst[k].lsbp;
      st_wr_id[W + k]    = lo_id(wb_dst[k]);
      st_wr_ready[W + k] = 1'b1;
      st_wr_upper[W + k] = !wb_narrow[k];
    end
    st_rd_bank[ST_DBG] = mt_map[MT_DBG].lsbp;
    st_rd_id[ST_DBG]   = lo_id(mt_map[MT_DBG]);
  end

  state_table #(
    .ENTRIES   (ENTRIES),
    .INIT_READY(NAREGS),
    .NRD       (5 * W + 1),
    .NWR       (2 * W)
  ) u_state (
    .clk, .rst_n,
    .rd_bank        (st_rd_bank),
    .rd_id          (st_rd_id),
    .rd_ready       (st_ready),
    .rd_upper_valid (st_upper),
    .wr_en          (st_wr_en),
    .wr_bank        (st_wr_bank),
    .wr_id          (st_wr_id),
    .wr_ready       (st_wr_ready),
    .wr_upper_valid (st_wr_upper)
  );

  // ---------------------------------------------------------------- ROB
  always_comb begin
    for (int k = 0; k < int'(W); k++) begin
      rob_alloc[k].rd      = in_instr[k].rd;
      rob_alloc[k].new_map = new_map[k];
      rob_alloc[k].old_map = old_map[k];
      commit_rd[k]         = rob_commit[k].rd;
      ins_payload[k].op    = in_instr[k].op;
      ins_payload[k].imm   = in_instr[k].imm;
      ins_payload[k].src1  = src1_map[k];
      ins_payload[k].src2  = src2_map[k];
      ins_payload[k].dst   = new_map[k];
      ins_payload[k].rob   = rob_idx[k];
      ins_r1[k]            = !src1_grp[k] && st_ready[2*k];
      ins_r2[k]            = !uses_rs2(in_instr[k].op) || (!src2_grp[k] && st_ready[2*k + 1]);
    end
  end

  reorder_buffer #(.SIZE(ROB_SIZE), .W(W)) u_rob (
    .clk, .rst_n,
    .alloc_en     (do_ren),
    .alloc_entry  (rob_alloc),
    .alloc_idx    (rob_idx),
    .room         (rob_room),
    .done_en      (wb_valid),
    .done_idx     (wb_rob),
    .commit_valid (commit_valid),
    .commit_entry (rob_commit),
    .count        ()
  );

  // ---------------------------------------------------------------- queue
  instruction_queue #(.SIZE(IQ_SIZE), .W(W)) u_iq (
    .clk, .rst_n,
    .ins_valid      (do_ren),
    .ins_payload    (ins_payload),
    .ins_src1_ready (ins_r1),
    .ins_src2_ready (ins_r2),
    .room           (iq_room),
    .count          (),
    .wk_valid       (wb_valid),
    .wk_bank        (st_wr_bank[2*W-1:W]),
    .wk_id          (st_wr_id[2*W-1:W]),
    .iss_valid      (iss_valid),
    .iss_payload    (iss_payload)
  );

  // ---------------------------------------------------------------- register read
  always_comb begin
    for (int b = 0; b < int'(NBANKS); b++) begin
      for (int k = 0; k < int'(W); k++) begin
        bk_rd_id[b][2*k]     = ID_W'(b == 0 ? rr_q[k].src1.id0 : rr_q[k].src1.id1);
        bk_rd_id[b][2*k + 1] = ID_W'(b == 0 ? rr_q[k].src2.id0 : rr_q[k].src2.id1);
      end
      bk_rd_id[b][BK_DBG] = ID_W'(b == 0 ? mt_map[MT_DBG].id0 : mt_map[MT_DBG].id1);
    end
  end

  for (genvar k = 0; k < int'(W); k++) begin : g_lane
    operand_assemble u_asm1 (
      .lsbp (rr_q[k].src1.lsbp), .upper_valid (st_upper[ST_RR + 2*k]),
      .bank0_data (bk_rd_data[0][2*k]), .bank1_data (bk_rd_data[1][2*k]),
      .operand (opnd1[k])
    );
    operand_assemble u_asm2 (
      .lsbp (rr_q[k].src2.lsbp), .upper_valid (st_upper[ST_RR + 2*k + 1]),
      .bank0_data (bk_rd_data[0][2*k + 1]), .bank1_data (bk_rd_data[1][2*k + 1]),
      .operand (opnd2[k])
    );
    alu u_alu (
      .op  (ex_q[k].op),
      .a   (ex_a[k]),
      .b   (ex_b[k]),
      .imm (ex_q[k].imm),
      .y   (alu_y[k])
    );
    zero_detect #(.XLEN(XLEN), .NBANKS(NBANKS)) u_zd (
      .result   (wb_result[k]),
      .sub_zero (wb_sub_zero[k]),
      .narrow   (wb_narrow[k])
    );
  end

  operand_assemble u_asm_dbg (
    .lsbp (mt_map[MT_DBG].lsbp), .upper_valid (st_upper[ST_DBG]),
    .bank0_data (bk_rd_data[0][BK_DBG]), .bank1_data (bk_rd_data[1][BK_DBG]),
    .operand (dbg_data)
  );

  // ---------------------------------------------------------------- write back
  always_comb begin
    for (int b = 0; b < int'(NBANKS); b++) begin
      for (int k = 0; k < int'(W); k++) begin
        // the LSBP bank takes the low sub-word, the other bank the upper one
        bk_wr_id[b][k]   = ID_W'(b == 0 ? wb_dst[k].id0 : wb_dst[k].id1);
        bk_wr_data[b][k] = (wb_dst[k].lsbp == 1'(b)) ? wb_result[k][SUBW-1:0]
                                                      : wb_result[k][XLEN-1:SUBW];
        bk_wr_en[b][k]   = wb_valid[k] && ((wb_dst[k].lsbp == 1'(b)) || !wb_narrow[k]);
      end
    end
  end

  for (genvar b = 0; b < int'(NBANKS); b++) begin : g_bank
    register_bank #(
      .ENTRIES (ENTRIES),
      .WIDTH   (SUBW),
      .NRD     (2 * W + 1),
      .NWR     (W)
    ) u_bank (
      .clk, .rst_n,
      .rd_id   (bk_rd_id[b]),
      .rd_data (bk_rd_data[b]),
      .wr_en   (bk_wr_en[b]),
      .wr_id   (bk_wr_id[b]),
      .wr_data (bk_wr_data[b])
    );
  end

  // ---------------------------------------------------------------- releases
  // ports 0..W-1: commit lanes (old low entry to its bank, old upper entry to
  // the other bank if it was not released early); ports W..2W-1: early
  // deallocation by the write-back lanes.
  always_comb begin
    for (int b = 0; b < int'(NBANKS); b++) begin
      for (int k = 0; k < int'(W); k++) begin
        pool_rel_en[b][k]     = commit_valid[k] &&
                                ((rob_commit[k].old_map.lsbp == 1'(b)) || st_upper[ST_CM + k]);
        pool_rel_id[b][k]     = ID_W'(b == 0 ? rob_commit[k].old_map.id0
                                             : rob_commit[k].old_map.id1);
        pool_rel_en[b][W + k] = wb_valid[k] && wb_narrow[k] && (wb_dst[k].lsbp != 1'(b));
        pool_rel_id[b][W + k] = ID_W'(b == 0 ? wb_dst[k].id0 : wb_dst[k].id1);
      end
    end
  end

  // ---------------------------------------------------------------- pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_valid  <= '0;
      rr_q      <= '0;
      ex_valid  <= '0;
      ex_q      <= '0;
      ex_a      <= '0;
      ex_b      <= '0;
      wb_valid  <= '0;
      wb_dst    <= '0;
      wb_rob    <= '0;
      wb_result <= '0;
    end else begin
      rr_valid  <= iss_valid;
      rr_q      <= iss_payload;
      ex_valid  <= rr_valid;
      ex_q      <= rr_q;
      ex_a      <= opnd1;
      ex_b      <= opnd2;
      wb_valid  <= ex_valid;
      for (int k = 0; k < int'(W); k++) begin
        wb_dst[k] <= ex_q[k].dst;
        wb_rob[k] <= ex_q[k].rob;
      end
      wb_result <= alu_y;
    end
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    events              = '0;
    events.rename       = |do_ren;
    events.stall_pool   = |in_valid && (int'(pool_cnt[0]) < int'(W) || int'(pool_cnt[1]) < int'(W));
    events.stall_iq     = |in_valid && !iq_room;
    events.stall_rob    = |in_valid && !rob_room;
    events.lsbp1        = |(do_ren & lsbp_new);
    events.group_dep    = |(do_ren & (src1_grp | src2_grp));
    events.issue        = |iss_valid;
    events.multi_issue  = $countones(iss_valid) > 1;
    events.writeback    = |wb_valid;
    events.erd          = |(wb_valid & wb_narrow);
    events.commit       = |commit_valid;
    for (int k = 0; k < int'(W); k++) begin
      if (rr_valid[k] && (rr_q[k].src1.lsbp || (uses_rs2(rr_q[k].op) && rr_q[k].src2.lsbp)))
        events.swapped_read = 1'b1;
      if (rr_valid[k] && (!st_upper[ST_RR + 2*k] ||
                          (uses_rs2(rr_q[k].op) && !st_upper[ST_RR + 2*k + 1])))
        events.narrow_read = 1'b1;
      if (commit_valid[k] && st_upper[ST_CM + k]) events.commit_free2 = 1'b1;
    end
  end

  for (genvar k = 0; k < int'(W); k++) begin : g_chk
    a_iss_ready: assert property (@(posedge clk) disable iff (!rst_n)
      rr_valid[k] |-> st_ready[ST_RR + 2*k] &&
                      (st_ready[ST_RR + 2*k + 1] || !uses_rs2(rr_q[k].op)));
  end
  a_contig: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_valid + 1'b1));

endmodule
