// reorder_buffer: in-order retirement of renamed instructions.
//
// Each entry keeps the destination register, the mapping the instruction
// created and the mapping it replaced, each with two register IDs and an
// LSBP (the twofold register-ID field of the bit-partitioned design).
// Up to W entries are allocated per cycle at rename in program order, up to
// W are marked done per cycle at write back, and up to W retire per cycle
// from the head: the longest run of done entries starting at the head.
// Retiring hands each old mapping to the core, which returns its entries to
// the free-pools (the usual, commit-time deallocation).
//
// Interface: alloc_en[k] for lanes 0..n-1 (contiguous from lane 0) writes
// alloc_entry[k] at tail+k, whose index is alloc_idx[k] (valid in the same
// cycle). `room` says W more entries fit. done_en/done_idx set done flags.
// commit_valid[k]/commit_entry[k] show the retiring entries, oldest in lane
// 0; they are removed at the clock edge of that cycle.
//
// SIZE 192 and width 8 are the 8-issue configuration's reorder buffer and
// commit width.
module reorder_buffer
  import bprf_pkg::*;
#(
  parameter int unsigned SIZE = 192,
  parameter int unsigned W    = 8,
  localparam int unsigned CNT_W = $clog2(SIZE + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic       [W-1:0]          alloc_en,
  input  rob_entry_t [W-1:0]          alloc_entry,
  output logic [W-1:0][ROB_IDX_W-1:0] alloc_idx,
  output logic                        room,
  input  logic       [W-1:0]          done_en,
  input  logic [W-1:0][ROB_IDX_W-1:0] done_idx,
  output logic       [W-1:0]          commit_valid,
  output rob_entry_t [W-1:0]          commit_entry,
  output logic [CNT_W-1:0]            count
);

  rob_entry_t              ent  [SIZE];
  logic                    done [SIZE];
  logic [ROB_IDX_W-1:0]    head, tail;
  logic [CNT_W-1:0]        cnt;
  int unsigned             n_alloc, n_commit;

  function automatic logic [ROB_IDX_W-1:0] wrap_add(logic [ROB_IDX_W-1:0] p, int unsigned n);
    int unsigned s;
    s = int'(p) + n;
    if (s >= SIZE) s = s - SIZE;
    return ROB_IDX_W'(s);
  endfunction

  assign room  = (int'(cnt) + int'(W) <= int'(SIZE));
  assign count = cnt;

  always_comb begin
    automatic logic run = 1'b1;
    n_alloc  = 0;
    n_commit = 0;
    for (int k = 0; k < int'(W); k++) begin
      alloc_idx[k]    = wrap_add(tail, k);
      if (alloc_en[k]) n_alloc++;
      commit_entry[k] = ent[wrap_add(head, k)];
      run             = run && (k < int'(cnt)) && done[wrap_add(head, k)];
      commit_valid[k] = run;
      if (run) n_commit++;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
      for (int i = 0; i < int'(SIZE); i++) begin
        done[i] <= 1'b0;
        ent[i]  <= '0;
      end
    end else begin
      for (int k = 0; k < int'(W); k++) begin
        if (alloc_en[k]) begin
          ent[alloc_idx[k]]  <= alloc_entry[k];
          done[alloc_idx[k]] <= 1'b0;
        end
        if (done_en[k]) done[done_idx[k]] <= 1'b1;
      end
      tail <= wrap_add(tail, n_alloc);
      head <= wrap_add(head, n_commit);
      cnt  <= cnt + CNT_W'(n_alloc) - CNT_W'(n_commit);
    end
  end

  a_alloc_room:   assert property (@(posedge clk) disable iff (!rst_n) |alloc_en |-> room);
  a_alloc_contig: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(alloc_en + 1'b1));
  a_size_fits:    assert property (@(posedge clk) int'(SIZE) <= (1 << ROB_IDX_W));

endmodule
