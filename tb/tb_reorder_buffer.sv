// tb_reorder_buffer: checks a 12-entry, 3-wide reorder buffer against a
// queue model. Groups of 0..3 instructions are allocated whenever there is
// room, up to 3 finish (done) per cycle in random order, and they must
// retire strictly in allocation order: each cycle the commit lanes must
// show exactly the run of done entries at the head (at most 3). The head
// entries, the room flag and the count are compared every cycle, and the
// allocated indices must continue from the previous ones modulo the size.
module tb_reorder_buffer;
  import bprf_pkg::*;
  localparam int S = 12, W = 3;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                        rst_n, room;
  logic       [W-1:0]          alloc_en, done_en, commit_valid;
  rob_entry_t [W-1:0]          alloc_entry, commit_entry;
  logic [W-1:0][7:0]           alloc_idx, done_idx;
  logic [3:0]                  count;

  typedef struct { rob_entry_t e; int idx; bit done; } mrec_t;
  mrec_t model [$];
  int    next_idx, commits, seen_full, seen_multi;

  reorder_buffer #(.SIZE(S), .W(W)) u_dut (
    .clk, .rst_n, .alloc_en, .alloc_entry, .alloc_idx, .room, .done_en, .done_idx,
    .commit_valid, .commit_entry, .count);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; alloc_en = '0; done_en = '0; alloc_entry = '0; done_idx = '0;
    next_idx = 0; commits = 0; seen_full = 0; seen_multi = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      int cand [$];
      int run, na;
      @(negedge clk);
      cand.delete();
      run = 0;
      while (run < W && run < model.size() && model[run].done) run++;
      chk(int'(count) == model.size(), $sformatf("count %0d expected %0d", count, model.size()));
      chk(room == (model.size() + W <= S), "room flag");
      for (int l = 0; l < W; l++) begin
        chk(commit_valid[l] == (l < run), $sformatf("commit_valid[%0d]", l));
        if (l < run) chk(commit_entry[l] == model[l].e, "commit entry contents");
      end
      if (model.size() + W > S) seen_full++;
      if (run > 1) seen_multi++;
      na = room ? $urandom_range(0, W) : 0;
      alloc_en = '0;
      for (int l = 0; l < W; l++) begin
        alloc_en[l]    = (l < na);
        alloc_entry[l] = '{rd: 5'($urandom), new_map: rmap_t'($urandom),
                           old_map: rmap_t'($urandom)};
        if (l < na) chk(int'(alloc_idx[l]) == (next_idx + l) % S, "allocation index in order");
      end
      foreach (model[i]) if (!model[i].done) cand.push_back(i);
      cand.shuffle();
      done_en = '0;
      for (int l = 0; l < W; l++)
        if (l < cand.size() && $urandom_range(0, 1) == 0) begin
          done_en[l]  = 1'b1;
          done_idx[l] = 8'(model[cand[l]].idx);
          model[cand[l]].done = 1'b1;     // seen by commit from the next cycle
        end
      @(posedge clk);
      for (int l = 0; l < run; l++) begin
        void'(model.pop_front());
        commits++;
      end
      for (int l = 0; l < na; l++) begin
        model.push_back('{e: alloc_entry[l], idx: next_idx, done: 1'b0});
        next_idx = (next_idx + 1) % S;
      end
    end
    chk(commits > 1000 && seen_full > 0 && seen_multi > 0,
        $sformatf("%0d commits, full seen %0d, multi-commit seen %0d", commits, seen_full,
                  seen_multi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
