// tb_free_pool: checks a bank-0 style free-pool (80 entries, 32 held by the
// initial registers, 4 allocations and 4 releases per cycle) against a
// queue model. After reset the pool must hold IDs 32..79 in order. Random
// cycles then allocate 0..4 IDs and release through all release ports (only
// IDs currently allocated are released, as in the core),
// including phases that drain the pool to empty and refill it to full. The
// head ID, count and empty flag are compared every cycle.
module tb_free_pool;
  localparam int E = 80, F = 32, NA = 4, NR = 4;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst_n, empty;
  logic [2:0]       alloc_n;
  logic [NA-1:0][6:0] alloc_id;
  logic [6:0]       count;
  logic [NR-1:0]    rel_en;
  logic [NR-1:0][6:0] rel_id;

  int seen_empty = 0, seen_full = 0;
  int unsigned model [$];
  int unsigned taken [$];

  free_pool #(.ENTRIES(E), .INIT_FIRST(F), .NALLOC(NA), .NREL(NR)) u_dut (
    .clk, .rst_n, .alloc_n, .alloc_id, .empty, .count, .rel_en, .rel_id);

  task automatic compare();
    checks++;
    if (int'(count) != model.size() || empty != (model.size() == 0)) begin
      failures++;
      $display("FAIL: count %0d/%0d empty %b", count, model.size(), empty);
    end
    for (int k = 0; k < NA && k < model.size(); k++) begin
      checks++;
      if (int'(alloc_id[k]) != model[k]) begin
        failures++;
        $display("FAIL: alloc_id[%0d] %0d expected %0d", k, alloc_id[k], model[k]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; alloc_n = '0; rel_en = '0; rel_id = '0;
    for (int i = F; i < E; i++) model.push_back(i);
    for (int i = 0; i < F; i++) taken.push_back(i);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      int bias;
      @(negedge clk);
      compare();
      bias = (k / 500) % 2;   // alternate drain-heavy and refill-heavy phases
      alloc_n = 3'($urandom_range(0, bias ? 1 : NA));
      if (int'(alloc_n) > model.size()) alloc_n = 3'(model.size());
      rel_en = '0;
      for (int p = 0; p < NR; p++) begin
        if (taken.size() > 0 && $urandom_range(0, 3) < (bias ? 3 : 1)) begin
          int j;
          j = $urandom_range(0, taken.size() - 1);
          rel_en[p] = 1'b1;
          rel_id[p] = 7'(taken[j]);
          taken.delete(j);
        end
      end
      @(posedge clk);
      for (int k = 0; k < int'(alloc_n); k++) taken.push_back(model.pop_front());
      for (int p = 0; p < NR; p++) if (rel_en[p]) model.push_back(rel_id[p]);
    end
    @(negedge clk);
    compare();
    checks++;
    if (seen_empty == 0 || seen_full == 0) begin
      failures++;
      $display("FAIL: empty seen %0d times, full seen %0d times", seen_empty, seen_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && empty) seen_empty++;
    if (rst_n && int'(count) == E) seen_full++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
