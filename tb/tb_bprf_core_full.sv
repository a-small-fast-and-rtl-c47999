// tb_bprf_core_full: the core at its default size (8 wide, 80 entries per
// bank, 64-entry instruction queue, 192-entry reorder buffer) running a
// 3000-instruction random program offered in groups of up to 8.
// tb_core_runner checks the lone-instruction latency, the commit order,
// every architectural register at the end and the free-entry accounting.
// The run must also see early deallocation, LSBP = 1 allocations, several
// issues in one cycle, dependences inside a rename group and at least one
// free-pool stall (48 free entries in bank 0 after reset are exhausted by
// dependency chains).
module tb_bprf_core_full;
  import bprf_pkg::*;

  localparam int NEV = $bits(core_events_t);
  localparam int W   = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n, in_ready, fin;
  logic [W-1:0]         in_valid, commit_valid;
  instr_t [W-1:0]       in_instr;
  logic [W-1:0][AREG_W-1:0] commit_rd;
  logic [AREG_W-1:0]    dbg_areg;
  logic [XLEN-1:0]      dbg_data;
  logic [$clog2(80+1)-1:0] f0, f1;
  core_events_t         ev, e;
  int                   checks, failures, chk, fl;
  int                   evc [NEV];

  bprf_core u_dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_instr, .commit_valid, .commit_rd,
    .dbg_areg, .dbg_data, .free0_count (f0), .free1_count (f1), .events (ev)
  );

  tb_core_runner #(
    .W       (W),
    .N_INSTR (3000),
    .SEED    (7),
    .ENTRIES (80)
  ) u_run (
    .clk, .rst_n, .in_valid, .in_ready, .in_instr, .commit_valid, .commit_rd,
    .dbg_areg, .dbg_data, .free0_count (f0), .free1_count (f1), .events (ev),
    .finished (fin), .checks (chk), .failures (fl), .ev_count (evc)
  );

  function automatic int pos(core_events_t x);
    for (int k = 0; k < NEV; k++) if (x[k]) return k;
    return 0;
  endfunction

  task automatic need(core_events_t x, string name);
    checks++;
    $display("  %-12s %0d", name, evc[pos(x)]);
    if (evc[pos(x)] == 0) begin
      failures++;
      $display("FAIL: '%s' never happened", name);
    end
  endtask

  initial begin
    checks = 0; failures = 0;
    #1;
    wait (fin);
    checks += chk;
    failures += fl;
    e = '0; e.stall_pool   = 1'b1; need(e, "stall_pool");
    e = '0; e.lsbp1        = 1'b1; need(e, "lsbp1");
    e = '0; e.group_dep    = 1'b1; need(e, "group_dep");
    e = '0; e.multi_issue  = 1'b1; need(e, "multi_issue");
    e = '0; e.erd          = 1'b1; need(e, "erd");
    e = '0; e.commit_free2 = 1'b1; need(e, "commit_free2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    checks += chk;
    failures += fl + 1;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
