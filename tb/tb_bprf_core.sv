// tb_bprf_core: end-to-end test of the bit-partitioned register file core.
//
// Four cores run their own random programs through tb_core_runner. The
// first three are sized so that a different resource runs out first:
//   g_run[0] : 4 wide, 40 entries per bank (8 free in bank 0 after reset) -
//              the free-pools run short and rename stalls;
//   g_run[1] : 2 wide, an 8-entry instruction queue - rename stalls on a
//              full queue;
//   g_run[2] : 4 wide, a 16-entry reorder buffer - rename stalls on a full
//              ROB;
//   g_run[3] : the 4-issue configuration of the reference processor:
//              4 wide, 50 entries per bank, 32-entry queue, 96-entry ROB.
// Every core's results, commit order, latency and entry accounting are
// checked by its runner. In addition every mechanism of the design must
// have happened at least once over the runs: LSBP = 1 allocation,
// a source produced inside the same rename group, several issues in one
// cycle, swapped (LSBP = 1) operand reads, reads of narrow operands, early
// deallocation by 0-detect, commits releasing one entry and two entries,
// and each of the three stalls.
module tb_bprf_core;
  import bprf_pkg::*;

  localparam int NEV = $bits(core_events_t);
  localparam int N   = 600;
  localparam int NG  = 4;
  localparam int unsigned ENT [NG] = '{40, 80, 80, 50};
  localparam int unsigned WID [NG] = '{4, 2, 4, 4};
  localparam int unsigned IQS [NG] = '{64, 8, 64, 32};
  localparam int unsigned ROBS[NG] = '{192, 192, 16, 96};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;
  logic [NG-1:0] fin;
  int chk [NG];
  int fl  [NG];
  int evc [NG][NEV];

  for (genvar g = 0; g < NG; g++) begin : g_run
    localparam int unsigned W = WID[g];
    logic                 rst_n, in_ready;
    logic [W-1:0]         in_valid, commit_valid;
    instr_t [W-1:0]       in_instr;
    logic [W-1:0][AREG_W-1:0] commit_rd;
    logic [AREG_W-1:0]    dbg_areg;
    logic [XLEN-1:0]      dbg_data;
    logic [$clog2(ENT[g]+1)-1:0] f0, f1;
    core_events_t         ev;

    bprf_core #(
      .WIDTH    (W),
      .ENTRIES  (ENT[g]),
      .IQ_SIZE  (IQS[g]),
      .ROB_SIZE (ROBS[g])
    ) u_dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_instr, .commit_valid, .commit_rd,
      .dbg_areg, .dbg_data, .free0_count (f0), .free1_count (f1), .events (ev)
    );

    tb_core_runner #(
      .W       (W),
      .N_INSTR (N),
      .SEED    (11 + g),
      .ENTRIES (ENT[g])
    ) u_run (
      .clk, .rst_n, .in_valid, .in_ready, .in_instr, .commit_valid, .commit_rd,
      .dbg_areg, .dbg_data, .free0_count (f0), .free1_count (f1), .events (ev),
      .finished (fin[g]), .checks (chk[g]), .failures (fl[g]), .ev_count (evc[g])
    );
  end

  // bit position of the single field set in e
  function automatic int pos(core_events_t e);
    for (int k = 0; k < NEV; k++) if (e[k]) return k;
    return 0;
  endfunction

  function automatic int total(core_events_t e);
    int t = 0;
    for (int g = 0; g < NG; g++) t += evc[g][pos(e)];
    return t;
  endfunction

  task automatic need(core_events_t e, string name);
    checks++;
    $display("  %-14s %0d", name, total(e));
    if (total(e) == 0) begin
      failures++;
      $display("FAIL: mechanism '%s' never happened", name);
    end
  endtask

  core_events_t e;

  initial begin
    checks = 0; failures = 0;
    #1;
    wait (&fin);
    for (int g = 0; g < NG; g++) begin
      checks += chk[g];
      failures += fl[g];
    end
    $display("mechanism counts:");
    e = '0; e.stall_pool   = 1'b1; need(e, "stall_pool");
    e = '0; e.stall_iq     = 1'b1; need(e, "stall_iq");
    e = '0; e.stall_rob    = 1'b1; need(e, "stall_rob");
    e = '0; e.lsbp1        = 1'b1; need(e, "lsbp1");
    e = '0; e.group_dep    = 1'b1; need(e, "group_dep");
    e = '0; e.multi_issue  = 1'b1; need(e, "multi_issue");
    e = '0; e.swapped_read = 1'b1; need(e, "swapped_read");
    e = '0; e.narrow_read  = 1'b1; need(e, "narrow_read");
    e = '0; e.erd          = 1'b1; need(e, "erd");
    e = '0; e.commit_free2 = 1'b1; need(e, "commit_free2");
    e = '0; e.commit       = 1'b1; need(e, "commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    for (int g = 0; g < NG; g++) begin
      checks += chk[g];
      failures += fl[g];
    end
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
