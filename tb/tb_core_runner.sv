// tb_core_runner: program driver and checker for one bprf_core instance.
//
// Builds a random program of N_INSTR ALU instructions at time zero (seeded
// by SEED) and computes the architectural result of each instruction in
// program order with a plain 64-bit reference model. It then
//   1. sends the first instruction alone and checks that it commits exactly
//      LATENCY cycles after it was accepted (rename, issue, register read,
//      execute, write back, commit),
//   2. streams the rest through the in_valid/in_ready handshake in groups
//      of 1..W instructions (random size, lanes 0..n-1),
//   3. checks the register named by every commit, lane by lane, against
//      program order,
//   4. once all have committed, reads every architectural register through
//      the observation port and compares it with the reference, and
//   5. checks that no register entry leaked: the free entries of both banks
//      must equal 2*ENTRIES minus one entry per register minus one more per
//      register whose final value is wider than 32 bits.
// The program mixes narrow values (small immediates, right shifts) with wide
// ones (left shifts, negative differences) and inserts dependency chains so
// that the queue, the reorder buffer and the free-pools fill up.
// Each event bit of the core is counted into ev_count.
module tb_core_runner
  import bprf_pkg::*;
#(
  parameter int unsigned W       = 8,
  parameter int unsigned N_INSTR = 400,
  parameter int unsigned SEED    = 1,
  parameter int unsigned ENTRIES = 80,
  parameter int unsigned LATENCY = 5
) (
  input  logic                 clk,
  output logic                 rst_n,
  output logic [W-1:0]         in_valid,
  input  logic                 in_ready,
  output instr_t [W-1:0]       in_instr,
  input  logic [W-1:0]         commit_valid,
  input  logic [W-1:0][AREG_W-1:0] commit_rd,
  output logic [AREG_W-1:0]    dbg_areg,
  input  logic [XLEN-1:0]      dbg_data,
  input  logic [$clog2(ENTRIES+1)-1:0] free0_count,
  input  logic [$clog2(ENTRIES+1)-1:0] free1_count,
  input  core_events_t         events,
  output logic                 finished,
  output int                   checks,
  output int                   failures,
  output int                   ev_count [$bits(core_events_t)]
);

  instr_t          prog [N_INSTR];
  logic [XLEN-1:0] gold [NAREGS];
  int              n_commit;
  int              cycle;

  function automatic logic [XLEN-1:0] ref_alu(alu_op_e op, logic [XLEN-1:0] a,
                                              logic [XLEN-1:0] b, logic [IMM_W-1:0] imm);
    logic signed [XLEN-1:0] s;
    s = $signed(imm);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLL:  return a << b[5:0];
      OP_SRL:  return a >> b[5:0];
      OP_ADDI: return a + s;
      OP_SLLI: return a << imm[5:0];
      OP_SRLI: return a >> imm[5:0];
      default: return '0;
    endcase
  endfunction

  task automatic build_program();
    int unsigned r, chain_left, chain_reg;
    alu_op_e     op;
    void'($urandom(SEED));
    for (int i = 0; i < int'(NAREGS); i++) gold[i] = '0;
    chain_left = 0;
    chain_reg  = 0;
    for (int i = 0; i < int'(N_INSTR); i++) begin
      r = $urandom_range(0, 15);
      case (r)
        0, 1, 2, 3: op = OP_ADDI;
        4:          op = OP_SLLI;
        5:          op = OP_SRLI;
        6, 7:       op = OP_ADD;
        8:          op = OP_SUB;
        9:          op = OP_AND;
        10:         op = OP_OR;
        11:         op = OP_XOR;
        12:         op = OP_SLL;
        13:         op = OP_SRL;
        default:    op = OP_ADDI;
      endcase
      prog[i].op  = op;
      prog[i].rd  = AREG_W'($urandom_range(0, NAREGS - 1));
      prog[i].rs1 = AREG_W'($urandom_range(0, NAREGS - 1));
      prog[i].rs2 = AREG_W'($urandom_range(0, NAREGS - 1));
      prog[i].imm = (op == OP_SLLI || op == OP_SRLI) ? IMM_W'($urandom_range(0, 63))
                                                     : IMM_W'($urandom_range(0, 2000));
      if (chain_left == 0 && $urandom_range(0, 19) == 0) begin
        chain_left = $urandom_range(8, 40);
        chain_reg  = $urandom_range(0, NAREGS - 1);
      end
      if (chain_left != 0) begin
        // a serial dependency chain on one register
        prog[i].op  = ($urandom_range(0, 3) == 0) ? OP_SLLI : OP_ADDI;
        prog[i].imm = (prog[i].op == OP_SLLI) ? IMM_W'($urandom_range(0, 40)) : IMM_W'(3);
        prog[i].rd  = AREG_W'(chain_reg);
        prog[i].rs1 = AREG_W'(chain_reg);
        chain_left--;
      end
      gold[prog[i].rd] = ref_alu(prog[i].op, gold[prog[i].rs1], gold[prog[i].rs2], prog[i].imm);
    end
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // commit order and event counting
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int k = 0; k < $bits(core_events_t); k++)
        if (events[k]) ev_count[k] <= ev_count[k] + 1;
      begin
        automatic int n = n_commit;
        for (int k = 0; k < int'(W); k++)
          if (commit_valid[k]) begin
            check(n < int'(N_INSTR) && commit_rd[k] == prog[n].rd,
                  $sformatf("commit %0d (lane %0d): rd %0d expected %0d", n, k, commit_rd[k],
                            prog[n].rd));
            n++;
          end
        n_commit <= n;
      end
    end
  end

  initial begin
    int t0, wide;
    logic [XLEN-1:0] v;
    checks = 0; failures = 0; finished = 1'b0; n_commit = 0; cycle = 0;
    for (int k = 0; k < $bits(core_events_t); k++) ev_count[k] = 0;
    rst_n = 1'b0; in_valid = '0; in_instr = '0; dbg_areg = '0;
    build_program();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // 1. latency of a lone instruction
    in_valid = W'(1);
    in_instr[0] = prog[0];
    @(posedge clk);
    check(in_ready, "first instruction accepted at once");
    @(negedge clk);
    t0 = cycle;
    in_valid = '0;
    while (n_commit == 0) @(negedge clk);
    check(cycle - t0 == int'(LATENCY),
          $sformatf("lone instruction committed %0d cycles after rename, expected %0d",
                    cycle - t0, LATENCY));
    // 2. stream the rest
    for (int i = 1; i < int'(N_INSTR); ) begin
      int n;
      n = $urandom_range(1, W);
      if (n > int'(N_INSTR) - i) n = int'(N_INSTR) - i;
      in_valid = '0;
      in_instr = '0;
      for (int k = 0; k < n; k++) begin
        in_valid[k] = 1'b1;
        in_instr[k] = prog[i + k];
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      i += n;
    end
    in_valid = '0;
    while (n_commit < int'(N_INSTR)) @(negedge clk);
    repeat (4) @(negedge clk);
    // 4. architectural state
    wide = 0;
    for (int r = 0; r < int'(NAREGS); r++) begin
      dbg_areg = AREG_W'(r);
      #1;
      v = dbg_data;
      check(v == gold[r], $sformatf("r%0d = %h, expected %h", r, v, gold[r]));
      if (gold[r][XLEN-1:SUBW] != '0) wide++;
    end
    // 5. no leaked entries
    check(int'(free0_count) + int'(free1_count) == 2 * int'(ENTRIES) - int'(NAREGS) - wide,
          $sformatf("free entries %0d + %0d, expected %0d", free0_count, free1_count,
                    2 * int'(ENTRIES) - int'(NAREGS) - wide));
    finished = 1'b1;
  end

endmodule
