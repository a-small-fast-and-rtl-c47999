// bprf_pkg: types and constants shared by the bit-partitioned register file
// (BPRF) core.
//
// A 64-bit architectural register is stored as two 32-bit sub-words kept in
// two register banks. Each renamed operand therefore carries two physical
// register IDs, one per bank, and a Least Significant Bank Pointer (LSBP)
// that names the bank holding the low sub-word. A value whose upper
// sub-word is all zero needs only the entry in the LSBP bank; the entry in
// the other bank is released early and marked invalid.
//
// The 2-bank split, the 32-bit sub-word and the {PRegID0, PRegID1, LSBP}
// operand tag follow the design. The small ALU instruction set, the
// instruction fields and the widths of IDs are this implementation's own.
package bprf_pkg;

  localparam int unsigned XLEN      = 64;            // architectural data width
  localparam int unsigned NBANKS    = 2;             // 2-partitioned register file
  localparam int unsigned SUBW      = XLEN / NBANKS; // 32-bit sub-word per bank
  localparam int unsigned NAREGS    = 32;            // architectural integer registers
  localparam int unsigned AREG_W    = $clog2(NAREGS);
  localparam int unsigned IMM_W     = 16;
  localparam int unsigned PREG_W    = 8;             // room for up to 256 entries per bank
  localparam int unsigned ROB_IDX_W = 8;             // room for up to 256 reorder-buffer entries

  typedef logic [PREG_W-1:0] preg_t;

  // renamed operand: one physical ID per bank plus the LSBP
  typedef struct packed {
    preg_t id1;    // entry in bank 1
    preg_t id0;    // entry in bank 0
    logic  lsbp;   // bank holding the least significant sub-word
  } rmap_t;

  // ID of the entry holding the least significant sub-word
  function automatic preg_t lo_id(rmap_t m);
    return m.lsbp ? m.id1 : m.id0;
  endfunction

  // ID of the entry holding the upper sub-word
  function automatic preg_t hi_id(rmap_t m);
    return m.lsbp ? m.id0 : m.id1;
  endfunction

  // ALU operations of the small test instruction set
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_AND  = 4'd2,
    OP_OR   = 4'd3,
    OP_XOR  = 4'd4,
    OP_SLL  = 4'd5,
    OP_SRL  = 4'd6,
    OP_ADDI = 4'd7,   // rs1 + sign-extended immediate
    OP_SLLI = 4'd8,   // rs1 << imm[5:0]
    OP_SRLI = 4'd9    // rs1 >> imm[5:0]
  } alu_op_e;

  function automatic logic uses_rs2(alu_op_e op);
    return !(op inside {OP_ADDI, OP_SLLI, OP_SRLI});
  endfunction

  // decoded instruction presented to the rename stage
  typedef struct packed {
    alu_op_e            op;
    logic [AREG_W-1:0]  rd;
    logic [AREG_W-1:0]  rs1;
    logic [AREG_W-1:0]  rs2;
    logic [IMM_W-1:0]   imm;
  } instr_t;

  // instruction waiting in the instruction queue / travelling to execute
  typedef struct packed {
    alu_op_e                op;
    logic [IMM_W-1:0]       imm;
    rmap_t                  src1;
    rmap_t                  src2;
    rmap_t                  dst;
    logic [ROB_IDX_W-1:0]   rob;
  } iq_payload_t;

  // reorder-buffer entry
  typedef struct packed {
    logic [AREG_W-1:0] rd;
    rmap_t             new_map;   // mapping created by this instruction
    rmap_t             old_map;   // mapping it replaced, released at commit
  } rob_entry_t;

  // events of the core, one pulse per cycle in which they happen (in any lane)
  typedef struct packed {
    logic rename;          // an instruction was renamed
    logic stall_pool;      // rename stalled: a free-pool was empty
    logic stall_iq;        // rename stalled: instruction queue full
    logic stall_rob;       // rename stalled: reorder buffer full
    logic lsbp1;           // a destination was given LSBP = 1
    logic group_dep;       // a source was produced by an earlier instruction of the same rename group
    logic issue;           // an instruction was issued
    logic multi_issue;     // more than one instruction issued in one cycle
    logic swapped_read;    // a source was read with LSBP = 1 (sub-words swapped)
    logic narrow_read;     // a source was read whose upper sub-word is invalid
    logic writeback;       // a result was written back
    logic erd;             // 0-detect released an upper entry early
    logic commit;          // an instruction committed
    logic commit_free2;    // commit released both entries of the old mapping
  } core_events_t;

endpackage
