// free_pool: list of free physical entries of one register bank.
//
// The bit-partitioned register file has one free-pool per bank. Rename takes
// one ID from each pool for every instruction it renames, up to NALLOC per
// cycle. IDs come back from two places: at commit, the entries of the
// overwritten mappings, and from the 0-detect logic, which returns the upper
// entry of a narrow result early. There are NREL release ports in all.
//
// It is a circular FIFO of IDs. The next NALLOC IDs from the head are visible
// combinationally in alloc_id[0..NALLOC-1]; alloc_n (at most `count`) pops
// that many at the clock edge. Releases in the same cycle are appended in
// port order and can be allocated from the next cycle. After reset the pool
// holds the IDs INIT_FIRST .. ENTRIES-1 in ascending order; IDs below
// INIT_FIRST hold the initial architectural registers.
//
// Separate pools per bank follow the design; the FIFO order, the port
// counts (one allocation and two releases per instruction per cycle) and the
// initial contents are this implementation's choice.
module free_pool #(
  parameter int unsigned ENTRIES    = 80,
  parameter int unsigned INIT_FIRST = 0,
  parameter int unsigned NALLOC     = 8,
  parameter int unsigned NREL       = 16,
  localparam int unsigned ID_W      = $clog2(ENTRIES),
  localparam int unsigned CNT_W     = $clog2(ENTRIES + 1),
  localparam int unsigned AN_W      = $clog2(NALLOC + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // allocate
  input  logic [AN_W-1:0]             alloc_n,
  output logic [NALLOC-1:0][ID_W-1:0] alloc_id,
  output logic                        empty,
  output logic [CNT_W-1:0]            count,
  // release
  input  logic [NREL-1:0]             rel_en,
  input  logic [NREL-1:0][ID_W-1:0]   rel_id
);

  logic [ID_W-1:0]  fifo [ENTRIES];
  logic [ID_W-1:0]  head, tail;
  logic [CNT_W-1:0] cnt;

  function automatic logic [ID_W-1:0] wrap_add(logic [ID_W-1:0] p, int unsigned n);
    int unsigned s;
    s = int'(p) + n;
    if (s >= ENTRIES) s = s - ENTRIES;
    return ID_W'(s);
  endfunction

  always_comb begin
    for (int k = 0; k < int'(NALLOC); k++) alloc_id[k] = fifo[wrap_add(head, k)];
  end

  assign empty = (cnt == '0);
  assign count = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++)
        fifo[i] <= ID_W'((i + int'(INIT_FIRST)) % int'(ENTRIES));
      head <= '0;
      tail <= ID_W'((ENTRIES - INIT_FIRST) % ENTRIES);
      cnt  <= CNT_W'(ENTRIES - INIT_FIRST);
    end else begin
      automatic logic [ID_W-1:0]  t = tail;
      automatic logic [CNT_W-1:0] c = cnt;
      for (int p = 0; p < int'(NREL); p++) begin
        if (rel_en[p]) begin
          fifo[t] <= rel_id[p];
          t = wrap_add(t, 1);
          c = c + 1'b1;
        end
      end
      head <= wrap_add(head, int'(alloc_n));
      tail <= t;
      cnt  <= c - CNT_W'(alloc_n);
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(alloc_n) <= int'(cnt));
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
    int'(cnt) + int'($countones(rel_en)) <= int'(ENTRIES));

endmodule
