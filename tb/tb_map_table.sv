// tb_map_table: checks the reset mapping (register i -> bank-0 entry i,
// LSBP 0) and then random renames through 3 write ports against a shadow
// table, reading on all four ports before and after each clock edge so that
// a write is seen only after the edge. Writes to the same register in one
// cycle must leave the highest-numbered port's mapping.
module tb_map_table;
  import bprf_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                   rst_n;
  logic [2:0]             wr_en;
  logic [3:0][4:0]        rd_areg;
  rmap_t [3:0]            rd_map;
  logic [2:0][4:0]        wr_areg;
  rmap_t [2:0]            wr_map;
  rmap_t                  shadow [32];

  map_table #(.NRD(4), .NWR(3)) u_dut (.clk, .rst_n, .rd_areg, .rd_map, .wr_en, .wr_areg, .wr_map);

  task automatic check_all();
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (rd_map[p] !== shadow[rd_areg[p]]) begin
        failures++;
        $display("FAIL: port %0d r%0d = %p expected %p", p, rd_areg[p], rd_map[p],
                 shadow[rd_areg[p]]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; wr_areg = '0; wr_map = '0; rd_areg = '0;
    for (int i = 0; i < 32; i++) shadow[i] = '{id1: 8'd0, id0: 8'(i), lsbp: 1'b0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      rd_areg = {4{5'(i)}};
      #1 check_all();
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        wr_en[p]   = $urandom_range(0, 3) != 0;
        wr_areg[p] = (p > 0 && k % 4 == 0) ? wr_areg[0] : 5'($urandom);
        wr_map[p]  = '{id1: 8'($urandom_range(0, 79)), id0: 8'($urandom_range(0, 79)),
                       lsbp: 1'($urandom)};
      end
      rd_areg[0] = wr_areg[0];
      for (int p = 1; p < 4; p++) rd_areg[p] = 5'($urandom);
      #1 check_all();
      @(posedge clk);
      for (int p = 0; p < 3; p++) if (wr_en[p]) shadow[wr_areg[p]] = wr_map[p];
      #1 check_all();
    end
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
