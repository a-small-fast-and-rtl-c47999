// tb_state_table: checks the per-entry ready / upper-valid records of both
// banks. After reset only bank-0 entries 0..31 are ready, and none has an
// upper entry. Random allocate (port 0: ready 0, upper 1) and write-back
// (port 1: ready 1, upper = wide) writes to distinct records are then
// compared with a shadow model on four read ports, before and after the
// clock edge.
module tb_state_table;
  import bprf_pkg::*;
  localparam int E = 80;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n;
  logic  [3:0]       rd_bank, rd_ready, rd_upper;
  preg_t [3:0]       rd_id;
  logic  [1:0]       wr_en, wr_bank, wr_ready, wr_upper;
  preg_t [1:0]       wr_id;
  logic              s_ready [2][E];
  logic              s_upper [2][E];

  state_table #(.ENTRIES(E), .INIT_READY(32), .NRD(4), .NWR(2)) u_dut (
    .clk, .rst_n, .rd_bank, .rd_id, .rd_ready, .rd_upper_valid (rd_upper),
    .wr_en, .wr_bank, .wr_id, .wr_ready, .wr_upper_valid (wr_upper));

  task automatic check_all();
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (rd_ready[p] !== s_ready[rd_bank[p]][rd_id[p]] ||
          rd_upper[p] !== s_upper[rd_bank[p]][rd_id[p]]) begin
        failures++;
        $display("FAIL: bank %0d id %0d ready %b upper %b expected %b %b", rd_bank[p],
                 rd_id[p], rd_ready[p], rd_upper[p], s_ready[rd_bank[p]][rd_id[p]],
                 s_upper[rd_bank[p]][rd_id[p]]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = '0; wr_bank = '0; wr_id = '0; wr_ready = '0; wr_upper = '0;
    rd_bank = '0; rd_id = '0;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < E; i++) begin
        s_ready[b][i] = (b == 0) && (i < 32);
        s_upper[b][i] = 1'b0;
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < E; i++) begin
        rd_bank[0] = 1'(b); rd_id[0] = preg_t'(i);
        #1 check_all();
      end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      wr_en      = 2'($urandom);
      wr_bank    = 2'($urandom);
      wr_id[0]   = preg_t'($urandom_range(0, E - 1));
      do wr_id[1] = preg_t'($urandom_range(0, E - 1));
      while (wr_id[1] == wr_id[0] && wr_bank[1] == wr_bank[0]);
      wr_ready   = 2'b10;
      wr_upper   = {1'($urandom), 1'b1};
      rd_bank    = 4'($urandom);
      rd_bank[0] = wr_bank[0]; rd_bank[1] = wr_bank[1];
      rd_id[0]   = wr_id[0];   rd_id[1]   = wr_id[1];
      rd_id[2]   = preg_t'($urandom_range(0, E - 1));
      rd_id[3]   = preg_t'($urandom_range(0, E - 1));
      #1 check_all();
      @(posedge clk);
      for (int p = 0; p < 2; p++)
        if (wr_en[p]) begin
          s_ready[wr_bank[p]][wr_id[p]] = wr_ready[p];
          s_upper[wr_bank[p]][wr_id[p]] = wr_upper[p];
        end
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
