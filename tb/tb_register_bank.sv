// tb_register_bank: checks an 80 x 32-bit bank with 3 read and 2 write
// ports against a shadow array: reset clears every entry, writes land at
// the clock edge (not before), reads are combinational on every port, and
// the higher-numbered write port wins when both write the same entry.
module tb_register_bank;
  localparam int E = 80;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                  rst_n;
  logic [2:0][6:0]       rd_id;
  logic [2:0][31:0]      rd_data;
  logic [1:0]            wr_en;
  logic [1:0][6:0]       wr_id;
  logic [1:0][31:0]      wr_data;
  logic [31:0]           shadow [E];

  register_bank #(.ENTRIES(E), .WIDTH(32), .NRD(3), .NWR(2)) u_dut (
    .clk, .rst_n, .rd_id, .rd_data, .wr_en, .wr_id, .wr_data);

  task automatic check_port(int p);
    checks++;
    if (rd_data[p] !== shadow[rd_id[p]]) begin
      failures++;
      $display("FAIL: port %0d id %0d = %h expected %h", p, rd_id[p], rd_data[p],
               shadow[rd_id[p]]);
    end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = '0; wr_id = '0; wr_data = '0; rd_id = '0;
    for (int i = 0; i < E; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < E; i++) begin
      rd_id[i % 3] = 7'(i);
      #1 check_port(i % 3);
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      wr_en      = 2'($urandom);
      wr_id[0]   = 7'($urandom_range(0, E - 1));
      wr_id[1]   = (k % 5 == 0) ? wr_id[0] : 7'($urandom_range(0, E - 1));
      wr_data[0] = $urandom;
      wr_data[1] = $urandom;
      for (int p = 0; p < 3; p++) rd_id[p] = (p == 0) ? wr_id[0] : 7'($urandom_range(0, E - 1));
      #1;
      for (int p = 0; p < 3; p++) check_port(p);   // old value before the edge
      @(posedge clk);
      if (wr_en[0]) shadow[wr_id[0]] = wr_data[0];
      if (wr_en[1]) shadow[wr_id[1]] = wr_data[1];
      #1;
      for (int p = 0; p < 3; p++) check_port(p);
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
