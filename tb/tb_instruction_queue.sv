// tb_instruction_queue: checks an 8-entry, 2-wide instruction queue with a
// model that knows which source tags ({LSBP, low ID}) have been written back
// but not where entries sit. Every cycle:
//   - the number issued must be min(2, number of queued instructions with
//     both sources ready), each issued one must be such an instruction and
//     no instruction may issue twice;
//   - each inserted instruction issues exactly once;
//   - `full` must match the model's occupancy.
// Source ready bits at insertion come from the tags woken before the cycle,
// so a wake-up in the insertion cycle must be caught by the queue itself.
module tb_instruction_queue;
  import bprf_pkg::*;
  localparam int S = 8, W = 2;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n, room;
  logic        [W-1:0]  ins_valid, ins_r1, ins_r2, wk_valid, wk_bank, iss_valid;
  iq_payload_t [W-1:0]  ins_payload, iss_payload;
  preg_t       [W-1:0]  wk_id;
  logic [3:0]   count;

  typedef struct { iq_payload_t p; bit r1, r2; } mrec_t;
  mrec_t model [$];
  bit    woken [512];
  int    n_woken, uid, issued;

  instruction_queue #(.SIZE(S), .W(W)) u_dut (
    .clk, .rst_n, .ins_valid, .ins_payload, .ins_src1_ready (ins_r1),
    .ins_src2_ready (ins_r2), .room, .count, .wk_valid, .wk_bank, .wk_id, .iss_valid,
    .iss_payload);

  function automatic int tag(rmap_t m);
    return int'(lo_id(m)) * 2 + int'(m.lsbp);
  endfunction

  function automatic rmap_t mk(int t);
    rmap_t m;
    m.lsbp = 1'(t % 2);
    m.id0  = m.lsbp ? preg_t'($urandom) : preg_t'(t / 2);
    m.id1  = m.lsbp ? preg_t'(t / 2) : preg_t'($urandom);
    return m;
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; ins_valid = '0; ins_payload = '0; ins_r1 = '0; ins_r2 = '0;
    wk_valid = '0; wk_bank = '0; wk_id = '0;
    n_woken = 0; uid = 0; issued = 0;
    foreach (woken[i]) woken[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 900; k++) begin
      int n_ready, n_iss, nw, ni;
      int match [W];
      @(negedge clk);
      n_ready = 0;
      foreach (model[i]) if (model[i].r1 && model[i].r2) n_ready++;
      n_iss = 0;
      for (int l = 0; l < W; l++) begin
        match[l] = -1;
        if (iss_valid[l]) begin
          n_iss++;
          foreach (model[i]) if (model[i].p.rob == iss_payload[l].rob) match[l] = i;
          chk(match[l] >= 0 && model[match[l]].r1 && model[match[l]].r2 &&
              model[match[l]].p == iss_payload[l], "issued instruction is a ready one");
          for (int m = 0; m < l; m++)
            chk(!iss_valid[m] || match[m] != match[l], "instruction issued twice");
        end
      end
      chk(room == (model.size() + W <= S), "room flag");
      chk(n_iss == (n_ready < W ? n_ready : W),
          $sformatf("issued %0d, model has %0d ready", n_iss, n_ready));
      // stimulus
      ni = room ? $urandom_range(0, W) : 0;
      for (int l = 0; l < W; l++) begin
        int t1, t2;
        ins_valid[l] = (l < ni);
        ins_payload[l].op   = alu_op_e'($urandom_range(0, 9));
        ins_payload[l].imm  = 16'($urandom);
        t1 = n_woken + $urandom_range(0, 6) - 2;
        t2 = n_woken + $urandom_range(0, 6);
        ins_payload[l].src1 = mk(t1 < 0 ? 0 : t1);
        ins_payload[l].src2 = mk(t2);
        ins_payload[l].dst  = rmap_t'($urandom);
        ins_payload[l].rob  = 8'((uid + l) % 256);
        ins_r1[l] = woken[tag(ins_payload[l].src1)];
        ins_r2[l] = woken[tag(ins_payload[l].src2)];
      end
      nw = (n_woken < 500) ? $urandom_range(0, W) : 0;
      for (int l = 0; l < W; l++) begin
        wk_valid[l] = (l < nw);
        wk_bank[l]  = 1'((n_woken + l) % 2);
        wk_id[l]    = preg_t'((n_woken + l) / 2);
      end
      @(posedge clk);
      for (int l = 0; l < nw; l++) begin
        woken[n_woken + l] = 1'b1;
        foreach (model[i]) begin
          if (tag(model[i].p.src1) == n_woken + l) model[i].r1 = 1'b1;
          if (tag(model[i].p.src2) == n_woken + l) model[i].r2 = 1'b1;
        end
      end
      begin
        int unsigned gone [$];
        gone.delete();
        for (int l = 0; l < W; l++) if (iss_valid[l] && match[l] >= 0) gone.push_back(match[l]);
        gone.rsort();
        foreach (gone[g]) begin
          model.delete(gone[g]);
          issued++;
        end
      end
      for (int l = 0; l < ni; l++) begin
        model.push_back('{p: ins_payload[l], r1: woken[tag(ins_payload[l].src1)],
                          r2: woken[tag(ins_payload[l].src2)]});
      end
      uid = (uid + ni) % 256;
      n_woken += nw;
    end
    chk(issued > 300, $sformatf("only %0d issued", issued));
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
