// tb_vrename: drives the renaming/commit unit with random instructions and random
// out-of-order completions and holds every output against a model kept here: the
// register alias table, the free list (lowest free register first), the in-order
// commit buffer with its done flags, and the per-register ready bits. A first
// phase completes almost nothing so that the free list runs dry (stall_free must
// appear); a second phase completes freely. Commit must happen in the cycle after
// the oldest instruction's completion is seen, never earlier, and the old mapping
// must come back to the free list only then.
module tb_vrename;
  import mvp_pkg::*;
  localparam int NCMP = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n); return int'($urandom % n); endfunction

  logic in_valid, buf_ready, in_ready, commit, stall_free, stall_rob, empty;
  vinst_t in_inst;
  vren_t ren;
  logic [PREGS-1:0] preg_ready;
  logic [NCMP-1:0] cmp_valid, cmp_has_pd;
  logic [PR_W-1:0] cmp_pd [NCMP];
  logic [7:0] cmp_rob [NCMP];

  vrename #(.NCMP(NCMP)) dut (.*);

  // model
  int mrat [AREGS];
  bit mfree [PREGS];
  bit mready [PREGS];
  int q_rob [$], q_old [$], q_pd [$];
  bit q_has [$], q_done [$], q_sent [$];
  int mtail = 0;
  int n_stall_free = 0, n_commit = 0, n_ooo_done = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; buf_ready = 0; in_inst = '0; cmp_valid = '0; cmp_has_pd = '0;
    for (int c = 0; c < NCMP; c++) begin cmp_pd[c] = '0; cmp_rob[c] = '0; end
    for (int a = 0; a < AREGS; a++) mrat[a] = a;
    for (int p = 0; p < PREGS; p++) begin mfree[p] = (p >= AREGS); mready[p] = 1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit exp_commit, exp_ready, has_pd, any_free;
      int lowest, pend [$];
      bit fire;
      @(negedge clk);
      // stimulus
      in_valid  = ($urandom % 4) != 0;
      buf_ready = ($urandom % 8) != 0;
      in_inst = '0;
      in_inst.op  = vop_e'($urandom % 9);
      in_inst.vd  = AR_W'($urandom); in_inst.vs1 = AR_W'($urandom); in_inst.vs2 = AR_W'($urandom);
      in_inst.vl  = VL_W'(1 + rnd(MVL));
      cmp_valid = '0;
      pend.delete();
      // completions: rare during the first phase
      for (int i = 0; i < q_rob.size(); i++) if (!q_sent[i]) pend.push_back(i);
      for (int c = 0; c < NCMP; c++) begin
        if (pend.size() > 0 && ($urandom % ((cyc < 1500) ? 40 : 2)) == 0) begin
          automatic int k = $urandom % pend.size();
          automatic int i = pend[k];
          pend.delete(k);
          if (i != 0) n_ooo_done++;
          cmp_valid[c] = 1; cmp_has_pd[c] = q_has[i]; cmp_pd[c] = PR_W'(q_pd[i]); cmp_rob[c] = 8'(q_rob[i]);
          q_sent[i] = 1;
        end
      end
      #1;
      // expected combinational outputs
      has_pd = (in_inst.op != OP_VST);
      any_free = 0; lowest = 0;
      for (int p = PREGS-1; p >= 0; p--) if (mfree[p]) begin any_free = 1; lowest = p; end
      exp_ready = buf_ready && (q_rob.size() < 256) && (!has_pd || any_free);
      exp_commit = (q_rob.size() > 0) && q_done[0];
      chk(in_ready == exp_ready, "in_ready");
      chk(stall_free == (in_valid && has_pd && !any_free), "stall_free");
      chk(commit == exp_commit, "commit");
      chk(empty == (q_rob.size() == 0), "empty");
      chk(int'(ren.ps1) == mrat[in_inst.vs1] && int'(ren.ps2) == mrat[in_inst.vs2], "source mapping");
      chk(int'(ren.rob) == mtail, "commit slot");
      if (has_pd && any_free) chk(int'(ren.pd) == lowest, "allocated register");
      for (int p = 0; p < PREGS; p++) chk(preg_ready[p] == mready[p], "ready bit");
      if (stall_free) n_stall_free++;
      fire = in_valid && exp_ready;
      // model update for the coming clock edge
      if (exp_commit) begin
        if (q_has[0]) mfree[q_old[0]] = 1;
        q_rob.delete(0); q_old.delete(0); q_pd.delete(0); q_has.delete(0); q_done.delete(0); q_sent.delete(0);
        n_commit++;
      end
      for (int c = 0; c < NCMP; c++) if (cmp_valid[c]) begin
        if (cmp_has_pd[c]) mready[cmp_pd[c]] = 1;
        foreach (q_rob[i]) if (q_rob[i] == int'(cmp_rob[c])) q_done[i] = 1;
      end
      if (fire) begin
        q_rob.push_back(mtail); q_has.push_back(has_pd); q_done.push_back(0); q_sent.push_back(0);
        q_old.push_back(mrat[in_inst.vd]); q_pd.push_back(has_pd ? lowest : 0);
        if (has_pd) begin mrat[in_inst.vd] = lowest; mfree[lowest] = 0; mready[lowest] = 0; end
        mtail = (mtail + 1) % 256;
      end
    end
    chk(n_stall_free > 0, "free-list stall seen");
    chk(n_commit > 1000, "commits seen");
    chk(n_ooo_done > 100, "out-of-order completions seen");
    $display("stall_free=%0d commits=%0d ooo_completions=%0d", n_stall_free, n_commit, n_ooo_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
