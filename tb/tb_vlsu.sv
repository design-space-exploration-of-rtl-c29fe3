// tb_vlsu: runs random vector loads and stores with random base, stride and
// length through the load/store unit against a cache model that accepts groups
// at random and answers each element after a random delay, on a random port, out
// of order. Checked: every group address is base + element x stride x 8, only
// elements below the vector length are enabled, store data equal the source
// register's elements, load data land in the destination register at the right
// element, and completion comes exactly one cycle after the last answer.
module tb_vlsu;
  import mvp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n); return int'($urandom % n); endfunction

  logic issue_valid, issue_ready, grp_valid, grp_ready, grp_we, cmp_valid, cmp_has_pd, busy;
  vren_t issue_ent;
  logic [PR_W-1:0] rd_preg, cmp_pd;
  logic [GR_W-1:0] rd_grp;
  logic [DATA_W-1:0] rd_data [LANES];
  logic [PORTS-1:0] grp_en, resp_valid, we_en;
  logic [ADDR_W-1:0] grp_addr [PORTS];
  logic [DATA_W-1:0] grp_wdata [PORTS], we_data [PORTS];
  logic [EL_W-1:0] grp_eidx [PORTS], we_eidx [PORTS];
  xdat_t resp [PORTS];
  logic [PR_W-1:0] we_preg [PORTS];
  logic [7:0] cmp_rob;

  vlsu dut (.*);

  logic [DATA_W-1:0] rf [PREGS][MVL];
  always_comb for (int l = 0; l < LANES; l++) rd_data[l] = rf[rd_preg][int'(rd_grp) * LANES + l];
  always @(posedge clk) for (int j = 0; j < PORTS; j++) if (we_en[j]) rf[we_preg[j]][we_eidx[j]] <= we_data[j];

  function automatic logic [DATA_W-1:0] mem_val(logic [ADDR_W-1:0] a);
    return {a ^ 32'h1357_9BDF, ~a};
  endfunction

  // cache model
  typedef struct { int eidx; bit we; logic [DATA_W-1:0] data; int due; } pend_t;
  pend_t pend [$];
  int now = 0;
  vren_t cur;
  int sent [MVL];
  logic [DATA_W-1:0] stored [MVL];
  int last_resp_cyc;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // sample the cache side at each clock edge, then drive the next responses
  always @(posedge clk) if (rst_n) begin
    now++;
    if (grp_valid && grp_ready) begin
      for (int j = 0; j < PORTS; j++) begin
        automatic int e = int'(grp_eidx[j]);
        automatic logic [ADDR_W-1:0] ea = cur.inst.base + ADDR_W'(int'(cur.inst.stride) * e * 8);
        chk(grp_en[j] == (e < int'(cur.inst.vl)) && (e % PORTS) == j, "element enables");
        chk(grp_we == (cur.inst.op == OP_VST), "store flag");
        if (grp_en[j]) begin
          chk(grp_addr[j] == ea, "element address");
          sent[e]++;
          if (grp_we) stored[e] = grp_wdata[j];
          pend.push_back('{eidx: e, we: grp_we, data: grp_we ? '0 : mem_val(ea), due: now + 1 + rnd(30)});
        end
      end
    end
  end
  always @(negedge clk) begin
    automatic logic [PORTS-1:0] used = '0;
    resp_valid <= '0;
    grp_ready  <= ($urandom % 3) != 0;
    for (int i = 0; i < pend.size(); i++) begin
      automatic int p = rnd(PORTS);
      if (pend[i].due <= now && !used[p]) begin
        used[p] = 1;
        resp_valid[p] <= 1'b1;
        resp[p] <= '{we: pend[i].we, eidx: EL_W'(pend[i].eidx), data: pend[i].data};
        pend.delete(i);
        i--;
        last_resp_cyc = now;
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    issue_valid = 0; issue_ent = '0; resp_valid = '0; grp_ready = 0;
    for (int j = 0; j < PORTS; j++) resp[j] = '0;
    for (int p = 0; p < PREGS; p++) for (int e = 0; e < MVL; e++) rf[p][e] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic vren_t e = '0;
      automatic logic [DATA_W-1:0] old [MVL];
      int c;
      e.inst.op = rnd(2) ? OP_VST : OP_VLD;
      e.inst.base = ADDR_W'(32'h0010_0000 + rnd(4096) * 8);
      e.inst.stride = 16'(rnd(9) - 4);
      e.inst.vl = VL_W'(1 + rnd(MVL));
      e.ps1 = PR_W'(rnd(48)); e.pd = PR_W'(48 + rnd(48)); e.rob = 8'(t);
      old = rf[e.pd];
      for (int k = 0; k < MVL; k++) sent[k] = 0;
      cur = e;
      wait (issue_ready);
      @(negedge clk); issue_valid = 1; issue_ent = e;
      @(posedge clk); #1 issue_valid = 0;
      c = 0;
      while (!cmp_valid) begin @(posedge clk); #1; c++; chk(c < 2000, "completion in time"); if (c >= 2000) break; end
      chk(now == last_resp_cyc + 1, "completion one cycle after the last answer");
      chk(cmp_pd == e.pd && cmp_rob == e.rob && cmp_has_pd == (e.inst.op == OP_VLD), "completion fields");
      for (int k = 0; k < MVL; k++) begin
        automatic logic [ADDR_W-1:0] ea = e.inst.base + ADDR_W'(int'(e.inst.stride) * k * 8);
        if (k < int'(e.inst.vl)) begin
          chk(sent[k] == 1, "each element sent once");
          if (e.inst.op == OP_VST) chk(stored[k] == rf[e.ps1][k], "store data");
          else chk(rf[e.pd][k] == mem_val(ea), "load data");
        end else begin
          chk(sent[k] == 0, "no element past the length");
          chk(rf[e.pd][k] == old[k], "register untouched past the length");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
