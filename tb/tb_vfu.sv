// tb_vfu: the three functional-unit kinds (ALU 10, multiplier 15, divider 20
// cycles) run random instructions with random vector lengths over a register
// file model. Every written element is compared with the operation computed here,
// elements past the vector length must stay untouched, and completion must come
// exactly ceil(vl/8) + LAT cycles after the instruction was accepted. In the
// second half the source groups are only available now and then (rd_ok, as when
// chaining on a producer that is still writing), and the results must not change.
module tb_vfu;
  import mvp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [DATA_W-1:0] rf [PREGS][MVL];
  int checks = 0, failures = 0;
  function automatic int rnd(int n); return int'($urandom % n); endfunction
  always #5 clk = ~clk;

  logic [2:0] iv, ir, wen, cv, bz;
  logic rd_ok = 1'b1;
  vren_t ie;
  logic [PR_W-1:0] rp [3][2];
  logic [GR_W-1:0] rg [3];
  logic [DATA_W-1:0] rd [3][2][LANES];
  logic [PR_W-1:0] wp [3];
  logic [GR_W-1:0] wgp [3];
  logic [LANES-1:0] wm [3];
  logic [DATA_W-1:0] wd [3][LANES];
  logic [PR_W-1:0] cpd [3];
  logic [7:0] crob [3];

  vfu #(.KIND(FU_ALU), .LAT(10)) u_alu (.clk, .rst_n, .issue_valid(iv[0]), .issue_ent(ie), .issue_ready(ir[0]),
    .rd_preg(rp[0]), .rd_grp(rg[0]), .rd_data(rd[0]), .rd_ok, .wr_en(wen[0]), .wr_preg(wp[0]), .wr_grp(wgp[0]),
    .wr_mask(wm[0]), .wr_data(wd[0]), .cmp_valid(cv[0]), .cmp_pd(cpd[0]), .cmp_rob(crob[0]), .busy(bz[0]));
  vfu #(.KIND(FU_MUL), .LAT(15)) u_mul (.clk, .rst_n, .issue_valid(iv[1]), .issue_ent(ie), .issue_ready(ir[1]),
    .rd_preg(rp[1]), .rd_grp(rg[1]), .rd_data(rd[1]), .rd_ok, .wr_en(wen[1]), .wr_preg(wp[1]), .wr_grp(wgp[1]),
    .wr_mask(wm[1]), .wr_data(wd[1]), .cmp_valid(cv[1]), .cmp_pd(cpd[1]), .cmp_rob(crob[1]), .busy(bz[1]));
  vfu #(.KIND(FU_DIV), .LAT(20)) u_div (.clk, .rst_n, .issue_valid(iv[2]), .issue_ent(ie), .issue_ready(ir[2]),
    .rd_preg(rp[2]), .rd_grp(rg[2]), .rd_data(rd[2]), .rd_ok, .wr_en(wen[2]), .wr_preg(wp[2]), .wr_grp(wgp[2]),
    .wr_mask(wm[2]), .wr_data(wd[2]), .cmp_valid(cv[2]), .cmp_pd(cpd[2]), .cmp_rob(crob[2]), .busy(bz[2]));

  always_comb
    for (int f = 0; f < 3; f++)
      for (int o = 0; o < 2; o++)
        for (int l = 0; l < LANES; l++) rd[f][o][l] = rf[rp[f][o]][int'(rg[f]) * LANES + l];
  // second half: source groups become available only now and then (chaining)
  int t_now = 0;
  always @(negedge clk) rd_ok <= (t_now < 75) || ($urandom % 3 == 0);
  always @(posedge clk)
    for (int f = 0; f < 3; f++) if (wen[f])
      for (int l = 0; l < LANES; l++) if (wm[f][l]) rf[wp[f]][int'(wgp[f]) * LANES + l] <= wd[f][l];

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat [3] = '{10, 15, 20};
    vop_e ops [7] = '{OP_VADD, OP_VSUB, OP_VAND, OP_VOR, OP_VXOR, OP_VMUL, OP_VDIV};
    iv = '0; ie = '0;
    for (int p = 0; p < PREGS; p++) for (int e = 0; e < MVL; e++) rf[p][e] = {$urandom, $urandom} >> ($urandom % 60);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      automatic vop_e op = ops[$urandom % 7];
      automatic int f = (op == OP_VMUL) ? 1 : (op == OP_VDIV) ? 2 : 0;
      int n, cyc;
      logic [DATA_W-1:0] a, b, exp;
      logic [DATA_W-1:0] old [MVL];
      t_now = t;
      ie = '0;
      ie.inst.op = op; ie.inst.vl = VL_W'(1 + rnd(MVL));
      ie.ps1 = PR_W'($urandom % 32); ie.ps2 = PR_W'(32 + $urandom % 32); ie.pd = PR_W'(64 + $urandom % 32);
      ie.rob = 8'($urandom);
      old = rf[ie.pd];
      @(negedge clk); iv[f] = 1;
      @(posedge clk); #1 iv[f] = 0;
      n = (int'(ie.inst.vl) + LANES - 1) / LANES;
      cyc = 0;
      while (!cv[f]) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (t < 75 && cyc != n + lat[f] - 1 || cpd[f] != ie.pd || crob[f] != ie.rob) begin
        failures++; $display("FAIL op %s completion after %0d cycles, expected %0d", op.name(), cyc + 1, n + lat[f]);
      end
      @(posedge clk); #1;
      for (int e = 0; e < MVL; e++) begin
        a = rf[ie.ps1][e]; b = rf[ie.ps2][e];
        case (op)
          OP_VADD: exp = a + b;  OP_VSUB: exp = a - b;  OP_VAND: exp = a & b;
          OP_VOR:  exp = a | b;  OP_VXOR: exp = a ^ b;  OP_VMUL: exp = a * b;
          default: exp = (b == 0) ? '1 : a / b;
        endcase
        if (e >= int'(ie.inst.vl)) exp = old[e];
        checks++;
        if (rf[ie.pd][e] !== exp) begin failures++; $display("FAIL op %s element %0d", op.name(), e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
