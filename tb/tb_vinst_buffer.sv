// tb_vinst_buffer: two 16-entry buffers, one for arithmetic and one for memory
// instructions, are fed random renamed instructions while the register ready
// bits change at random. For the arithmetic buffer the pick must be exactly the
// oldest instruction whose sources are ready, flagged out-of-order when it passes
// an older one. For the memory buffer every pick must have its data ready, must
// not pass an older store whose address range overlaps it, and a store must not
// pass an older overlapping load; when the oldest entry is ready it must be taken.
// Every accepted instruction must leave exactly once; a full buffer must refuse.
module tb_vinst_buffer;
  import mvp_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n); return int'($urandom % n); endfunction

  logic [1:0] in_valid, in_ready, out_valid, out_ready, out_ooo, empty;
  vren_t in_ent [2], out_ent [2];
  logic [PREGS-1:0] preg_ready;

  vinst_buffer #(.DEPTH(DEPTH), .MEM(1'b0)) u_a (.clk, .rst_n, .in_valid(in_valid[0]), .in_ent(in_ent[0]),
    .in_ready(in_ready[0]), .preg_ready, .out_valid(out_valid[0]), .out_ent(out_ent[0]),
    .out_ready(out_ready[0]), .out_ooo(out_ooo[0]), .empty(empty[0]));
  vinst_buffer #(.DEPTH(DEPTH), .MEM(1'b1)) u_m (.clk, .rst_n, .in_valid(in_valid[1]), .in_ent(in_ent[1]),
    .in_ready(in_ready[1]), .preg_ready, .out_valid(out_valid[1]), .out_ent(out_ent[1]),
    .out_ready(out_ready[1]), .out_ooo(out_ooo[1]), .empty(empty[1]));

  vren_t q [2][$];
  int n_in [2], n_out [2], n_ooo [2], n_full [2];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit rdy(vren_t e);
    if (e.inst.op == OP_VLD) return 1;
    if (e.inst.op == OP_VST) return preg_ready[e.ps1];
    return preg_ready[e.ps1] && preg_ready[e.ps2];
  endfunction

  // exact byte ranges of two unit-or-larger-stride accesses overlap
  function automatic bit overlap(vinst_t a, vinst_t b);
    longint alo, ahi, blo, bhi, sa, sb;
    sa = longint'(a.stride) * 8 * (longint'(a.vl) - 1);
    sb = longint'(b.stride) * 8 * (longint'(b.vl) - 1);
    alo = (sa < 0) ? longint'(a.base) + sa : longint'(a.base);  ahi = ((sa < 0) ? longint'(a.base) : longint'(a.base) + sa) + 7;
    blo = (sb < 0) ? longint'(b.base) + sb : longint'(b.base);  bhi = ((sb < 0) ? longint'(b.base) : longint'(b.base) + sb) + 7;
    return !(ahi < blo || bhi < alo);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rob_id = 0;
    in_valid = '0; out_ready = '0; preg_ready = '1;
    in_ent[0] = '0; in_ent[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit tk [2];
      @(negedge clk);
      for (int b = 0; b < 2; b++) begin
        in_valid[b]  = ($urandom % 3) != 0;
        out_ready[b] = ($urandom % 4) != 0 && !(cyc % 2000 < 100);   // stall the output now and then
        begin
          automatic vren_t e = '0;
          e.ps1 = PR_W'($urandom % PREGS); e.ps2 = PR_W'($urandom % PREGS);
          e.pd  = PR_W'($urandom % PREGS);
          e.rob = 8'(rob_id); rob_id++;
          if (b == 0) e.inst.op = vop_e'($urandom % 7);
          else begin
            e.inst.op = ($urandom % 2) ? OP_VST : OP_VLD;
            e.inst.base = ADDR_W'(32'h1000 + ($urandom % 64) * 8);
            e.inst.stride = 16'(int'($urandom % 5) - 2);
          end
          e.inst.vl = VL_W'(1 + rnd(16));
          in_ent[b] = e;
        end
      end
      if (cyc % 3 == 0) for (int p = 0; p < PREGS; p++) if ($urandom % 4 == 0) preg_ready[p] = !preg_ready[p];
      #1;
      // arithmetic buffer: exact oldest-ready pick
      begin
        automatic int k = -1;
        for (int i = 0; i < q[0].size(); i++) if (k < 0 && rdy(q[0][i])) k = i;
        chk(out_valid[0] == (k >= 0), "arith pick valid");
        if (k >= 0) begin
          chk(out_ent[0] == q[0][k], "arith pick entry");
          chk(out_ooo[0] == (k > 0), "arith out-of-order flag");
        end
      end
      // memory buffer: safe picks and progress
      if (out_valid[1]) begin
        automatic int k = -1;
        foreach (q[1][i]) if (q[1][i] == out_ent[1]) k = i;
        chk(k >= 0, "memory pick is a waiting entry");
        if (k >= 0) begin
          chk(rdy(q[1][k]), "memory pick has ready data");
          chk(out_ooo[1] == (k > 0), "memory out-of-order flag");
          for (int i = 0; i < k; i++)
            if (q[1][i].inst.op == OP_VST || q[1][k].inst.op == OP_VST)
              begin chk(!overlap(q[1][i].inst, q[1][k].inst), "memory order kept"); if (overlap(q[1][i].inst, q[1][k].inst)) $display("FAIL old %h new %h out %h k=%0d i=%0d", q[1][i], q[1][k], out_ent[1], k, i); end
        end
      end
      if (q[1].size() > 0 && rdy(q[1][0])) chk(out_valid[1] && out_ent[1] == q[1][0], "oldest ready memory entry taken");
      for (int b = 0; b < 2; b++) begin
        chk(empty[b] == (q[b].size() == 0), "empty");
        if (q[b].size() == DEPTH) chk(!in_ready[b], "full buffer refuses");
        if (!in_ready[b]) n_full[b]++;
      end
      // model update
      for (int b = 0; b < 2; b++) begin
        if (out_valid[b] && out_ready[b]) begin
          foreach (q[b][i]) if (q[b][i] == out_ent[b]) begin q[b].delete(i); break; end
          n_out[b]++;
          if (out_ooo[b]) n_ooo[b]++;
        end
        if (in_valid[b] && in_ready[b]) begin q[b].push_back(in_ent[b]); n_in[b]++; end
      end
    end
    // drain
    @(posedge clk); #1;
    in_valid = '0; out_ready = '1; preg_ready = '1;
    repeat (4 * DEPTH) begin
      #1;
      for (int b = 0; b < 2; b++) if (out_valid[b]) begin
        foreach (q[b][i]) if (q[b][i] == out_ent[b]) begin q[b].delete(i); break; end
        n_out[b]++;
      end
      @(posedge clk);
    end
    for (int b = 0; b < 2; b++) begin
      chk(n_in[b] == n_out[b], "every instruction left once");
      chk(n_ooo[b] > 50, "out-of-order picks seen");
      chk(n_full[b] > 0, "full buffer seen");
      $display("buffer %0d: in=%0d out=%0d ooo=%0d full_cycles=%0d", b, n_in[b], n_out[b], n_ooo[b], n_full[b]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
