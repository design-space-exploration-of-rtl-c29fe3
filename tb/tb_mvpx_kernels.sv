// tb_mvpx_kernels: the vector lengths of the evaluated multimedia benchmarks run
// on the whole vector unit at its default sizes.
//
// Each benchmark is represented by its vector length (sphinx 4096, face
// 173, ray 1080, vips 79, clip 64, fft 32, power 33, MxM 1000, VxM 1000). For each
// one the program strip-mines the kernel Z = X*Y + X into pieces of at most 128
// elements (load X, load Y, multiply, add, store Z), using two register sets in
// turn so consecutive strips overlap. The benchmarks' own kernels are not
// reproduced; this kernel is this testbench's own choice. The
// program is also run on an architectural reference model. After each benchmark
// the unit is drained, its cycle count printed, and every block of Z read back
// through the L1 port and compared with the reference. The number of
// instructions, commits and chained starts is checked per benchmark.
//
// Uses the same behavioural main memory as tb_mvpx_top (100-cycle latency, 32
// bytes per cycle). Prints TB_RESULT checks/failures; a watchdog ends a hung run.
module tb_mvpx_kernels;
  import mvp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n); return int'($urandom % n); endfunction

  localparam logic [ADDR_W-1:0] AREA = 32'h0300_0000;   // benchmark b uses AREA + b * 128 KB


  // ---------------- DUT and memory ----------------
  logic in_valid, in_ready;
  vinst_t in_inst;
  logic l1_valid, l1_store, l1_ready, l1_done, ev_req, ev_ack;
  logic [ADDR_W-1:0] l1_addr;
  logic [LINE_W-1:0] l1_line, ev_line, m_resp_line;
  logic [BLK_W-1:0] ev_blk;
  logic m_req_valid, m_req_ready, m_resp_valid;
  mreq_t m_req;
  logic [SID_W-1:0] m_resp_id;
  logic ppom_start, ppom_done;
  logic [15:0] ppom_k, ppom_al, ppom_ml;
  logic [2:0] ppom_pipe_idx, ppom_port_idx;
  logic [3:0] ppom_n_est;
  logic idle, ev_ooo_arith, ev_ooo_mem, ev_stall_dispatch, ev_commit, ev_merge, ev_chain;
  logic [SUBC-1:0] ev_hit, ev_miss, ev_conflict, ev_early_evict;
  int n_reads, n_writes;

  mvpx_top dut (.*);

  mem_model #(.LAT(100), .BEAT(2)) u_mem (
    .clk, .rst_n, .req_valid(m_req_valid), .req(m_req), .req_ready(m_req_ready),
    .resp_valid(m_resp_valid), .resp_id(m_resp_id), .resp_line(m_resp_line),
    .n_reads, .n_writes
  );

  // ---------------- architectural reference ----------------
  logic [DATA_W-1:0] rreg [AREGS][MVL];
  bit                rdef [AREGS][MVL];
  logic [DATA_W-1:0] rmem [logic [ADDR_W-1:0]];
  bit                rundef [logic [ADDR_W-1:0]];
  bit                st_blk [logic [BLK_W-1:0]];

  function automatic logic [DATA_W-1:0] mem_rd(logic [ADDR_W-1:0] a);
    return rmem.exists(a) ? rmem[a] : {a ^ 32'hA5A5_5A5A, a};
  endfunction

  function automatic logic [ADDR_W-1:0] ea(vinst_t i, int e);
    return i.base + ADDR_W'(int'(i.stride) * e * 8);
  endfunction

  task automatic ref_exec(vinst_t i);
    logic [DATA_W-1:0] t [MVL];
    bit d [MVL];
    for (int e = 0; e < MVL; e++) begin
      automatic logic [DATA_W-1:0] a = rreg[i.vs1][e], b = rreg[i.vs2][e];
      d[e] = 0; t[e] = '0;
      if (e < int'(i.vl)) begin
        case (i.op)
          OP_VADD: t[e] = a + b;  OP_VSUB: t[e] = a - b;  OP_VAND: t[e] = a & b;
          OP_VOR:  t[e] = a | b;  OP_VXOR: t[e] = a ^ b;  OP_VMUL: t[e] = a * b;
          OP_VDIV: t[e] = (b == 0) ? '1 : a / b;
          OP_VLD:  t[e] = mem_rd(ea(i, e));
          default: ;
        endcase
        d[e] = (i.op == OP_VLD) ? !rundef.exists(ea(i, e)) : (rdef[i.vs1][e] && rdef[i.vs2][e]);
      end
    end
    if (i.op == OP_VST) begin
      for (int e = 0; e < int'(i.vl); e++) begin
        rmem[ea(i, e)] = rreg[i.vs1][e];
        if (rdef[i.vs1][e]) rundef.delete(ea(i, e)); else rundef[ea(i, e)] = 1;
        st_blk[ea(i, e)[ADDR_W-1 -: BLK_W]] = 1;
      end
    end else begin
      // a fresh physical register: elements past the length are not defined
      rreg[i.vd] = t;
      rdef[i.vd] = d;
    end
  endtask

  // ---------------- program generation ----------------
  vinst_t prog [$];
  int n_sent = 0;

  task automatic add(vinst_t i);
    ref_exec(i);
    prog.push_back(i);
  endtask

  // ---------------- drivers ----------------
  task automatic send_all();
    while (prog.size() > 0) begin
      bit fire;
      @(negedge clk);
      in_valid = 1; in_inst = prog[0];
      #4 fire = in_ready;
      @(posedge clk);
      if (fire) begin void'(prog.pop_front()); n_sent++; end
    end
    @(negedge clk) in_valid = 0;
  endtask

  task automatic wait_idle();
    int n = 0;
    do begin @(posedge clk); #1; n = idle ? n + 1 : 0; end while (n < 4);
  endtask

  // the L1 side: copies it holds, keyed by block
  logic [LINE_W-1:0] l1_held [logic [BLK_W-1:0]];
  int n_l1_evict_bad = 0;

  task automatic l1_access(logic [ADDR_W-1:0] a, bit st, output logic [LINE_W-1:0] line);
    @(negedge clk); l1_valid = 1; l1_store = st; l1_addr = a;
    #4 while (!l1_ready) begin @(negedge clk); #4; end
    @(negedge clk); l1_valid = 0;
    while (!l1_done) @(negedge clk);
    line = l1_line;
  endtask

  always @(negedge clk) begin
    if (ev_ack) ev_ack <= 0;
    else if (ev_req) begin
      if (!l1_held.exists(ev_blk)) n_l1_evict_bad++;
      else begin ev_line <= l1_held[ev_blk]; l1_held.delete(ev_blk); end
      ev_ack <= 1;
    end
  end

  // ---------------- event counters ----------------
  int c_chain, c_ooo_a, c_ooo_m, c_stall, c_commit, c_hit, c_miss, c_conf, c_early, c_merge, c_wb, c_ppom;
  always @(posedge clk) if (rst_n) begin
    c_ooo_a  += int'(ev_ooo_arith);
    c_ooo_m  += int'(ev_ooo_mem);
    c_stall  += int'(ev_stall_dispatch);
    c_commit += int'(ev_commit);
    c_chain  += int'(ev_chain);
    c_hit    += $countones(ev_hit);
    c_miss   += $countones(ev_miss);
    c_conf   += $countones(ev_conflict);
    c_early  += $countones(ev_early_evict);
    c_merge  += int'(ev_merge);
    c_wb     += int'(m_req_valid && m_req_ready && m_req.we);
    c_ppom   += int'(ppom_done);
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic need(int n, string what);
    $display("  %-22s %0d", what, n);
    chk(n > 0, {what, " never happened"});
  endtask

  initial begin
    #400000000;
    failures++;
    $display("watchdog: %0d instructions still to send", prog.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LINE_W-1:0] line;
    string names [9] = '{"sphinx", "face", "ray", "vips", "clip", "fft", "power", "MxM", "VxM"};
    int    lens  [9] = '{4096, 173, 1080, 79, 64, 32, 33, 1000, 1000};
    in_valid = 0; in_inst = '0; l1_valid = 0; l1_store = 0; l1_addr = '0; ev_ack = 0; ev_line = '0;
    ppom_start = 0; ppom_k = 16'h4000; ppom_al = 16'h2000; ppom_ml = 16'h2000;
    for (int r = 0; r < AREGS; r++) for (int e = 0; e < MVL; e++) begin rreg[r][e] = '0; rdef[r][e] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;

    for (int b = 0; b < 9; b++) begin
      automatic logic [ADDR_W-1:0] xa = AREA + ADDR_W'(b * 32'h2_0000);
      automatic logic [ADDR_W-1:0] ya = xa + 32'h8000, za = xa + 32'h1_0000;
      automatic int strips = (lens[b] + MVL - 1) / MVL;
      automatic int sent0 = n_sent, commit0 = c_commit, chain0 = c_chain;
      automatic longint t0;
      for (int s = 0; s < strips; s++) begin
        automatic int   vl = (lens[b] - s * MVL < MVL) ? lens[b] - s * MVL : MVL;
        automatic int   r  = (s % 2) * 4;
        automatic logic [ADDR_W-1:0] off = ADDR_W'(s * MVL * 8);
        automatic vinst_t i = '0;
        i.vl = VL_W'(vl); i.stride = 16'sd1;
        i.op = OP_VLD; i.vd = AR_W'(r);     i.base = xa + off; add(i);
        i.op = OP_VLD; i.vd = AR_W'(r + 1); i.base = ya + off; add(i);
        i.base = '0;
        i.op = OP_VMUL; i.vd = AR_W'(r + 2); i.vs1 = AR_W'(r); i.vs2 = AR_W'(r + 1); add(i);
        i.op = OP_VADD; i.vd = AR_W'(r + 3); i.vs1 = AR_W'(r + 2); i.vs2 = AR_W'(r); add(i);
        i.op = OP_VST;  i.vs1 = AR_W'(r + 3); i.base = za + off; add(i);
      end
      t0 = $time;
      send_all();
      wait_idle();
      $display("%-7s vl %4d: %2d strips, %4d cycles", names[b], lens[b], strips, ($time - t0) / 10);
      chk(n_sent - sent0 == 5 * strips, {names[b], ": instruction count"});
      chk(c_commit - commit0 == 5 * strips, {names[b], ": every instruction committed"});
      chk(c_chain - chain0 > 0, {names[b], ": dependent arithmetic started chained"});
      for (int k = 0; k < (lens[b] * 8 + 63) / 64; k++) begin
        automatic logic [ADDR_W-1:0] a = za + ADDR_W'(k * 64);
        l1_access(a, 0, line);
        l1_held[a[ADDR_W-1 -: BLK_W]] = line;
        for (int w = 0; w < ARRAYS; w++)
          if (k * ARRAYS + w < lens[b])
            chk(line[w*DATA_W +: DATA_W] == mem_rd(a + ADDR_W'(w * 8)), $sformatf("%s Z[%0d]", names[b], k * ARRAYS + w));
      end
    end
    chk(n_l1_evict_bad == 0, "early evictions only of blocks the L1 holds");

    // configuration search on the profile of all nine kernels
    @(negedge clk); ppom_start = 1;
    @(negedge clk); ppom_start = 0;
    begin
      int n = 0;
      while (!ppom_done && n < 200) begin @(posedge clk); #1; n++; end
    end
    chk(ppom_done, "configuration search finished");
    $display("search: pipes=%0d ports=%0d after %0d estimates", 4 << ppom_pipe_idx, 4 << ppom_port_idx, ppom_n_est);
    $display("instructions %0d, memory reads %0d, writes %0d, cycles %0t", n_sent, n_reads, n_writes, $time / 10);
    need(c_commit, "commits");
    need(c_chain, "chained starts");
    need(c_hit, "cache hits");
    need(c_miss, "cache misses");
    need(c_merge, "request merges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
