// tb_mvpx_top: end-to-end test of the whole vector unit at its default sizes
// (2 MB MVP-cache, 128-entry buffers and request queues, 8 lanes, 8 ports).
//
// A random vector program (loads and stores with unit, large, negative and zero
// strides, and all arithmetic operations with random lengths) is executed on an
// architectural reference model here, in program order, and streamed into the
// unit. Addresses are spread over four 64 KB windows that lie 2 MB apart, so they
// share cache sets and cause conflict misses and dirty write-backs against the
// behavioural main memory (100-cycle latency, 32 bytes per cycle). Between program
// segments the scalar side loads and stores blocks through the L1 port; the next
// vector access to those blocks forces an early eviction, and the L1's modified
// word must come back. At the end all 16 registers are stored to a dump area and
// every dump block, plus blocks written by the program, is read back through the
// L1 port and compared with the reference. Finally the configuration search runs
// on the collected profile.
//
// Each mechanism of the design is counted and must have happened at least once:
// out-of-order picks in both instruction buffers, dispatch stalls, commits, chained starts,
// cache hits, misses, tag-array conflicts, request merges, dirty write-backs,
// early evictions, and a completed configuration search.
module tb_mvpx_top;
  import mvp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic int rnd(int n); return int'($urandom % n); endfunction

  localparam logic [ADDR_W-1:0] WIN  = 32'h0100_0000;   // four 64 KB windows, 2 MB apart
  localparam logic [ADDR_W-1:0] PAGE = 32'h0020_0000;
  localparam logic [ADDR_W-1:0] L1R  = 32'h0110_0000;   // blocks shared with the L1 side
  localparam logic [ADDR_W-1:0] DUMP = 32'h0208_0000;   // final register dump

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

  function automatic vinst_t mem_inst(bit st, logic [ADDR_W-1:0] region, bit zero_ok);
    vinst_t i = '0;
    int s, span, off;
    int strides [7] = '{1, 1, 1, 2, 4, -1, 0};
    i.op = st ? OP_VST : OP_VLD;
    i.vl = VL_W'(1 + rnd(MVL));
    s = strides[rnd(zero_ok ? 7 : 6)];
    span = (s < 0 ? -s : s) * (int'(i.vl) - 1);
    off = rnd(8192 - span);
    if (s < 0) off += span;
    i.base = region + ADDR_W'(off * 8);
    i.stride = 16'(s);
    i.vd = AR_W'(rnd(AREGS)); i.vs1 = AR_W'(rnd(AREGS)); i.vs2 = AR_W'(rnd(AREGS));
    return i;
  endfunction

  task automatic add(vinst_t i);
    ref_exec(i);
    prog.push_back(i);
  endtask

  task automatic gen_segment(int n);
    for (int k = 0; k < n; k++) begin
      automatic int c = rnd(100);
      automatic vinst_t i = '0;
      if (c < 30) i = mem_inst(0, WIN + PAGE * rnd(4), 1);
      else if (c < 50) i = mem_inst(1, WIN + PAGE * rnd(4), 1);
      else begin
        automatic vop_e ops [7] = '{OP_VADD, OP_VSUB, OP_VAND, OP_VOR, OP_VXOR, OP_VMUL, OP_VDIV};
        i.op = ops[rnd(7)];
        i.vd = AR_W'(rnd(AREGS)); i.vs1 = AR_W'(rnd(AREGS)); i.vs2 = AR_W'(rnd(AREGS));
        i.vl = VL_W'(1 + rnd(MVL));
      end
      add(i);
    end
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
    in_valid = 0; in_inst = '0; l1_valid = 0; l1_store = 0; l1_addr = '0; ev_ack = 0; ev_line = '0;
    ppom_start = 0; ppom_k = 16'h4000; ppom_al = 16'h2000; ppom_ml = 16'h2000;
    for (int r = 0; r < AREGS; r++) for (int e = 0; e < MVL; e++) begin rreg[r][e] = '0; rdef[r][e] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;

    // give every register a defined value
    for (int r = 0; r < AREGS; r++) begin
      automatic vinst_t i = '0;
      i.op = OP_VLD; i.vd = AR_W'(r); i.vl = VL_W'(MVL); i.stride = 16'sd1;
      i.base = WIN + PAGE * (r % 4) + ADDR_W'(r * 1024);
      add(i);
    end
    gen_segment(100);
    send_all();
    wait_idle();

    for (int seg = 0; seg < 4; seg++) begin
      // scalar accesses to four blocks of the shared region; stores change one word
      for (int b = 0; b < 4; b++) begin
        automatic logic [ADDR_W-1:0] a = L1R + ADDR_W'(seg * 4096 + b * 64);
        automatic bit st = b[0];
        l1_access(a, st, line);
        for (int w = 0; w < ARRAYS; w++) begin
          automatic logic [ADDR_W-1:0] wa = a + ADDR_W'(w * 8);
          chk(rundef.exists(wa) || line[w*DATA_W +: DATA_W] == mem_rd(wa), "scalar load data");
        end
        if (st) begin
          automatic logic [DATA_W-1:0] v = {$urandom, $urandom};
          line[DATA_W*3 +: DATA_W] = v;
          rmem[a + 24] = v;
          rundef.delete(a + 24);
        end
        l1_held[a[ADDR_W-1 -: BLK_W]] = line;
      end
      // the next vector accesses touch those blocks first
      begin
        automatic vinst_t i = '0;
        i.op = OP_VLD; i.vd = AR_W'(seg); i.vl = VL_W'(MVL); i.stride = 16'sd1;
        i.base = L1R + ADDR_W'(seg * 4096);
        add(i);
        i.op = OP_VST; i.vs1 = AR_W'(seg + 4); i.vl = VL_W'(16); i.stride = 16'sd4;
        i.base = L1R + ADDR_W'(seg * 4096 + 8);
        add(i);
      end
      gen_segment(100);
      send_all();
      wait_idle();
    end

    // dump all registers and read the dump back through the L1 side
    for (int r = 0; r < AREGS; r++) begin
      automatic vinst_t i = '0;
      i.op = OP_VST; i.vs1 = AR_W'(r); i.vl = VL_W'(MVL); i.stride = 16'sd1;
      i.base = DUMP + ADDR_W'(r * 1024);
      add(i);
    end
    send_all();
    wait_idle();
    chk(c_commit == n_sent, "every instruction committed");
    for (int r = 0; r < AREGS; r++)
      for (int b = 0; b < MVL / ARRAYS; b++) begin
        l1_access(DUMP + ADDR_W'(r * 1024 + b * 64), 0, line);
        for (int w = 0; w < ARRAYS; w++)
          if (rdef[r][b * ARRAYS + w])
            chk(line[w*DATA_W +: DATA_W] == rreg[r][b * ARRAYS + w], $sformatf("register v%0d element %0d", r, b * ARRAYS + w));
      end
    // read back a sample of the blocks the program stored to
    begin
      int n = 0;
      foreach (st_blk[blk]) begin
        if (n < 200 && rnd(3) == 0 && !l1_held.exists(blk)) begin
          automatic logic [ADDR_W-1:0] a = {blk, 6'b0};
          l1_access(a, 0, line);
          l1_held[blk] = line;
          for (int w = 0; w < ARRAYS; w++)
            if (!rundef.exists(a + ADDR_W'(w * 8)))
              chk(line[w*DATA_W +: DATA_W] == mem_rd(a + ADDR_W'(w * 8)), $sformatf("memory word %h", a + ADDR_W'(w * 8)));
          n++;
        end
      end
    end
    chk(n_l1_evict_bad == 0, "early evictions only of blocks the L1 holds");

    // configuration search on the collected profile
    @(negedge clk); ppom_start = 1;
    @(negedge clk); ppom_start = 0;
    begin
      int n = 0;
      while (!ppom_done && n < 200) begin @(posedge clk); #1; n++; end
    end
    chk(ppom_done, "configuration search finished");
    chk(ppom_pipe_idx < 5 && ppom_port_idx < 5 && ppom_n_est >= 1, "configuration in range");
    $display("search: pipes=%0d ports=%0d after %0d estimates", 4 << ppom_pipe_idx, 4 << ppom_port_idx, ppom_n_est);
    @(posedge clk); #1;

    $display("instructions %0d, memory reads %0d, writes %0d, cycles %0t", n_sent, n_reads, n_writes, $time / 10);
    need(c_ooo_a, "out-of-order arith");
    need(c_ooo_m, "out-of-order memory");
    need(c_stall, "dispatch stalls");
    need(c_commit, "commits");
    need(c_chain, "chained starts");
    need(c_hit, "cache hits");
    need(c_miss, "cache misses");
    need(c_conf, "tag conflicts");
    need(c_merge, "request merges");
    need(c_wb, "write-backs");
    need(c_early, "early evictions");
    need(c_ppom, "configuration searches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
