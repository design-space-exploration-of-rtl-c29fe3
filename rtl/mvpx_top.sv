// mvpx_top: MVPX, a vector extension for a general-purpose core aimed at
// multimedia kernels with short vectors, with its MVP-cache and its run-time
// configuration search.
//
// Decoded vector instructions from the scalar core enter at in_*. They are
// renamed (vrename) and placed in the arithmetic or memory instruction buffer
// (vinst_buffer, VAIB/VMIB), from which any instruction whose operands are ready
// moves to its issue queue (viq, VAIQ/VMIQ), out of program order. The VAIQ feeds
// three pipelined functional units (vfu: ALU, multiplier, divider; 8 lanes); the
// VMIQ feeds the load/store unit (vlsu), whose AGU sends groups of 8 element
// addresses to the MVP-cache (mvp_cache). Results go to the physical register
// file (vrf); completions are committed in order by vrename. Arithmetic
// instructions chain: one may start as soon as the functional unit producing its
// source has started, and then reads each group of 8 elements only after the
// producer has written it (a design choice of how chaining works with renamed
// registers; loads and stores wait for complete registers).
//
// Profiling counters measure the queues' enqueue and dequeue rates, the cache hit
// rate and the store share while the unit runs. On ppom_start, ppom_engine uses
// them (with the dependency ratios K, AL, ML given on ppom_k/al/ml) to pick the
// pipes/ports configuration it reports on ppom_pipe_idx/ppom_port_idx; the
// datapath itself keeps its built width (reconfiguring it is not modelled).
//
// Outside interfaces: the L1 data cache side (l1_*, ev_*) and the main memory
// port (m_*), both modelled outside this design. Event pulses on ev_* report the
// mechanisms at work. Defaults are the evaluated configuration (8 lanes, 8 cache
// ports, 2 MB MVP-cache with 4 sub-caches of 8 data arrays, 20-cycle access,
// 10/15/20-cycle ALU/multiplier/divider).
module mvpx_top
  import mvp_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 2 * 1024 * 1024,
  parameter int unsigned ACCESS_LAT  = 20,
  parameter int unsigned QDEPTH      = 128,
  parameter int unsigned IBUF_DEPTH  = 128,
  parameter int unsigned IQ_DEPTH    = 8,
  parameter int unsigned ALU_LAT     = 10,
  parameter int unsigned MUL_LAT     = 15,
  parameter int unsigned DIV_LAT     = 20
)(
  input  logic               clk,
  input  logic               rst_n,
  // decoded vector instructions
  input  logic               in_valid,
  input  vinst_t             in_inst,
  output logic               in_ready,
  // L1 data cache side
  input  logic               l1_valid,
  input  logic               l1_store,
  input  logic [ADDR_W-1:0]  l1_addr,
  output logic               l1_ready,
  output logic               l1_done,
  output logic [LINE_W-1:0]  l1_line,
  output logic               ev_req,
  output logic [BLK_W-1:0]   ev_blk,
  input  logic               ev_ack,
  input  logic [LINE_W-1:0]  ev_line,
  // main memory
  output logic               m_req_valid,
  output mreq_t              m_req,
  input  logic               m_req_ready,
  input  logic               m_resp_valid,
  input  logic [SID_W-1:0]   m_resp_id,
  input  logic [LINE_W-1:0]  m_resp_line,
  // configuration search
  input  logic               ppom_start,
  input  logic [15:0]        ppom_k, ppom_al, ppom_ml,
  output logic               ppom_done,
  output logic [2:0]         ppom_pipe_idx,
  output logic [2:0]         ppom_port_idx,
  output logic [3:0]         ppom_n_est,
  // status and events
  output logic               idle,
  output logic               ev_ooo_arith,
  output logic               ev_ooo_mem,
  output logic               ev_stall_dispatch,
  output logic               ev_commit,
  output logic               ev_chain,
  output logic [SUBC-1:0]    ev_hit,
  output logic [SUBC-1:0]    ev_miss,
  output logic [SUBC-1:0]    ev_conflict,
  output logic [SUBC-1:0]    ev_early_evict,
  output logic               ev_merge
);

  // ---------------- rename and dispatch ----------------
  localparam int unsigned NCMP = 4;   // ALU, MUL, DIV, VLSU

  vren_t             ren;
  logic [PREGS-1:0]  preg_ready;
  logic              vaib_in_ready, vmib_in_ready, buf_ready, dispatch_mem;
  logic [NCMP-1:0]   cmp_valid, cmp_has_pd;
  logic [PR_W-1:0]   cmp_pd  [NCMP];
  logic [7:0]        cmp_rob [NCMP];
  logic              stall_free, stall_rob, ren_empty;

  assign dispatch_mem = is_mem(in_inst.op);
  assign buf_ready    = dispatch_mem ? vmib_in_ready : vaib_in_ready;

  vrename #(.NCMP(NCMP)) u_ren (
    .clk, .rst_n, .in_valid, .in_inst, .buf_ready, .in_ready, .ren, .preg_ready,
    .cmp_valid, .cmp_has_pd, .cmp_pd, .cmp_rob, .commit(ev_commit),
    .stall_free, .stall_rob, .empty(ren_empty)
  );

  assign ev_stall_dispatch = in_valid && !in_ready;

  // ---------------- instruction buffers and issue queues ----------------
  logic  vaib_ov, vmib_ov, vaib_or, vmib_or;
  vren_t vaib_oe, vmib_oe;
  logic  vaib_empty, vmib_empty, vaib_ooo, vmib_ooo;

  // chaining: an arithmetic source counts as ready once its producer, a
  // functional unit, has started; the consuming unit then reads each group only
  // after the producer has written it (chain_cnt = groups written so far).
  // Memory instructions wait for complete registers.
  logic [PREGS-1:0]  chain_ok;
  logic [GR_W:0]     chain_cnt [PREGS];
  logic [PREGS-1:0]  arith_ready;
  assign arith_ready = preg_ready | chain_ok;

  vinst_buffer #(.DEPTH(IBUF_DEPTH), .MEM(1'b0)) u_vaib (
    .clk, .rst_n, .in_valid(in_valid && in_ready && !dispatch_mem), .in_ent(ren),
    .in_ready(vaib_in_ready), .preg_ready(arith_ready), .out_valid(vaib_ov), .out_ent(vaib_oe),
    .out_ready(vaib_or), .out_ooo(vaib_ooo), .empty(vaib_empty)
  );
  vinst_buffer #(.DEPTH(IBUF_DEPTH), .MEM(1'b1)) u_vmib (
    .clk, .rst_n, .in_valid(in_valid && in_ready && dispatch_mem), .in_ent(ren),
    .in_ready(vmib_in_ready), .preg_ready, .out_valid(vmib_ov), .out_ent(vmib_oe),
    .out_ready(vmib_or), .out_ooo(vmib_ooo), .empty(vmib_empty)
  );

  // an out-of-order pick counts when it actually moves to its issue queue
  assign ev_ooo_arith = vaib_ooo && vaib_ov && vaib_or;
  assign ev_ooo_mem   = vmib_ooo && vmib_ov && vmib_or;

  logic  vaiq_hv, vmiq_hv, vaiq_pop, vmiq_pop;
  vren_t vaiq_h, vmiq_h;
  logic  vaiq_full, vmiq_full;
  logic  a_enq, a_deq, m_enq, m_deq;

  viq #(.DEPTH(IQ_DEPTH)) u_vaiq (
    .clk, .rst_n, .push(vaib_ov), .push_ent(vaib_oe), .push_ready(vaib_or),
    .head_valid(vaiq_hv), .head(vaiq_h), .pop(vaiq_pop), .full(vaiq_full),
    .ev_enq(a_enq), .ev_deq(a_deq)
  );
  viq #(.DEPTH(IQ_DEPTH)) u_vmiq (
    .clk, .rst_n, .push(vmib_ov), .push_ent(vmib_oe), .push_ready(vmib_or),
    .head_valid(vmiq_hv), .head(vmiq_h), .pop(vmiq_pop), .full(vmiq_full),
    .ev_enq(m_enq), .ev_deq(m_deq)
  );

  // ---------------- functional units ----------------
  localparam int unsigned NRG = 7;
  logic [PR_W-1:0]    rg_preg [NRG];
  logic [GR_W-1:0]    rg_grp  [NRG];
  logic [DATA_W-1:0]  rg_data [NRG][LANES];
  logic [2:0]         wg_en;
  logic [PR_W-1:0]    wg_preg [3];
  logic [GR_W-1:0]    wg_grp  [3];
  logic [LANES-1:0]   wg_mask [3];
  logic [DATA_W-1:0]  wg_data [3][LANES];
  logic [2:0]         fu_ready, fu_busy, fu_rd_ok;

  assign vaiq_pop = vaiq_hv && fu_ready[fu_of(vaiq_h.inst.op)];
  assign ev_chain = vaiq_pop && !(preg_ready[vaiq_h.ps1] && preg_ready[vaiq_h.ps2]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chain_ok <= '0;
      for (int p = 0; p < PREGS; p++) chain_cnt[p] <= '0;
    end else begin
      for (int f = 0; f < 3; f++)
        if (wg_en[f]) chain_cnt[wg_preg[f]] <= chain_cnt[wg_preg[f]] + 1'b1;
      if (vaiq_pop) chain_ok[vaiq_h.pd] <= 1'b1;
      if (in_valid && in_ready && ren.inst.op != OP_VST) begin
        chain_ok[ren.pd]  <= 1'b0;
        chain_cnt[ren.pd] <= '0;
      end
    end
  end

  for (genvar f = 0; f < 3; f++) begin : g_fu
    localparam fu_e         K = fu_e'(f);
    localparam int unsigned L = (f == 0) ? ALU_LAT : (f == 1) ? MUL_LAT : DIV_LAT;
    logic [PR_W-1:0]   rp [2];
    logic [GR_W-1:0]   rgp;
    logic [DATA_W-1:0] rd [2][LANES];
    logic [DATA_W-1:0] wd [LANES];

    assign fu_rd_ok[f] = (preg_ready[rp[0]] || chain_cnt[rp[0]] > {1'b0, rgp}) &&
                         (preg_ready[rp[1]] || chain_cnt[rp[1]] > {1'b0, rgp});

    vfu #(.KIND(K), .LAT(L)) u_fu (
      .clk, .rst_n,
      .issue_valid(vaiq_hv && fu_of(vaiq_h.inst.op) == K), .issue_ent(vaiq_h),
      .issue_ready(fu_ready[f]),
      .rd_preg(rp), .rd_grp(rgp), .rd_data(rd), .rd_ok(fu_rd_ok[f]),
      .wr_en(wg_en[f]), .wr_preg(wg_preg[f]), .wr_grp(wg_grp[f]), .wr_mask(wg_mask[f]),
      .wr_data(wd),
      .cmp_valid(cmp_valid[f]), .cmp_pd(cmp_pd[f]), .cmp_rob(cmp_rob[f]), .busy(fu_busy[f])
    );
    assign cmp_has_pd[f] = 1'b1;
    assign rg_preg[2*f]   = rp[0];
    assign rg_preg[2*f+1] = rp[1];
    assign rg_grp[2*f]    = rgp;
    assign rg_grp[2*f+1]  = rgp;
    assign rd[0]          = rg_data[2*f];
    assign rd[1]          = rg_data[2*f+1];
    assign wg_data[f]     = wd;
  end

  // ---------------- load/store unit and MVP-cache ----------------
  logic               g_valid, g_ready, g_we;
  logic [PORTS-1:0]   g_en, r_valid, e_en;
  logic [ADDR_W-1:0]  g_addr  [PORTS];
  logic [DATA_W-1:0]  g_wdata [PORTS];
  logic [EL_W-1:0]    g_eidx  [PORTS];
  xdat_t              r_dat   [PORTS];
  logic [PR_W-1:0]    e_preg  [PORTS];
  logic [EL_W-1:0]    e_eidx  [PORTS];
  logic [DATA_W-1:0]  e_data  [PORTS];
  logic               lsu_ready, lsu_busy, c_idle;

  assign vmiq_pop = vmiq_hv && lsu_ready;

  vlsu u_lsu (
    .clk, .rst_n, .issue_valid(vmiq_hv), .issue_ent(vmiq_h), .issue_ready(lsu_ready),
    .rd_preg(rg_preg[6]), .rd_grp(rg_grp[6]), .rd_data(rg_data[6]),
    .grp_valid(g_valid), .grp_ready(g_ready), .grp_we(g_we), .grp_en(g_en),
    .grp_addr(g_addr), .grp_wdata(g_wdata), .grp_eidx(g_eidx),
    .resp_valid(r_valid), .resp(r_dat),
    .we_en(e_en), .we_preg(e_preg), .we_eidx(e_eidx), .we_data(e_data),
    .cmp_valid(cmp_valid[3]), .cmp_has_pd(cmp_has_pd[3]), .cmp_pd(cmp_pd[3]),
    .cmp_rob(cmp_rob[3]), .busy(lsu_busy)
  );

  vrf #(.NRG(NRG), .NWG(3), .NWE(PORTS)) u_vrf (
    .clk, .rg_preg, .rg_grp, .rg_data,
    .wg_en, .wg_preg, .wg_grp, .wg_mask, .wg_data,
    .we_en(e_en), .we_preg(e_preg), .we_eidx(e_eidx), .we_data(e_data)
  );

  mvp_cache #(.CACHE_BYTES(CACHE_BYTES), .ACCESS_LAT(ACCESS_LAT), .QDEPTH(QDEPTH)) u_cache (
    .clk, .rst_n,
    .grp_valid(g_valid), .grp_ready(g_ready), .grp_we(g_we), .grp_en(g_en),
    .grp_addr(g_addr), .grp_wdata(g_wdata), .grp_eidx(g_eidx),
    .resp_valid(r_valid), .resp(r_dat),
    .l1_valid, .l1_store, .l1_addr, .l1_ready, .l1_done, .l1_line,
    .ev_req, .ev_blk, .ev_ack, .ev_line,
    .m_req_valid, .m_req, .m_req_ready, .m_resp_valid, .m_resp_id, .m_resp_line,
    .idle(c_idle), .st_hit(ev_hit), .st_miss(ev_miss), .st_conflict(ev_conflict),
    .st_early_evict(ev_early_evict), .st_merge(ev_merge)
  );

  assign idle = ren_empty && c_idle && !lsu_busy && !(|fu_busy) && vaib_empty && vmib_empty;

  // ---------------- profiling counters and configuration search ----------------
  logic [31:0] c_cyc, c_aenq, c_adeq, c_menq, c_mdeq, c_hit, c_miss, c_st;
  always_ff @(posedge clk) begin
    if (!rst_n) {c_cyc, c_aenq, c_adeq, c_menq, c_mdeq, c_hit, c_miss, c_st} <= '0;
    else begin
      if (!ren_empty) c_cyc <= c_cyc + 1;
      c_aenq <= c_aenq + 32'(a_enq);
      c_adeq <= c_adeq + 32'(a_deq);
      c_menq <= c_menq + 32'(m_enq);
      c_mdeq <= c_mdeq + 32'(m_deq);
      c_hit  <= c_hit  + 32'($countones(ev_hit));
      c_miss <= c_miss + 32'($countones(ev_miss));
      c_st   <= c_st   + 32'(m_deq && vmiq_h.inst.op == OP_VST);
    end
  end

  // rate = count / cycles in Q16.16; ratio = part / whole in Q0.16 (saturated)
  function automatic logic [31:0] rate(logic [31:0] n, logic [31:0] d);
    return (d == 0) ? 32'd0 : 32'(({n, 16'd0}) / {16'd0, d});
  endfunction
  function automatic logic [15:0] ratio(logic [31:0] n, logic [31:0] d);
    logic [47:0] q;
    q = (d == 0) ? 48'd0 : ({n, 16'd0} / {16'd0, d});
    return (q > 48'hFFFF) ? 16'hFFFF : q[15:0];
  endfunction

  logic p_busy;
  logic [63:0] p_cyc, p_en;
  logic        p_bmem;

  ppom_engine u_ppom (
    .clk, .rst_n, .start(ppom_start && !p_busy),
    .ea(rate(c_aenq, c_cyc)), .da(rate(c_adeq, c_cyc)),
    .em(rate(c_menq, c_cyc)), .dm(rate(c_mdeq, c_cyc)),
    .hr(ratio(c_hit, c_hit + c_miss)), .k(ppom_k), .s(ratio(c_st, c_mdeq)),
    .al(ppom_al), .ml(ppom_ml), .ia(c_adeq), .im(c_mdeq),
    .busy(p_busy), .done(ppom_done), .pipe_idx(ppom_pipe_idx), .port_idx(ppom_port_idx),
    .n_est(ppom_n_est), .best_cycles(p_cyc), .best_energy(p_en), .last_bottleneck_mem(p_bmem)
  );

endmodule
