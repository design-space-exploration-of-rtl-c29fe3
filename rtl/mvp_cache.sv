// mvp_cache: the MVP-cache, a multi-banked cache for the vector unit in which
// each sub-cache has one tag array shared by several data arrays of 8-byte lines.
//
// A group of up to PORTS element accesses (one per cache port, all loads or all
// stores) enters through grp_*. mvp_req_gen merges the accesses that fall into
// the same block and each resulting entry is queued at its sub-cache
// (mvp_req_queue). The sub-caches (mvp_subcache) look up their tag arrays; the
// data arrays of hitting entries request ports, mvp_xbar_alloc grants at most one
// array per port, and mvp_crossbar moves the words. Port outputs pass a delay
// line so that an uncontended hit returns ACCESS_LAT cycles after its group was
// accepted. Loads return data, stores return an acknowledgement, each tagged with
// the element index that came with the address.
//
// Misses go to main memory through one block-wide port (64-byte blocks, the
// requesting sub-cache's id echoed back with the read data), shared round-robin.
// Scalar accesses from the L1 data cache (l1_*) and early evictions of L1 copies
// (ev_*) implement the two-state ownership protocol of mvp_coh_fsm.
//
// Defaults: 2 MB, 4 sub-caches x 8 data arrays, 8 ports, 20-cycle access latency.
// The queue/lookup/transfer/delay-line split of that latency, the block-wide
// memory port and the L1 handshake are this design's choices.
module mvp_cache
  import mvp_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 2 * 1024 * 1024,
  parameter int unsigned ACCESS_LAT  = 20,
  parameter int unsigned QDEPTH      = 128
)(
  input  logic                  clk,
  input  logic                  rst_n,
  // vector side: one group of element accesses
  input  logic                  grp_valid,
  output logic                  grp_ready,
  input  logic                  grp_we,
  input  logic [PORTS-1:0]      grp_en,
  input  logic [ADDR_W-1:0]     grp_addr  [PORTS],
  input  logic [DATA_W-1:0]     grp_wdata [PORTS],
  input  logic [EL_W-1:0]       grp_eidx  [PORTS],
  output logic [PORTS-1:0]      resp_valid,
  output xdat_t                 resp      [PORTS],
  // scalar side (L1 data cache)
  input  logic                  l1_valid,
  input  logic                  l1_store,
  input  logic [ADDR_W-1:0]     l1_addr,
  output logic                  l1_ready,
  output logic                  l1_done,
  output logic [LINE_W-1:0]     l1_line,
  output logic                  ev_req,
  output logic [BLK_W-1:0]      ev_blk,
  input  logic                  ev_ack,
  input  logic [LINE_W-1:0]     ev_line,
  // main memory
  output logic                  m_req_valid,
  output mreq_t                 m_req,
  input  logic                  m_req_ready,
  input  logic                  m_resp_valid,
  input  logic [SID_W-1:0]      m_resp_id,
  input  logic [LINE_W-1:0]     m_resp_line,
  // status and events
  output logic                  idle,
  output logic [SUBC-1:0]       st_hit,
  output logic [SUBC-1:0]       st_miss,
  output logic [SUBC-1:0]       st_conflict,
  output logic [SUBC-1:0]       st_early_evict,
  output logic                  st_merge      // a group used fewer entries than accesses
);

  localparam int unsigned SETS = CACHE_BYTES / (LINE_W / 8) / SUBC;
  localparam int unsigned PIPE = (ACCESS_LAT > 2) ? ACCESS_LAT - 2 : 0;

  // ---------------- request generation and queues ----------------
  logic [PORTS-1:0] ent_valid;
  creq_t            ent [PORTS];
  logic [SUBC-1:0]  q_ready, q_valid, q_pop;
  creq_t            q_head [SUBC];
  logic [SUBC-1:0][$clog2(QDEPTH):0] q_count;

  mvp_req_gen u_gen (
    .we(grp_we), .en(grp_en), .addr(grp_addr), .wdata(grp_wdata), .eidx(grp_eidx),
    .ent_valid(ent_valid), .ent(ent)
  );

  assign grp_ready = &q_ready;
  assign st_merge  = grp_valid && grp_ready && ($countones(ent_valid) < $countones(grp_en));

  // ---------------- sub-caches ----------------
  logic [SUBC-1:0]              sc_l1_valid, sc_l1_ready, sc_l1_done;
  logic [LINE_W-1:0]            sc_l1_line [SUBC];
  logic [SUBC-1:0]              sc_ev_req, sc_ev_ack;
  logic [BLK_W-1:0]             sc_ev_blk  [SUBC];
  logic [SUBC-1:0]              sc_m_valid, sc_m_ready, sc_m_resp;
  mreq_t                        sc_m_req   [SUBC];
  logic [NARR-1:0]              a_mask, a_gnt;
  logic [NARR-1:0][PID_W-1:0]   a_rinfo;
  xdat_t                        a_out [NARR];
  logic [SUBC-1:0]              sc_idle, sc_st_idle;
  logic [BLK_W-1:0]             l1_blk;

  assign l1_blk = l1_addr[ADDR_W-1 -: BLK_W];

  for (genvar s = 0; s < SUBC; s++) begin : g_sc
    logic [ARRAYS-1:0]            m;
    logic [ARRAYS-1:0][PID_W-1:0] ri;
    xdat_t                        ao [ARRAYS];

    mvp_req_queue #(.DEPTH(QDEPTH), .SUB_ID(s)) u_q (
      .clk, .rst_n,
      .push_valid (grp_valid ? ent_valid : '0),
      .push_ent   (ent),
      .push_ready (q_ready[s]),
      .head_valid (q_valid[s]),
      .head       (q_head[s]),
      .pop        (q_pop[s]),
      .count      (q_count[s])
    );

    assign sc_l1_valid[s] = l1_valid && (l1_blk[SID_W-1:0] == SID_W'(s));
    assign sc_m_resp[s]   = m_resp_valid && (m_resp_id == SID_W'(s));

    mvp_subcache #(.SUB_ID(s), .SETS(SETS)) u_sc (
      .clk, .rst_n,
      .q_valid (q_valid[s]), .q_head (q_head[s]), .q_pop (q_pop[s]),
      .l1_valid (sc_l1_valid[s]), .l1_store (l1_store), .l1_blk (l1_blk),
      .l1_ready (sc_l1_ready[s]), .l1_done (sc_l1_done[s]), .l1_line (sc_l1_line[s]),
      .ev_req (sc_ev_req[s]), .ev_blk (sc_ev_blk[s]), .ev_ack (sc_ev_ack[s]), .ev_line (ev_line),
      .m_req_valid (sc_m_valid[s]), .m_req (sc_m_req[s]), .m_req_ready (sc_m_ready[s]),
      .m_resp_valid (sc_m_resp[s]), .m_resp_line (m_resp_line),
      .arr_mask (m), .arr_rinfo (ri), .arr_gnt (a_gnt[s*ARRAYS +: ARRAYS]), .arr_out (ao),
      .ev_hit (st_hit[s]), .ev_miss (st_miss[s]), .ev_conflict (st_conflict[s]),
      .ev_early_evict (st_early_evict[s]), .idle (sc_st_idle[s])
    );

    assign a_mask[s*ARRAYS +: ARRAYS] = m;
    for (genvar a = 0; a < ARRAYS; a++) begin : g_a
      assign a_rinfo[s*ARRAYS + a] = ri[a];
      assign a_out[s*ARRAYS + a]   = ao[a];
    end
    assign sc_idle[s] = !q_valid[s] && !sc_m_valid[s] && sc_st_idle[s];
  end

  // ---------------- allocator and crossbar ----------------
  logic [NARR-1:0][PORTS-1:0]         r_mat, g_mat;
  logic [PORTS-1:0][$clog2(NARR)-1:0] port_sel;
  logic [PORTS-1:0]                   port_vld, x_valid;
  xdat_t                              x_out [PORTS];

  mvp_xbar_alloc #(.N(NARR), .M(PORTS)) u_alloc (
    .clk, .rst_n, .mask(a_mask), .rinfo(a_rinfo),
    .r_mat, .g_mat, .gnt(a_gnt), .port_sel, .port_vld
  );

  mvp_crossbar #(.N(NARR), .M(PORTS)) u_xbar (
    .g_mat, .arr_out(a_out), .port_valid(x_valid), .port_out(x_out)
  );

  // ---------------- access latency delay line ----------------
  logic [PORTS-1:0] pv [PIPE+1];
  xdat_t            pd [PIPE+1][PORTS];
  logic [PIPE:0]    pipe_busy;
  assign pv[0] = x_valid;
  assign pd[0] = x_out;
  for (genvar k = 1; k <= PIPE; k++) begin : g_pipe
    always_ff @(posedge clk) begin
      if (!rst_n) pv[k] <= '0;
      else        pv[k] <= pv[k-1];
      pd[k] <= pd[k-1];
    end
  end
  always_comb for (int k = 0; k <= PIPE; k++) pipe_busy[k] = |pv[k];
  assign resp_valid = pv[PIPE];
  assign resp       = pd[PIPE];

  // ---------------- main memory arbiter (round robin) ----------------
  logic [SID_W-1:0] m_ptr, m_win;
  logic             m_any;
  always_comb begin
    int idx;
    m_any = 1'b0;
    m_win = '0;
    for (int o = 0; o < SUBC; o++) begin
      idx = (int'(m_ptr) + o) % SUBC;
      if (!m_any && sc_m_valid[idx]) begin m_any = 1'b1; m_win = SID_W'(idx); end
    end
    m_req_valid = m_any;
    m_req       = sc_m_req[m_win];
    sc_m_ready  = '0;
    sc_m_ready[m_win] = m_any && m_req_ready;
  end
  always_ff @(posedge clk) begin
    if (!rst_n) m_ptr <= '0;
    else if (m_any && m_req_ready) m_ptr <= m_win + 1'b1;
  end

  // ---------------- L1 side ----------------
  always_comb begin
    l1_ready = |sc_l1_ready;
    l1_done  = |sc_l1_done;
    l1_line  = '0;
    for (int s = 0; s < SUBC; s++) if (sc_l1_done[s]) l1_line = sc_l1_line[s];
    // early evictions: lowest requesting sub-cache first
    ev_req    = 1'b0;
    ev_blk    = '0;
    sc_ev_ack = '0;
    for (int s = SUBC-1; s >= 0; s--) if (sc_ev_req[s]) begin ev_req = 1'b1; ev_blk = sc_ev_blk[s]; end
    for (int s = 0; s < SUBC; s++) begin
      if (sc_ev_req[s]) begin sc_ev_ack[s] = ev_ack; break; end
    end
  end

  assign idle = (&sc_idle) && !(|pipe_busy);

endmodule
