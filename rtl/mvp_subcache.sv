// mvp_subcache: one sub-cache of the MVP-cache: a single tag array shared by
// ARRAYS independent data arrays of 8-byte lines, and its controller.
//
// The ARRAYS lines of one set form a block that has one tag and is allocated,
// refilled and written back as a unit. A request entry (Address Info, Masked
// Bits, Request Info) is looked up once in the tag array; on a hit only the data
// arrays whose Masked Bit is set ask the crossbar allocator for their port and
// move their word. Arrays that are not granted in a cycle keep their Masked Bit
// and ask again, so an entry finishes when its mask is empty. Only one set can be
// looked up per cycle: entries of other sets wait in the request queue (a tag
// array conflict).
//
// Miss handling (this design's choice, the document gives none): direct mapped,
// write-allocate, write-back; a dirty victim is written to memory as one 64-byte
// block, then the block is read. The coherency state per block follows
// mvp_coh_fsm: scalar loads/stores from the L1 side receive the block and set
// STATE1; a vector access to a STATE1 block first asks the L1 to give back and
// invalidate its copy (early eviction). A STATE1 block chosen as a miss victim is
// taken back from the L1 the same way before it is replaced (own choice: the
// document does not discuss replacement of a block the L1 holds).
//
// Timing: a hitting entry takes one lookup cycle plus one cycle per crossbar
// round; the fixed access latency is added after the crossbar by mvp_cache.
// Memory requests use valid/ready; the response arrives later with our id.
module mvp_subcache
  import mvp_pkg::*;
#(
  parameter int unsigned SUB_ID = 0,
  parameter int unsigned SETS   = 8192     // 2 MB / (4 sub-caches * 8 arrays * 8 B)
)(
  input  logic                     clk,
  input  logic                     rst_n,
  // request queue head
  input  logic                     q_valid,
  input  creq_t                    q_head,
  output logic                     q_pop,
  // scalar (L1) side access to a block of this sub-cache
  input  logic                     l1_valid,
  input  logic                     l1_store,
  input  logic [BLK_W-1:0]         l1_blk,
  output logic                     l1_ready,
  output logic                     l1_done,
  output logic [LINE_W-1:0]        l1_line,
  // early eviction of an L1 copy
  output logic                     ev_req,
  output logic [BLK_W-1:0]         ev_blk,
  input  logic                     ev_ack,
  input  logic [LINE_W-1:0]        ev_line,
  // main memory
  output logic                     m_req_valid,
  output mreq_t                    m_req,
  input  logic                     m_req_ready,
  input  logic                     m_resp_valid,
  input  logic [LINE_W-1:0]        m_resp_line,
  // crossbar allocator and crossbar
  output logic [ARRAYS-1:0]        arr_mask,
  output logic [ARRAYS-1:0][PID_W-1:0] arr_rinfo,
  input  logic [ARRAYS-1:0]        arr_gnt,
  output xdat_t                    arr_out [ARRAYS],
  // events
  output logic                     ev_hit,
  output logic                     ev_miss,
  output logic                     ev_conflict,
  output logic                     ev_early_evict,
  output logic                     idle
);

  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = BLK_W - SID_W - SET_W;

  typedef enum logic [2:0] { S_IDLE, S_LOOK, S_XFER, S_WB, S_FILL_REQ, S_FILL_WAIT, S_EVICT,
                         S_VEVICT }
    sc_state_e;

  sc_state_e              st;
  creq_t                  cur;
  logic                   cur_l1, cur_l1_store;

  logic [TAG_W-1:0]       tag_q [SETS];
  logic [SETS-1:0]        vld_q, dirty_q, coh_q;
  logic [DATA_W-1:0]      darr  [ARRAYS][SETS];

  // tag lookup of the queue head (idle) or of the current access
  logic [BLK_W-1:0]       lk_blk;
  logic [SET_W-1:0]       lk_set, cur_set;
  logic [TAG_W-1:0]       lk_tag;
  logic                   lk_hit;
  logic [LINE_W-1:0]      lk_line;

  logic                   coh_next, coh_to_l1, coh_evict;
  logic [1:0]             coh_req;

  assign cur_set = cur.blk[SID_W +: SET_W];
  assign lk_blk  = (st == S_IDLE) ? q_head.blk : cur.blk;
  assign lk_set  = lk_blk[SID_W +: SET_W];
  assign lk_tag  = lk_blk[BLK_W-1 -: TAG_W];
  assign lk_hit  = vld_q[lk_set] && (tag_q[lk_set] == lk_tag);

  always_comb
    for (int a = 0; a < ARRAYS; a++) lk_line[a*DATA_W +: DATA_W] = darr[a][lk_set];

  assign coh_req = cur_l1 ? (cur_l1_store ? 2'd3 : 2'd2) : (cur.we ? 2'd1 : 2'd0);

  mvp_coh_fsm u_coh (
    .valid      (st == S_LOOK && lk_hit),
    .req        (coh_req),
    .state      (coh_q[lk_set]),
    .next_state (coh_next),
    .to_l1      (coh_to_l1),
    .evict_l1   (coh_evict)
  );

  // fast path: an idle sub-cache with no L1 request takes a hitting vector
  // request whose block is in STATE0 straight into the transfer state
  logic fast;
  assign fast = (st == S_IDLE) && !l1_valid && q_valid && lk_hit && !coh_q[lk_set];

  assign q_pop    = (st == S_IDLE) && !l1_valid && q_valid;
  assign l1_ready = (st == S_IDLE) && l1_valid;
  assign ev_req   = (st == S_EVICT) || (st == S_VEVICT);
  assign ev_blk   = (st == S_VEVICT) ? {tag_q[cur_set], cur_set, SID_W'(SUB_ID)} : cur.blk;

  assign arr_mask  = (st == S_XFER) ? cur.mask : '0;
  assign arr_rinfo = cur.rinfo;
  always_comb
    for (int a = 0; a < ARRAYS; a++)
      arr_out[a] = '{we: cur.we, eidx: cur.eidx[a], data: cur.we ? '0 : darr[a][cur_set]};

  always_comb begin
    m_req_valid = (st == S_WB) || (st == S_FILL_REQ);
    m_req.id    = SID_W'(SUB_ID);
    m_req.we    = (st == S_WB);
    m_req.blk   = (st == S_WB) ? {tag_q[cur_set], cur_set, SID_W'(SUB_ID)} : cur.blk;
    m_req.wdata = lk_line;
  end

  assign ev_hit         = fast || (st == S_LOOK && lk_hit && !cur_l1);
  assign ev_miss        = (st == S_LOOK && !lk_hit);
  assign ev_conflict    = q_valid && (st != S_IDLE);
  assign ev_early_evict = ev_req && ev_ack;
  assign idle           = (st == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      vld_q        <= '0;
      dirty_q      <= '0;
      coh_q        <= '0;
      cur          <= '0;
      cur_l1       <= 1'b0;
      cur_l1_store <= 1'b0;
      l1_done      <= 1'b0;
      l1_line      <= '0;
    end else begin
      l1_done <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (l1_valid) begin
            cur          <= '0;
            cur.blk      <= l1_blk;
            cur_l1       <= 1'b1;
            cur_l1_store <= l1_store;
            st           <= S_LOOK;
          end else if (q_valid) begin
            cur    <= q_head;
            cur_l1 <= 1'b0;
            st     <= fast ? S_XFER : S_LOOK;
          end
        end
        S_LOOK: begin
          if (!lk_hit)
            st <= (vld_q[lk_set] && coh_q[lk_set])  ? S_VEVICT :
                  (vld_q[lk_set] && dirty_q[lk_set]) ? S_WB : S_FILL_REQ;
          else if (cur_l1) begin
            coh_q[lk_set] <= coh_next;
            l1_done       <= 1'b1;
            l1_line       <= lk_line;
            st            <= S_IDLE;
          end else if (coh_evict)
            st <= S_EVICT;
          else
            st <= S_XFER;
        end
        S_WB:       if (m_req_ready) st <= S_FILL_REQ;
        S_FILL_REQ: if (m_req_ready) st <= S_FILL_WAIT;
        S_FILL_WAIT: if (m_resp_valid) begin
          for (int a = 0; a < ARRAYS; a++) darr[a][cur_set] <= m_resp_line[a*DATA_W +: DATA_W];
          tag_q[cur_set]   <= cur.blk[BLK_W-1 -: TAG_W];
          vld_q[cur_set]   <= 1'b1;
          dirty_q[cur_set] <= 1'b0;
          coh_q[cur_set]   <= 1'b0;
          st               <= S_LOOK;
        end
        S_EVICT: if (ev_ack) begin
          for (int a = 0; a < ARRAYS; a++) darr[a][cur_set] <= ev_line[a*DATA_W +: DATA_W];
          dirty_q[cur_set] <= 1'b1;
          coh_q[cur_set]   <= 1'b0;
          st               <= S_XFER;
        end
        // the victim is held by the L1: take its copy back before replacing it
        S_VEVICT: if (ev_ack) begin
          for (int a = 0; a < ARRAYS; a++) darr[a][cur_set] <= ev_line[a*DATA_W +: DATA_W];
          dirty_q[cur_set] <= 1'b1;
          coh_q[cur_set]   <= 1'b0;
          st               <= S_WB;
        end
        S_XFER: begin
          for (int a = 0; a < ARRAYS; a++) begin
            if (cur.mask[a] && arr_gnt[a] && cur.we) darr[a][cur_set] <= cur.wdata[a];
          end
          if (cur.we && |(cur.mask & arr_gnt)) dirty_q[cur_set] <= 1'b1;
          cur.mask <= cur.mask & ~arr_gnt;
          if ((cur.mask & ~arr_gnt) == '0) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // a granted array always had its Masked Bit set
  assert property (@(posedge clk) disable iff (!rst_n) (arr_gnt & ~arr_mask) == '0);

endmodule
