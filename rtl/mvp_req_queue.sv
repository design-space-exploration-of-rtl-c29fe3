// mvp_req_queue: request queue of one MVP-cache sub-cache.
//
// Each cycle the request generator presents up to PORTS merged entries; the queue
// keeps those whose sub-cache id (low SID_W bits of the block address) equals its
// own SUB_ID and appends them in port order, so a vector instruction's accesses
// to one sub-cache stay in program order. The sub-cache controller takes entries
// one at a time from the head.
//
// Interface: push_ready is high while at least PORTS slots are free, so a whole
// group is always accepted at once (push_valid is only looked at when push_ready
// is high). head_valid/head show the oldest entry; pop removes it.
// Timing: an entry pushed in cycle t is visible at the head in cycle t+1.
// The queue depth is not given per sub-cache; the default of 128 splits the
// 512-entry vector load/store queue of the evaluated configuration over the four
// sub-caches (own reading).
module mvp_req_queue
  import mvp_pkg::*;
#(
  parameter int unsigned DEPTH  = 128,
  parameter int unsigned SUB_ID = 0
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PORTS-1:0]  push_valid,
  input  creq_t             push_ent [PORTS],
  output logic              push_ready,
  output logic              head_valid,
  output creq_t             head,
  input  logic              pop,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned IW = $clog2(DEPTH);

  creq_t          mem [DEPTH];
  logic [IW-1:0]  rd_ptr, wr_ptr;
  logic [IW:0]    n_push;
  logic [PORTS-1:0] mine;

  always_comb begin
    for (int j = 0; j < PORTS; j++)
      mine[j] = push_valid[j] && (push_ent[j].blk[SID_W-1:0] == SID_W'(SUB_ID));
    n_push = '0;
    for (int j = 0; j < PORTS; j++) n_push = n_push + (IW+1)'(mine[j]);
  end

  assign push_ready = (int'(count) + int'(PORTS)) <= int'(DEPTH);
  assign head_valid = count != 0;
  assign head       = mem[rd_ptr];

  always_ff @(posedge clk) begin
    logic [IW-1:0] p;
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      p = wr_ptr;
      if (push_ready) begin
        for (int j = 0; j < PORTS; j++) begin
          if (mine[j]) begin
            mem[p] <= push_ent[j];
            p = p + 1'b1;
          end
        end
        wr_ptr <= p;
      end
      if (pop && head_valid) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (push_ready ? n_push : '0) - (IW+1)'(pop && head_valid);
    end
  end

  // an empty queue is never popped
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
