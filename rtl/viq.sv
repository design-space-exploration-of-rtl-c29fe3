// viq: vector issue queue (VAIQ for arithmetic, VMIQ for memory instructions).
//
// Instructions whose operands are ready enter from their instruction buffer and
// wait here, in arrival order, for a free functional unit or for the load/store
// unit. The number entering per cycle (enqueue throughput) and leaving per cycle
// (dequeue throughput) are the two quantities the configuration search uses to
// find the bottleneck, so both are brought out as event pulses.
//
// Interface: a FIFO with push/push_ready and pop/head_valid; one of each per
// cycle (the issue width of one per queue is this design's choice, as is the
// default depth of 8; the document gives neither). `full` is the queue-full
// condition that a resource shortage produces.
module viq
  import mvp_pkg::*;
#(
  parameter int unsigned DEPTH = 8
)(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push,
  input  vren_t  push_ent,
  output logic   push_ready,
  output logic   head_valid,
  output vren_t  head,
  input  logic   pop,
  output logic   full,
  output logic   ev_enq,
  output logic   ev_deq
);

  localparam int unsigned IW = $clog2(DEPTH);

  vren_t          mem [DEPTH];
  logic [IW-1:0]  rd, wr;
  logic [IW:0]    count;

  assign full       = (int'(count) == int'(DEPTH));
  assign push_ready = !full;
  assign head_valid = (count != 0);
  assign head       = mem[rd];
  assign ev_enq     = push && push_ready;
  assign ev_deq     = pop && head_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; count <= '0;
    end else begin
      if (ev_enq) begin mem[wr] <= push_ent; wr <= wr + 1'b1; end
      if (ev_deq) rd <= rd + 1'b1;
      count <= count + (IW+1)'(ev_enq) - (IW+1)'(ev_deq);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
