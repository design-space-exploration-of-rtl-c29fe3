// vinst_buffer: vector instruction buffer that reorders renamed instructions
// (VAIB for arithmetic, VMIB for memory instructions).
//
// Entries are written in program order into a circular buffer. Every cycle the
// buffer is searched from its oldest entry and the first instruction whose
// source physical registers are all ready is handed on to its issue queue, even
// when older instructions are still waiting: this is the out-of-order issue.
// Destination registers are fresh physical registers and are always ready.
// The head pointer skips slots that have left, so freed slots are reused once the
// head passes them.
//
// MEM = 1 (VMIB) adds a memory-order rule of this design's own: an entry may
// not pass an older waiting entry whose address range could overlap its own when
// either of the two is a store. Older ranges are summarised as one hull for
// stores and one for loads, which is conservative. Stores wait for their data
// register (vs1); loads have no vector sources.
//
// Interface: in_valid/in_ready (one per cycle), out_valid/out_ready (one per
// cycle, combinational pick). out_ooo marks a pick that passed an older entry.
module vinst_buffer
  import mvp_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter bit          MEM   = 1'b0
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  vren_t            in_ent,
  output logic             in_ready,
  input  logic [PREGS-1:0] preg_ready,
  output logic             out_valid,
  output vren_t            out_ent,
  input  logic             out_ready,
  output logic             out_ooo,
  output logic             empty
);

  localparam int unsigned IW = $clog2(DEPTH);

  vren_t              ent [DEPTH];
  logic [ADDR_W-1:0]  lo  [DEPTH];
  logic [ADDR_W-1:0]  hi  [DEPTH];
  logic [DEPTH-1:0]   vld;
  logic [IW-1:0]      head, tail;

  // address range of a memory instruction
  function automatic logic [2*ADDR_W-1:0] range_of(vinst_t i);
    logic signed [ADDR_W:0] step, last;
    logic [ADDR_W-1:0] a0, a1;
    step = (ADDR_W+1)'(i.stride) * 8;
    last = $signed({1'b0, i.base}) + step * $signed({1'b0, (ADDR_W)'(i.vl) - 1'b1});
    a0   = i.base;
    a1   = last[ADDR_W-1:0];
    return (step < 0) ? {a1, a0 + ADDR_W'(7)} : {a0, a1 + ADDR_W'(7)};
  endfunction

  function automatic logic srcs_ready(vren_t e, logic [PREGS-1:0] rdy);
    if (e.inst.op == OP_VLD) return 1'b1;
    if (e.inst.op == OP_VST) return rdy[e.ps1];
    return rdy[e.ps1] && rdy[e.ps2];
  endfunction

  assign in_ready = !vld[tail] && !(tail == head && vld != '0);
  assign empty    = (vld == '0);

  logic [IW-1:0] pick;
  always_comb begin
    int idx;
    logic seen_older, s_any, l_any;
    logic [ADDR_W-1:0] s_lo, s_hi, l_lo, l_hi;
    logic ok;
    out_valid  = 1'b0;
    out_ooo    = 1'b0;
    pick       = '0;
    seen_older = 1'b0;
    s_any = 1'b0; l_any = 1'b0;
    s_lo = '1; s_hi = '0; l_lo = '1; l_hi = '0;
    ok   = 1'b0;
    for (int o = 0; o < DEPTH; o++) begin
      idx = (int'(head) + o) % DEPTH;
      if (!out_valid && vld[idx]) begin
        ok = srcs_ready(ent[idx], preg_ready);
        if (MEM) begin
          if (s_any && !(hi[idx] < s_lo || lo[idx] > s_hi)) ok = 1'b0;
          if (ent[idx].inst.op == OP_VST && l_any && !(hi[idx] < l_lo || lo[idx] > l_hi)) ok = 1'b0;
        end
        if (ok) begin
          out_valid = 1'b1;
          pick      = IW'(idx);
          out_ooo   = seen_older;
        end else begin
          seen_older = 1'b1;
          if (ent[idx].inst.op == OP_VST) begin
            s_any = 1'b1;
            if (lo[idx] < s_lo) s_lo = lo[idx];
            if (hi[idx] > s_hi) s_hi = hi[idx];
          end else begin
            l_any = 1'b1;
            if (lo[idx] < l_lo) l_lo = lo[idx];
            if (hi[idx] > l_hi) l_hi = hi[idx];
          end
        end
      end
    end
    out_ent = ent[pick];
  end

  always_ff @(posedge clk) begin
    logic [2*ADDR_W-1:0] r;
    if (!rst_n) begin
      vld  <= '0;
      head <= '0;
      tail <= '0;
    end else begin
      if (in_valid && in_ready) begin
        r         = range_of(in_ent.inst);
        ent[tail] <= in_ent;
        lo[tail]  <= r[2*ADDR_W-1 -: ADDR_W];
        hi[tail]  <= r[ADDR_W-1:0];
        vld[tail] <= 1'b1;
        tail      <= tail + 1'b1;
      end
      if (out_valid && out_ready) vld[pick] <= 1'b0;
      // advance the head over slots that have left
      if (!vld[head] && vld != '0) head <= head + 1'b1;
    end
  end

endmodule
