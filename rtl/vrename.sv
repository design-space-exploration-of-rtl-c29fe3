// vrename: renaming unit and commit unit of the out-of-order vector datapath.
//
// Renaming maps the 16 architectural vector registers onto 96 physical ones
// through a register alias table (RAT), which removes name dependences; a ready
// bit per physical register exposes true dependences to the instruction buffers.
// Every instruction gets a slot in an in-order commit buffer that remembers the
// physical register its destination used to map to. When the oldest instruction
// has completed it commits, and only then is that old physical register returned
// to the free list, as the commit unit of the out-of-order scheme requires.
//
// Interface: one instruction per cycle enters through in_valid/in_ready and leaves
// renamed on `ren` in the same cycle (in_ready also needs the target buffer's
// ready, buf_ready). Completions arrive on NCMP ports (physical destination,
// commit slot); they set the ready bit one cycle later. One commit per cycle.
// Own choices: the lowest free register is allocated; commit buffer depth 256
// (the two 128-entry instruction buffers together); no exceptions or squashes.
module vrename
  import mvp_pkg::*;
#(
  parameter int unsigned NCMP      = 4
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  vinst_t             in_inst,
  input  logic               buf_ready,
  output logic               in_ready,
  output vren_t              ren,
  output logic [PREGS-1:0]   preg_ready,
  input  logic [NCMP-1:0]    cmp_valid,
  input  logic [NCMP-1:0]    cmp_has_pd,
  input  logic [PR_W-1:0]    cmp_pd  [NCMP],
  input  logic [7:0]         cmp_rob [NCMP],
  output logic               commit,
  output logic               stall_free,   // no free physical register
  output logic               stall_rob,    // commit buffer full
  output logic               empty         // nothing in flight
);

  localparam int unsigned ROB_DEPTH = 256;   // 8-bit commit slot numbers wrap at 256

  typedef struct packed {
    logic            has_pd;
    logic [PR_W-1:0] old_pd;
  } rob_t;

  logic [PR_W-1:0]     rat [AREGS];
  logic [PREGS-1:0]    free_q;
  rob_t                rob [ROB_DEPTH];
  logic [ROB_DEPTH-1:0] rob_done;
  logic [7:0]          head, tail;
  logic [8:0]          count;

  logic                has_pd, have_free, fire;
  logic [PR_W-1:0]     new_pd;

  assign has_pd = (in_inst.op != OP_VST);

  always_comb begin
    have_free = 1'b0;
    new_pd    = '0;
    for (int p = PREGS-1; p >= 0; p--)
      if (free_q[p]) begin have_free = 1'b1; new_pd = PR_W'(p); end
  end

  assign stall_rob  = in_valid && (int'(count) == int'(ROB_DEPTH));
  assign stall_free = in_valid && has_pd && !have_free;
  assign in_ready   = buf_ready && !(int'(count) == int'(ROB_DEPTH)) && (!has_pd || have_free);
  assign fire       = in_valid && in_ready;
  assign empty      = (count == 0);

  always_comb begin
    ren.inst = in_inst;
    ren.ps1  = rat[in_inst.vs1];
    ren.ps2  = rat[in_inst.vs2];
    ren.pd   = has_pd ? new_pd : '0;
    ren.rob  = tail;
  end

  assign commit = (count != 0) && rob_done[head];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int a = 0; a < AREGS; a++) rat[a] <= PR_W'(a);
      free_q     <= {{(PREGS-AREGS){1'b1}}, {AREGS{1'b0}}};
      preg_ready <= '1;
      rob_done   <= '0;
      head       <= '0;
      tail       <= '0;
      count      <= '0;
    end else begin
      for (int c = 0; c < NCMP; c++) begin
        if (cmp_valid[c]) begin
          if (cmp_has_pd[c]) preg_ready[cmp_pd[c]] <= 1'b1;
          rob_done[cmp_rob[c]] <= 1'b1;
        end
      end
      if (commit) begin
        if (rob[head].has_pd) free_q[rob[head].old_pd] <= 1'b1;
        rob_done[head] <= 1'b0;
        head <= head + 1'b1;
      end
      if (fire) begin
        rob[tail] <= '{has_pd: has_pd, old_pd: rat[in_inst.vd]};
        rob_done[tail] <= 1'b0;
        tail <= tail + 1'b1;
        if (has_pd) begin
          rat[in_inst.vd]    <= new_pd;
          free_q[new_pd]     <= 1'b0;
          preg_ready[new_pd] <= 1'b0;
        end
      end
      count <= count + (fire ? 9'd1 : 9'd0) - (commit ? 9'd1 : 9'd0);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= 9'(ROB_DEPTH));

endmodule
