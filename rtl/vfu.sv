// vfu: one vector functional unit, spread over LANES parallel pipelines.
//
// An issued instruction occupies the unit for ceil(vl / LANES) cycles: each
// cycle it reads one group of LANES elements of both sources from the register
// file, computes them and sends them down a pipeline of LAT stages, at whose end
// the group is written back. When the last group is written the unit reports
// completion (destination register and commit slot). KIND selects the unit:
// FU_ALU (add, sub, and, or, xor), FU_MUL (low 64 bits of the product) or
// FU_DIV (unsigned quotient, all ones for a zero divisor). Latencies default to
// 10, 15 and 20 cycles as in the evaluated configuration; the integer operations
// and the divide-by-zero result are this design's choices (the document names
// double-precision data but no instruction set).
//
// Chaining: an instruction may enter while a source register is still being
// produced by another unit. rd_ok, computed outside from the producers'
// progress, says whether the group rd_grp of both sources has been written; while
// it is low the unit holds its group counter and sends a bubble down the pipe.
//
// Timing: group g read in cycle t is written in cycle t+LAT; the next
// instruction is accepted in the cycle after the previous one's last group. With
// rd_ok high throughout, completion comes ceil(vl/LANES) + LAT cycles after issue.
module vfu
  import mvp_pkg::*;
#(
  parameter fu_e         KIND = FU_ALU,
  parameter int unsigned LAT  = 10
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               issue_valid,
  input  vren_t              issue_ent,
  output logic               issue_ready,
  // register file read (two group ports)
  output logic [PR_W-1:0]    rd_preg [2],
  output logic [GR_W-1:0]    rd_grp,
  input  logic [DATA_W-1:0]  rd_data [2][LANES],
  input  logic               rd_ok,       // both source groups rd_grp are written
  // register file write (one group port)
  output logic               wr_en,
  output logic [PR_W-1:0]    wr_preg,
  output logic [GR_W-1:0]    wr_grp,
  output logic [LANES-1:0]   wr_mask,
  output logic [DATA_W-1:0]  wr_data [LANES],
  // completion
  output logic               cmp_valid,
  output logic [PR_W-1:0]    cmp_pd,
  output logic [7:0]         cmp_rob,
  output logic               busy
);

  typedef struct packed {
    logic                          v;
    logic                          last;
    logic [PR_W-1:0]               pd;
    logic [7:0]                    rob;
    logic [GR_W-1:0]               grp;
    logic [LANES-1:0]              mask;
    logic [LANES-1:0][DATA_W-1:0]  d;
  } stage_t;

  logic             act;
  vren_t            cur;
  logic [GR_W:0]    g, ngrp;
  stage_t           pipe [LAT];
  stage_t           s0;

  assign issue_ready = !act;
  assign busy        = act || pipe_busy();
  assign ngrp        = (GR_W+1)'((int'(cur.inst.vl) + LANES - 1) / LANES);
  assign rd_preg[0]  = cur.ps1;
  assign rd_preg[1]  = cur.ps2;
  assign rd_grp      = g[GR_W-1:0];

  function automatic logic pipe_busy();
    logic b = 1'b0;
    for (int k = 0; k < LAT; k++) b |= pipe[k].v;
    return b;
  endfunction

  function automatic logic [DATA_W-1:0] op(vop_e o, logic [DATA_W-1:0] a, logic [DATA_W-1:0] b);
    unique case (KIND)
      FU_MUL:  return a * b;
      FU_DIV:  return (b == '0) ? '1 : a / b;
      default: begin
        case (o)
          OP_VSUB: return a - b;
          OP_VAND: return a & b;
          OP_VOR:  return a | b;
          OP_VXOR: return a ^ b;
          default: return a + b;
        endcase
      end
    endcase
  endfunction

  always_comb begin
    int e;
    s0      = '0;
    s0.v    = act && rd_ok;
    s0.last = act && rd_ok && (g + 1'b1 == ngrp);
    s0.pd   = cur.pd;
    s0.rob  = cur.rob;
    s0.grp  = g[GR_W-1:0];
    for (int l = 0; l < LANES; l++) begin
      e          = int'(g) * LANES + l;
      s0.mask[l] = (e < int'(cur.inst.vl));
      s0.d[l]    = op(cur.inst.op, rd_data[0][l], rd_data[1][l]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      act <= 1'b0;
      g   <= '0;
      cur <= '0;
      for (int k = 0; k < LAT; k++) pipe[k] <= '0;
    end else begin
      pipe[0] <= s0;
      for (int k = 1; k < LAT; k++) pipe[k] <= pipe[k-1];
      if (!act) begin
        if (issue_valid) begin
          cur <= issue_ent;
          act <= 1'b1;
          g   <= '0;
        end
      end else if (rd_ok) begin
        g <= g + 1'b1;
        if (g + 1'b1 == ngrp) act <= 1'b0;
      end
    end
  end

  // stage LAT-1 is the write-back stage
  always_comb begin
    wr_en     = pipe[LAT-1].v;
    wr_preg   = pipe[LAT-1].pd;
    wr_grp    = pipe[LAT-1].grp;
    wr_mask   = pipe[LAT-1].mask;
    for (int l = 0; l < LANES; l++) wr_data[l] = pipe[LAT-1].d[l];
    cmp_valid = pipe[LAT-1].v && pipe[LAT-1].last;
    cmp_pd    = pipe[LAT-1].pd;
    cmp_rob   = pipe[LAT-1].rob;
  end

endmodule
