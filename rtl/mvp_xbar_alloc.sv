// mvp_xbar_alloc: n x m crossbar allocator of the MVP-cache (n = all data arrays
// of all sub-caches, m = cache ports).
//
// The request matrix R follows the mask-aware rule: r[i][j] = 1 when the Masked
// Bit of data array i is set and its Request Info names port j. Every data array
// thus asks for at most one port, so a single arbitration stage per port makes a
// legal grant matrix G: each port picks one requesting array with a round-robin
// arbiter whose priority moves past the winner. The arbiter type is this design's
// choice; only the R/G matrices and their meaning are given.
//
// Interface: mask/rinfo in, R and G matrices out, plus per port the index of the
// granted array (port_sel) and whether any was granted (port_vld); gnt[i] is the
// OR of row i of G. Combinational from request to grant; the round-robin pointers
// update on the clock edge after a grant.
module mvp_xbar_alloc
  import mvp_pkg::*;
#(
  parameter int unsigned N = NARR,
  parameter int unsigned M = PORTS
)(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0]                mask,
  input  logic [N-1:0][$clog2(M)-1:0] rinfo,
  output logic [N-1:0][M-1:0]         r_mat,
  output logic [N-1:0][M-1:0]         g_mat,
  output logic [N-1:0]                gnt,
  output logic [M-1:0][$clog2(N)-1:0] port_sel,
  output logic [M-1:0]                port_vld
);

  localparam int unsigned NW = $clog2(N);

  logic [M-1:0][NW-1:0] prio;   // first array considered by each port

  // request matrix
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M; j++)
        r_mat[i][j] = mask[i] && (int'(rinfo[i]) == j);
  end

  // one round-robin arbiter per port (column of R)
  always_comb begin
    int idx;
    g_mat    = '0;
    port_sel = '0;
    port_vld = '0;
    for (int j = 0; j < M; j++) begin
      for (int o = 0; o < N; o++) begin
        idx = (int'(prio[j]) + o) % N;
        if (!port_vld[j] && r_mat[idx][j]) begin
          port_vld[j]     = 1'b1;
          port_sel[j]     = NW'(idx);
          g_mat[idx][j]   = 1'b1;
        end
      end
    end
    for (int i = 0; i < N; i++) gnt[i] = |g_mat[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) prio <= '0;
    else
      for (int j = 0; j < M; j++)
        if (port_vld[j]) prio[j] <= (int'(port_sel[j]) == N-1) ? '0 : port_sel[j] + 1'b1;
  end

  // a granted array was requesting, and no port is granted twice
  for (genvar j = 0; j < M; j++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) port_vld[j] |-> r_mat[port_sel[j]][j]);
  end

endmodule
