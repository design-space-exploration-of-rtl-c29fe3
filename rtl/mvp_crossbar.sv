// mvp_crossbar: data crossbar between the MVP-cache data arrays and the cache
// ports of the vector register files.
//
// Each port j outputs the word of the data array i for which the grant matrix
// has g[i][j] = 1 (an AND-OR one-hot multiplexer), together with that word's
// element index and whether it is a store acknowledgement. The allocator
// guarantees at most one grant per column. Purely combinational.
module mvp_crossbar
  import mvp_pkg::*;
#(
  parameter int unsigned N = NARR,
  parameter int unsigned M = PORTS
)(
  input  logic [N-1:0][M-1:0] g_mat,
  input  xdat_t               arr_out [N],
  output logic [M-1:0]        port_valid,
  output xdat_t               port_out [M]
);

  always_comb begin
    for (int j = 0; j < M; j++) begin
      port_out[j]   = '0;
      port_valid[j] = 1'b0;
      for (int i = 0; i < N; i++) begin
        if (g_mat[i][j]) begin
          port_out[j]   = port_out[j] | arr_out[i];
          port_valid[j] = 1'b1;
        end
      end
    end
  end

endmodule
