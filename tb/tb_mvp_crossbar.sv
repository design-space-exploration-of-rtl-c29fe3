// tb_mvp_crossbar: random one-hot-per-column grant matrices; every port must
// carry exactly the word of the data array granted to it, and no other.
module tb_mvp_crossbar;
  import mvp_pkg::*;
  logic [NARR-1:0][PORTS-1:0] g_mat;
  xdat_t                      arr_out [NARR];
  logic [PORTS-1:0]           port_valid;
  xdat_t                      port_out [PORTS];
  int checks = 0, failures = 0;

  mvp_crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src [PORTS];
    for (int t = 0; t < 200; t++) begin
      g_mat = '0;
      for (int i = 0; i < NARR; i++)
        arr_out[i] = '{we: 1'($urandom), eidx: EL_W'($urandom), data: {$urandom, $urandom}};
      for (int j = 0; j < PORTS; j++) begin
        src[j] = ($urandom % 3 == 0) ? -1 : int'($urandom % NARR);
        if (src[j] >= 0) g_mat[src[j]][j] = 1'b1;
      end
      #1;
      for (int j = 0; j < PORTS; j++) begin
        checks++;
        if (src[j] < 0) begin
          if (port_valid[j]) begin failures++; $display("FAIL port %0d valid without grant", j); end
        end else if (!port_valid[j] || port_out[j] !== arr_out[src[j]]) begin
          failures++;
          $display("FAIL port %0d expected array %0d", j, src[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
