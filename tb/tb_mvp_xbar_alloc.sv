// tb_mvp_xbar_alloc: random masked requests. Checks the request matrix against
// the mask/Request Info rule, that the grant matrix has at most one grant per
// port and per array, only on requests, that every requested port is granted
// (work conserving), and that a port shared by two arrays alternates between them
// (round-robin fairness).
module tb_mvp_xbar_alloc;
  import mvp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NARR-1:0]              mask;
  logic [NARR-1:0][PID_W-1:0]   rinfo;
  logic [NARR-1:0][PORTS-1:0]   r_mat, g_mat;
  logic [NARR-1:0]              gnt;
  logic [PORTS-1:0][$clog2(NARR)-1:0] port_sel;
  logic [PORTS-1:0]             port_vld;
  int checks = 0, failures = 0;

  mvp_xbar_alloc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cycle();
    logic [PORTS-1:0] wanted;
    wanted = '0;
    for (int i = 0; i < NARR; i++)
      for (int j = 0; j < PORTS; j++) begin
        checks++;
        if (r_mat[i][j] !== (mask[i] && rinfo[i] == j)) begin failures++; $display("FAIL R[%0d][%0d]", i, j); end
        if (g_mat[i][j] && !r_mat[i][j]) begin failures++; $display("FAIL grant without request"); end
        if (mask[i] && rinfo[i] == j) wanted[j] = 1'b1;
      end
    for (int j = 0; j < PORTS; j++) begin
      automatic int n = 0;
      for (int i = 0; i < NARR; i++) n += g_mat[i][j];
      checks++;
      if (n != (wanted[j] ? 1 : 0)) begin failures++; $display("FAIL port %0d has %0d grants", j, n); end
    end
  endtask

  initial begin
    int first, second;
    mask = '0; rinfo = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int i = 0; i < NARR; i++) begin
        mask[i]  = ($urandom % 4 == 0);
        rinfo[i] = PID_W'($urandom);
      end
      #1 check_cycle();
    end
    // fairness: arrays 3 and 20 both want port 5 for four cycles
    @(negedge clk);
    mask = '0; mask[3] = 1; mask[20] = 1; rinfo[3] = 5; rinfo[20] = 5;
    #1 first = port_sel[5];
    @(negedge clk); #1 second = port_sel[5];
    checks++;
    if (first == second || !((first == 3 && second == 20) || (first == 20 && second == 3))) begin
      failures++; $display("FAIL round robin: %0d then %0d", first, second);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
