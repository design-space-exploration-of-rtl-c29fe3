// tb_mvp_req_gen: groups of addresses with unit, strided, repeated and random
// patterns. A reference model written in the testbench (a scoreboard of blocks)
// says how many entries each group must produce; every access must appear in
// exactly one entry, with its block address, its Masked Bit, its port as Request
// Info, its element index and its store data.
module tb_mvp_req_gen;
  import mvp_pkg::*;
  logic                we;
  logic [PORTS-1:0]    en;
  logic [ADDR_W-1:0]   addr  [PORTS];
  logic [DATA_W-1:0]   wdata [PORTS];
  logic [EL_W-1:0]     eidx  [PORTS];
  logic [PORTS-1:0]    ent_valid;
  creq_t               ent   [PORTS];
  int checks = 0, failures = 0;

  mvp_req_gen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int mode, int t);
    int exp_n, found;
    logic [BLK_W-1:0] kb [PORTS];
    logic [ARRAYS-1:0] km [PORTS];
    logic [ADDR_W-1:0] base;
    base = {$urandom} & 32'h00FF_FFF8;
    we = 1'($urandom);
    for (int j = 0; j < PORTS; j++) begin
      en[j] = (mode == 3) ? 1'($urandom) : 1'b1;
      case (mode)
        0: addr[j] = base + 32'(j * 8);                // unit stride
        1: addr[j] = base + 32'(j * 8 * (t % 5 + 2));   // strided
        2: addr[j] = base + 32'((j % 2) * 8);          // repeated lines
        default: addr[j] = {$urandom} & 32'h0000_0FF8;
      endcase
      wdata[j] = {$urandom, $urandom};
      eidx[j]  = EL_W'(t * PORTS + j);
    end
    // reference: greedy first-fit merge on (block, free data array)
    exp_n = 0;
    for (int j = 0; j < PORTS; j++) begin
      automatic logic m = 0;
      if (!en[j]) continue;
      for (int k = 0; k < exp_n; k++)
        if (!m && kb[k] == addr[j][31:6] && !km[k][addr[j][5:3]]) begin km[k][addr[j][5:3]] = 1; m = 1; end
      if (!m) begin kb[exp_n] = addr[j][31:6]; km[exp_n] = '0; km[exp_n][addr[j][5:3]] = 1; exp_n++; end
    end
    #1;
    checks++;
    if ($countones(ent_valid) != exp_n) begin
      failures++; $display("FAIL mode %0d: %0d entries, expected %0d", mode, $countones(ent_valid), exp_n);
    end
    for (int j = 0; j < PORTS; j++) begin
      if (!en[j]) continue;
      found = 0;
      for (int k = 0; k < PORTS; k++) begin
        automatic logic [AID_W-1:0] a = addr[j][5:3];
        if (ent_valid[k] && ent[k].blk == addr[j][31:6] && ent[k].mask[a] &&
            ent[k].rinfo[a] == j && ent[k].eidx[a] == eidx[j] && ent[k].wdata[a] == wdata[j] &&
            ent[k].we == we)
          found++;
      end
      checks++;
      if (found != 1) begin failures++; $display("FAIL mode %0d port %0d found %0d times", mode, j, found); end
    end
  endtask

  initial begin
    for (int t = 0; t < 400; t++) run(t % 4, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
