// tb_mvp_cache: end-to-end test of the MVP-cache with a 16 KB capacity (the
// organisation, ports and 20-cycle access latency stay at their defaults).
//  1. a unit-stride load group misses, then hits; the hit must return all eight
//     elements exactly ACCESS_LAT cycles after the group was accepted;
//  2. 600 random load/store groups (unit, strided and scattered addresses in a
//     64 KB window, so blocks are evicted and written back) are checked against a
//     reference memory kept by the testbench;
//  3. a scalar load from the L1 side takes a block into STATE1; the next vector
//     load of it must trigger an early eviction and return the L1's newer data.
// Hits, misses, merges, tag-array conflicts, write-backs and early evictions are
// counted, and each must have happened.
module tb_mvp_cache;
  import mvp_pkg::*;
  localparam int LAT = 20;
  logic clk = 0, rst_n = 0;
  logic grp_valid, grp_ready, grp_we;
  logic [PORTS-1:0] grp_en, resp_valid;
  logic [ADDR_W-1:0] grp_addr [PORTS];
  logic [DATA_W-1:0] grp_wdata [PORTS];
  logic [EL_W-1:0]   grp_eidx [PORTS];
  xdat_t resp [PORTS];
  logic l1_valid, l1_store, l1_ready, l1_done, ev_req, ev_ack;
  logic [ADDR_W-1:0] l1_addr;
  logic [LINE_W-1:0] l1_line, ev_line, m_resp_line;
  logic [BLK_W-1:0] ev_blk;
  logic m_req_valid, m_req_ready, m_resp_valid, idle, st_merge;
  mreq_t m_req;
  logic [SID_W-1:0] m_resp_id;
  logic [SUBC-1:0] st_hit, st_miss, st_conflict, st_early_evict;
  int n_reads, n_writes;
  int checks = 0, failures = 0;
  int c_hit = 0, c_miss = 0, c_conf = 0, c_ev = 0, c_merge = 0;
  logic [DATA_W-1:0] refm [logic [ADDR_W-1:0]];
  longint cyc = 0;

  mvp_cache #(.CACHE_BYTES(16384), .ACCESS_LAT(LAT), .QDEPTH(16)) dut (.*);
  mem_model #(.LAT(100)) u_mem (.clk, .rst_n, .req_valid(m_req_valid), .req(m_req),
    .req_ready(m_req_ready), .resp_valid(m_resp_valid), .resp_id(m_resp_id),
    .resp_line(m_resp_line), .n_reads, .n_writes);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    c_hit += $countones(st_hit); c_miss += $countones(st_miss);
    c_conf += $countones(st_conflict); c_ev += $countones(st_early_evict); c_merge += st_merge;
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] ref_rd(logic [ADDR_W-1:0] a);
    return refm.exists(a) ? refm[a] : {a ^ 32'hA5A5_5A5A, a};
  endfunction

  // issue one group and wait for all its responses; returns cycles to last one
  task automatic do_group(input logic we, input logic [ADDR_W-1:0] a [PORTS],
                          input logic [PORTS-1:0] en, output int lat);
    int got; logic [PORTS-1:0] seen; longint t0;
    @(negedge clk);
    grp_we = we; grp_en = en; grp_addr = a;
    for (int j = 0; j < PORTS; j++) begin grp_wdata[j] = {$urandom, $urandom}; grp_eidx[j] = EL_W'(j); end
    grp_valid = 1;
    while (!grp_ready) @(negedge clk);
    @(posedge clk); t0 = cyc;
    #1 grp_valid = 0;
    // resolve duplicates the way the cache serialises them: in port order
    got = 0; seen = '0;
    while (got < $countones(en)) begin
      @(posedge clk);
      for (int j = 0; j < PORTS; j++) if (resp_valid[j]) begin
        automatic int e = int'(resp[j].eidx);
        got++;
        checks++;
        if (e != j || !en[e] || seen[e] || resp[j].we != we) begin
          failures++; $display("FAIL response on port %0d for element %0d", j, e);
        end
        seen[e] = 1;
        if (!we && resp[j].data !== ref_rd(a[e])) begin
          failures++; $display("FAIL load %h got %h exp %h", a[e], resp[j].data, ref_rd(a[e]));
        end
        if (we) refm[a[e]] = grp_wdata[e];
      end
    end
    lat = int'(cyc - t0);
  endtask

  initial begin
    logic [ADDR_W-1:0] a [PORTS];
    logic [PORTS-1:0]  en;
    int lat, mode;
    logic [LINE_W-1:0] l1_copy;
    grp_valid = 0; grp_we = 0; grp_en = '0; l1_valid = 0; l1_store = 0; l1_addr = '0;
    ev_ack = 0; ev_line = '0;
    for (int j = 0; j < PORTS; j++) begin grp_addr[j] = '0; grp_wdata[j] = '0; grp_eidx[j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. miss then hit latency
    for (int j = 0; j < PORTS; j++) a[j] = 32'h1000 + 32'(8 * j);
    do_group(0, a, '1, lat);
    checks++; if (lat <= 100) begin failures++; $display("FAIL miss latency %0d", lat); end
    do_group(0, a, '1, lat);
    checks++; if (lat != LAT) begin failures++; $display("FAIL hit latency %0d, expected %0d", lat, LAT); end
    // 2. random traffic; stores write distinct lines inside a group
    for (int t = 0; t < 600; t++) begin
      automatic logic [ADDR_W-1:0] base = ({$urandom} % 65536) & ~32'h7;
      mode = $urandom % 4;
      for (int j = 0; j < PORTS; j++) begin
        case (mode)
          0: a[j] = base + 32'(8 * j);
          1: a[j] = base + 32'(8 * 3 * j);
          2: a[j] = base + 32'(8 * 17 * j);
          default: a[j] = ({$urandom} % 65536) & ~32'h7;
        endcase
        a[j] = a[j] % 65536;
      end
      en = (mode == 3) ? PORTS'($urandom) | 8'h1 : '1;
      // a store group never names one line twice (a vector has distinct elements)
      for (int j = 0; j < PORTS; j++) for (int k = 0; k < j; k++) if (en[k] && a[k] == a[j]) en[j] = 0;
      do_group(1'($urandom), a, en, lat);
    end
    // 3. coherency: scalar load takes block 0x1000 into STATE1
    @(negedge clk); l1_valid = 1; l1_store = 0; l1_addr = 32'h1000;
    while (!l1_ready) @(negedge clk);
    @(negedge clk); l1_valid = 0;
    while (!l1_done) @(negedge clk);
    l1_copy = l1_line;
    checks++;
    for (int w = 0; w < ARRAYS; w++)
      if (l1_copy[w*64 +: 64] !== ref_rd(32'h1000 + 32'(8 * w))) begin failures++; $display("FAIL L1 line word %0d", w); end
    // the L1 modifies word 0 of the block; a vector load must see the new value
    fork
      begin
        while (!ev_req) @(negedge clk);
        checks++;
        if (ev_blk != BLK_W'(32'h1000 >> 6)) begin failures++; $display("FAIL evict block"); end
        ev_line = l1_copy; ev_line[63:0] = 64'hC0FFEE; ev_ack = 1;
        refm[32'h1000] = 64'hC0FFEE;
        @(negedge clk); ev_ack = 0;
      end
      begin
        for (int j = 0; j < PORTS; j++) a[j] = 32'h1000 + 32'(8 * j);
        do_group(0, a, '1, lat);
      end
    join
    repeat (5) @(posedge clk);
    checks++; if (!idle) begin failures++; $display("FAIL not idle"); end
    $display("events: hit=%0d miss=%0d merge=%0d conflict=%0d writeback=%0d early_evict=%0d",
             c_hit, c_miss, c_merge, c_conf, n_writes, c_ev);
    checks += 6;
    if (c_hit == 0 || c_miss == 0 || c_merge == 0 || c_conf == 0 || n_writes == 0 || c_ev == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
