// tb_mvp_subcache: one sub-cache (id 0, 16 sets) driven directly. Random load and
// store entries with random Masked Bits are offered at the queue head; the
// crossbar grants are random subsets of the requests, so entries need several
// rounds. Each word a load delivers is checked against a reference memory kept by
// the testbench, which also follows stores; the address window is four times the
// capacity, so dirty blocks are written back and read again. Also checked: grants
// only reach requesting arrays, every Masked Bit is served once, and hits,
// misses and write-backs all occur.
module tb_mvp_subcache;
  import mvp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic q_valid, q_pop, l1_valid, l1_store, l1_ready, l1_done, ev_req, ev_ack;
  creq_t q_head;
  logic [BLK_W-1:0] l1_blk, ev_blk;
  logic [LINE_W-1:0] l1_line, ev_line, m_resp_line;
  logic m_req_valid, m_req_ready, m_resp_valid;
  mreq_t m_req;
  logic [SID_W-1:0] m_resp_id;
  logic [ARRAYS-1:0] arr_mask, arr_gnt;
  logic [ARRAYS-1:0][PID_W-1:0] arr_rinfo;
  xdat_t arr_out [ARRAYS];
  logic ev_hit, ev_miss, ev_conflict, ev_early_evict, idle;
  int n_reads, n_writes, checks = 0, failures = 0, c_hit = 0, c_miss = 0;
  logic [DATA_W-1:0] refm [logic [ADDR_W-1:0]];

  mvp_subcache #(.SUB_ID(0), .SETS(16)) dut (.*, .m_resp_valid(m_resp_valid && m_resp_id == 0));
  mem_model #(.LAT(30)) u_mem (.clk, .rst_n, .req_valid(m_req_valid), .req(m_req),
    .req_ready(m_req_ready), .resp_valid(m_resp_valid), .resp_id(m_resp_id),
    .resp_line(m_resp_line), .n_reads, .n_writes);

  always #5 clk = ~clk;
  always @(posedge clk) begin c_hit += ev_hit; c_miss += ev_miss; end

  function automatic logic [DATA_W-1:0] ref_rd(logic [ADDR_W-1:0] a);
    return refm.exists(a) ? refm[a] : {a ^ 32'hA5A5_5A5A, a};
  endfunction

  // random partial grants of the current requests
  always_comb arr_gnt = arr_mask & grant_rand;
  logic [ARRAYS-1:0] grant_rand;
  always @(negedge clk) grant_rand = ARRAYS'($urandom);

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    creq_t e;
    logic [ARRAYS-1:0] served;
    q_valid = 0; q_head = '0; l1_valid = 0; l1_store = 0; l1_blk = '0; ev_ack = 0; ev_line = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      logic [ADDR_W-1:0] a;
      e = '0;
      // block address with sub-cache id 0, 64 blocks of this sub-cache in the window
      e.blk  = BLK_W'(({$urandom} % 64) << SID_W);
      e.we   = 1'($urandom);
      e.mask = ARRAYS'($urandom) | 1;
      for (int k = 0; k < ARRAYS; k++) begin
        e.rinfo[k] = PID_W'(k);
        e.eidx[k]  = EL_W'(k);
        e.wdata[k] = {$urandom, $urandom};
      end
      @(negedge clk);
      q_head = e; q_valid = 1;
      #1;
      while (!q_pop) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 q_valid = 0;
      served = '0;
      while (served != e.mask) begin
        @(negedge clk);
        #2;
        for (int k = 0; k < ARRAYS; k++) if (arr_gnt[k]) begin
          a = {e.blk, AID_W'(k), 3'b000};
          checks++;
          if (!e.mask[k] || served[k] || arr_out[k].eidx != EL_W'(k)) begin failures++; $display("FAIL grant %0d", k); end
          served[k] = 1;
          if (e.we) refm[a] = e.wdata[k];
          else if (arr_out[k].data !== ref_rd(a)) begin
            failures++; $display("FAIL load %h got %h exp %h", a, arr_out[k].data, ref_rd(a));
          end
        end
      end
    end
    repeat (3) @(posedge clk);
    $display("events: hit=%0d miss=%0d writeback=%0d", c_hit, c_miss, n_writes);
    checks++;
    if (c_hit == 0 || c_miss == 0 || n_writes == 0 || !idle) begin failures++; $display("FAIL mechanism missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
